// ldu_rx: LPD receiver. Collects one frame B (11 bits) or frame H (19 bits)
// from LPDO, removes the start and stop bits and checks the stop bits.
//
// How it works: a four-state machine (IDLE, SHIFT, LOAD, STOP) drives a
// 19-bit serial-to-parallel shift register and the shared bit counter. The
// line is sampled only on clocks where `bit_en` is high (one sample per bit).
// In IDLE a sample of 0 is a start bit: it is shifted in and the machine
// moves to SHIFT, where the remaining bits are shifted in, newest at the top,
// while the counter counts. After bit 10 (frame B) or bit 18 (frame H) the
// machine goes to LOAD, which copies the 8 or 16 data bits to
// `ldu_rx_dataout`, and then to STOP, which sets `error_status` if either
// stop bit is 0. Because the newest bit enters at the top of the register,
// the two stop bits always end in bits 18:17, the data of frame H in 16:1
// and the data of frame B in 16:9. States and frame layout follow the
// published design; the `bit_en` sampling strobe and the `rx_valid` pulse are this
// design's own.
//
// Interface and timing: `rx_status` is high from the clock after the start
// bit until the clock after STOP. `ldu_rx_dataout` changes on the clock
// after the last bit is sampled (frame B data zero-extended to 16 bits);
// `error_status` and a one-clock `rx_valid` pulse follow one clock later.
// `frame_rx_h` must be stable while a frame is received. With `bit_en` tied
// high a frame is received in 11 or 19 clocks plus 2 for LOAD and STOP, and
// the next start bit is accepted on the clock after STOP. Reset is
// synchronous, active high.
module ldu_rx
  import lpd_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  bit_en,          // sample strobe, one per bit
  input  logic  lpdo,            // serial data from the target
  input  logic  frame_rx_h,      // 0: frame B, 1: frame H
  output word_t ldu_rx_dataout,  // received data
  output logic  rx_status,       // high while a frame is received
  output logic  error_status,    // stop bit of the last frame was not 1
  output logic  rx_valid         // one-clock pulse: a frame is complete
);

  typedef enum logic [1:0] {RX_IDLE, RX_SHIFT, RX_LOAD, RX_STOP} rx_state_e;

  rx_state_e        state, state_n;
  logic [LAST_H:0]  rx_reg;
  logic [CNT_W-1:0] count;
  logic             start_det, shift_en, rx_ld_en, count_en;

  always_comb begin
    state_n   = state;
    start_det = 1'b0;
    shift_en  = 1'b0;
    rx_ld_en  = 1'b0;
    unique case (state)
      RX_IDLE: begin
        start_det = bit_en && !lpdo;
        if (start_det) state_n = RX_SHIFT;
      end
      RX_SHIFT: begin
        shift_en = bit_en;
        // the bit now sampled has index count+1
        if (bit_en && count == last_bit(frame_rx_h) - CNT_W'(1))
          state_n = RX_LOAD;
      end
      RX_LOAD: begin
        rx_ld_en = 1'b1;
        state_n  = RX_STOP;
      end
      RX_STOP: state_n = RX_IDLE;
      default: state_n = RX_IDLE;
    endcase
  end
  assign count_en = shift_en;

  always_ff @(posedge clk) begin
    if (rst) state <= RX_IDLE;
    else     state <= state_n;
  end

  lpd_bit_counter #(.WIDTH(CNT_W)) u_counter (
    .clk  (clk),
    .rst  (rst),
    .clr  (state == RX_IDLE),
    .en   (count_en),
    .count(count)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_reg         <= '1;
      ldu_rx_dataout <= '0;
      error_status   <= 1'b0;
      rx_valid       <= 1'b0;
    end else begin
      rx_valid <= (state == RX_STOP);
      if (start_det || shift_en) rx_reg <= {lpdo, rx_reg[LAST_H:1]};
      if (rx_ld_en)
        ldu_rx_dataout <= frame_rx_h ? rx_reg[16:1] : {8'h00, rx_reg[16:9]};
      if (state == RX_STOP)
        error_status <= !(rx_reg[LAST_H] && rx_reg[LAST_H-1]);
    end
  end

  assign rx_status = (state != RX_IDLE);

endmodule
