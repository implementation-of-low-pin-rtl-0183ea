// ldu_tx: LPD transmitter. Sends one frame B (8 data bits) or frame H
// (16 data bits) on LPDI, least significant bit first, framed by a start bit
// of 0 and two stop bits of 1, and drives the LPD clock that the target uses
// to sample LPDI.
//
// How it works: a three-state machine (IDLE, LOAD, SHIFT) controls a 19-bit
// parallel-to-serial shift register and the shared bit counter. In LOAD the
// word on `ldu_tx_data` is concatenated with the start and stop bits and
// loaded into the shift register without shifting. In SHIFT one bit leaves
// the register per LPD clock period while the counter counts in parallel;
// when the counter reaches 10 (frame B) or 18 (frame H) the last bit is on
// the line and the machine returns to IDLE. The state machine and the frame
// layout follow the published design; the clock divider is this design's own.
//
// LPD clock: a free-running clock of CLK_DIV system clocks per period (low
// for the first half, high for the second). LPDI changes together with the
// falling edge of `lpd_clk`, so a target that samples on the rising edge
// sees it half a period after it changed. Between frames LPDI idles at 1.
//
// Interface and timing: pulse `ldu_tx_start` for one clock in IDLE; the
// word on `ldu_tx_data` and `frame_tx_h` are read one clock later (LOAD) and
// must be held until then. `tx_status` is high from LOAD until the last stop
// bit has been put on the line, and `tx_done` pulses for one clock then. A
// frame takes 11 (B) or 19 (H) LPD clock periods plus up to one period of
// alignment to the free-running clock. Reset is synchronous, active high.
module ldu_tx
  import lpd_pkg::*;
#(
  parameter int unsigned CLK_DIV = 4   // system clocks per LPD clock period
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  ldu_tx_start,   // begin a frame
  input  word_t ldu_tx_data,    // 16-bit word; only [7:0] in frame B
  input  logic  frame_tx_h,     // 0: frame B, 1: frame H
  output logic  lpdi,           // serial data to the target
  output logic  lpd_clk,        // LPD clock to the target
  output logic  tx_status,      // high while a frame is being sent
  output logic  tx_done         // one-clock pulse at the end of a frame
);

  initial assert (CLK_DIV >= 2 && CLK_DIV % 2 == 0)
    else $error("ldu_tx: CLK_DIV must be even and at least 2");

  typedef enum logic [1:0] {TX_IDLE, TX_LOAD, TX_SHIFT} tx_state_e;

  localparam int unsigned DW = $clog2(CLK_DIV);

  tx_state_e          state, state_n;
  logic [DW-1:0]      div_cnt, div_nxt;
  logic               tick;            // bit boundary: falling edge of lpd_clk
  logic [LAST_H:0]    shreg;
  logic [CNT_W-1:0]   count;
  logic               ld_en, shift_en, count_en, h_q;

  // ------------------------------------------------- LPD clock divider
  always_comb begin
    tick    = (div_cnt == DW'(CLK_DIV - 1));
    div_nxt = tick ? '0 : div_cnt + DW'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt <= '0;
      lpd_clk <= 1'b0;
    end else begin
      div_cnt <= div_nxt;
      lpd_clk <= (32'(div_nxt) >= CLK_DIV / 2);
    end
  end

  // ------------------------------------------------------ state machine
  always_comb begin
    state_n  = state;
    ld_en    = 1'b0;
    shift_en = 1'b0;
    unique case (state)
      TX_IDLE:  if (ldu_tx_start) state_n = TX_LOAD;
      TX_LOAD: begin
        ld_en   = 1'b1;                 // TX DATA_LD_EN
        state_n = TX_SHIFT;
      end
      TX_SHIFT: begin
        shift_en = tick;                // SHIFT EN, one bit per LPD clock
        if (tick && count == last_bit(h_q)) state_n = TX_IDLE;
      end
      default: state_n = TX_IDLE;
    endcase
  end
  assign count_en = shift_en;           // counter runs beside the shifter

  always_ff @(posedge clk) begin
    if (rst) state <= TX_IDLE;
    else     state <= state_n;
  end

  lpd_bit_counter #(.WIDTH(CNT_W)) u_counter (
    .clk  (clk),
    .rst  (rst),
    .clr  (ld_en),
    .en   (count_en),
    .count(count)
  );

  // ------------------------------------- concatenation and shift register
  always_ff @(posedge clk) begin
    if (rst) begin
      shreg <= '1;
      lpdi  <= 1'b1;
      h_q   <= 1'b0;
    end else if (ld_en) begin
      h_q   <= frame_tx_h;
      // bit 0 start, data LSB first, last two bits stop; frame B leaves the
      // unused upper bits at 1
      shreg <= frame_tx_h ? {2'b11, ldu_tx_data, 1'b0}
                          : {10'h3FF, ldu_tx_data[7:0], 1'b0};
    end else if (shift_en) begin
      lpdi  <= shreg[0];
      shreg <= {1'b1, shreg[LAST_H:1]};
    end
  end

  assign tx_status = (state != TX_IDLE);
  assign tx_done   = (state == TX_SHIFT) && (state_n == TX_IDLE);

endmodule
