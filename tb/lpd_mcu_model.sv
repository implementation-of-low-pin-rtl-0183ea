// lpd_mcu_model: behavioural model of the target microcontroller's LPD debug
// unit, for simulation only (not synthesizable).
//
// It samples LPDI on the rising edge of the LPD clock, drives LPDO on the
// rising edge of its LPD clock output (a copy of the LPD clock delayed by
// CLKOUT_DELAY time units, as the chip's own clock path would), and answers
// the command set of lpd_pkg: CONNECT, SWITCH_H (answers in frame B, then
// uses frame H in both directions), DCU_ACT, ID_AUTH (compares the ID words
// with ID; a mismatch is answered with NAK and returns the unit to frame B),
// CPU_ACT, register writes of MA_RWA, MA_CTRL and MA_WD and register reads
// of MA_RD. Writing MA_CTRL with the read condition copies the addressed word
// of its memory into MA_RD; writing MA_WD after the write condition stores
// the word. Memory is MEM_WORDS 32-bit words addressed by address[..:2].
// An answer starts one LPD clock period after the command's last stop bit.
// Test hooks: `mute` makes it ignore commands, `bad_stop` sends answers with
// a 0 in the first stop bit, `link_reset` returns it to frame B.
module lpd_mcu_model
  import lpd_pkg::*;
#(
  parameter int unsigned ID_WORDS  = 2,
  parameter logic [ID_WORDS*16-1:0] ID = '0,
  parameter int unsigned MEM_WORDS = 256,
  parameter int unsigned CLKOUT_DELAY = 0   // lag of lpdo_clk behind lpd_clk
) (
  input  logic lpd_clk,
  input  logic lpdi,
  output logic lpdo,
  output logic lpdo_clk,
  input  logic mute,
  input  logic bad_stop,
  input  logic link_reset
);

  assign #(CLKOUT_DELAY) lpdo_clk = lpd_clk;

  logic        frame_h = 1'b0;
  logic [31:0] mem [MEM_WORDS];
  logic [31:0] ma_rwa = '0, ma_rd = '0, ma_wd = '0;
  word_t       ma_ctrl = '0;

  // event counters read by the testbench
  int unsigned frames_b_in = 0, frames_h_in = 0, frames_b_out = 0, frames_h_out = 0;
  int unsigned rx_stop_errors = 0, switches = 0, auth_ok = 0, auth_fail = 0;
  int unsigned mem_reads = 0, mem_writes = 0, cpu_acts = 0, dcu_acts = 0, connects = 0;

  initial begin
    lpdo = 1'b1;
    foreach (mem[i]) mem[i] = 32'h0;
  end

  always @(posedge link_reset) frame_h = 1'b0;

  task automatic get_frame(output word_t d);
    int unsigned n;
    d = '0;
    do @(posedge lpd_clk); while (lpdi !== 1'b0);
    n = frame_h ? 16 : 8;
    for (int i = 0; i < n; i++) begin
      @(posedge lpd_clk);
      d[i] = lpdi;
    end
    @(posedge lpd_clk); if (lpdi !== 1'b1) rx_stop_errors++;
    @(posedge lpd_clk); if (lpdi !== 1'b1) rx_stop_errors++;
    if (frame_h) frames_h_in++; else frames_b_in++;
  endtask

  task automatic put_frame(input word_t d);
    int unsigned n;
    n = frame_h ? 16 : 8;
    @(posedge lpdo_clk);                 // one idle period before answering
    @(posedge lpdo_clk); lpdo <= 1'b0;   // start bit
    for (int i = 0; i < n; i++) begin
      @(posedge lpdo_clk); lpdo <= d[i];
    end
    @(posedge lpdo_clk); lpdo <= !bad_stop;
    @(posedge lpdo_clk); lpdo <= 1'b1;
    if (frame_h) frames_h_out++; else frames_b_out++;
  endtask

  localparam int unsigned AW = $clog2(MEM_WORDS);

  initial begin
    word_t cmd, w;
    logic  ok;
    forever begin
      get_frame(cmd);
      if (!mute) begin
        case (cmd[7:4])
          OP_CONNECT:  begin connects++; put_frame(16'(RSP_ACK)); end
          OP_SWITCH_H: begin put_frame(16'(RSP_ACK)); frame_h = 1'b1; switches++; end
          OP_DCU_ACT:  begin dcu_acts++; put_frame(16'(RSP_ACK)); end
          OP_ID_AUTH: begin
            ok = 1'b1;
            for (int i = 0; i < ID_WORDS; i++) begin
              get_frame(w);
              if (w != ID[16*i +: 16]) ok = 1'b0;
            end
            if (ok) begin auth_ok++; put_frame(16'(RSP_ACK)); end
            else begin auth_fail++; put_frame(16'(RSP_NAK)); frame_h = 1'b0; end
          end
          OP_CPU_ACT:  begin cpu_acts++; put_frame(16'(RSP_ACK)); end
          OP_REG_WR: begin
            case (cmd[3:0])
              REG_MA_RWA: begin
                get_frame(w); ma_rwa[15:0] = w;
                get_frame(w); ma_rwa[31:16] = w;
              end
              REG_MA_CTRL: begin
                get_frame(w); ma_ctrl = w;
                if (ma_ctrl[15] && !ma_ctrl[0]) begin
                  ma_rd = mem[ma_rwa[AW+1:2]];
                  mem_reads++;
                end
              end
              REG_MA_WD: begin
                get_frame(w); ma_wd[15:0] = w;
                get_frame(w); ma_wd[31:16] = w;
                if (ma_ctrl[15] && ma_ctrl[0]) begin
                  mem[ma_rwa[AW+1:2]] = ma_wd;
                  mem_writes++;
                end
              end
              default: ;
            endcase
          end
          OP_REG_RD: begin
            if (cmd[3:0] == REG_MA_RD) begin
              put_frame(ma_rd[15:0]);
              put_frame(ma_rd[31:16]);
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
