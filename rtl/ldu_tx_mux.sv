// ldu_tx_mux: the multiplexer of the LPD interface controller that selects
// the 16-bit word the transmitter sends next.
//
// The main state machine names the word with `sel`: the command word it
// builds, the low or high half of the memory address (for MA_RWA), the
// memory access condition (for MA_CTRL), the low or high half of the write
// data (for MA_WD), or word `id_idx` of the ID code used for
// authentication. 32-bit values are sent low half first. The published design names
// a multiplexer inside the controller; which words it selects and their
// order are this design's own. Purely combinational.
module ldu_tx_mux
  import lpd_pkg::*;
#(
  parameter int unsigned ID_WORDS = 2   // 16-bit words of the ID code
) (
  input  tx_sel_e                     sel,
  input  word_t                       cmd,
  input  logic [31:0]                 addr,
  input  word_t                       ctrl,
  input  logic [31:0]                 wdata,
  input  logic [ID_WORDS*16-1:0]      id_code,
  input  logic [$clog2(ID_WORDS+1)-1:0] id_idx,
  output word_t                       word
);

  always_comb begin
    unique case (sel)
      SEL_CMD:     word = cmd;
      SEL_ADDR_LO: word = addr[15:0];
      SEL_ADDR_HI: word = addr[31:16];
      SEL_CTRL:    word = ctrl;
      SEL_WD_LO:   word = wdata[15:0];
      SEL_WD_HI:   word = wdata[31:16];
      SEL_ID:      word = (32'(id_idx) < ID_WORDS) ? id_code[16*id_idx +: 16] : '0;
      default:     word = '0;
    endcase
  end

endmodule
