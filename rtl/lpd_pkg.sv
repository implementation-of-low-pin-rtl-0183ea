// lpd_pkg: constants and types shared by the Low Pin Debug (LPD) interface
// controller.
//
// Frame layout (from the communication format): every frame starts with one
// start bit (0), carries its data least significant bit first and ends with
// two stop bits (1). Frame B carries 8 data bits (11 bits on the wire),
// frame H carries 16 data bits (19 bits on the wire). Bit 0 of the frame is
// the start bit, bits 1..8 (B) or 1..16 (H) the data, and the last two bits
// SP0 and SP1.
//
// The command codes, the acknowledge codes and the numbers of the LDU
// registers MA_RWA, MA_CTRL, MA_RD and MA_WD are this design's own choice:
// the register names follow the read/write flow of the controller, their
// encodings do not come from any published table. A command is one frame
// whose low byte is {opcode[3:0], register[3:0]}; in frame H mode the upper
// byte is zero.
package lpd_pkg;

  // ---------------------------------------------------------------- frames
  localparam int unsigned FRAME_B_BITS = 11;  // ST + 8 data + SP0 + SP1
  localparam int unsigned FRAME_H_BITS = 19;  // ST + 16 data + SP0 + SP1
  localparam int unsigned LAST_B       = FRAME_B_BITS - 1;  // 10
  localparam int unsigned LAST_H       = FRAME_H_BITS - 1;  // 18
  localparam int unsigned CNT_W        = 5;   // holds 0..18

  typedef logic [15:0] word_t;

  // Index of the last bit of a frame: 10 for frame B, 18 for frame H.
  function automatic logic [CNT_W-1:0] last_bit(input logic frame_h);
    return frame_h ? CNT_W'(LAST_H) : CNT_W'(LAST_B);
  endfunction

  // ------------------------------------------------------ command opcodes
  typedef enum logic [3:0] {
    OP_CONNECT  = 4'h1,  // establish the LPD connection (frame B)
    OP_SWITCH_H = 4'h2,  // switch both directions from frame B to frame H
    OP_DCU_ACT  = 4'h3,  // activate the debug control unit
    OP_ID_AUTH  = 4'h4,  // followed by the ID code, one frame H per word
    OP_CPU_ACT  = 4'h5,  // activate CPU access
    OP_REG_WR   = 4'h6,  // write an LDU register; data frames follow
    OP_REG_RD   = 4'h7   // read an LDU register; the target answers
  } opcode_e;

  // ------------------------------------------------------- LDU registers
  typedef enum logic [3:0] {
    REG_NONE    = 4'h0,
    REG_MA_RWA  = 4'h1,  // memory access start address, 32 bit
    REG_MA_CTRL = 4'h2,  // memory access condition, 16 bit
    REG_MA_RD   = 4'h3,  // memory access read data, 32 bit
    REG_MA_WD   = 4'h4   // memory access write data, 32 bit
  } ldu_reg_e;

  // Status answers of the target to connection/activation commands.
  localparam logic [7:0] RSP_ACK = 8'hA5;
  localparam logic [7:0] RSP_NAK = 8'h5A;

  // MA_CTRL condition word: bit 0 = direction (1 write), bits 2:1 = access
  // size (2'b10 = 32 bit), bit 15 = request.
  localparam logic [15:0] CTRL_READ  = 16'h8004;
  localparam logic [15:0] CTRL_WRITE = 16'h8005;

  function automatic word_t cmd_word(input opcode_e op, input ldu_reg_e r);
    return {8'h00, op, r};
  endfunction

  // ------------------------------------------- transmit word selection
  typedef enum logic [2:0] {
    SEL_CMD     = 3'd0,
    SEL_ADDR_LO = 3'd1,
    SEL_ADDR_HI = 3'd2,
    SEL_CTRL    = 3'd3,
    SEL_WD_LO   = 3'd4,
    SEL_WD_HI   = 3'd5,
    SEL_ID      = 3'd6
  } tx_sel_e;

endpackage
