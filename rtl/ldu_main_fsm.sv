// ldu_main_fsm: the main state machine of the LPD interface controller. It
// turns one memory read or write request into the sequence of LPD frames
// that the target's debug unit understands.
//
// Sequence: the first request after reset (or after an error) first brings
// the link up, in the order of the controller's flow chart:
//   1. connection    CONNECT command in frame B, target answers ACK
//   2. frame switch  SWITCH_H command in frame B, ACK in frame B, from then
//                    on both directions use frame H
//   3. DCU activate  DCU_ACT command, ACK
//   4. ID check      ID_AUTH command, ID_WORDS frames of ID code, ACK
//   5. CPU activate  CPU_ACT command, ACK
// Every request, the first included, then runs the access itself:
//   read:  write start address to MA_RWA (two frames, low half first),
//          write the read condition to MA_CTRL, read MA_RD (the target
//          answers with two frames, low half first)
//   write: write MA_RWA, write the write condition to MA_CTRL, write the
//          data to MA_WD (two frames, low half first)
// A response that is not ACK, a received frame with a bad stop bit, or no
// response within RESP_TIMEOUT clocks ends the request with `error` set; the
// link is then considered down and the next request starts again at step 1
// in frame B. The order of the steps and the register names come from the
// published design; the command and answer encodings (see lpd_pkg), the 32-bit
// width of address and data, the ID length, the timeout and the recovery
// are this design's own.
//
// Each send state pulses `ldu_tx_start` once and waits for `tx_done`; the
// word to send is chosen by `tx_sel` through ldu_tx_mux. Each answer state
// waits for `rx_valid`.
//
// Interface and timing: pulse `start` for one clock while `busy` is low,
// with `write`, `address` and `write_data` valid in that clock (they are
// registered). `busy` stays high until the request ends; `done` pulses for
// one clock at the end, with `read_data` updated for a read and `error`
// showing the outcome (it holds until the next `start`). `linked` is high
// while the link is up. Reset is synchronous, active high, and drops the
// link.
module ldu_main_fsm
  import lpd_pkg::*;
#(
  parameter int unsigned ID_WORDS     = 2,     // 16-bit words of ID code
  parameter int unsigned RESP_TIMEOUT = 4096   // clocks to wait for an answer
) (
  input  logic        clk,
  input  logic        rst,
  // request side
  input  logic        start,
  input  logic        write,        // 1: write, 0: read
  input  logic [31:0] address,
  input  logic [31:0] write_data,
  output logic [31:0] read_data,
  output logic        busy,
  output logic        done,
  output logic        error,
  output logic        linked,
  // transmitter and its multiplexer
  output logic        ldu_tx_start,
  output tx_sel_e     tx_sel,
  output word_t       tx_cmd,
  output logic [31:0] req_addr,
  output logic [31:0] req_wdata,
  output word_t       req_ctrl,
  output logic [$clog2(ID_WORDS+1)-1:0] id_idx,
  input  logic        tx_done,
  // receiver
  input  logic        rx_valid,
  input  word_t       rx_data,
  input  logic        rx_error,
  // frame format for both directions
  output logic        frame_h
);

  initial assert (ID_WORDS >= 1) else $error("ldu_main_fsm: ID_WORDS must be at least 1");

  typedef enum logic [4:0] {
    M_IDLE,
    M_CONN_CMD, M_CONN_RSP,
    M_SWH_CMD,  M_SWH_RSP,
    M_DCU_CMD,  M_DCU_RSP,
    M_ID_CMD,   M_ID_DATA,  M_ID_RSP,
    M_CPU_CMD,  M_CPU_RSP,
    M_RWA_CMD,  M_RWA_LO,   M_RWA_HI,
    M_CTRL_CMD, M_CTRL_DATA,
    M_RD_CMD,   M_RD_LO,    M_RD_HI,
    M_WD_CMD,   M_WD_LO,    M_WD_HI,
    M_DONE,     M_ERROR
  } main_state_e;

  localparam int unsigned TW = $clog2(RESP_TIMEOUT + 1);
  localparam int unsigned IW = $clog2(ID_WORDS + 1);

  main_state_e state, send_next;
  logic        is_send, is_rsp, issued, req_write;
  logic [TW-1:0] timer;

  // -------------------------------- what each send state puts on the line
  always_comb begin
    is_send   = 1'b1;
    tx_sel    = SEL_CMD;
    tx_cmd    = '0;
    send_next = M_IDLE;
    unique case (state)
      M_CONN_CMD:  begin tx_cmd = cmd_word(OP_CONNECT,  REG_NONE);    send_next = M_CONN_RSP;  end
      M_SWH_CMD:   begin tx_cmd = cmd_word(OP_SWITCH_H, REG_NONE);    send_next = M_SWH_RSP;   end
      M_DCU_CMD:   begin tx_cmd = cmd_word(OP_DCU_ACT,  REG_NONE);    send_next = M_DCU_RSP;   end
      M_ID_CMD:    begin tx_cmd = cmd_word(OP_ID_AUTH,  REG_NONE);    send_next = M_ID_DATA;   end
      M_ID_DATA:   begin
        tx_sel    = SEL_ID;
        send_next = (32'(id_idx) == ID_WORDS - 1) ? M_ID_RSP : M_ID_DATA;
      end
      M_CPU_CMD:   begin tx_cmd = cmd_word(OP_CPU_ACT,  REG_NONE);    send_next = M_CPU_RSP;   end
      M_RWA_CMD:   begin tx_cmd = cmd_word(OP_REG_WR,   REG_MA_RWA);  send_next = M_RWA_LO;    end
      M_RWA_LO:    begin tx_sel = SEL_ADDR_LO;                        send_next = M_RWA_HI;    end
      M_RWA_HI:    begin tx_sel = SEL_ADDR_HI;                        send_next = M_CTRL_CMD;  end
      M_CTRL_CMD:  begin tx_cmd = cmd_word(OP_REG_WR,   REG_MA_CTRL); send_next = M_CTRL_DATA; end
      M_CTRL_DATA: begin
        tx_sel    = SEL_CTRL;
        send_next = req_write ? M_WD_CMD : M_RD_CMD;
      end
      M_RD_CMD:    begin tx_cmd = cmd_word(OP_REG_RD,   REG_MA_RD);   send_next = M_RD_LO;     end
      M_WD_CMD:    begin tx_cmd = cmd_word(OP_REG_WR,   REG_MA_WD);   send_next = M_WD_LO;     end
      M_WD_LO:     begin tx_sel = SEL_WD_LO;                          send_next = M_WD_HI;     end
      M_WD_HI:     begin tx_sel = SEL_WD_HI;                          send_next = M_DONE;      end
      default:     is_send = 1'b0;
    endcase
  end

  always_comb begin
    unique case (state)
      M_CONN_RSP, M_SWH_RSP, M_DCU_RSP, M_ID_RSP, M_CPU_RSP, M_RD_LO, M_RD_HI:
               is_rsp = 1'b1;
      default: is_rsp = 1'b0;
    endcase
  end

  assign ldu_tx_start = is_send && !issued;
  assign req_ctrl     = req_write ? CTRL_WRITE : CTRL_READ;
  assign busy         = (state != M_IDLE);

  // --------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= M_IDLE;
      issued    <= 1'b0;
      id_idx    <= '0;
      timer     <= '0;
      req_write <= 1'b0;
      req_addr  <= '0;
      req_wdata <= '0;
      read_data <= '0;
      done      <= 1'b0;
      error     <= 1'b0;
      linked    <= 1'b0;
      frame_h   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (is_send) begin
        if (!issued) issued <= 1'b1;
        if (tx_done) begin
          issued <= 1'b0;
          state  <= send_next;
          if (state == M_ID_DATA) id_idx <= id_idx + IW'(1);
        end
      end

      if (is_rsp) begin
        if (rx_valid) begin
          timer <= '0;
          if (rx_error) begin
            state <= M_ERROR;
          end else begin
            unique case (state)
              M_RD_LO: begin read_data[15:0]  <= rx_data; state <= M_RD_HI; end
              M_RD_HI: begin read_data[31:16] <= rx_data; state <= M_DONE;  end
              default: begin
                if (rx_data[7:0] != RSP_ACK) state <= M_ERROR;
                else unique case (state)
                  M_CONN_RSP: state <= M_SWH_CMD;
                  M_SWH_RSP:  begin state <= M_DCU_CMD; frame_h <= 1'b1; end
                  M_DCU_RSP:  begin state <= M_ID_CMD;  id_idx  <= '0;   end
                  M_ID_RSP:   state <= M_CPU_CMD;
                  M_CPU_RSP:  begin state <= M_RWA_CMD; linked  <= 1'b1; end
                  default:    state <= M_ERROR;
                endcase
              end
            endcase
          end
        end else if (32'(timer) == RESP_TIMEOUT - 1) begin
          timer <= '0;
          state <= M_ERROR;
        end else begin
          timer <= timer + TW'(1);
        end
      end

      unique case (state)
        M_IDLE: if (start) begin
          req_write <= write;
          req_addr  <= address;
          req_wdata <= write_data;
          error     <= 1'b0;
          state     <= linked ? M_RWA_CMD : M_CONN_CMD;
        end
        M_DONE: begin
          done  <= 1'b1;
          state <= M_IDLE;
        end
        M_ERROR: begin
          done    <= 1'b1;
          error   <= 1'b1;
          linked  <= 1'b0;
          frame_h <= 1'b0;
          state   <= M_IDLE;
        end
        default: ;
      endcase
    end
  end

  // a new request is only taken while idle
  property p_start_only_idle;
    @(posedge clk) disable iff (rst) start |-> !busy;
  endproperty
  a_start_only_idle: assert property (p_start_only_idle)
    else $error("ldu_main_fsm: start while busy is ignored");

endmodule
