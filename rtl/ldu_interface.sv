// ldu_interface: LPD (Low Pin Debug) interface controller. It reads and
// writes the memory of a microcontroller through the controller's on-chip
// debug unit over four pins, so that data can be acquired from a running
// electronic control unit without using the unit's own software or
// communication resources.
//
// Structure: the main state machine (ldu_main_fsm) takes one read or write
// request at a time and runs the link bring-up and register access sequence;
// a multiplexer (ldu_tx_mux) picks the 16-bit word to send; the transmitter
// (ldu_tx) frames it and shifts it out on LPDI together with the LPD clock;
// the receiver (ldu_rx) collects the target's answers from LPDO after a
// synchronizer (ldu_rx_sync) has brought LPDO and the target's LPD clock
// output into this clock domain. Both directions use frame B (8 data bits)
// until the switch to frame H (16 data bits) during link bring-up.
//
// Pins: lpdi and lpd_clk are outputs to the target (its LPDI and LPD CLK
// inputs), lpdo and lpdo_clk inputs from it (its LPDO and LPD CLKOUT
// outputs). Request side: see ldu_main_fsm. `id_code` is the target's ID
// code, sent word 0 first, each word in one frame H.
//
// Timing: LPD clock = clk / CLK_DIV. A frame H takes 19 LPD clock periods.
// The system clock must be at least four times the target's LPD clock
// output. Reset is synchronous and active high. The block structure (main
// state machine, transmitter, receiver, counter, multiplexer) follows the
// published design; the clock ratio and the protocol encodings are this design's
// own.
module ldu_interface
  import lpd_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 4,
  parameter int unsigned ID_WORDS     = 2,
  parameter int unsigned RESP_TIMEOUT = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   write,
  input  logic [31:0]            address,
  input  logic [31:0]            write_data,
  input  logic [ID_WORDS*16-1:0] id_code,
  output logic [31:0]            read_data,
  output logic                   busy,
  output logic                   done,
  output logic                   error,
  output logic                   linked,
  output logic                   tx_status,   // transmitter busy
  output logic                   rx_status,   // receiver busy
  // LPD pins
  output logic                   lpdi,
  output logic                   lpd_clk,
  input  logic                   lpdo,
  input  logic                   lpdo_clk
);

  localparam int unsigned IW = $clog2(ID_WORDS + 1);

  logic          tx_start, tx_done, frame_h;
  tx_sel_e       tx_sel;
  word_t         tx_cmd, tx_word, req_ctrl, rx_data;
  logic [31:0]   req_addr, req_wdata;
  logic [IW-1:0] id_idx;
  logic          rx_valid, rx_error, lpdo_s, bit_en;

  ldu_main_fsm #(
    .ID_WORDS    (ID_WORDS),
    .RESP_TIMEOUT(RESP_TIMEOUT)
  ) u_main (
    .clk         (clk),
    .rst         (rst),
    .start       (start),
    .write       (write),
    .address     (address),
    .write_data  (write_data),
    .read_data   (read_data),
    .busy        (busy),
    .done        (done),
    .error       (error),
    .linked      (linked),
    .ldu_tx_start(tx_start),
    .tx_sel      (tx_sel),
    .tx_cmd      (tx_cmd),
    .req_addr    (req_addr),
    .req_wdata   (req_wdata),
    .req_ctrl    (req_ctrl),
    .id_idx      (id_idx),
    .tx_done     (tx_done),
    .rx_valid    (rx_valid),
    .rx_data     (rx_data),
    .rx_error    (rx_error),
    .frame_h     (frame_h)
  );

  ldu_tx_mux #(.ID_WORDS(ID_WORDS)) u_mux (
    .sel    (tx_sel),
    .cmd    (tx_cmd),
    .addr   (req_addr),
    .ctrl   (req_ctrl),
    .wdata  (req_wdata),
    .id_code(id_code),
    .id_idx (id_idx),
    .word   (tx_word)
  );

  ldu_tx #(.CLK_DIV(CLK_DIV)) u_tx (
    .clk         (clk),
    .rst         (rst),
    .ldu_tx_start(tx_start),
    .ldu_tx_data (tx_word),
    .frame_tx_h  (frame_h),
    .lpdi        (lpdi),
    .lpd_clk     (lpd_clk),
    .tx_status   (tx_status),
    .tx_done     (tx_done)
  );

  ldu_rx_sync u_sync (
    .clk     (clk),
    .rst     (rst),
    .lpdo_clk(lpdo_clk),
    .lpdo    (lpdo),
    .lpdo_s  (lpdo_s),
    .bit_en  (bit_en)
  );

  ldu_rx u_rx (
    .clk           (clk),
    .rst           (rst),
    .bit_en        (bit_en),
    .lpdo          (lpdo_s),
    .frame_rx_h    (frame_h),
    .ldu_rx_dataout(rx_data),
    .rx_status     (rx_status),
    .error_status  (rx_error),
    .rx_valid      (rx_valid)
  );

endmodule
