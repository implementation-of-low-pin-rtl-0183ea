// tb_ldu_main_fsm: runs the main state machine against a word-level stand-in
// for the transmitter, the receiver and the target. Every word the machine
// asks to send is logged with its frame format and compared with the
// expected sequence: link bring-up (connect and frame switch in frame B,
// DCU activation, ID words, CPU activation in frame H), then MA_RWA,
// MA_CTRL and MA_RD or MA_WD. Also checks that a second request reuses the
// link, that a NAK to the ID, a response with a stop-bit error and a silent
// target (timeout after RESP_TIMEOUT clocks) each end with error and drop
// the link, and that read data is assembled low half first.
module tb_ldu_main_fsm;
  import lpd_pkg::*;
  localparam int unsigned IDW = 2;
  localparam int unsigned TMO = 300;

  logic        clk = 0, rst = 1, start = 0, write = 0;
  logic [31:0] address = 0, write_data = 0, read_data;
  logic        busy, done, error, linked, tx_start, tx_done = 0, frame_h;
  tx_sel_e     tx_sel;
  word_t       tx_cmd, req_ctrl, rx_data = 0;
  logic [31:0] req_addr, req_wdata;
  logic [1:0]  id_idx;
  logic        rx_valid = 0, rx_error = 0;
  logic [IDW*16-1:0] id_code = 32'hC0DE_1D01;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  ldu_main_fsm #(.ID_WORDS(IDW), .RESP_TIMEOUT(TMO)) dut (
    .clk, .rst, .start, .write, .address, .write_data, .read_data, .busy,
    .done, .error, .linked, .ldu_tx_start(tx_start), .tx_sel, .tx_cmd,
    .req_addr, .req_wdata, .req_ctrl, .id_idx, .tx_done, .rx_valid, .rx_data,
    .rx_error, .frame_h);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ------------------------------------------------ word-level stand-in
  typedef enum {R_NORMAL, R_NAK_ID, R_BAD_STOP, R_SILENT} rmode_e;
  rmode_e      rmode = R_NORMAL;
  logic [31:0] mem_rd = 32'h0;       // value the target returns from MA_RD
  logic [16:0] sent[$];              // {frame_h, word}
  int unsigned id_left = 0, starts_in_flight = 0;

  function automatic word_t word_of(tx_sel_e s);
    case (s)
      SEL_CMD:     return tx_cmd;
      SEL_ADDR_LO: return address[15:0];
      SEL_ADDR_HI: return address[31:16];
      SEL_CTRL:    return write ? 16'h8005 : 16'h8004;
      SEL_WD_LO:   return write_data[15:0];
      SEL_WD_HI:   return write_data[31:16];
      default:     return id_code[16*id_idx +: 16];
    endcase
  endfunction

  task automatic respond(input word_t d, input logic bad);
    repeat (7) @(posedge clk);
    rx_data  <= d;
    rx_error <= bad;
    rx_valid <= 1'b1;
    @(posedge clk);
    rx_valid <= 1'b0;
  endtask

  always @(posedge clk) begin
    if (!rst && tx_start) begin
      automatic word_t w = word_of(tx_sel);
      automatic logic  h = frame_h;
      sent.push_back({h, w});
      starts_in_flight++;
      fork
        begin
          repeat (12) @(posedge clk);
          tx_done <= 1'b1;
          @(posedge clk);
          tx_done <= 1'b0;
          starts_in_flight--;
          if (rmode == R_SILENT) ;
          else if (id_left > 0) begin
            id_left--;
            if (id_left == 0) respond((w == id_code[31:16]) && rmode != R_NAK_ID
                                      ? 16'(RSP_ACK) : 16'(RSP_NAK), 1'b0);
          end else if (tx_sel == SEL_CMD) begin
            case (w[7:4])
              4'h1, 4'h2, 4'h3, 4'h5: respond(16'(RSP_ACK), rmode == R_BAD_STOP);
              4'h4: id_left = IDW;
              4'h7: begin
                respond(mem_rd[15:0], 1'b0);
                respond(mem_rd[31:16], 1'b0);
              end
              default: ;
            endcase
          end
        end
      join_none
    end
  end

  // ------------------------------------------------------------ requests
  int unsigned t_start, t_done;

  task automatic request(input logic wr, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    write = wr; address = a; write_data = d; start = 1;
    t_start = cyc;
    @(negedge clk);
    start = 0;
    expect_eq("busy after start", busy, 1);
    wait (done);
    t_done = cyc;
    @(negedge clk);
    expect_eq("busy after done", busy, 0);
  endtask

  task automatic expect_words(input string what, input logic [16:0] exp[$]);
    expect_eq({what, ": number of frames"}, sent.size(), exp.size());
    foreach (exp[i]) begin
      if (i < sent.size()) expect_eq($sformatf("%s: frame %0d", what, i), sent[i], exp[i]);
    end
    sent.delete();
  endtask

  function automatic logic [16:0] B(input logic [7:0] w);  return {1'b0, 8'h00, w}; endfunction
  function automatic logic [16:0] H(input logic [15:0] w); return {1'b1, w}; endfunction

  initial begin
    logic [16:0] bringup[$];
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    expect_eq("not linked after reset", linked, 0);
    bringup = '{B(8'h10), B(8'h20), H(16'h30), H(16'h40), H(16'h1D01), H(16'hC0DE), H(16'h50)};

    // first read: bring-up then MA_RWA, MA_CTRL, MA_RD
    mem_rd = 32'hDEAD_BEEF;
    request(0, 32'h0102_0304, 0);
    expect_words("first read", {bringup, H(16'h61), H(16'h0304), H(16'h0102),
                                H(16'h62), H(16'h8004), H(16'h73)});
    expect_eq("read data", read_data, 32'hDEAD_BEEF);
    expect_eq("error after read", error, 0);
    expect_eq("linked", linked, 1);

    // write on the live link: no bring-up
    request(1, 32'hFEDC_BA98, 32'h7654_3210);
    expect_words("write", {H(16'h61), H(16'hBA98), H(16'hFEDC), H(16'h62), H(16'h8005),
                           H(16'h64), H(16'h3210), H(16'h7654)});
    expect_eq("error after write", error, 0);

    // second read on the live link
    mem_rd = 32'h0000_FFFF;
    request(0, 32'h0000_0010, 0);
    expect_words("second read", {H(16'h61), H(16'h0010), H(16'h0000), H(16'h62),
                                 H(16'h8004), H(16'h73)});
    expect_eq("second read data", read_data, 32'h0000_FFFF);

    // ID refused: error, link dropped, frame B again
    rst = 1; @(negedge clk); rst = 0;
    rmode = R_NAK_ID;
    request(0, 32'h4, 0);
    expect_words("refused ID", bringup[0:5]);
    expect_eq("error on refused ID", error, 1);
    expect_eq("link dropped", linked, 0);
    expect_eq("frame B after error", frame_h, 0);

    // the next request starts the bring-up again, and the error clears
    rmode = R_NORMAL;
    mem_rd = 32'h1357_9BDF;
    request(0, 32'h8, 0);
    expect_words("retry", {bringup, H(16'h61), H(16'h0008), H(16'h0000),
                           H(16'h62), H(16'h8004), H(16'h73)});
    expect_eq("error cleared", error, 0);
    expect_eq("retry read data", read_data, 32'h1357_9BDF);

    // stop-bit error on an answer
    rst = 1; @(negedge clk); rst = 0;
    rmode = R_BAD_STOP;
    request(0, 32'h0, 0);
    expect_words("stop-bit error", bringup[0:0]);
    expect_eq("error on stop bit", error, 1);

    // silent target: timeout after TMO clocks of waiting
    rmode = R_SILENT;
    request(0, 32'h0, 0);
    expect_words("timeout", bringup[0:0]);
    expect_eq("error on timeout", error, 1);
    checks++;
    if (t_done - t_start < TMO || t_done - t_start > TMO + 40) begin
      failures++;
      $display("timeout after %0d clocks", t_done - t_start);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
