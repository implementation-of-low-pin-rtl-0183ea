// tb_ldu_rx: drives frames B and H into the receiver, one bit per clock
// (bit_en tied high, as in a bit-rate clock) and with one sample strobe
// every third clock. Checks the received data, error_status for good and
// broken stop bits, rx_status, that a 1 on an idle line starts nothing, and
// the latency: rx_valid rises at the second clock edge after the edge that
// samples the last bit (one clock each in LOAD and STOP).
module tb_ldu_rx;
  import lpd_pkg::*;

  logic  clk = 0, rst = 1, bit_en = 0, lpdo = 1, frame_h = 0;
  word_t dout;
  logic  rx_status, error_status, rx_valid;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, valid_cyc = 0, valid_cnt = 0;

  ldu_rx dut (
    .clk, .rst, .bit_en, .lpdo, .frame_rx_h(frame_h),
    .ldu_rx_dataout(dout), .rx_status, .error_status, .rx_valid);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rx_valid && !rst) begin valid_cyc = cyc; valid_cnt++; end
  end

  initial begin
    repeat (50000) @(posedge clk);
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

  // Drive one frame. `stride` clocks per bit, bit_en high in the last one.
  task automatic frame(input logic h, input word_t d, input logic sp0,
                       input logic sp1, input int unsigned stride);
    logic [18:0] bits;
    int unsigned n, last_cyc, vcnt0;
    n = h ? 19 : 11;
    bits = h ? {sp1, sp0, d, 1'b0} : {8'hFF, sp1, sp0, d[7:0], 1'b0};
    vcnt0 = valid_cnt;
    frame_h = h;
    for (int i = 0; i < n; i++) begin
      for (int s = 0; s < stride; s++) begin
        @(negedge clk);
        lpdo   = bits[i];
        bit_en = (s == stride - 1);
      end
      if (i == 1) begin
        #1 expect_eq("rx_status while receiving", rx_status, 1);
      end
    end
    last_cyc = cyc;              // the next posedge samples the last bit
    @(negedge clk); bit_en = 0; lpdo = 1;
    repeat (4) @(negedge clk);
    expect_eq("one rx_valid per frame", valid_cnt - vcnt0, 1);
    expect_eq("rx_valid latency", valid_cyc - last_cyc, 3);
    expect_eq("data", dout, h ? d : {8'h00, d[7:0]});
    expect_eq("error_status", error_status, !(sp0 && sp1));
    expect_eq("rx_status idle", rx_status, 0);
  endtask

  initial begin
    word_t d;
    logic  h;
    repeat (3) @(negedge clk);
    rst = 0;
    // an idle line of ones, sampled every clock, starts nothing
    bit_en = 1; lpdo = 1;
    repeat (30) @(negedge clk);
    bit_en = 0;
    expect_eq("no frame on idle line", valid_cnt, 0);
    expect_eq("rx_status on idle line", rx_status, 0);
    frame(0, 16'h0029, 1, 1, 1);
    frame(1, 16'hB11B, 1, 1, 1);
    frame(0, 16'h00FF, 0, 1, 1);      // broken first stop bit
    frame(1, 16'h1234, 1, 0, 1);      // broken second stop bit
    frame(1, 16'h5A5A, 1, 1, 1);      // error clears on a good frame
    repeat (60) begin
      d = word_t'($urandom);
      h = 1'($urandom_range(0, 1));
      frame(h, d, 1'($urandom_range(0, 7) != 0), 1'($urandom_range(0, 7) != 0),
            $urandom_range(1, 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
