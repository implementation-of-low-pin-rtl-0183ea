// tb_ldu_tx: sends random frame B and frame H words and decodes LPDI on the
// rising edges of the LPD clock, as the target would. Checks the start bit,
// the data (least significant bit first), both stop bits, the idle level,
// tx_status, the LPD clock period and the frame time from start to tx_done:
// (bits + up to one period of alignment) * CLK_DIV + 2 clocks at most.
module tb_ldu_tx;
  import lpd_pkg::*;
  localparam int unsigned DIV = 4;

  logic  clk = 0, rst = 1, start = 0, frame_h = 0;
  word_t data = '0;
  logic  lpdi, lpd_clk, tx_status, tx_done;
  int checks = 0, failures = 0;

  ldu_tx #(.CLK_DIV(DIV)) dut (
    .clk, .rst, .ldu_tx_start(start), .ldu_tx_data(data), .frame_tx_h(frame_h),
    .lpdi, .lpd_clk, .tx_status, .tx_done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // cycle counter and LPD clock period measurement
  int unsigned cyc = 0, last_rise = 0, periods_ok = 0, periods_bad = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge lpd_clk) begin
    if (last_rise != 0) begin
      if (cyc - last_rise == DIV) periods_ok++; else periods_bad++;
    end
    last_rise = cyc;
  end

  // done pulses
  int unsigned done_cyc;
  always @(posedge clk) if (!rst && tx_done) done_cyc = cyc;

  task automatic send(input logic h, input word_t d);
    int unsigned n, t0, guard;
    logic [18:0] bits;
    n = h ? 19 : 11;
    @(negedge clk);
    frame_h = h; data = d; start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    expect_eq("tx_status during frame", tx_status, 1);
    // find the start bit on a rising LPD clock edge
    guard = 0;
    do begin @(posedge lpd_clk); guard++; end while (lpdi !== 1'b0 && guard < 4);
    bits[0] = lpdi;
    for (int i = 1; i < n; i++) begin
      @(posedge lpd_clk);
      bits[i] = lpdi;
    end
    expect_eq("start bit", bits[0], 0);
    if (h) expect_eq("frame H data", bits[16:1], d);
    else   expect_eq("frame B data", bits[8:1], d[7:0]);
    expect_eq("stop bit 0", bits[n-2], 1);
    expect_eq("stop bit 1", bits[n-1], 1);
    @(negedge clk);
    wait (!tx_status);
    checks++;
    if (done_cyc - t0 > (n + 1) * DIV + 2 || done_cyc - t0 < (n - 1) * DIV) begin
      failures++;
      $display("frame time %0d clocks out of range", done_cyc - t0);
    end
    // line idles at 1
    repeat (2 * DIV) begin
      @(posedge lpd_clk);
      expect_eq("idle level", lpdi, 1);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    expect_eq("idle after reset", lpdi, 1);
    expect_eq("tx_status idle", tx_status, 0);
    send(0, 16'h00A5);
    send(1, 16'h8001);
    send(0, 16'hFF00);
    send(1, 16'h0000);
    send(1, 16'hFFFF);
    repeat (40) send(1'($urandom_range(0, 1)), word_t'($urandom));
    checks++;
    if (periods_bad != 0 || periods_ok < 100) begin
      failures++;
      $display("LPD clock periods: %0d ok, %0d wrong", periods_ok, periods_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
