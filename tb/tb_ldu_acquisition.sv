// tb_ldu_acquisition: data-acquisition workload. Brings the link up once,
// then reads a block of consecutive 32-bit words from the target model back
// to back, as a logger sampling ECU variables would, and reports the
// sustained rate in clocks per byte. Runs at CLK_DIV = 8 and a 64-bit ID to
// exercise parameters other than the defaults, with the target's returned
// clock lagging the LPD clock by 1.7 system clock periods, so that LPDO and
// its clock reach the controller at a phase unrelated to its own clock.
//
// Checks: every word read equals what the target holds; the link is brought
// up exactly once; each read on the live link takes between its wire time
// (8 frames H of 19 LPD clock periods) and that plus 5 periods of gaps per
// frame; the target never sees a bad stop bit.
module tb_ldu_acquisition;
  import lpd_pkg::*;
  localparam int unsigned DIV   = 8;
  localparam int unsigned IDW   = 4;
  localparam int unsigned WORDS = 64;
  localparam logic [IDW*16-1:0] ID = 64'h0123_4567_89AB_CDEF;

  logic        clk = 0, rst = 1, start = 0, write = 0;
  logic [31:0] address = 0, write_data = 0, read_data;
  logic [IDW*16-1:0] id_code = ID;
  logic        busy, done, error, linked, tx_status, rx_status;
  logic        lpdi, lpd_clk, lpdo, lpdo_clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  ldu_interface #(.CLK_DIV(DIV), .ID_WORDS(IDW), .RESP_TIMEOUT(4096)) dut (
    .clk, .rst, .start, .write, .address, .write_data, .id_code, .read_data,
    .busy, .done, .error, .linked, .tx_status, .rx_status,
    .lpdi, .lpd_clk, .lpdo, .lpdo_clk);

  lpd_mcu_model #(.ID_WORDS(IDW), .ID(ID), .MEM_WORDS(256), .CLKOUT_DELAY(17)) mcu (
    .lpd_clk, .lpdi, .lpdo, .lpdo_clk, .mute(1'b0), .bad_stop(1'b0), .link_reset(1'b0));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // target memory contents: a simple function of the index
  function automatic logic [31:0] pattern(input int unsigned i);
    return (32'(i) * 32'h9E37_79B9) ^ 32'h5555_AAAA;
  endfunction

  initial begin
    int unsigned t0, t_first, t_all, t_req;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 256; i++) mcu.mem[i] = pattern(i);   // after the model's own init
    rst = 0;
    repeat (5) @(negedge clk);
    t_first = 0;
    t0 = cyc;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      address = 32'(i) << 2; write = 0; start = 1;
      t_req = cyc;
      @(negedge clk);
      start = 0;
      wait (done);
      @(negedge clk);
      expect_eq("no error", error, 0);
      expect_eq($sformatf("word %0d", i), read_data, pattern(i));
      if (i == 0) begin
        t_first = cyc - t0;
        t0 = cyc;
      end else begin
        checks++;
        if (cyc - t_req < 8 * 19 * DIV || cyc - t_req > 8 * 24 * DIV) begin
          failures++;
          $display("read %0d took %0d clocks", i, cyc - t_req);
        end
      end
    end
    t_all = cyc - t0;
    expect_eq("one bring-up", mcu.connects, 1);
    expect_eq("ID accepted once", mcu.auth_ok, 1);
    expect_eq("reads done by target", mcu.mem_reads, WORDS);
    expect_eq("target saw no stop-bit errors", mcu.rx_stop_errors, 0);
    $display("bring-up and first read: %0d clocks", t_first);
    $display("%0d further reads: %0d clocks, %0d.%02d clocks per byte at CLK_DIV=%0d",
             WORDS - 1, t_all, t_all / (4 * (WORDS - 1)),
             (100 * t_all / (4 * (WORDS - 1))) % 100, DIV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
