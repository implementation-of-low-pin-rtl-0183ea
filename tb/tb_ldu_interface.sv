// tb_ldu_interface: end-to-end test of the LPD interface controller at its
// default parameters, connected over the four LPD pins to a behavioural
// model of the target's debug unit (lpd_mcu_model).
//
// It writes random words to random addresses and reads them back, comparing
// read data with a scoreboard and the model's memory with what was written.
// Along the way it makes every mechanism of the design happen and counts
// each: frames B and H in both directions, the switch from frame B to frame
// H, DCU activation, ID authentication (accepted and refused), CPU
// activation, memory reads and writes, requests on a live link without
// bring-up, a stop-bit error on an answer and an answer timeout. A mechanism
// that never happened counts as a failure. It also measures the clocks per
// read and per write on a live link and checks them against the frame
// count: every frame H is 19 LPD clock periods of CLK_DIV clocks.
module tb_ldu_interface;
  import lpd_pkg::*;
  localparam int unsigned DIV = 4;                 // default CLK_DIV
  localparam logic [31:0] ID  = 32'hA1B2_C3D4;

  logic        clk = 0, rst = 1, start = 0, write = 0;
  logic [31:0] address = 0, write_data = 0, read_data;
  logic [31:0] id_code = ID;
  logic        busy, done, error, linked, tx_status, rx_status;
  logic        lpdi, lpd_clk, lpdo, lpdo_clk;
  logic        mute = 0, bad_stop = 0, link_reset = 0;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  ldu_interface dut (
    .clk, .rst, .start, .write, .address, .write_data, .id_code, .read_data,
    .busy, .done, .error, .linked, .tx_status, .rx_status,
    .lpdi, .lpd_clk, .lpdo, .lpdo_clk);

  lpd_mcu_model #(.ID_WORDS(2), .ID(ID), .MEM_WORDS(256)) mcu (
    .lpd_clk, .lpdi, .lpdo, .lpdo_clk, .mute, .bad_stop, .link_reset);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  // status activity seen on the pins of the controller
  int unsigned tx_busy_clocks = 0, rx_busy_clocks = 0;
  always @(posedge clk) if (!rst) begin
    if (tx_status) tx_busy_clocks++;
    if (rx_status) rx_busy_clocks++;
  end

  int unsigned t_start, t_done, live_reads = 0, live_writes = 0;
  int unsigned errors_seen = 0, read_clk = 0, write_clk = 0;

  task automatic request(input logic wr, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    write = wr; address = a; write_data = d; start = 1;
    t_start = cyc;
    @(negedge clk);
    start = 0;
    wait (done);
    t_done = cyc;
    @(negedge clk);
    if (error) errors_seen++;
  endtask

  logic [31:0] sb [256];
  logic        sb_valid [256];

  initial begin
    logic [31:0] a, d;
    logic        was_linked;
    int unsigned idx;
    foreach (sb_valid[i]) sb_valid[i] = 1'b0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    expect_eq("lpdi idles high", lpdi, 1);

    // 1. wrong ID: refused, error, link stays down
    id_code = ID ^ 32'h0000_0100;
    request(0, 32'h0, 0);
    expect_eq("refused ID gives error", error, 1);
    expect_eq("refused ID: not linked", linked, 0);
    expect_eq("target counted refusal", mcu.auth_fail, 1);

    // 2. correct ID: bring-up and a write, then random traffic
    id_code = ID;
    for (int n = 0; n < 60; n++) begin
      idx = (n < 20) ? n : $urandom_range(0, 31);
      a   = {22'h0, 8'(idx), 2'b00};
      was_linked = linked;
      if (n < 20 || $urandom_range(0, 1) == 1) begin
        d = $urandom;
        request(1, a, d);
        expect_eq("write: no error", error, 0);
        sb[idx] = d; sb_valid[idx] = 1'b1;
        // done means the last stop bit is on the line; the target samples
        // it half an LPD clock period later
        repeat (DIV) @(negedge clk);
        expect_eq("target memory after write", mcu.mem[idx], d);
        if (was_linked) begin live_writes++; write_clk = t_done - t_start; end
      end else begin
        request(0, a, 0);
        expect_eq("read: no error", error, 0);
        if (sb_valid[idx]) expect_eq($sformatf("read data @%0h", a), read_data, sb[idx]);
        if (was_linked) begin live_reads++; read_clk = t_done - t_start; end
      end
      expect_eq("linked after request", linked, 1);
    end
    // read back everything written
    for (int i = 0; i < 20; i++) begin
      request(0, {22'h0, 8'(i), 2'b00}, 0);
      expect_eq($sformatf("read back %0d", i), read_data, sb[i]);
      live_reads++;
      read_clk = t_done - t_start;
    end

    // 3. stop-bit error on an answer
    bad_stop = 1;
    request(0, 32'h4, 0);
    expect_eq("stop-bit error gives error", error, 1);
    expect_eq("stop-bit error drops link", linked, 0);
    bad_stop = 0;
    repeat (30 * DIV) @(negedge clk);        // target finishes its answer
    link_reset = 1; @(negedge clk); link_reset = 0;

    // 4. silent target: answer timeout
    mute = 1;
    request(0, 32'h4, 0);
    expect_eq("timeout gives error", error, 1);
    checks++;
    if (t_done - t_start < 4096) begin
      failures++;
      $display("timeout after only %0d clocks", t_done - t_start);
    end
    mute = 0;
    link_reset = 1; @(negedge clk); link_reset = 0;
    repeat (4 * DIV * 20) @(negedge clk);    // let the target finish listening

    // 5. recovery: a fresh bring-up works again
    request(0, 32'h8, 0);
    expect_eq("recovered read: no error", error, 0);
    expect_eq("recovered read data", read_data, sb[2]);

    // timing of accesses on a live link: read = 6 frames out + 2 in,
    // write = 8 frames out; each frame H is 19 LPD clock periods
    $display("clocks per read %0d, per write %0d (CLK_DIV=%0d)", read_clk, write_clk, DIV);
    checks++;
    if (read_clk < 8 * 19 * DIV || read_clk > 8 * 24 * DIV) begin
      failures++; $display("read time out of range");
    end
    checks++;
    if (write_clk < 8 * 19 * DIV || write_clk > 8 * 22 * DIV) begin
      failures++; $display("write time out of range");
    end

    // every mechanism must have happened
    begin
      string names[15];
      int unsigned counts[15];
      names  = '{"frame B sent", "frame H sent", "frame B answered", "frame H answered",
                 "switch to frame H", "connect", "DCU activation", "ID accepted",
                 "ID refused", "CPU activation", "memory read", "memory write",
                 "request on live link", "error ended a request", "tx/rx status seen"};
      counts = '{mcu.frames_b_in, mcu.frames_h_in, mcu.frames_b_out, mcu.frames_h_out,
                 mcu.switches, mcu.connects, mcu.dcu_acts, mcu.auth_ok,
                 mcu.auth_fail, mcu.cpu_acts, mcu.mem_reads, mcu.mem_writes,
                 live_reads + live_writes, errors_seen,
                 (tx_busy_clocks > 0 && rx_busy_clocks > 0) ? 1 : 0};
      foreach (names[i]) begin
        $display("%-24s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("mechanism never happened: %s", names[i]);
        end
      end
    end
    expect_eq("target saw no stop-bit errors", mcu.rx_stop_errors, 0);
    expect_eq("errors: refused ID, stop bit, timeout", errors_seen, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
