// tb_lpd_bit_counter: random enable/clear sequence against a reference count;
// also checks that the counter reaches 10 and 18 (the last bit indices of
// frames B and H) after that many enabled clocks.
module tb_lpd_bit_counter;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  logic [4:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;
  int unsigned ref_cnt_last[2] = '{10, 18};

  lpd_bit_counter #(.WIDTH(5)) dut (.clk, .rst, .clr, .en, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned exp);
    checks++;
    if (count !== 5'(exp)) begin
      failures++;
      $display("count %0d expected %0d", count, exp);
    end
  endtask

  initial begin
    @(negedge clk); rst = 0; ref_cnt = 0;
    @(negedge clk); check(0);
    foreach (ref_cnt_last[i]) begin
      clr = 1; @(negedge clk); clr = 0;
      en = 1; repeat (ref_cnt_last[i]) @(negedge clk); en = 0;
      check(ref_cnt_last[i]);
      @(negedge clk); check(ref_cnt_last[i]);   // holds without en
    end
    clr = 1; @(negedge clk); clr = 0; ref_cnt = 0;
    repeat (500) begin
      en  = $urandom_range(0, 1);
      clr = ($urandom_range(0, 15) == 0);
      @(negedge clk);
      if (clr) ref_cnt = 0; else if (en) ref_cnt = (ref_cnt + 1) % 32;
      check(ref_cnt);
    end
    // clear wins over enable
    en = 1; clr = 1; @(negedge clk); check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
