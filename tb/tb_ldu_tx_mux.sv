// tb_ldu_tx_mux: random inputs, every selection, compared with the word
// each selection must give (32-bit values low half first, ID word by index).
module tb_ldu_tx_mux;
  import lpd_pkg::*;
  localparam int unsigned IDW = 3;

  tx_sel_e            sel;
  word_t              cmd, ctrl, word, exp;
  logic [31:0]        addr, wdata;
  logic [IDW*16-1:0]  id_code;
  logic [1:0]         id_idx;
  int checks = 0, failures = 0;

  ldu_tx_mux #(.ID_WORDS(IDW)) dut (.sel, .cmd, .addr, .ctrl, .wdata, .id_code, .id_idx, .word);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      cmd = word_t'($urandom); ctrl = word_t'($urandom);
      addr = $urandom; wdata = $urandom;
      id_code = {$urandom, $urandom};
      for (int s = 0; s <= 6; s++) begin
        for (int k = 0; k < IDW; k++) begin
          sel = tx_sel_e'(s);
          id_idx = 2'(k);
          case (s)
            0: exp = cmd;
            1: exp = addr & 32'hFFFF;
            2: exp = addr >> 16;
            3: exp = ctrl;
            4: exp = wdata & 32'hFFFF;
            5: exp = wdata >> 16;
            default: exp = word_t'(id_code >> (16 * k));
          endcase
          #1;
          checks++;
          if (word !== exp) begin
            failures++;
            $display("sel %0d idx %0d: got %h expected %h", s, k, word, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
