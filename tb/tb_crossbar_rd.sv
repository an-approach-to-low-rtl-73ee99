// tb_crossbar_rd: random bank words, twiddles and swap settings; after one
// cycle A must be the bank-1 word when swap was set (else bank 0), B the
// other one, W the twiddle, and out_valid the registered in_valid.
module tb_crossbar_rd;
  import spiffee_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, swap = 0, out_valid;
  cache_word_t bank0_q = '0, bank1_q = '0, a, b;
  tw_word_t    w_in = '0, w;
  int checks = 0, failures = 0;

  crossbar_rd dut (.*);
  always #5 clk = ~clk;

  initial begin
    cache_word_t ea, eb; tw_word_t ew; logic ev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom); swap = 1'($urandom);
      bank0_q = {20'($urandom), 20'($urandom)}; bank1_q = {20'($urandom), 20'($urandom)};
      w_in = {20'($urandom), 20'($urandom)};
      ea = swap ? bank1_q : bank0_q; eb = swap ? bank0_q : bank1_q; ew = w_in; ev = in_valid;
      @(negedge clk);
      checks++;
      if (a !== ea || b !== eb || w !== ew || out_valid !== ev) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
