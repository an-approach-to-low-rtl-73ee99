// tb_crossbar_wr: random butterfly result pairs with address pairs that
// differ in one bit (as every butterfly's do); after one cycle each bank port
// must carry the row (low four address bits) and the data of the result whose
// address parity selects that bank, with we and set registered.
module tb_crossbar_wr;
  import spiffee_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_set = 0, we, set;
  logic [4:0] addr_x = '0, addr_y = '0;
  logic [3:0] row0, row1;
  cache_word_t x = '0, y = '0, data0, data1;
  int checks = 0, failures = 0;

  crossbar_wr dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [4:0] e0a, e1a; cache_word_t e0d, e1d; logic ev, es;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom); in_set = 1'($urandom);
      addr_x = 5'($urandom); addr_y = addr_x ^ (5'd1 << $urandom_range(0, 4));
      x = {20'($urandom), 20'($urandom)}; y = {20'($urandom), 20'($urandom)};
      if (^addr_x) begin e1a = addr_x; e1d = x; e0a = addr_y; e0d = y; end
      else         begin e0a = addr_x; e0d = x; e1a = addr_y; e1d = y; end
      ev = in_valid; es = in_set;
      @(negedge clk);
      checks++;
      if (we !== ev || set !== es || row0 !== e0a[3:0] || row1 !== e1a[3:0] ||
          data0 !== e0d || data1 !== e1d) begin
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
