// tb_cache_bank: random simultaneous reads and writes on the 16 x 40-bit
// dual-ported bank, checked against a reference array: read data appears one
// cycle after re, keeps its value while re is low, and a same-cycle read of
// the word being written returns the old word.
module tb_cache_bank;
  logic clk = 0, we = 0, re = 0;
  logic [3:0]  waddr = '0, raddr = '0;
  logic [39:0] wdata = '0, rdata;
  logic [39:0] model [16];
  logic [39:0] expq;
  int checks = 0, failures = 0;

  cache_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill every word first so nothing undefined is read
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = {8'(i), 32'($urandom)}; model[i] = wdata;
    end
    @(negedge clk); we = 0; re = 1; raddr = 0;
    expq = model[0];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== expq) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d got %h expected %h", i, rdata, expq);
      end
      we = 1'($urandom); waddr = 4'($urandom); wdata = {8'($urandom), 32'($urandom)};
      re = 1'($urandom); raddr = ($urandom_range(0, 3) == 0) ? waddr : 4'($urandom);
      if (re) expq = model[raddr];          // old value on a collision
      if (we) model[waddr] = wdata;
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
