// tb_sram_bank: writes all 128 words of the 36-bit array, then mixes random
// reads and writes and compares each read (one cycle after the request)
// with a reference array; rdata must hold its value on idle and write cycles.
module tb_sram_bank;
  logic clk = 0, en = 0, we = 0;
  logic [6:0]  addr = '0;
  logic [35:0] wdata = '0, rdata;
  logic [35:0] model [128];
  logic [35:0] expq;
  int checks = 0, failures = 0;

  sram_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 7'(i); wdata = {4'(i), 32'($urandom)}; model[i] = wdata;
    end
    @(negedge clk); en = 1; we = 0; addr = 0; expq = model[0];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== expq) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d got %h expected %h", i, rdata, expq);
      end
      en = 1'($urandom); we = 1'($urandom); addr = 7'($urandom); wdata = {4'($urandom), 32'($urandom)};
      if (en && !we) expq = model[addr];
      if (en && we)  model[addr] = wdata;
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
