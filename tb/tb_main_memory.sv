// tb_main_memory: fills all 1024 words of the eight-array main memory, then
// mixes random reads and writes across all arrays and compares each read
// (one cycle after the request) with a reference array.
module tb_main_memory;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [9:0]  addr = '0;
  logic [35:0] wdata = '0, rdata;
  logic [35:0] model [1024];
  logic [35:0] expq;
  int checks = 0, failures = 0;

  main_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'(i); wdata = {4'(i%16), 32'($urandom)}; model[i] = wdata;
    end
    @(negedge clk); en = 1; we = 0; addr = 0; expq = model[0];
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== expq) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d got %h expected %h", i, rdata, expq);
      end
      en = 1'($urandom); we = 1'($urandom); addr = 10'($urandom); wdata = {4'($urandom), 32'($urandom)};
      if (en && !we) expq = model[addr];
      if (en && we)  model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
