// tb_ulpacc: random sequences of external writes, accumulator stores,
// accumulate and clear commands, checked cycle by cycle against a reference
// model of the 16 x 24-bit memory and the accumulator (one-cycle read, old
// data on a same-cycle write, clear over add).
module tb_ulpacc;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_src = 0, acc_en = 0, acc_clr = 0;
  logic [3:0] wr_addr = '0, rd_addr = '0;
  logic [23:0] wr_data = '0, acc;
  int checks = 0, failures = 0;

  ulpacc dut (.*);
  always #5 clk = ~clk;

  logic [23:0] model [16];
  logic [23:0] macc, pend;
  logic        pend_v;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      wr_en = 1; wr_src = 0; wr_addr = 4'(i); wr_data = 24'($urandom); model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    macc = '0; pend_v = 0; pend = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (acc !== macc) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d acc %h expected %h", i, acc, macc);
      end
      wr_en = ($urandom_range(0, 3) == 0); wr_src = 1'($urandom); wr_addr = 4'($urandom);
      wr_data = 24'($urandom);
      acc_en = 1'($urandom); rd_addr = 4'($urandom);
      acc_clr = ($urandom_range(0, 15) == 0);
      // model of the clock edge that follows
      begin
        logic [23:0] rd_now, nacc;
        rd_now = model[rd_addr];
        nacc = acc_clr ? 24'd0 : (pend_v ? macc + pend : macc);
        if (wr_en) model[wr_addr] = wr_src ? macc : wr_data;
        pend_v = acc_en; pend = rd_now;
        macc = nacc;
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
