// tb_cache_array: drives the datapath side and the transfer side of the
// two-set cache at the same time, always in different sets (as the
// controller does), with random rows, addresses and data, and compares every
// read with a reference model of 2 sets x 32 words in which cache address c
// lives in bank parity(c), row c[3:0]. Reads return the old word on a
// same-cycle write.
module tb_cache_array;
  import spiffee_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dp_re = 0, dp_rd_set = 0, dp_we = 0, dp_wr_set = 0;
  logic [3:0] dp_row0 = '0, dp_row1 = '0, dp_wrow0 = '0, dp_wrow1 = '0;
  cache_word_t dp_q0, dp_q1, dp_wdata0 = '0, dp_wdata1 = '0, xf_q, xf_wdata = '0;
  logic xf_re = 0, xf_rd_set = 0, xf_we = 0, xf_wr_set = 0;
  logic [4:0] xf_raddr = '0, xf_waddr = '0;
  int checks = 0, failures = 0;

  cache_array dut (.*);
  always #5 clk = ~clk;

  cache_word_t model [2][32];

  function automatic logic [4:0] addr_of(logic par, logic [3:0] row);
    return {(^row) ^ par, row};
  endfunction

  task automatic chk(input cache_word_t got, input cache_word_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    cache_word_t e0, e1, ex;
    logic c_dp, c_xf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill both sets through the transfer port
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < 32; c++) begin
        @(negedge clk);
        xf_we = 1; xf_wr_set = 1'(s); xf_waddr = 5'(c);
        xf_wdata = {20'($urandom), 20'($urandom)}; model[s][c] = xf_wdata;
      end
    @(negedge clk); xf_we = 0;
    c_dp = 0; c_xf = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (c_dp) begin chk(dp_q0, e0, "dp_q0"); chk(dp_q1, e1, "dp_q1"); end
      if (c_xf) chk(xf_q, ex, "xf_q");
      dp_rd_set = 1'($urandom); dp_wr_set = dp_rd_set;
      xf_rd_set = ~dp_rd_set;   xf_wr_set = ~dp_rd_set;
      dp_re = 1'($urandom); dp_row0 = 4'($urandom); dp_row1 = 4'($urandom);
      dp_we = 1'($urandom); dp_wrow0 = 4'($urandom); dp_wrow1 = 4'($urandom);
      dp_wdata0 = {20'($urandom), 20'($urandom)}; dp_wdata1 = {20'($urandom), 20'($urandom)};
      xf_re = 1'($urandom); xf_raddr = 5'($urandom);
      xf_we = 1'($urandom); xf_waddr = 5'($urandom);
      xf_wdata = {20'($urandom), 20'($urandom)};
      c_dp = dp_re; c_xf = xf_re;
      e0 = model[dp_rd_set][addr_of(0, dp_row0)];
      e1 = model[dp_rd_set][addr_of(1, dp_row1)];
      ex = model[xf_rd_set][xf_raddr];
      if (dp_we) begin
        model[dp_wr_set][addr_of(0, dp_wrow0)] = dp_wdata0;
        model[dp_wr_set][addr_of(1, dp_wrow1)] = dp_wdata1;
      end
      if (xf_we) model[xf_wr_set][xf_waddr] = xf_wdata;
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
