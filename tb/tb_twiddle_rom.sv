// tb_twiddle_rom: reads every word of both twiddle ROMs and compares it with
// round(2^18 * cos(2*pi*k/1024)) and round(-2^18 * sin(2*pi*k/1024)),
// computed here, allowing 1 LSB for floating-point rounding; also checks the
// one-cycle read latency and that rdata holds while re is low.
module tb_twiddle_rom;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, re0 = 0, re1 = 0;
  logic [7:0]  addr = '0;
  logic [39:0] q0, q1;
  int checks = 0, failures = 0;

  twiddle_rom #(.INIT_FILE("rtl/twiddle_rom0.hex")) dut0 (.clk, .re(re0), .addr, .rdata(q0));
  twiddle_rom #(.INIT_FILE("rtl/twiddle_rom1.hex")) dut1 (.clk, .re(re1), .addr, .rdata(q1));
  always #5 clk = ~clk;

  task automatic cmp(input logic [39:0] q, input int k);
    int er, ei, gr, gi;
    er = int'($floor($cos(2.0*PI*real'(k)/1024.0) * 262144.0 + 0.5));
    ei = int'($floor(-$sin(2.0*PI*real'(k)/1024.0) * 262144.0 + 0.5));
    gr = int'(signed'(q[39:20]));
    gi = int'(signed'(q[19:0]));
    checks++;
    if (gr - er > 1 || er - gr > 1 || gi - ei > 1 || ei - gi > 1) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d got (%0d,%0d) expected (%0d,%0d)", k, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) begin
      @(negedge clk); re0 = 1; re1 = 1; addr = 8'(k);
      @(negedge clk); re0 = 0; re1 = 0; addr = 8'(k + 77);
      cmp(q0, k);
      cmp(q1, k + 256);
      @(negedge clk);           // held while re is low
      cmp(q0, k);
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
