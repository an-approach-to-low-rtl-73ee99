// tb_prog_oscillator: measures the oscillator period for several control
// settings (expected 2 * (ctrl + 1) time units) and checks that the output
// stays low while the oscillator is disabled.
module tb_prog_oscillator;
  logic       enable = 0;
  logic [3:0] ctrl = '0;
  logic       clk_out;
  int checks = 0, failures = 0;

  prog_oscillator dut (.*);

  initial begin
    realtime t0, t1;
    #20;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("FAIL output not low while disabled"); end
    for (int c = 0; c < 16; c += 3) begin
      ctrl = 4'(c);
      enable = 1;
      repeat (2) @(posedge clk_out);
      t0 = $realtime;
      @(posedge clk_out);
      t1 = $realtime;
      checks++;
      if (t1 - t0 != real'(2 * (c + 1))) begin
        failures++;
        $display("FAIL ctrl=%0d period %f expected %0d", c, t1 - t0, 2 * (c + 1));
      end
      enable = 0;
      #50;
      checks++;
      if (clk_out !== 1'b0) begin failures++; $display("FAIL output not low while disabled"); end
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
