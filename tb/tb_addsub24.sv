// tb_addsub24: checks the 24-bit CLA-ripple adder/subtractor against plain
// integer arithmetic for corner operands and random operands, both modes,
// including the carry out.
module tb_addsub24;
  logic [23:0] a, b, sum;
  logic        sub, cout;
  int checks = 0, failures = 0;

  addsub24 dut (.*);

  task automatic one(input logic [23:0] ta, input logic [23:0] tb_, input logic ts);
    logic [24:0] ref_v;
    a = ta; b = tb_; sub = ts;
    #1;
    ref_v = ts ? ({1'b0, ta} + {1'b0, ~tb_} + 25'd1) : ({1'b0, ta} + {1'b0, tb_});
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h sub=%0d got %h expected %h", ta, tb_, ts, {cout, sum}, ref_v);
    end
  endtask

  initial begin
    one(24'h000000, 24'h000000, 0);
    one(24'hFFFFFF, 24'h000001, 0);
    one(24'h7FFFFF, 24'h000001, 0);
    one(24'h800000, 24'h000001, 1);
    one(24'h000000, 24'h000001, 1);
    one(24'h0F0F0F, 24'h0F0F0F, 1);
    for (int i = 0; i < 5000; i++) one(24'($urandom), 24'($urandom), 1'($urandom));
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
