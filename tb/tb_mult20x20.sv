// tb_mult20x20: streams one operand pair per cycle into the 3-stage
// multiplier and checks each 24-bit product against
// round((a*b) / 2^16), computed here with 64-bit integers, exactly three
// cycles after the operands were applied; also checks the valid pipeline.
module tb_mult20x20;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [19:0] a = '0, b = '0;
  logic signed [23:0] p;
  int checks = 0, failures = 0;

  mult20x20 dut (.*);
  always #5 clk = ~clk;

  longint exp_q [$];
  logic   vexp_q [$];

  function automatic longint ref_p(logic signed [19:0] x, logic signed [19:0] y);
    longint full;
    full = longint'(x) * longint'(y);
    full = (full + 64'sd32768) >>> 16;
    return longint'(24'(full)) ;
  endfunction

  initial begin
    logic signed [19:0] ta, tb_;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3003; i++) begin
      @(negedge clk);
      // outputs of the pair applied three cycles earlier
      if (exp_q.size() == 3) begin
        longint e; logic ve;
        e  = exp_q.pop_front();
        ve = vexp_q.pop_front();
        checks++;
        if (out_valid !== ve || (ve && p !== 24'(e))) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d (v=%0d) expected %0d (v=%0d)", p, out_valid, 24'(e), ve);
        end
      end
      case (i)
        0: begin ta = 20'sh7FFFF; tb_ = 20'sh40000; end
        1: begin ta = 20'sh80000; tb_ = 20'sh40000; end
        2: begin ta = 20'sh80000; tb_ = 20'shC0000; end
        default: begin ta = 20'($urandom); tb_ = 20'($urandom); end
      endcase
      a = ta; b = tb_; in_valid = 1'($urandom);
      exp_q.push_back(ref_p(ta, tb_));
      vexp_q.push_back(in_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
