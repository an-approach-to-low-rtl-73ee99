// tb_bfly_datapath: streams random butterflies (A, B of magnitude below 1,
// W a unit-magnitude twiddle factor) through the datapath, one per cycle with
// random gaps, and checks X = (A + BW)/2 and Y = (A - BW)/2 against a
// floating-point model to within 2 LSB of the 20-bit format, exactly five
// cycles after the inputs, together with out_valid.
module tb_bfly_datapath;
  import spiffee_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real L19 = 524288.0, L18 = 262144.0;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  cache_word_t a = '0, b = '0, x, y;
  tw_word_t    w = '0;
  int checks = 0, failures = 0;

  bfly_datapath dut (.*);
  always #5 clk = ~clk;

  real  exr [$], exi [$], eyr [$], eyi [$];
  logic ev [$];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real rnd_unit();
    return (real'($urandom_range(0, 2000)) - 1000.0) / 1000.0 * 0.7;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2005; i++) begin
      @(negedge clk);
      if (ev.size() == 5) begin
        real rxr, rxi, ryr, ryi; logic v;
        rxr = exr.pop_front(); rxi = exi.pop_front();
        ryr = eyr.pop_front(); ryi = eyi.pop_front();
        v = ev.pop_front();
        checks++;
        if (out_valid !== v) begin
          failures++;
          $display("FAIL valid at step %0d", i);
        end
        if (v) begin
          checks++;
          if (fabs(real'(x.re) / L19 - rxr) > 2.0 / L19 || fabs(real'(x.im) / L19 - rxi) > 2.0 / L19 ||
              fabs(real'(y.re) / L19 - ryr) > 2.0 / L19 || fabs(real'(y.im) / L19 - ryi) > 2.0 / L19) begin
            failures++;
            if (failures < 10)
              $display("FAIL X=(%f,%f) exp (%f,%f) Y=(%f,%f) exp (%f,%f)",
                       real'(x.re)/L19, real'(x.im)/L19, rxr, rxi, real'(y.re)/L19, real'(y.im)/L19, ryr, ryi);
          end
        end
      end
      begin
        real ar, ai, br, bi, wr, wi, bwr, bwi;
        int k;
        k = $urandom_range(0, 511);
        a.re = 20'(int'(rnd_unit() * L19)); a.im = 20'(int'(rnd_unit() * L19));
        b.re = 20'(int'(rnd_unit() * L19)); b.im = 20'(int'(rnd_unit() * L19));
        w.re = 20'(int'($floor($cos(2.0*PI*real'(k)/1024.0) * L18 + 0.5)));
        w.im = 20'(int'($floor(-$sin(2.0*PI*real'(k)/1024.0) * L18 + 0.5)));
        in_valid = ($urandom_range(0, 3) != 0);
        ar = real'(a.re)/L19; ai = real'(a.im)/L19; br = real'(b.re)/L19; bi = real'(b.im)/L19;
        wr = real'(w.re)/L18; wi = real'(w.im)/L18;
        bwr = br*wr - bi*wi; bwi = br*wi + bi*wr;
        exr.push_back((ar + bwr)/2.0); exi.push_back((ai + bwi)/2.0);
        eyr.push_back((ar - bwr)/2.0); eyi.push_back((ai - bwi)/2.0);
        ev.push_back(in_valid);
      end
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
