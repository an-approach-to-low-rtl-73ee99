// tb_spiffee: end-to-end test of the 1024-point FFT processor at its full
// size.
//
// Run 1 (external clock): loads the test signal
//   x[n] = 0.25 * ( cos(2*pi*23n/N) + sin(2*pi*83n/N) + cos(2*pi*211n/N)
//                   - j*sin(2*pi*211n/N) )
// quantised to Q1.17, runs one transform and compares every output bin with
// a direct DFT of the same quantised samples, divided by 1024, computed here
// in floating point. It also checks the cycle count against the expected
// schedule, the number of read-after-write bubbles (one per 80-butterfly
// group), that the epoch boundary made the datapath wait for main memory, and
// that the five tones land in their bins.
// Run 2 (on-chip oscillator selected): an impulse of 0.5 at n = 0 must give
// 0.5/1024 in every bin.
module tb_spiffee;
  import spiffee_pkg::*;

  localparam real PI  = 3.14159265358979323846;
  localparam real LSB = 1.0 / 131072.0;   // Q1.17
  localparam real TOL = 6.0 * LSB;

  logic       ext_clk = 1'b0;
  logic       rst_n   = 1'b0;
  logic       osc_sel = 1'b0;
  logic [3:0] osc_ctrl = 4'd6;
  logic       clk_mon, start = 1'b0, busy, done;
  logic       host_en = 1'b0, host_we = 1'b0;
  logic [9:0] host_addr = '0;
  mem_word_t  host_wdata = '0, host_rdata;

  logic        ua_clk = 0, ua_rst_n = 0, ua_wr_en = 0, ua_wr_src = 0, ua_acc_en = 0, ua_acc_clr = 0;
  logic [3:0]  ua_wr_addr = '0, ua_rd_addr = '0;
  logic [23:0] ua_wr_data = '0, ua_acc;
  int checks = 0, failures = 0;
  int cycles, n_stall, n_wait, n_groups, n_done;
  int n_runs_ext = 0, n_runs_osc = 0;

  spiffee dut (.*);

  always #5 ext_clk = ~ext_clk;
  always #4 ua_clk = ~ua_clk;

  real xr [N], xi [N];
  real cs [N], sn [N];

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic signed [17:0] q17(real v);
    return 18'(int'($floor(v * 131072.0 + 0.5)));
  endfunction

  task automatic load_input();
    for (int n = 0; n < int'(N); n++) begin
      @(posedge clk_mon);
      host_en    <= 1'b1;
      host_we    <= 1'b1;
      host_addr  <= 10'(n);
      host_wdata <= '{re: q17(xr[n]), im: q17(xi[n])};
      xr[n] = real'(q17(xr[n])) * LSB;     // the exact quantised value
      xi[n] = real'(q17(xi[n])) * LSB;
    end
    @(posedge clk_mon);
    host_en <= 1'b0;
    host_we <= 1'b0;
  endtask

  task automatic run_fft();
    cycles = 0; n_stall = 0; n_wait = 0; n_groups = 0; n_done = 0;
    @(posedge clk_mon);
    start <= 1'b1;
    @(posedge clk_mon);
    start <= 1'b0;
    @(negedge clk_mon);
    while (busy) begin
      cycles++;
      if (dut.ev_stall)     n_stall++;
      if (dut.ev_wait_load) n_wait++;
      if (dut.ev_group_end) n_groups++;
      @(negedge clk_mon);
      if (done)             n_done++;
    end
  endtask

  task automatic read_and_compare(input string tag, output real max_err);
    max_err = 0.0;
    for (int k = 0; k < int'(N); k++) begin
      real er, ei, gr, gi;
      @(posedge clk_mon);
      host_en   <= 1'b1;
      host_we   <= 1'b0;
      host_addr <= 10'(k);
      @(posedge clk_mon);
      host_en   <= 1'b0;
      @(negedge clk_mon);
      er = 0.0; ei = 0.0;
      for (int n = 0; n < int'(N); n++) begin
        int m;
        m  = (k * n) % int'(N);
        // (xr + j xi)(cos - j sin)
        er += xr[n] * cs[m] + xi[n] * sn[m];
        ei += xi[n] * cs[m] - xr[n] * sn[m];
      end
      er = er / real'(N);
      ei = ei / real'(N);
      gr = real'(host_rdata.re) * LSB;
      gi = real'(host_rdata.im) * LSB;
      if (fabs(gr - er) > max_err) max_err = fabs(gr - er);
      if (fabs(gi - ei) > max_err) max_err = fabs(gi - ei);
      check(fabs(gr - er) <= TOL && fabs(gi - ei) <= TOL,
            $sformatf("%s bin %0d: got (%f,%f) expected (%f,%f)", tag, k, gr, gi, er, ei));
      if (tag == "tones" && (k == 23 || k == 1001 || k == 83 || k == 941 || k == 813))
        check(fabs(gr) + fabs(gi) > 0.1, $sformatf("tone missing in bin %0d", k));
    end
  endtask

  initial begin
    real max_err;
    for (int m = 0; m < int'(N); m++) begin
      cs[m] = $cos(2.0 * PI * real'(m) / real'(N));
      sn[m] = $sin(2.0 * PI * real'(m) / real'(N));
    end
    repeat (3) @(posedge ext_clk);
    rst_n = 1'b1;

    // ---------------- run 1: tones, external clock
    for (int n = 0; n < int'(N); n++) begin
      xr[n] = 0.25 * (cs[(23*n) % N] + sn[(83*n) % N] + cs[(211*n) % N]);
      xi[n] = -0.25 * sn[(211*n) % N];
    end
    load_input();
    run_fft();
    n_runs_ext++;
    $display("run 1: %0d cycles, %0d stalls, %0d wait-for-load cycles, %0d groups",
             cycles, n_stall, n_wait, n_groups);
    // 64 groups x (80 butterflies + 1 bubble), plus the first load (33),
    // the epoch-boundary flush and reload (2 x 33 + 9 drain) and the final
    // drain and flush, plus a few control cycles
    check(cycles >= 5250 && cycles <= 5350, $sformatf("cycle count %0d", cycles));
    check(n_stall == 64, $sformatf("stall count %0d, expected 1 per 80 butterflies", n_stall));
    check(n_groups == 64, $sformatf("group count %0d", n_groups));
    check(n_wait > 0, "the epoch boundary never made the datapath wait");
    check(n_done == 1, "done did not pulse once");
    read_and_compare("tones", max_err);
    $display("run 1: largest error %f LSB", max_err / LSB);

    // ---------------- run 2: impulse, on-chip oscillator
    osc_sel = 1'b1;
    repeat (4) @(posedge clk_mon);
    for (int n = 0; n < int'(N); n++) begin
      xr[n] = (n == 0) ? 0.5 : 0.0;
      xi[n] = 0.0;
    end
    load_input();
    run_fft();
    n_runs_osc++;
    check(n_stall == 64, $sformatf("run 2 stall count %0d", n_stall));
    read_and_compare("impulse", max_err);
    $display("run 2: %0d cycles, largest error %f LSB", cycles, max_err / LSB);

    // ---------------- accumulator test chip: sum 16 words, store, re-add
    begin
      logic [23:0] sum;
      sum = '0;
      ua_rst_n = 1'b1;
      for (int i = 0; i < 16; i++) begin
        @(negedge ua_clk);
        ua_wr_en = 1; ua_wr_src = 0; ua_wr_addr = 4'(i); ua_wr_data = 24'(1000 * i + 7);
        sum += 24'(1000 * i + 7);
      end
      @(negedge ua_clk); ua_wr_en = 0; ua_acc_clr = 1;
      @(negedge ua_clk); ua_acc_clr = 0;
      for (int i = 0; i < 16; i++) begin
        ua_acc_en = 1; ua_rd_addr = 4'(i);
        @(negedge ua_clk);
      end
      ua_acc_en = 0;
      @(negedge ua_clk);
      check(ua_acc == sum, $sformatf("accumulator %0d expected %0d", ua_acc, sum));
      ua_wr_en = 1; ua_wr_src = 1; ua_wr_addr = 4'd3;       // store the sum
      @(negedge ua_clk); ua_wr_en = 0; ua_acc_en = 1; ua_rd_addr = 4'd3;
      @(negedge ua_clk); ua_acc_en = 0;
      @(negedge ua_clk);
      check(ua_acc == 24'(2 * sum), "accumulator store and re-add");
    end

    // every mechanism must have happened
    check(n_runs_ext == 1 && n_runs_osc == 1, "clock mode switch not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
