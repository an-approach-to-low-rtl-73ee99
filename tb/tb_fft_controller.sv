// tb_fft_controller: runs the controller through one whole 1024-point
// transform with the memories replaced by fixed data and checks its
// schedule against an independent model of the cached FFT:
//  - 64 groups x 5 passes x 16 butterflies are issued; in pass p butterfly
//    k reads cache words A = k with a 0 inserted at bit p and A + 2^p, from
//    set (group mod 2), with twiddle exponent (j mod 2^s) << (9 - s), where
//    s = 5*epoch + p and j is A's index in main memory;
//  - no butterfly reads a word that one of the 8 butterflies issued before it
//    has not yet written back, and exactly one bubble is inserted per group;
//  - the write-back slot presents each butterfly's addresses 7 cycles after
//    its issue;
//  - every main-memory word is read twice and written twice, and its second
//    read (epoch 1) comes after its first write (epoch 0 result);
//  - the transform takes the expected number of cycles and done pulses once.
module tb_fft_controller;
  import spiffee_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, rd_set, tw_re, xb_valid, xb_swap, wb_valid, wb_set;
  logic [3:0] rd_row0, rd_row1;
  logic [8:0] tw_addr;
  logic [4:0] wb_addr_x, wb_addr_y, xf_raddr, xf_waddr;
  logic mem_en, mem_we, xf_re, xf_rd_set, xf_we, xf_wr_set;
  logic [9:0] mem_addr;
  mem_word_t mem_wdata, mem_rdata = '0;
  cache_word_t xf_q = '0, xf_wdata;
  logic ev_stall, ev_wait_load, ev_group_end;
  int checks = 0, failures = 0;

  fft_controller dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  int n_issue = 0, n_stall = 0, cyc = 0, n_done = 0;
  int rd_cnt [1024], wr_cnt [1024];
  int issue_cyc [$];
  logic [4:0] issue_ax [$], issue_ay [$];
  logic issue_set [$];
  logic [4:0] hist_a [$], hist_b [$];
  int hist_cyc [$];
  logic hist_set [$];

  always @(negedge clk) if (done) n_done++;

  always @(negedge clk) if (rst_n && busy) begin
    cyc++;
    if (ev_stall) n_stall++;

    // main-memory traffic
    if (mem_en && !mem_we) begin
      rd_cnt[mem_addr]++;
      if (rd_cnt[mem_addr] == 2) chk(wr_cnt[mem_addr] == 1, $sformatf("addr %0d reloaded before written back", mem_addr));
    end
    if (mem_en && mem_we) begin
      wr_cnt[mem_addr]++;
      chk(rd_cnt[mem_addr] == wr_cnt[mem_addr], $sformatf("addr %0d written before read", mem_addr));
    end
    // issued butterfly
    if (rd_en) begin
      int g, p, k, ep, grp, s, j, ew;
      logic [4:0] c0, c1, ca, cb, lo;
      g = n_issue / 80; p = (n_issue % 80) / 16; k = n_issue % 16;
      ep = g / 32; grp = g % 32;
      c0 = {^rd_row0, rd_row0};
      c1 = {~(^rd_row1), rd_row1};
      lo = 5'(k) & 5'((1 << p) - 1);
      ca = ((5'(k) & ~5'((1 << p) - 1)) << 1) | lo;
      cb = ca | 5'(1 << p);
      chk((c0 == ca && c1 == cb) || (c0 == cb && c1 == ca),
          $sformatf("bfly %0d: read %0d,%0d expected %0d,%0d", n_issue, c0, c1, ca, cb));
      chk(rd_set == 1'(g), "wrong cache set");
      s = 5 * ep + p;
      j = (ep == 0) ? (32 * grp + int'(ca)) : (grp + 32 * int'(ca));
      ew = (j % (1 << s)) << (9 - s);
      chk(tw_re && int'(tw_addr) == ew, $sformatf("bfly %0d twiddle %0d expected %0d", n_issue, tw_addr, ew));
      // read-after-write safety against the previous 8 cycles of issue
      for (int h = 0; h < hist_cyc.size(); h++)
        if (cyc - hist_cyc[h] <= 8 && hist_set[h] == rd_set)
          chk(!(hist_a[h] == ca || hist_a[h] == cb || hist_b[h] == ca || hist_b[h] == cb),
              $sformatf("bfly %0d reads a word still in the pipeline", n_issue));
      hist_cyc.push_back(cyc); hist_a.push_back(ca); hist_b.push_back(cb); hist_set.push_back(rd_set);
      if (hist_cyc.size() > 8) begin
        void'(hist_cyc.pop_front()); void'(hist_a.pop_front()); void'(hist_b.pop_front()); void'(hist_set.pop_front());
      end
      issue_cyc.push_back(cyc); issue_ax.push_back(ca); issue_ay.push_back(cb); issue_set.push_back(rd_set);
      n_issue++;
    end
    // write-back slot 7 cycles after issue
    if (wb_valid) begin
      int ic;
      ic = issue_cyc.pop_front();
      chk(cyc - ic == 7, $sformatf("write-back %0d cycles after issue", cyc - ic));
      chk(wb_addr_x == issue_ax.pop_front() && wb_addr_y == issue_ay.pop_front() && wb_set == issue_set.pop_front(),
          "write-back addresses differ from the issued ones");
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin rd_cnt[i] = 0; wr_cnt[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    $display("controller: %0d cycles, %0d butterflies, %0d stalls", cyc, n_issue, n_stall);
    chk(n_issue == 64 * 80, $sformatf("%0d butterflies issued", n_issue));
    chk(n_stall == 64, $sformatf("%0d stalls, expected 64", n_stall));
    chk(cyc >= 5250 && cyc <= 5350, $sformatf("%0d cycles", cyc));
    chk(n_done == 1, "done pulses");
    chk(!busy, "still busy");
    for (int i = 0; i < 1024; i++)
      chk(rd_cnt[i] == 2 && wr_cnt[i] == 2, $sformatf("addr %0d read %0d written %0d times", i, rd_cnt[i], wr_cnt[i]));
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
