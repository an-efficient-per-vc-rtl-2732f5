// tb_pasd_red_sdwu: self-checking test of the nonlinear RED block with SDWU.
// Part 1 (RED): random occupancies X_i and X are applied with a trigger every
// clock; the drop probability P = min{(X_i/(X F_i) - 1) X/B, 1} is computed
// in floating point and compared with the block's v_inc against the same
// 16-bit LFSR sequence, kept by the test. Cases within 1e-9 of the threshold
// are skipped. The share of drops must also follow P on average.
// Part 2 (SDWU): cells are "transmitted" with per-VC rates; at every interval
// end (checked to come after exactly 2^LOG_T link slots, which occur in 3 of
// 4 clocks at random) rho_i must equal the count
// divided by 2^LOG_T and F_i must move by (f_i - rho_i) / 2^ETA_SHIFT.
module tb_pasd_red_sdwu;
  import pasd_pkg::*;
  localparam int N = 3, BB = 100, XW = 8, LT = 6, ES = 2;

  logic clk = 0, rst_n = 0;
  fix_t fair_share [N];
  logic trigger = 0, tx_valid = 0, link_slot = 0;
  vc_idx_t trig_vc = '0, tx_vc = '0, v_vc;
  logic [XW-1:0] x_cnt [N];
  logic [XW-1:0] x_total = '0;
  logic v_inc, sdwu_update;
  fix_t fair_index [N], rho [N];
  int checks = 0, failures = 0;

  pasd_red_sdwu #(.N_VC(N), .B(BB), .X_W(XW), .LOG_T(LT), .ETA_SHIFT(ES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [15:0] lf;        // the test's own copy of the random sequence
  longint mf [N];         // model fair index, units of 2^-16
  int cyc = 0, last_upd = -1, cnt [N], n_upd = 0;
  real psum = 0.0;
  int ndrop = 0, ntrig = 0;

  always @(posedge clk) if (rst_n) begin
    lf <= lf[0] ? ((lf >> 1) ^ 16'hB400) : (lf >> 1);
    if (link_slot) cyc <= cyc + 1;
  end

  initial begin
    fair_share[0] = 17'(65536 / 6);
    fair_share[1] = 17'(65536 / 3);
    fair_share[2] = 17'(65536 / 2);
    for (int i = 0; i < N; i++) begin x_cnt[i] = '0; mf[i] = fair_share[i]; cnt[i] = 0; end
    lf = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- part 1: RED test
    for (int t = 0; t < 3000; t++) begin
      int v, xt, xi;
      real f, p, r;
      @(negedge clk);
      v = $urandom_range(N - 1);
      xt = $urandom_range(0, 200);
      xi = (xt == 0) ? 0 : $urandom_range(0, xt);
      for (int i = 0; i < N; i++) x_cnt[i] = XW'($urandom_range(0, 200));
      x_cnt[v] = XW'(xi);
      x_total = XW'(xt);
      trig_vc = vc_idx_t'(v);
      trigger = $urandom_range(3) != 0;
      #1;
      f = real'(fair_index[v]) / 65536.0;
      if (xi > 0 && (f == 0.0 || real'(xi) > real'(xt) * f)) begin
        p = (f == 0.0) ? 1.0 : (real'(xi) / (real'(xt) * f) - 1.0) * real'(xt) / real'(BB);
        if (p > 1.0) p = 1.0;
      end else p = 0.0;
      r = real'(lf) / 65536.0;
      if (trigger) begin
        ntrig++;
        psum += p;
        if (v_inc) ndrop++;
        if (p - r > 1e-9 || r - p > 1e-9)
          chk(v_inc == (p > r), "red decision");
        chk(!v_inc || int'(v_vc) == v, "v_vc");
      end else chk(!v_inc, "no trigger, no drop");
    end
    @(negedge clk);
    trigger = 0;
    // drops must follow the expected count within 5 sigma
    chk(real'(ndrop) > psum - 5.0 * $sqrt(psum) - 1 && real'(ndrop) < psum + 5.0 * $sqrt(psum) + 1, "drop rate");
    $display("red: %0d triggers, %0d drops, %0.1f expected", ntrig, ndrop, psum);
    $display("TB_PART1 done");
  end

  // ---------------- part 2: SDWU, runs alongside part 1 from reset on
  initial begin
    int rate [N];
    rate[0] = 60; rate[1] = 20; rate[2] = 35;  // percent of slots
    @(posedge rst_n);
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      // the slot of this clock
      tx_vc = vc_idx_t'($urandom_range(N - 1));
      link_slot = $urandom_range(3) != 0;
      tx_valid = link_slot && $urandom_range(99) < rate[tx_vc];
      #1;
      if (tx_valid) cnt[tx_vc]++;
      // cyc counts the link slots before this clock
      chk(sdwu_update == (link_slot && (cyc % (1 << LT)) == (1 << LT) - 1), "update in the last slot");
      if (sdwu_update) begin
        n_upd++;
        if (last_upd >= 0) chk(cyc - last_upd == (1 << LT), "interval length");
        last_upd = cyc;
      end
      if (sdwu_update) begin
        @(posedge clk); #1;
        for (int i = 0; i < N; i++) begin
          longint rq, d;
          rq = longint'(cnt[i]) << (16 - LT);
          d = (longint'(fair_share[i]) - rq) >>> ES;
          mf[i] = mf[i] + d;
          if (mf[i] < 0) mf[i] = 0;
          if (mf[i] > 65536) mf[i] = 65536;
          chk(longint'(rho[i]) == rq, "rho");
          chk(longint'(fair_index[i]) == mf[i], "fair index");
          cnt[i] = 0;
        end
        tx_valid = 0;
      end
    end
    chk(n_upd >= 40, "updates happened");
    // VC0 is over-served (about 20% of slots against 1/6): its F must fall
    chk(longint'(fair_index[0]) < longint'(fair_share[0]), "F0 decreased");
    chk(longint'(fair_index[1]) > longint'(fair_share[1]), "F1 increased");
    $display("F = %0d %0d %0d", fair_index[0], fair_index[1], fair_index[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
