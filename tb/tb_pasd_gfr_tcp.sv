// tb_pasd_gfr_tcp: workload test in the setting the PASD scheme was evaluated
// in: 5 GFR VCs with MCRs 5:10:15:20:25 (summing to half the link), 10 greedy
// window-controlled sources per VC, 12-cell frames, a 1000-cell buffer and a
// 2448-cell-time round trip. Two ports run side by side on the same kind of
// traffic: one with SDWU as built (eta = 1/16), one whose fair indices stay at
// f_i (eta = 2^-24, no adaptation). For each it reports the per-VC link share
// rho_i, the utilisation index UI and the fairness index FI, the mean buffer
// occupancy and the mean cell delay, and it checks that
//   - frames reach the link whole and in order (no integrity errors),
//   - the link stays busy (UI > 0.9) with both ports,
//   - all of PEPD rejection, RED marking, front drops and retagging occur,
//   - with SDWU the fairness index is at least that of the fixed indices
//     (less 0.02 for noise), F_1 has fallen below f_1 and F_5 risen above
//     f_5, and every VC's share is within 0.02 of its ideal share.
// The sources are deterministic, so the run repeats exactly.
module tb_pasd_gfr_tcp;
  localparam int N = 5;
  localparam longint WARM = 400000, MEAS = 1600000;

  logic clk = 0, rst_n = 0, meas = 0;
  int tx_a [N], tx_b [N];
  int slots_a, slots_b, flaws_a, flaws_b, dn_a, dn_b;
  longint occ_a, occ_b, ds_a, ds_b;
  int ind_a, outd_a, rt_a, red_a, ind_b, outd_b, rt_b, red_b;
  int checks = 0, failures = 0;

  pasd_gfr_env #(.ETA_SHIFT(4)) env_a (.clk, .rst_n, .start_measure(meas),
    .tx_cells(tx_a), .slots(slots_a), .flaws(flaws_a), .occ_sum(occ_a), .delay_sum(ds_a),
    .delay_n(dn_a), .n_in_drop(ind_a), .n_out_drop(outd_a), .n_retag(rt_a), .n_red(red_a));
  pasd_gfr_env #(.ETA_SHIFT(24)) env_b (.clk, .rst_n, .start_measure(meas),
    .tx_cells(tx_b), .slots(slots_b), .flaws(flaws_b), .occ_sum(occ_b), .delay_sum(ds_b),
    .delay_n(dn_b), .n_in_drop(ind_b), .n_out_drop(outd_b), .n_retag(rt_b), .n_red(red_b));

  always #5 clk = ~clk;

  initial begin
    repeat (WARM + MEAS + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic void report(string name, int tx [N], int slots, longint occ,
                                 longint ds, int dn, output real ui, output real fi);
    real s1, s2, rho;
    ui = 0.0; s1 = 0.0; s2 = 0.0;
    for (int v = 0; v < N; v++) begin
      real f;
      f = real'(v + 1) / 15.0;
      rho = real'(tx[v]) / real'(slots);
      ui += rho;
      s1 += rho / f;
      s2 += (rho / f) * (rho / f);
      $display("%s VC%0d ideal %0.4f measured %0.4f", name, v + 1, f, rho);
    end
    fi = s1 * s1 / (real'(N) * s2);
    $display("%s UI %0.4f FI %0.4f mean occupancy %0.1f%% of B, mean delay %0.1f cell times",
             name, ui, fi, 100.0 * real'(occ) / real'(MEAS) / 1000.0, real'(ds) / real'(dn) / 4.0);
  endfunction

  real ui_a, fi_a, ui_b, fi_b;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (WARM) @(posedge clk);
    meas = 1;
    repeat (MEAS) @(posedge clk);
    meas = 0;
    @(negedge clk);
    report("SDWU ", tx_a, slots_a, occ_a, ds_a, dn_a, ui_a, fi_a);
    report("fixed", tx_b, slots_b, occ_b, ds_b, dn_b, ui_b, fi_b);
    $display("SDWU : in_drop %0d out_drop %0d retag %0d red %0d", ind_a, outd_a, rt_a, red_a);
    $display("fixed: in_drop %0d out_drop %0d retag %0d red %0d", ind_b, outd_b, rt_b, red_b);
    for (int v = 0; v < N; v++) $display("F%0d = %0d (f = %0d)", v + 1, env_a.fair_index[v], env_a.fair_share[v]);
    chk(flaws_a == 0 && flaws_b == 0, "frame integrity on the link");
    chk(ui_a > 0.9 && ui_b > 0.9, "link utilisation");
    chk(ind_a > 0 && red_a > 0 && outd_a > 0 && rt_a > 0, "all mechanisms active");
    chk(fi_a >= fi_b - 0.02, "SDWU fairness not worse than fixed indices");
    // SDWU lowers the index of the smallest VC and raises that of the largest
    chk(env_a.fair_index[0] < env_a.fair_share[0], "F1 below f1");
    chk(env_a.fair_index[4] > env_a.fair_share[4], "F5 above f5");
    for (int v = 0; v < N; v++) begin
      real d;
      d = real'(tx_a[v]) / real'(slots_a) - real'(v + 1) / 15.0;
      chk(d < 0.02 && d > -0.02, "SDWU share within 0.02 of the ideal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
