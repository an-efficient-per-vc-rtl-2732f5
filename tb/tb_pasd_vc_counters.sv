// tb_pasd_vc_counters: self-checking test of the per-VC counter block.
// Random increments from the input side and decrements from the output side,
// often on the same VC in the same clock, are applied to 4-bit U/V counters
// (so that saturation is reached) and compared every clock with a reference
// model that saturates at the top and never goes below zero.
module tb_pasd_vc_counters;
  import pasd_pkg::*;
  localparam int N = 3, XW = 5, UW = 4;

  logic clk = 0, rst_n = 0;
  vc_idx_t in_vc = '0, red_vc = '0, out_vc = '0;
  logic x_inc = 0, u_inc = 0, v_inc = 0, x_dec = 0, u_dec = 0, v_dec = 0;
  logic [XW-1:0] x_cnt [N];
  logic [UW-1:0] u_cnt [N];
  logic [UW-1:0] v_cnt [N];
  logic [XW-1:0] x_total;
  int checks = 0, failures = 0;

  pasd_vc_counters #(.N_VC(N), .X_W(XW), .UV_W(UW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mx [N], mu [N], mv [N], mt;
  int umax = (1 << UW) - 1;
  int sat_seen = 0;

  initial begin
    for (int i = 0; i < N; i++) begin mx[i] = 0; mu[i] = 0; mv[i] = 0; end
    mt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int up;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(x_cnt[i]) != mx[i] || int'(u_cnt[i]) != mu[i] || int'(v_cnt[i]) != mv[i]) begin
          failures++;
          $display("FAIL vc%0d x=%0d/%0d u=%0d/%0d v=%0d/%0d", i, x_cnt[i], mx[i], u_cnt[i], mu[i], v_cnt[i], mv[i]);
        end
        if (mu[i] == umax) sat_seen++;
      end
      checks++;
      if (int'(x_total) != mt) begin failures++; $display("FAIL total %0d/%0d", x_total, mt); end
      up = ((t / 500) % 2 == 0) ? 70 : 30;
      in_vc  = vc_idx_t'($urandom_range(N - 1));
      red_vc = vc_idx_t'($urandom_range(N - 1));
      out_vc = vc_idx_t'($urandom_range(N - 1));
      x_inc = $urandom_range(99) < up && mt < 31;
      u_inc = $urandom_range(99) < up;
      v_inc = $urandom_range(99) < up;
      x_dec = $urandom_range(99) >= up;
      u_dec = $urandom_range(99) >= up;
      v_dec = $urandom_range(99) >= up;
      // reference update, all on the old values
      begin
        int ox;
        ox = mx[out_vc];
        if (x_inc) begin mx[in_vc]++; mt++; end
        if (x_dec && ox > 0) begin mx[out_vc]--; mt--; end
        if (u_inc && mu[in_vc] < umax && !(u_dec && out_vc == in_vc && mu[in_vc] > 0)) mu[in_vc]++;
        else if (u_inc && mu[in_vc] < umax) mu[in_vc] = mu[in_vc];
        if (u_dec && mu[out_vc] > 0 && !(u_inc && out_vc == in_vc)) mu[out_vc]--;
        if (v_inc && mv[red_vc] < umax && !(v_dec && out_vc == red_vc && mv[red_vc] > 0)) mv[red_vc]++;
        if (v_dec && mv[out_vc] > 0 && !(v_inc && out_vc == red_vc)) mv[out_vc]--;
        // same VC, inc at max and dec: net -1
        if (u_inc && u_dec && out_vc == in_vc && mu[in_vc] == umax) mu[in_vc]--;
        if (v_inc && v_dec && out_vc == red_vc && mv[red_vc] == umax) mv[red_vc]--;
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
