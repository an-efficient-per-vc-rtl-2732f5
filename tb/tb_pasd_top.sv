// tb_pasd_top: end-to-end test of the PASD output port at its default size
// (4 switch inputs, 5 GFR VCs, B = 1000 cells, frames of up to M = 12 cells,
// 4096-cell SDWU interval).
//
// Five VCs with MCRs in the ratio 5:10:15:20:25 (fair shares 1/15 .. 5/15)
// send frames, mostly of 12 cells, half of them tagged, over four inputs, and
// a few cells with an unknown VPI/VCI are mixed in. The output link first
// runs at half the offered rate (congestion: PEPD rejections, RED marks,
// drop-from-front, retagging), then at full rate; finally the inputs stop
// and the buffer drains. The scoreboard checks that
//   - a single cell crosses an idle port in 2 clocks,
//   - every cell on the link belongs to its VC, arrives in order, and every
//     frame on the link is complete (whole-frame accept / drop),
//   - a frame keeps one CLP on the link, and a tagged frame leaves untagged
//     exactly when the port reports a retag,
//   - cells in = cells out + cells dropped at input + cells dropped at output,
//   - after draining, B_t is back to B and the FIFO and X are empty,
//   - the FIFO never holds more than B + M - 1 cells,
// and that each mechanism (SEL back-pressure, lookup miss, B_t <= 0, PEPD
// rejection, RED mark, front drop, retag, SDWU update, F_i change) happened.
module tb_pasd_top;
  import pasd_pkg::*;
  localparam int NI = 4, N = 5, BB = 1000, MM = 12;

  logic clk = 0, rst_n = 0;
  logic [NI-1:0] in_valid, in_ready;
  cell_t in_cell [NI];
  logic cfg_we = 0, cfg_en = 0;
  vc_idx_t cfg_idx = '0;
  logic [VPI_W-1:0] cfg_vpi = '0;
  logic [VCI_W-1:0] cfg_vci = '0;
  fix_t fair_share [N];
  logic out_valid, out_ready = 0;
  cell_t out_cell;
  logic in_drop, red_mark, out_drop, retag, sdwu_update;
  logic signed [15:0] bt;
  logic [10:0] fifo_count, x_total;
  fix_t fair_index [N], rho [N];
  int checks = 0, failures = 0;

  pasd_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ traffic
  // payload layout: [47:40] vc, [39:16] frame number, [15:8] cell index,
  // [7:1] frame length, [0] CLP the frame was sent with
  int fno [N], cidx [N], flen [N];
  bit fclp [N];
  bit gen_on = 0;
  int load = 100, ready_pct = 50;
  bit held [NI];
  int sent = 0, n_miss_sent = 0;

  function automatic cell_t make_cell(int v);
    cell_t c;
    c = '0;
    c.vpi = 8'(v + 1);
    c.vci = 16'(100 + v);
    if (cidx[v] == 0) begin
      flen[v] = ($urandom_range(9) == 0) ? $urandom_range(1, MM) : MM;
      fclp[v] = $urandom_range(1);
    end
    c.clp = fclp[v];
    c.eof = (cidx[v] == flen[v] - 1);
    c.payload[47:40] = 8'(v);
    c.payload[39:16] = 24'(fno[v]);
    c.payload[15:8]  = 8'(cidx[v]);
    c.payload[7:1]   = 7'(flen[v]);
    c.payload[0]     = fclp[v];
    c.payload[383:48] = {11{$urandom}};
    return c;
  endfunction

  function automatic void advance(int v);
    if (cidx[v] == flen[v] - 1) begin cidx[v] = 0; fno[v]++; end
    else cidx[v]++;
  endfunction

  int cur_vc [NI];   // VC whose cell input k presents

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NI; k++) begin
      // after gen_on falls, frames in progress are still completed
      if (!held[k] && (gen_on || cidx[k] != 0 || (k == 0 && cidx[4] != 0))
          && $urandom_range(99) < load) begin
        if (gen_on && $urandom_range(499) == 0) begin
          cur_vc[k] = -1;   // a cell of an unknown connection
          in_cell[k] = '0;
          in_cell[k].vpi = 8'd200;
          in_cell[k].eof = 1'b1;
        end else begin
          // input 0 carries VC 0 and VC 4, input k carries VC k
          if (k == 0 && !gen_on) cur_vc[k] = (cidx[0] != 0) ? 0 : 4;
          else cur_vc[k] = (k == 0 && $urandom_range(1) == 1) ? 4 : k;
          in_cell[k] = make_cell(cur_vc[k]);
        end
        held[k] = 1;
      end
      in_valid[k] = held[k];
    end
    out_ready = $urandom_range(99) < ready_pct;
  end

  int n_bp = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NI; k++) begin
      if (in_valid[k] && in_ready[k]) begin
        held[k] <= 0;
        sent++;
        if (cur_vc[k] >= 0) advance(cur_vc[k]); else n_miss_sent++;
      end
      if (in_valid[k] && !in_ready[k]) n_bp++;
    end
  end

  // ------------------------------------------------------------ scoreboard
  int o_fno [N], o_idx [N], o_len [N];
  bit o_clp [N], o_ret [N], o_open [N];
  int n_out = 0, n_in_drop = 0, n_out_drop = 0, n_red = 0, n_retag = 0;
  int n_retag_seen = 0, n_bt_le0 = 0, n_upd = 0, n_miss_drop = 0, max_fill = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_drop) n_in_drop++;
    if (out_drop) n_out_drop++;
    if (red_mark) n_red++;
    if (retag) n_retag++;
    if (sdwu_update) n_upd++;
    if (bt <= 0) n_bt_le0++;
    if (int'(fifo_count) > max_fill) max_fill = int'(fifo_count);
    if (out_valid && out_ready) begin
      int v, f, i, l;
      bit oc;
      n_out++;
      v = int'(out_cell.payload[47:40]);
      f = int'(out_cell.payload[39:16]);
      i = int'(out_cell.payload[15:8]);
      l = int'(out_cell.payload[7:1]);
      oc = out_cell.payload[0];
      chk(v < N && out_cell.vpi == 8'(v + 1) && out_cell.vci == 16'(100 + v), "cell belongs to its VC");
      chk(out_cell.eof == (i == l - 1), "eof flag");
      if (i == 0) begin
        chk(!o_open[v], "previous frame complete");
        chk(f > o_fno[v] || o_fno[v] < 0, "frame order");
        o_fno[v] = f; o_len[v] = l; o_clp[v] = out_cell.clp;
        o_ret[v] = oc && !out_cell.clp;
        if (o_ret[v]) n_retag_seen++;
        chk(out_cell.clp == oc || o_ret[v], "CLP kept or retagged");
        chk(o_ret[v] == retag, "retag reported");
      end else begin
        chk(o_open[v] && f == o_fno[v] && i == o_idx[v] + 1, "cell order within frame");
        chk(out_cell.clp == o_clp[v], "one CLP per frame");
      end
      o_idx[v] = i;
      o_open[v] = (i != l - 1);
    end
  end

  // ------------------------------------------------------------ sequence
  fix_t f0 [N];
  bit fchanged;
  int t0, lat;

  initial begin
    fair_share[0] = 17'd4369;   // 5/75 of 2^16
    fair_share[1] = 17'd8738;
    fair_share[2] = 17'd13107;
    fair_share[3] = 17'd17476;
    fair_share[4] = 17'd21845;
    for (int v = 0; v < N; v++) begin
      fno[v] = 0; cidx[v] = 0; flen[v] = MM; fclp[v] = 0;
      o_fno[v] = -1; o_idx[v] = 0; o_open[v] = 0; o_clp[v] = 0; o_ret[v] = 0;
    end
    for (int k = 0; k < NI; k++) begin held[k] = 0; in_cell[k] = '0; cur_vc[k] = 0; end
    in_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < N; v++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = vc_idx_t'(v); cfg_en = 1;
      cfg_vpi = 8'(v + 1); cfg_vci = 16'(100 + v);
    end
    @(negedge clk);
    cfg_we = 0;
    for (int v = 0; v < N; v++) f0[v] = fair_index[v];
    chk(int'(bt) == BB, "B_t starts at B");

    // latency of one cell through an idle port
    ready_pct = 100;
    @(negedge clk);
    #2;
    in_cell[1] = '0; in_cell[1].vpi = 8'd2; in_cell[1].vci = 16'd101; in_cell[1].eof = 1;
    in_cell[1].payload[47:40] = 8'd1; in_cell[1].payload[39:16] = 24'hFFFFF;
    in_cell[1].payload[7:1] = 7'd1;
    held[1] = 1; in_valid[1] = 1; cur_vc[1] = -2;
    @(posedge clk);
    t0 = $time;
    fork
      begin @(posedge clk iff (out_valid && out_ready)); lat = ($time - t0) / 10; end
      begin repeat (20) @(posedge clk); lat = -1; end
    join_any
    disable fork;
    chk(lat == 2, "idle-port latency of 2 clocks");
    $display("latency %0d clocks", lat);
    repeat (5) @(posedge clk);
    @(negedge clk);
    o_fno[1] = -1;   // the marker frame number is not part of the sequence
    sent = 0; n_out = 0; n_in_drop = 0; n_out_drop = 0; n_retag = 0; n_retag_seen = 0;
    n_miss_sent = 0;

    // congestion: offered about one cell per clock, link at half rate
    ready_pct = 50; load = 100; gen_on = 1;
    repeat (40000) @(posedge clk);
    // link at full rate, lighter load
    ready_pct = 100; load = 20;
    repeat (10000) @(posedge clk);
    // stop and drain
    gen_on = 0;
    wait (held[0] == 0 && held[1] == 0 && held[2] == 0 && held[3] == 0);
    repeat (3000) @(posedge clk);

    chk(fifo_count == 0 && x_total == 0, "buffer empty after drain");
    chk(int'(bt) == BB, "B_t back to B");
    chk(sent == n_out + n_in_drop + n_out_drop, "cell conservation");
    chk(max_fill <= BB + MM - 1, "FIFO fill within B + M - 1");
    for (int v = 0; v < N; v++) chk(!o_open[v], "last frame complete");
    chk(n_retag == n_retag_seen, "retags seen on link");
    fchanged = 0;
    for (int v = 0; v < N; v++) if (fair_index[v] != f0[v]) fchanged = 1;

    // mechanism coverage
    chk(n_bp > 0, "SEL back-pressure happened");
    chk(n_miss_sent > 0, "lookup miss happened");
    chk(n_bt_le0 > 0, "B_t <= 0 happened");
    chk(n_in_drop > n_miss_sent, "PEPD frame rejection happened");
    chk(n_red > 0, "RED mark happened");
    chk(n_out_drop > 0, "drop from front happened");
    chk(n_retag > 0, "retag happened");
    chk(n_upd > 5, "SDWU updates happened");
    chk(fchanged, "fair index changed");
    $display("sent %0d out %0d in_drop %0d out_drop %0d red %0d retag %0d bp %0d miss %0d bt<=0 %0d upd %0d maxfill %0d",
             sent, n_out, n_in_drop, n_out_drop, n_red, n_retag, n_bp, n_miss_sent, n_bt_le0, n_upd, max_fill);
    for (int v = 0; v < N; v++)
      $display("VC%0d f=%0d F=%0d rho=%0d", v, fair_share[v], fair_index[v], rho[v]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
