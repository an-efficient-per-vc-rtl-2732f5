// pasd_gfr_env: a GFR traffic environment around one pasd_top, for workload
// tests. Not synthesizable; used only by testbenches.
//
// Five VCs, each the aggregate of CONNS window-controlled greedy sources
// (a simple TCP model: slow start, then one frame more per window per round
// trip, window halved at most once per round trip when a frame is lost).
// Frames are FRAME cells long. Each VC has its own switch input and tags a frame (CLP=1)
// when its token bucket, filled at the VC's MCR, cannot pay for it; the MCRs
// are in the ratio 5:10:15:20:25 and add up to half the link rate. The
// output link offers one cell slot every LINK_DIV clocks. A frame is
// acknowledged, or its loss noticed, RTT link cell times after it leaves
// the port or is dropped. Measured after start_measure rises: per-VC link
// utilisation rho_i, the utilisation index UI = sum rho / sum f, the
// fairness index FI = (sum rho_i/f_i)^2 / (N sum (rho_i/f_i)^2), mean buffer
// occupancy and mean cell delay through the port (in link cell times).
module pasd_gfr_env #(
  parameter int ETA_SHIFT = 4,
  parameter int CONNS     = 10,
  parameter int FRAME     = 12,
  parameter int LINK_DIV  = 4,
  parameter int RTT       = 2448    // link cell times
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start_measure,
  output int   tx_cells [5],
  output int   slots,
  output int   flaws,                // frame-integrity errors seen on the link
  output longint occ_sum,
  output longint delay_sum,
  output int   delay_n,
  output int   n_in_drop, n_out_drop, n_retag, n_red
);
  import pasd_pkg::*;
  localparam int N = 5, NC = N * CONNS;

  logic [N-1:0] in_valid, in_ready;
  cell_t in_cell [N];
  logic cfg_we = 0, cfg_en = 1;
  vc_idx_t cfg_idx = '0;
  logic [7:0] cfg_vpi = '0;
  logic [15:0] cfg_vci = '0;
  fix_t fair_share [N];
  logic out_valid, out_ready, in_drop, red_mark, out_drop, retag, sdwu_update;
  cell_t out_cell;
  logic signed [15:0] bt;
  logic [10:0] fifo_count, x_total;
  fix_t fair_index [N], rho [N];

  pasd_top #(.NUM_IN(N), .ETA_SHIFT(ETA_SHIFT)) dut (.*);

  // ------------------------------------------------------------ sources
  real cwnd [NC], ssth [NC];
  int  infl [NC];
  longint last_halve [NC];
  longint now = 0;
  real tokens [N], mcr [N];
  int  rr [N];
  int  seq [N];
  // frame waiting at each VC's input: connection, sequence, clp, cell index
  int  q_conn [N][$], q_seq [N][$], q_clp [N][$];
  int  cidx [N];
  bit  held [N];

  typedef struct { longint t; int conn; bit loss; } ev_t;
  ev_t evq [$];

  initial begin
    for (int c = 0; c < NC; c++) begin cwnd[c] = 1.0; ssth[c] = 32.0; infl[c] = 0; last_halve[c] = -1000000; end
    for (int v = 0; v < N; v++) begin
      mcr[v] = real'(v + 1) / 15.0 * 0.5 / real'(LINK_DIV);  // cells per clock
      tokens[v] = 0.0; rr[v] = 0; seq[v] = 0; cidx[v] = 0; held[v] = 0;
      fair_share[v] = 17'(((v + 1) * 65536) / 15);
      in_cell[v] = '0;
    end
    in_valid = '0;
    for (int k = 0; k < 5; k++) tx_cells[k] = 0;
    slots = 0; flaws = 0; occ_sum = 0; delay_sum = 0; delay_n = 0;
    n_in_drop = 0; n_out_drop = 0; n_retag = 0; n_red = 0;
    @(posedge rst_n);
    for (int v = 0; v < N; v++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = vc_idx_t'(v); cfg_vpi = 8'(v + 1); cfg_vci = 16'(100 + v);
    end
    @(negedge clk);
    cfg_we = 0;
  end

  assign out_ready = (now % LINK_DIV) == 0;

  function automatic void new_frames();
    for (int v = 0; v < N; v++) begin
      tokens[v] += mcr[v];
      if (tokens[v] > 2.0 * FRAME) tokens[v] = 2.0 * FRAME;
      if (q_conn[v].size() < 2) begin
        for (int k = 0; k < CONNS; k++) begin
          int c;
          c = v * CONNS + (rr[v] + k) % CONNS;
          if (real'(infl[c]) < cwnd[c] - 0.999) begin
            infl[c]++;
            q_conn[v].push_back(c);
            q_seq[v].push_back(seq[v] & 16'hFFFF);
            seq[v]++;
            if (tokens[v] >= real'(FRAME)) begin tokens[v] -= FRAME; q_clp[v].push_back(0); end
            else q_clp[v].push_back(1);
            rr[v] = (rr[v] + k + 1) % CONNS;
            break;
          end
        end
      end
    end
  endfunction

  function automatic void events();
    while (evq.size() > 0 && evq[0].t <= now) begin
      ev_t e;
      int c;
      e = evq.pop_front();
      c = e.conn;
      infl[c]--;
      if (!e.loss) begin
        if (cwnd[c] < ssth[c]) cwnd[c] += 1.0;
        else cwnd[c] += 1.0 / cwnd[c];
      end else if (now - last_halve[c] >= longint'(RTT * LINK_DIV)) begin
        ssth[c] = (cwnd[c] / 2.0 < 2.0) ? 2.0 : cwnd[c] / 2.0;
        cwnd[c] = ssth[c];
        last_halve[c] = now;
      end
    end
  endfunction

  function automatic void schedule(int conn, bit loss);
    ev_t e;
    e.t = now + longint'(RTT * LINK_DIV);
    e.conn = conn;
    e.loss = loss;
    evq.push_back(e);
  endfunction

  // present cells
  always @(negedge clk) if (rst_n && !cfg_we) begin
    new_frames();
    for (int v = 0; v < N; v++) begin
      if (!held[v] && q_conn[v].size() > 0) begin
        in_cell[v] = '0;
        in_cell[v].vpi = 8'(v + 1);
        in_cell[v].vci = 16'(100 + v);
        in_cell[v].clp = 1'(q_clp[v][0]);
        in_cell[v].eof = (cidx[v] == FRAME - 1);
        in_cell[v].payload[47:40] = 8'(v);
        in_cell[v].payload[39:32] = 8'(q_conn[v][0]);
        in_cell[v].payload[31:16] = 16'(q_seq[v][0]);
        in_cell[v].payload[15:8]  = 8'(cidx[v]);
        in_cell[v].payload[0]     = 1'(q_clp[v][0]);
        in_cell[v].payload[127:64] = 64'(now);
        held[v] = 1;
      end
      in_valid[v] = held[v];
    end
  end

  // link side, drops and bookkeeping
  int o_seq [N], o_idx [N];
  bit o_open [N];
  initial for (int v = 0; v < N; v++) begin o_seq[v] = -1; o_idx[v] = 0; o_open[v] = 0; end

  always @(posedge clk) if (rst_n) begin
    now <= now + 1;
    events();
    for (int v = 0; v < N; v++)
      if (in_valid[v] && in_ready[v]) begin
        held[v] <= 0;
        if (cidx[v] == FRAME - 1) begin
          cidx[v] = 0;
          void'(q_conn[v].pop_front()); void'(q_seq[v].pop_front()); void'(q_clp[v].pop_front());
        end else cidx[v]++;
      end
    // a frame is lost when its first cell is dropped (whole frames only)
    if (in_drop && dut.sel_valid && dut.sel_cell.payload[15:8] == 8'd0)
      schedule(int'(dut.sel_cell.payload[39:32]), 1);
    if (out_drop && out_cell.payload[15:8] == 8'd0)
      schedule(int'(out_cell.payload[39:32]), 1);
    if (out_valid && out_ready) begin
      int v, i;
      v = int'(out_cell.payload[47:40]);
      i = int'(out_cell.payload[15:8]);
      if (i == 0) begin
        if (o_open[v]) flaws++;
      end else if (!o_open[v] || i != o_idx[v] + 1 || int'(out_cell.payload[31:16]) != o_seq[v]) flaws++;
      o_seq[v] = int'(out_cell.payload[31:16]);
      o_idx[v] = i;
      o_open[v] = (i != FRAME - 1);
      if (out_cell.eof) schedule(int'(out_cell.payload[39:32]), 0);
      if (start_measure) begin
        tx_cells[v]++;
        delay_sum += now - longint'(out_cell.payload[127:64]);
        delay_n++;
      end
    end
    if (start_measure) begin
      if (out_ready) slots++;
      occ_sum += longint'(fifo_count);
      if (in_drop) n_in_drop++;
      if (out_drop) n_out_drop++;
      if (retag) n_retag++;
      if (red_mark) n_red++;
    end
  end
endmodule
