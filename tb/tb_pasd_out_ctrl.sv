// tb_pasd_out_ctrl: self-checking test of the output controller.
// A queue in the test stands for the FIFO: it holds interleaved frames of
// three VCs with random CLP. U_i and V_i are counters kept by the test and
// raised at random. For each head cell a reference model of the FIFO output
// port (A2_i chosen on the first cell: drop if tagged and V_i > 0, else retag
// if tagged and U_i > 0, else transmit) predicts pop, out_valid, the CLP seen
// on the link and every counter strobe; the output link is ready at random.
// Drops must not wait for the link; each decision kind must occur.
module tb_pasd_out_ctrl;
  import pasd_pkg::*;
  localparam int N = 3, UW = 16;

  logic clk = 0, rst_n = 0;
  logic fifo_empty, pop, out_ready = 0;
  fifo_entry_t head;
  logic [UW-1:0] u_cnt [N];
  logic [UW-1:0] v_cnt [N];
  vc_idx_t out_vc, tx_vc;
  logic x_dec, u_dec, v_dec, cell_freed, out_valid, tx_valid, out_drop, retag;
  cell_t out_cell;
  int checks = 0, failures = 0;

  pasd_out_ctrl #(.N_VC(N), .UV_W(UW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  fifo_entry_t q [$];
  int m_a2 [N];
  int rem [N];
  bit fclp [N];
  int pend_u = -1, pend_v = -1;
  int n_tx = 0, n_rt = 0, n_dr = 0, n_dr_notready = 0;

  // fill the queue with interleaved frames
  task automatic refill(input int ncells);
    for (int k = 0; k < ncells; k++) begin
      fifo_entry_t e;
      int v;
      v = $urandom_range(N - 1);
      e = '0;
      e.vc = vc_idx_t'(v);
      e.first = (rem[v] == 0);
      if (rem[v] == 0) begin rem[v] = $urandom_range(1, 5); fclp[v] = $urandom_range(1); end
      e.cl.clp = fclp[v];
      e.cl.eof = (rem[v] == 1);
      e.cl.vci = 16'(k);
      e.cl.payload = {12{$urandom}};
      rem[v]--;
      q.push_back(e);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin u_cnt[i] = '0; v_cnt[i] = '0; m_a2[i] = 0; rem[i] = 0; end
    fifo_empty = 1; head = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    refill(4000);
    for (int t = 0; t < 8000; t++) begin
      int v, a2;
      bit p;
      @(negedge clk);
      // counter decrements of the last clock take effect at its edge
      if (pend_u >= 0) u_cnt[pend_u]--;
      if (pend_v >= 0) v_cnt[pend_v]--;
      pend_u = -1; pend_v = -1;
      if ($urandom_range(9) == 0) u_cnt[$urandom_range(N - 1)]++;
      if ($urandom_range(14) == 0) v_cnt[$urandom_range(N - 1)]++;
      out_ready = $urandom_range(99) < 60;
      fifo_empty = (q.size() == 0) || ($urandom_range(19) == 0 && t % 3 == 0);
      if (q.size() > 0) head = q[0];
      #1;
      if (fifo_empty) begin
        chk(!pop && !out_valid && !x_dec && !tx_valid && !out_drop, "idle when empty");
        continue;
      end
      v = int'(head.vc);
      if (head.first) begin
        a2 = 0;
        if (head.cl.clp) begin
          if (v_cnt[v] != 0) a2 = 2;
          else if (u_cnt[v] != 0) a2 = 1;
        end
      end else a2 = m_a2[v];
      p = (a2 == 2) || out_ready;
      chk(pop == p, "pop");
      chk(out_valid == (a2 != 2), "out_valid");
      chk(x_dec == p && cell_freed == p, "x_dec / freed");
      chk(int'(out_vc) == v && int'(tx_vc) == v, "vc");
      chk(tx_valid == (p && a2 != 2), "tx");
      chk(out_drop == (p && a2 == 2), "drop");
      chk(u_dec == (p && head.first && a2 == 1), "u_dec");
      chk(v_dec == (p && head.first && a2 == 2), "v_dec");
      chk(retag == (p && head.first && a2 == 1), "retag");
      if (a2 != 2) begin
        chk(out_cell.clp == (a2 == 1 ? 1'b0 : head.cl.clp), "clp on link");
        chk(out_cell.payload == head.cl.payload && out_cell.vci == head.cl.vci, "cell data");
      end
      if (p) begin
        m_a2[v] = a2;
        void'(q.pop_front());
        if (head.first && a2 == 1) begin pend_u = v; n_rt++; end
        if (head.first && a2 == 2) begin pend_v = v; n_dr++; if (!out_ready) n_dr_notready++; end
        if (a2 != 2) n_tx++;
      end
      if (q.size() < 50) refill(500);
    end
    chk(n_tx > 100 && n_rt > 20 && n_dr > 20 && n_dr_notready > 5, "coverage");
    $display("tx %0d retagged frames %0d dropped frames %0d", n_tx, n_rt, n_dr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
