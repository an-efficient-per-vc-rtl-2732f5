// tb_pasd_pepd: self-checking test of the pre-paid early packet discard block.
// Three VCs send interleaved frames of 1..M cells with random CLP; cells that
// miss the VC table are mixed in; freed cells come back at random. A reference
// model of the FIFO input port (B_t check on the first cell, prepayment of M,
// refund of M - L_i on the last cell, A1_i per VC, U_i on rejected untagged
// frames, RED trigger on accepted tagged frames) predicts every output each
// clock. A directed start checks the first frame exactly, and the test
// requires that frames were both accepted and rejected.
module tb_pasd_pepd;
  import pasd_pkg::*;
  localparam int N = 3, BB = 40, MM = 4;

  logic clk = 0, rst_n = 0;
  logic cell_valid = 0, vc_hit = 0, cell_freed = 0;
  cell_t cell_in = '0;
  vc_idx_t vc = '0;
  logic push, x_inc, u_inc, red_trigger, in_drop;
  fifo_entry_t push_entry;
  vc_idx_t cnt_vc, red_vc;
  logic signed [15:0] bt;
  int checks = 0, failures = 0;

  pasd_pepd #(.N_VC(N), .B(BB), .M(MM), .BT_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int m_bt, m_len [N], m_rem [N];
  bit m_a1 [N], m_inf [N];
  int n_acc_frames = 0, n_rej_frames = 0, n_red = 0, n_u = 0;
  int occupancy = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // drive one cell, check the combinational outputs, update the model
  task automatic send(input int v, input bit hit, input bit clp, input bit eof, input bit freed);
    bit first, a1, acc;
    @(negedge clk);
    cell_valid = 1; vc_hit = hit; vc = vc_idx_t'(v);
    cell_in = '0;
    cell_in.vpi = 8'(v); cell_in.clp = clp; cell_in.eof = eof;
    cell_in.payload = {12{$urandom}};
    cell_freed = freed;
    #1;
    first = hit && !m_inf[v];
    a1 = first ? (m_bt <= 0) : (hit ? m_a1[v] : 1);
    acc = hit && !a1;
    chk(push == acc, "push");
    chk(x_inc == acc, "x_inc");
    chk(in_drop == !acc, "in_drop");
    chk(u_inc == (first && a1 && !clp), "u_inc");
    chk(red_trigger == (first && acc && clp), "red_trigger");
    if (acc) begin
      chk(push_entry.cl == cell_in, "entry cell");
      chk(push_entry.first == first, "entry first");
      chk(int'(push_entry.vc) == v, "entry vc");
    end
    if (acc || u_inc || red_trigger) chk(int'(cnt_vc) == v && int'(red_vc) == v, "vc out");
    // model update
    if (hit) begin
      if (first) begin
        m_a1[v] = a1;
        if (a1) n_rej_frames++; else n_acc_frames++;
        if (first && a1 && !clp) n_u++;
        if (first && acc && clp) n_red++;
      end
      if (acc) begin
        if (first) m_bt -= MM;
        m_len[v]++;
        occupancy++;
        if (eof) begin m_bt += MM - m_len[v]; m_len[v] = 0; end
      end
      m_inf[v] = !eof;
    end
    if (freed) m_bt += 1;
    @(posedge clk);
    #1;
    chk(int'(bt) == m_bt, "bt");
  endtask

  initial begin
    m_bt = BB;
    for (int i = 0; i < N; i++) begin m_len[i] = 0; m_a1[i] = 0; m_inf[i] = 0; m_rem[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(int'(bt) == BB, "bt after reset");
    // directed: a 3-cell untagged frame on VC0: B_t = B - M, then B - 3
    send(0, 1, 0, 0, 0);
    chk(int'(bt) == BB - MM, "prepay");
    send(0, 1, 0, 0, 0);
    send(0, 1, 0, 1, 0);
    chk(int'(bt) == BB - 3, "refund");
    // random traffic
    for (int t = 0; t < 6000; t++) begin
      int v;
      bit hit, clp, eof, fr;
      v = $urandom_range(N - 1);
      hit = $urandom_range(19) != 0;
      if (!m_inf[v]) m_rem[v] = $urandom_range(1, MM);
      clp = $urandom_range(1);
      eof = (m_rem[v] == 1);
      if (hit) m_rem[v]--;
      // free cells slower than they arrive in phases, to hit B_t <= 0
      fr = occupancy > 0 && ($urandom_range(99) < (((t / 700) % 2) ? 90 : 40));
      if (fr) occupancy--;
      send(v, hit, clp, eof, fr);
      if (!hit) m_rem[v] = m_rem[v];
    end
    @(negedge clk);
    cell_valid = 0;
    chk(n_acc_frames > 10 && n_rej_frames > 10 && n_red > 5 && n_u > 5, "coverage");
    $display("accepted %0d rejected %0d red %0d u %0d", n_acc_frames, n_rej_frames, n_red, n_u);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
