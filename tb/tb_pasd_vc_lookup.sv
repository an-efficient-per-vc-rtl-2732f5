// tb_pasd_vc_lookup: self-checking test of the VPI/VCI -> VC index table.
// Five VCs are written, then random lookups (some of written pairs, some not)
// are compared with a software copy of the table; an entry is then disabled
// and rewritten and the lookups are checked again.
module tb_pasd_vc_lookup;
  import pasd_pkg::*;
  localparam int N = 5;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_en = 0;
  vc_idx_t cfg_idx = '0;
  logic [VPI_W-1:0] cfg_vpi = '0, vpi = '0;
  logic [VCI_W-1:0] cfg_vci = '0, vci = '0;
  logic hit;
  vc_idx_t idx;
  int checks = 0, failures = 0;

  pasd_vc_lookup #(.N_VC(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [VPI_W-1:0] tvpi [N];
  logic [VCI_W-1:0] tvci [N];
  logic             ten  [N];

  task automatic wr(input int i, input logic en, input logic [7:0] p, input logic [15:0] c);
    @(negedge clk);
    cfg_we = 1; cfg_idx = vc_idx_t'(i); cfg_en = en; cfg_vpi = p; cfg_vci = c;
    @(negedge clk);
    cfg_we = 0;
    ten[i] = en; tvpi[i] = p; tvci[i] = c;
  endtask

  task automatic look(input logic [7:0] p, input logic [15:0] c);
    int e;
    e = -1;
    for (int i = 0; i < N; i++) if (e < 0 && ten[i] && tvpi[i] == p && tvci[i] == c) e = i;
    vpi = p; vci = c;
    #1;
    checks++;
    if (hit != (e >= 0) || (e >= 0 && int'(idx) != e)) begin
      failures++;
      $display("FAIL lookup %h/%h hit=%b idx=%0d exp=%0d", p, c, hit, idx, e);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) ten[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(8'd0, 16'd0);   // empty table after reset
    for (int i = 0; i < N; i++) wr(i, 1, 8'(i + 1), 16'(32 + 7 * i));
    for (int t = 0; t < 300; t++) begin
      int i;
      i = $urandom_range(N - 1);
      if ($urandom_range(1)) look(tvpi[i], tvci[i]);
      else look(8'($urandom_range(7)), 16'($urandom_range(70)));
    end
    wr(2, 0, 8'd3, 16'd46);
    wr(4, 1, 8'd9, 16'd99);
    for (int i = 0; i < 6; i++) look(8'(i + 1), 16'(32 + 7 * i));
    look(8'd9, 16'd99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
