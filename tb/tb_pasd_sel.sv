// tb_pasd_sel: self-checking test of the round-robin SEL block.
// Random input valids are driven for many cycles; a reference round-robin
// pointer predicts which input gets in_ready, and the registered output must
// carry that input's cell one clock later. With all inputs valid the grants
// must rotate 0,1,2,3 (one cell per clock, no starvation).
module tb_pasd_sel;
  import pasd_pkg::*;
  localparam int NI = 4;

  logic clk = 0, rst_n = 0;
  logic [NI-1:0] in_valid, in_ready;
  cell_t in_cell [NI];
  logic out_valid;
  cell_t out_cell;
  int checks = 0, failures = 0;

  pasd_sel #(.NUM_IN(NI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int ptr = 0;
  int exp_g;
  logic exp_v;
  cell_t exp_c;

  initial begin
    in_valid = '0;
    for (int k = 0; k < NI; k++) in_cell[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_v = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // check the output registered from the previous cycle
      chk(out_valid == exp_v, "out_valid");
      if (exp_v) chk(out_cell == exp_c, "out_cell");
      for (int k = 0; k < NI; k++) begin
        in_cell[k].vpi = 8'(k);
        in_cell[k].vci = 16'($urandom);
        in_cell[k].payload = {12{$urandom}};
        in_cell[k].clp = 1'($urandom);
        in_cell[k].eof = 1'($urandom);
      end
      in_valid = (t < 100) ? '1 : NI'($urandom);
      #1;
      exp_g = -1;
      for (int k = 0; k < NI; k++)
        if (exp_g < 0 && in_valid[(ptr + k) % NI]) exp_g = (ptr + k) % NI;
      if (exp_g >= 0) begin
        chk(in_ready == NI'(1 << exp_g), "in_ready");
        exp_c = in_cell[exp_g];
        exp_v = 1;
        ptr = (exp_g + 1) % NI;
        if (t < 100) chk(exp_g == t % NI, "rotation");
      end else begin
        chk(in_ready == '0, "no grant");
        exp_v = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
