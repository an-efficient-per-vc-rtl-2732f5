// tb_pasd_fifo: self-checking test of the shared cell FIFO.
// Random pushes and pops (with the queue filled to full and drained to empty
// on the way) are compared against a SystemVerilog queue; count, empty and
// full flags and the head entry are checked every clock.
module tb_pasd_fifo;
  import pasd_pkg::*;
  localparam int D = 16;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  fifo_entry_t push_entry = '0, head;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;

  pasd_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fifo_entry_t q [$];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int bias;
      @(negedge clk);
      chk(int'(count) == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(head == q[0], "head");
      bias = (t / 200) % 2 ? 30 : 70;   // alternate filling and draining
      push = ($urandom_range(99) < bias) && q.size() < D;
      pop  = ($urandom_range(99) >= bias) || ($urandom_range(3) == 0);
      push_entry.vc = vc_idx_t'($urandom_range(4));
      push_entry.first = 1'($urandom);
      push_entry.cl.vci = 16'(t);
      push_entry.cl.payload = {12{$urandom}};
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(push_entry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
