// pasd_sel: the SEL block. Each cell time it takes one cell from the switch
// input modules and hands it to the PEPD block of this output module.
//
// The published scheme gives only the function ("selects one of incoming cells from
// input modules"); the selection rule is this design's choice: a round-robin
// arbiter, so no input can starve another. One clock is one cell time.
// Inputs use a valid/ready handshake: in_ready[k] is high in the cycle in
// which input k's cell is taken. The chosen cell appears on out_valid /
// out_cell one clock later (registered output); the downstream PEPD block
// takes a cell every clock, so there is no back-pressure on the output.
module pasd_sel
  import pasd_pkg::*;
#(
  parameter int NUM_IN = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_IN-1:0]  in_valid,
  input  cell_t              in_cell [NUM_IN],
  output logic [NUM_IN-1:0]  in_ready,
  output logic               out_valid,
  output cell_t              out_cell
);

  localparam int IW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic [IW-1:0] ptr_q;   // input with the highest priority this cycle
  logic [IW-1:0] grant;
  logic          any;
  logic [IW:0]   cand;    // candidate input, ptr_q + k wrapped to NUM_IN

  // Round robin: the first valid input at or after ptr_q wins.
  always_comb begin
    any   = 1'b0;
    grant = '0;
    cand  = '0;
    for (int k = 0; k < NUM_IN; k++) begin
      cand = {1'b0, ptr_q} + (IW+1)'(k);
      if (int'(cand) >= NUM_IN) cand = cand - (IW+1)'(NUM_IN);
      if (!any && in_valid[cand[IW-1:0]]) begin
        any   = 1'b1;
        grant = cand[IW-1:0];
      end
    end
  end

  always_comb begin
    in_ready = '0;
    if (any) in_ready[grant] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q     <= '0;
      out_valid <= 1'b0;
      out_cell  <= '0;
    end else begin
      out_valid <= any;
      if (any) begin
        out_cell <= in_cell[grant];
        ptr_q    <= (int'(grant) == NUM_IN - 1) ? '0 : grant + 1'b1;
      end
    end
  end

endmodule
