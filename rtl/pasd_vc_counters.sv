// pasd_vc_counters: the per-VC counter block.
//
// Holds, for every VC i, X_i (cells of VC i in the FIFO), U_i (untagged frames
// rejected by PEPD and not yet compensated by retagging) and V_i (frames that
// the nonlinear RED test chose to drop from the front and not yet dropped),
// plus the total FIFO occupancy X = sum X_i. The input side (PEPD, RED) only
// increments and the output controller only decrements, each through its own
// port with its own VC index, so both sides can update in the same clock,
// even the same VC. Counts are read directly from the output arrays.
//
// The counters and their meaning follow the published scheme. Widths, saturation of
// U_i / V_i at their maximum, and never going below zero are this design's
// choices.
module pasd_vc_counters
  import pasd_pkg::*;
#(
  parameter int N_VC  = 5,
  parameter int X_W   = 11,   // enough for a FIFO of up to 2047 cells
  parameter int UV_W  = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // input side
  input  vc_idx_t         in_vc,
  input  logic            x_inc,
  input  logic            u_inc,
  input  vc_idx_t         red_vc,
  input  logic            v_inc,
  // output side
  input  vc_idx_t         out_vc,
  input  logic            x_dec,
  input  logic            u_dec,
  input  logic            v_dec,
  // counts
  output logic [X_W-1:0]  x_cnt [N_VC],
  output logic [UV_W-1:0] u_cnt [N_VC],
  output logic [UV_W-1:0] v_cnt [N_VC],
  output logic [X_W-1:0]  x_total
);

  logic [X_W-1:0]  x_q [N_VC];
  logic [UV_W-1:0] u_q [N_VC];
  logic [UV_W-1:0] v_q [N_VC];
  logic [X_W-1:0]  tot_q;

  localparam int VW = (N_VC > 1) ? $clog2(N_VC) : 1;  // index width of the per-VC arrays
  logic [VW-1:0]   ov_i;
  assign ov_i = out_vc[VW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tot_q <= '0;
      for (int i = 0; i < N_VC; i++) begin
        x_q[i] <= '0;
        u_q[i] <= '0;
        v_q[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_VC; i++) begin
        logic xi, xd, ui, ud, vi, vd;
        xi = x_inc && int'(in_vc)  == i;
        xd = x_dec && int'(out_vc) == i && x_q[i] != '0;
        ui = u_inc && int'(in_vc)  == i && u_q[i] != '1;
        ud = u_dec && int'(out_vc) == i && u_q[i] != '0;
        vi = v_inc && int'(red_vc) == i && v_q[i] != '1;
        vd = v_dec && int'(out_vc) == i && v_q[i] != '0;
        x_q[i] <= x_q[i] + X_W'(xi) - X_W'(xd);
        u_q[i] <= u_q[i] + UV_W'(ui) - UV_W'(ud);
        v_q[i] <= v_q[i] + UV_W'(vi) - UV_W'(vd);
      end
      tot_q <= tot_q + X_W'(x_inc && int'(in_vc) < N_VC)
                     - X_W'(x_dec && int'(out_vc) < N_VC && x_q[ov_i] != '0);
    end
  end

  assign x_cnt   = x_q;
  assign u_cnt   = u_q;
  assign v_cnt   = v_q;
  assign x_total = tot_q;

endmodule
