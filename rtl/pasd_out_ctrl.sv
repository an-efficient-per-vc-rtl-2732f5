// pasd_out_ctrl: the output controller, the FIFO output port of PASD.
//
// It serves the head of the FIFO. On the first cell of a frame it chooses the
// frame's marking A2_i: for a tagged (CLP=1) frame, if V_i > 0 the whole frame
// is dropped from the front of the buffer (A2_i = 2, V_i--); else if U_i > 0 the
// frame is retagged as untagged (CLP set to 0, A2_i = 1, U_i--), making up
// for an untagged frame that PEPD had to reject; otherwise, and for every
// untagged frame, it is transmitted as it is (A2_i = 0). The other cells of
// the frame follow A2_i of their VC. Every cell that leaves the FIFO
// decrements X_i and returns one cell to B_t (cell_freed).
//
// Timing: one clock is one cell time. A cell to transmit is offered on
// out_valid / out_cell and leaves when out_ready (the output link's cell
// slot) is high. A cell to drop leaves in one clock without using an output
// slot, as the published algorithm's "Discard cell; goto Label" step lets the next cell be
// served at once. The published PASD algorithm does not increase B_t or decrease
// X_i for a dropped cell, while its text says B_t grows "whenever a cell is
// served out from the FIFO block"; this design frees the space of dropped
// cells too, since they leave the buffer.
module pasd_out_ctrl
  import pasd_pkg::*;
#(
  parameter int N_VC = 5,
  parameter int UV_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // FIFO head
  input  logic            fifo_empty,
  input  fifo_entry_t     head,
  output logic            pop,
  // counters of the head's VC
  input  logic [UV_W-1:0] u_cnt [N_VC],
  input  logic [UV_W-1:0] v_cnt [N_VC],
  output vc_idx_t         out_vc,
  output logic            x_dec,
  output logic            u_dec,
  output logic            v_dec,
  output logic            cell_freed,
  // output link
  output logic            out_valid,
  output cell_t           out_cell,
  input  logic            out_ready,
  // to the SDWU utilisation measurement
  output logic            tx_valid,
  output vc_idx_t         tx_vc,
  // status
  output logic            out_drop,
  output logic            retag
);

  a2_e  a2_q [N_VC];
  a2_e  a2_now;
  logic hv;

  localparam int VW = (N_VC > 1) ? $clog2(N_VC) : 1;  // index width of the per-VC arrays
  logic [VW-1:0] hv_i;
  assign hv_i = head.vc[VW-1:0];

  assign hv = !fifo_empty && int'(head.vc) < N_VC;

  always_comb begin
    a2_now = A2_TRANSMIT;
    if (hv) begin
      if (head.first) begin
        if (head.cl.clp) begin
          if (v_cnt[hv_i] != '0)      a2_now = A2_DISCARD;
          else if (u_cnt[hv_i] != '0) a2_now = A2_RETAG;
        end
      end else begin
        a2_now = a2_q[hv_i];
      end
    end
  end

  always_comb begin
    out_cell = head.cl;
    if (a2_now == A2_RETAG) out_cell.clp = 1'b0;
  end

  assign out_valid  = hv && a2_now != A2_DISCARD;
  assign pop        = !fifo_empty && (!hv || a2_now == A2_DISCARD || out_ready);
  assign out_vc     = head.vc;
  assign x_dec      = pop && hv;
  assign cell_freed = pop;
  assign u_dec      = pop && hv && head.first && a2_now == A2_RETAG;
  assign v_dec      = pop && hv && head.first && a2_now == A2_DISCARD;
  assign tx_valid   = pop && hv && a2_now != A2_DISCARD;
  assign tx_vc      = head.vc;
  assign out_drop   = pop && hv && a2_now == A2_DISCARD;
  assign retag      = pop && hv && head.first && a2_now == A2_RETAG;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_VC; i++) a2_q[i] <= A2_TRANSMIT;
    end else if (pop && hv) begin
      a2_q[hv_i] <= a2_now;
    end
  end

endmodule
