// pasd_pepd: pre-paid early packet discard (PEPD), the FIFO input port of the
// PASD buffer manager.
//
// Whole frames are accepted or rejected on their first cell. B_t tracks the
// residual FIFO space: if B_t > 0 when a frame's first cell arrives, the frame
// is accepted (A1_i = 0) and M cells (the maximum frame length) are prepaid,
// B_t -= M; otherwise it is rejected (A1_i = 1) and, if untagged (CLP=0),
// U_i is incremented so that the output controller can later retag a tagged
// frame in its place. Every cell of the frame then follows A1_i. An accepted
// cell is pushed into the FIFO, increments L_i (frame length so far) and X_i
// (cells of VC i in the FIFO); on the last cell the unused prepayment is
// refunded, B_t += M - L_i, and L_i is cleared. Every cell leaving the FIFO
// (cell_freed) gives one cell back, B_t += 1. An accepted tagged first cell
// triggers the nonlinear RED test (red_trigger), which may count the VC's
// frame for drop-from-front.
//
// All of this follows the published PASD algorithm. This design's own choices:
// the first cell of a frame is the first cell of a VC after its last cell
// (in_frame_q), as in AAL5; a cell whose VPI/VCI hits no VC is discarded;
// one clock is one cell time and all decisions are made in that clock, the
// counters changing at its end. in_drop pulses for every discarded cell.
module pasd_pepd
  import pasd_pkg::*;
#(
  parameter int N_VC = 5,
  parameter int B    = 1000,  // FIFO buffer capacity in cells
  parameter int M    = 12,    // maximum frame size in cells
  parameter int BT_W = 16     // width of the signed B_t counter
) (
  input  logic        clk,
  input  logic        rst_n,
  // cell from SEL, VC index from the lookup
  input  logic        cell_valid,
  input  cell_t       cell_in,
  input  logic        vc_hit,
  input  vc_idx_t     vc,
  // one cell left the FIFO this cycle (transmitted or discarded)
  input  logic        cell_freed,
  // to the FIFO
  output logic        push,
  output fifo_entry_t push_entry,
  // to the per-VC counters
  output logic        x_inc,
  output logic        u_inc,
  output vc_idx_t     cnt_vc,
  // to the nonlinear RED with SDWU block
  output logic        red_trigger,
  output vc_idx_t     red_vc,
  // status
  output logic        in_drop,
  output logic signed [BT_W-1:0] bt
);

  logic signed [BT_W-1:0] bt_q;
  logic [N_VC-1:0] a1_q;        // A1_i: 1 = current frame rejected
  logic [N_VC-1:0] in_frame_q;  // a frame of VC i is in progress
  logic [7:0]      len_q [N_VC];// L_i

  logic       ok, first, a1_now, accept;
  logic [7:0] len_new;
  logic signed [BT_W-1:0] bt_next;

  localparam int VW = (N_VC > 1) ? $clog2(N_VC) : 1;  // index width of the per-VC arrays
  logic [VW-1:0] vi;
  assign vi = vc[VW-1:0];

  assign ok      = cell_valid && vc_hit && int'(vc) < N_VC;
  assign first   = ok && !in_frame_q[vi];
  assign a1_now  = first ? (bt_q <= 0) : (ok ? a1_q[vi] : 1'b1);
  assign accept  = ok && !a1_now;
  assign len_new = ok ? len_q[vi] + 8'd1 : 8'd0;

  always_comb begin
    bt_next = bt_q;
    if (first && accept)        bt_next = bt_next - BT_W'(M);
    if (accept && cell_in.eof)     bt_next = bt_next + BT_W'(M) - BT_W'(len_new);
    if (cell_freed)             bt_next = bt_next + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bt_q       <= BT_W'(B);
      a1_q       <= '0;
      in_frame_q <= '0;
      for (int i = 0; i < N_VC; i++) len_q[i] <= '0;
    end else begin
      bt_q <= bt_next;
      if (ok) begin
        in_frame_q[vi] <= !cell_in.eof;
        if (first) a1_q[vi] <= a1_now;
        if (accept) len_q[vi] <= cell_in.eof ? 8'd0 : len_new;
      end
    end
  end

  assign push             = accept;
  assign push_entry.vc    = vc;
  assign push_entry.first = first;
  assign push_entry.cl    = cell_in;

  assign x_inc       = accept;
  assign u_inc       = first && a1_now && !cell_in.clp;
  assign cnt_vc      = vc;
  assign red_trigger = first && accept && cell_in.clp;
  assign red_vc      = vc;
  assign in_drop     = cell_valid && !accept;
  assign bt          = bt_q;

endmodule
