// pasd_top: one output port of a cell switch with PASD buffer management
// for guaranteed-frame-rate (GFR) VCs.
//
// Data path: SEL picks one cell per cell time from the switch inputs; the VC
// lookup turns its VPI/VCI into the VC index i; PEPD accepts or rejects the
// cell's frame and pushes accepted cells into one shared FIFO; the output
// controller serves the FIFO head to the output link, dropping from the front
// the frames chosen by the nonlinear RED test and retagging tagged frames to
// make up for rejected untagged ones. The per-VC counter block holds X_i, U_i
// and V_i for both sides; the nonlinear RED block with SDWU draws the drop
// decisions and adapts the fair indices F_i from the measured output
// utilisation. The block structure and connections follow the published scheme's
// functional block diagram; the FIFO here is one on-chip array, where the
// scheme uses FIFO chips for headers and DDR SDRAM for payloads.
//
// Interface: inputs use valid/ready per switch input; the output link offers
// a cell with out_valid and takes it when out_ready is high (one cell slot;
// the SDWU update interval is counted in these slots).
// Management writes the VPI/VCI of each VC through cfg_* and gives the ideal
// fair shares f_i = MCR_i / sum MCR on fair_share (read at reset).
// Latency: a cell taken from an input is in the FIFO two clocks later and can
// leave on the clock after that if the FIFO was empty.
module pasd_top
  import pasd_pkg::*;
#(
  parameter int NUM_IN     = 4,
  parameter int N_VC       = 5,
  parameter int B          = 1000,
  parameter int M          = 12,
  parameter int FIFO_DEPTH = 1024,
  parameter int LOG_T      = 12,
  parameter int ETA_SHIFT  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // switch inputs
  input  logic [NUM_IN-1:0] in_valid,
  input  cell_t             in_cell [NUM_IN],
  output logic [NUM_IN-1:0] in_ready,
  // management
  input  logic              cfg_we,
  input  vc_idx_t           cfg_idx,
  input  logic              cfg_en,
  input  logic [VPI_W-1:0]  cfg_vpi,
  input  logic [VCI_W-1:0]  cfg_vci,
  input  fix_t              fair_share [N_VC],
  // output link
  output logic              out_valid,
  output cell_t             out_cell,
  input  logic              out_ready,
  // status
  output logic              in_drop,      // a cell discarded by PEPD
  output logic              red_mark,     // RED chose a frame to drop
  output logic              out_drop,     // a cell dropped from the front
  output logic              retag,        // a frame retagged CLP 1 -> 0
  output logic              sdwu_update,
  output logic signed [15:0] bt,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] x_total,
  output fix_t              fair_index [N_VC],
  output fix_t              rho [N_VC]
);

  localparam int X_W  = $clog2(FIFO_DEPTH + 1);
  localparam int UV_W = 16;

  // SEL -> lookup -> PEPD
  logic    sel_valid;
  cell_t   sel_cell;
  logic    vc_hit;
  vc_idx_t vc_idx;

  // PEPD
  logic        push, x_inc, u_inc, red_trigger;
  fifo_entry_t push_entry;
  vc_idx_t     in_cnt_vc, red_vc;

  // FIFO
  fifo_entry_t head;
  logic        fifo_empty, fifo_full, fifo_overflow, pop;

  // counters
  logic [X_W-1:0]  x_cnt [N_VC];
  logic [UV_W-1:0] u_cnt [N_VC];
  logic [UV_W-1:0] v_cnt [N_VC];

  // RED / output controller
  logic    v_inc, x_dec, u_dec, v_dec, cell_freed, tx_valid;
  vc_idx_t v_vc, out_vc, tx_vc;

  pasd_sel #(.NUM_IN(NUM_IN)) u_sel (
    .clk, .rst_n, .in_valid, .in_cell, .in_ready,
    .out_valid(sel_valid), .out_cell(sel_cell)
  );

  pasd_vc_lookup #(.N_VC(N_VC)) u_lookup (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_en, .cfg_vpi, .cfg_vci,
    .vpi(sel_cell.vpi), .vci(sel_cell.vci), .hit(vc_hit), .idx(vc_idx)
  );

  pasd_pepd #(.N_VC(N_VC), .B(B), .M(M), .BT_W(16)) u_pepd (
    .clk, .rst_n,
    .cell_valid(sel_valid), .cell_in(sel_cell), .vc_hit, .vc(vc_idx),
    .cell_freed,
    .push, .push_entry,
    .x_inc, .u_inc, .cnt_vc(in_cnt_vc),
    .red_trigger, .red_vc,
    .in_drop, .bt
  );

  pasd_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push, .push_entry, .pop, .head,
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count),
    .overflow(fifo_overflow)
  );

  pasd_vc_counters #(.N_VC(N_VC), .X_W(X_W), .UV_W(UV_W)) u_counters (
    .clk, .rst_n,
    .in_vc(in_cnt_vc), .x_inc, .u_inc, .red_vc(v_vc), .v_inc,
    .out_vc, .x_dec, .u_dec, .v_dec,
    .x_cnt, .u_cnt, .v_cnt, .x_total
  );

  pasd_red_sdwu #(.N_VC(N_VC), .B(B), .X_W(X_W), .LOG_T(LOG_T),
                  .ETA_SHIFT(ETA_SHIFT)) u_red (
    .clk, .rst_n, .fair_share,
    .trigger(red_trigger), .trig_vc(red_vc), .x_cnt, .x_total,
    .v_inc, .v_vc, .link_slot(out_ready), .tx_valid, .tx_vc,
    .fair_index, .rho, .sdwu_update
  );

  pasd_out_ctrl #(.N_VC(N_VC), .UV_W(UV_W)) u_out (
    .clk, .rst_n, .fifo_empty, .head, .pop,
    .u_cnt, .v_cnt, .out_vc, .x_dec, .u_dec, .v_dec, .cell_freed,
    .out_valid, .out_cell, .out_ready,
    .tx_valid, .tx_vc, .out_drop, .retag
  );

  assign red_mark = v_inc;

  // PEPD prepayment keeps the shared FIFO from overflowing.
  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) !fifo_overflow)
    else $error("pasd_top: FIFO overflow");

endmodule
