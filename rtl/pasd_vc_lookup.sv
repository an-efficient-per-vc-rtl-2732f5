// pasd_vc_lookup: finds the VC index i of a cell from its VPI/VCI.
//
// The published scheme only names this step ("Get VC index i from the VPI/VCI of an
// incoming cell"); how it is done is this design's choice: a small fully
// associative table of N_VC entries, written by management through the cfg_*
// port while the connection is set up. Lookup is combinational (same cell
// time): hit is high when an enabled entry holds the cell's VPI/VCI, and idx
// is that entry's number. A cell that hits no entry belongs to no GFR VC of
// this port and is discarded by the PEPD block.
module pasd_vc_lookup
  import pasd_pkg::*;
#(
  parameter int N_VC = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  // management write port
  input  logic             cfg_we,
  input  vc_idx_t          cfg_idx,
  input  logic             cfg_en,
  input  logic [VPI_W-1:0] cfg_vpi,
  input  logic [VCI_W-1:0] cfg_vci,
  // lookup
  input  logic [VPI_W-1:0] vpi,
  input  logic [VCI_W-1:0] vci,
  output logic             hit,
  output vc_idx_t          idx
);

  logic [N_VC-1:0]  en_q;
  logic [VPI_W-1:0] vpi_q [N_VC];
  logic [VCI_W-1:0] vci_q [N_VC];

  localparam int VW = (N_VC > 1) ? $clog2(N_VC) : 1;  // index width of the per-VC arrays
  logic [VW-1:0]    ci;
  assign ci = cfg_idx[VW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q <= '0;
      for (int i = 0; i < N_VC; i++) begin
        vpi_q[i] <= '0;
        vci_q[i] <= '0;
      end
    end else if (cfg_we && int'(cfg_idx) < N_VC) begin
      en_q[ci]  <= cfg_en;
      vpi_q[ci] <= cfg_vpi;
      vci_q[ci] <= cfg_vci;
    end
  end

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int i = 0; i < N_VC; i++) begin
      if (!hit && en_q[i] && vpi_q[i] == vpi && vci_q[i] == vci) begin
        hit = 1'b1;
        idx = vc_idx_t'(i);
      end
    end
  end

endmodule
