// pasd_pkg: types and constants shared by the PASD (per-VC accounting with
// steepest-descent weight updating) buffer manager.
//
// A cell is an ATM-style cell: a VPI/VCI header, the cell loss priority bit
// (CLP=0 untagged, CLP=1 tagged), an end-of-frame flag (the AAL5 "last cell of
// the frame" indication) and a 48-byte payload. The header fields and widths
// are those of a standard ATM UNI cell; the published scheme only speaks
// of "cells", "VPI/VCI", "CLP", "first cell" and "last cell". A FIFO entry is
// a cell plus the VC index found for it and a "first cell of frame" flag,
// so that the output side can see frame boundaries without a second lookup.
//
// Fractions (fair share f_i, fair index F_i, utilisation rho_i, the random
// number of the RED test) are unsigned fixed point with FRAC_W fraction bits.
package pasd_pkg;

  localparam int PAYLOAD_W = 384;  // 48-byte cell payload
  localparam int VPI_W     = 8;
  localparam int VCI_W     = 16;
  localparam int VCIDX_W   = 8;    // VC index width: up to 256 VCs
  localparam int FRAC_W    = 16;   // fraction bits of f_i, F_i, rho_i
  localparam int FIX_W     = FRAC_W + 1;  // holds values 0 .. 1.0

  typedef logic [VCIDX_W-1:0] vc_idx_t;
  typedef logic [FIX_W-1:0]   fix_t;

  typedef struct packed {
    logic [VPI_W-1:0]     vpi;
    logic [VCI_W-1:0]     vci;
    logic                 clp;     // 0: untagged (high priority), 1: tagged
    logic                 eof;     // last cell of a frame
    logic [PAYLOAD_W-1:0] payload;
  } cell_t;

  typedef struct packed {
    vc_idx_t vc;
    logic    first;  // first cell of a frame
    cell_t   cl;     // the cell itself
  } fifo_entry_t;

  // Per-VC output marking A2_i
  typedef enum logic [1:0] {
    A2_TRANSMIT = 2'd0,
    A2_RETAG    = 2'd1,
    A2_DISCARD  = 2'd2
  } a2_e;

endpackage
