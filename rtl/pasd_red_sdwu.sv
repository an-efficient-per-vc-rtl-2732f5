// pasd_red_sdwu: the nonlinear RED block with steepest-descent weight
// updating (SDWU).
//
// RED test. When PEPD accepts the first cell of a tagged (CLP=1) frame of VC i
// it raises trigger; the block then drops that VC's next tagged frame from the
// front (v_inc, which increments V_i) with probability
//     P = min{ (X_i / (X * F_i) - 1) * X / B , 1 }   if X_i > X * F_i, else 0
// where X_i is VC i's FIFO occupancy, X the total occupancy, B the buffer
// capacity and F_i the fair index. As in the published PASD algorithm, the test is
// "P > Random(0,1)". In fixed point (F_i = Fq / 2^FRAC_W, Random = r / 2^16)
// and after cancelling X, this is evaluated exactly as
//     (X_i * 2^FRAC_W - X * Fq) * 2^16 > r * Fq * B ,  left side positive.
// The random number r comes from a 16-bit Galois LFSR that steps every clock
// (this design's choice; the published scheme does not say how Random(0,1) is made).
//
// SDWU. Every update interval of 2^LOG_T output-link cell slots (link_slot
// marks a clock in which the link can take a cell, used or not) the block
// measures the output-link utilisation of each VC, rho_i = (cells of VC i
// transmitted in the interval) / 2^LOG_T, and moves each fair index towards
// fairness:
//     F_i = F_i + eta * (f_i - rho_i)
// with f_i = MCR_i / sum MCR the ideal fair share (input fair_share, given
// by management) and eta = 2^-ETA_SHIFT. F_i starts at f_i after reset and
// is kept within [0, 1]. The update rule and the starting value follow the
// published scheme; the interval length, eta, the power-of-two forms and the clamp are
// this design's choices. All updates of an interval happen in the clock of
// its last link slot.
module pasd_red_sdwu
  import pasd_pkg::*;
#(
  parameter int N_VC      = 5,
  parameter int B         = 1000,
  parameter int X_W       = 11,
  parameter int LOG_T     = 12,       // update interval = 2^LOG_T link slots
  parameter int ETA_SHIFT = 4,        // eta = 2^-ETA_SHIFT
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  fix_t           fair_share [N_VC],  // f_i
  // RED test request from PEPD
  input  logic           trigger,
  input  vc_idx_t        trig_vc,
  input  logic [X_W-1:0] x_cnt [N_VC],
  input  logic [X_W-1:0] x_total,
  // to the per-VC counters
  output logic           v_inc,
  output vc_idx_t        v_vc,
  // output link: a cell slot, and a cell transmitted (output controller)
  input  logic           link_slot,
  input  logic           tx_valid,
  input  vc_idx_t        tx_vc,
  // status
  output fix_t           fair_index [N_VC],  // F_i
  output fix_t           rho [N_VC],         // rho_i of the last interval
  output logic           sdwu_update         // pulses in the update clock
);

  localparam fix_t ONE = fix_t'(1) << FRAC_W;

  // ---------------------------------------------------------------- LFSR
  logic [15:0] lfsr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= SEED;
    else        lfsr_q <= lfsr_q[0] ? ((lfsr_q >> 1) ^ 16'hB400) : (lfsr_q >> 1);
  end

  // ---------------------------------------------------------------- RED test
  fix_t        f_q [N_VC];
  logic [63:0] lhs_base, lhs, rhs, own, fair;
  logic        drop;

  localparam int VW = (N_VC > 1) ? $clog2(N_VC) : 1;  // index width of the per-VC arrays
  logic [VW-1:0] tv_i;
  assign tv_i = trig_vc[VW-1:0];

  always_comb begin
    own  = '0;
    fair = '0;
    if (int'(trig_vc) < N_VC) begin
      own  = 64'(x_cnt[tv_i]) << FRAC_W;
      fair = 64'(x_total) * 64'(f_q[tv_i]);
    end
    lhs_base = own - fair;
    lhs      = lhs_base << 16;
    rhs      = 64'(lfsr_q) * 64'(int'(trig_vc) < N_VC ? f_q[tv_i] : '0) * 64'(B);
    drop     = (own > fair) && (lhs > rhs);
  end

  assign v_inc = trigger && int'(trig_vc) < N_VC && drop;
  assign v_vc  = trig_vc;

  // ---------------------------------------------------------------- SDWU
  logic [LOG_T-1:0] cyc_q;
  logic [LOG_T:0]   txc_q [N_VC];
  fix_t             rho_q [N_VC];
  logic             last;

  assign last = link_slot && (cyc_q == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q <= '0;
      for (int i = 0; i < N_VC; i++) begin
        txc_q[i] <= '0;
        rho_q[i] <= '0;
        f_q[i]   <= fair_share[i];
      end
    end else begin
      if (link_slot) cyc_q <= cyc_q + 1'b1;
      for (int i = 0; i < N_VC; i++) begin
        logic [LOG_T:0]     cnt;
        fix_t               r;
        logic signed [FIX_W+1:0] d, nf;
        cnt = txc_q[i] + (LOG_T+1)'(tx_valid && int'(tx_vc) == i);
        if (last) begin
          r  = fix_t'(cnt) << (FRAC_W - LOG_T);
          d  = ($signed({2'b00, fair_share[i]}) - $signed({2'b00, r})) >>> ETA_SHIFT;
          nf = $signed({2'b00, f_q[i]}) + d;
          if (nf < 0)                          f_q[i] <= '0;
          else if (nf > $signed({2'b00, ONE})) f_q[i] <= ONE;
          else                                 f_q[i] <= fix_t'(nf);
          rho_q[i] <= r;
          txc_q[i] <= '0;
        end else begin
          txc_q[i] <= cnt;
        end
      end
    end
  end

  assign fair_index  = f_q;
  assign rho         = rho_q;
  assign sdwu_update = last;

endmodule
