// Phase detector of the linear PFD: two D flip-flops.
//
// Both inputs are short pulses (pulse-shaped reference R and divider output
// V). The R flip-flop is clocked by R with D = 1 and cleared by V; the V
// flip-flop is clocked by V with D = 1 and cleared by R. So q_r is high from
// an R pulse to the next V pulse and q_v from V to R: for a phase lag phi of V
// behind R the mean of q_r is phi/2pi and that of q_v is 1 - phi/2pi. The
// balanced analog stage subtracts each output from its complement and adds
// the two pairs as (q_r - qn_r) + (qn_v - q_v); with a 1 V step per pair this
// gives 4 V over 2pi, linear over the whole period and centred at phi = pi,
// the bias point furthest from both edges of the characteristic.
// The frequency detector can force either output through the four control
// lines: a clear line holds its flip-flop cleared, a set line holds its
// output high. The lines are idle in lock.
// Two D flip-flops, clocked by R and V, with four control lines from the
// frequency detector, follow the document. The cross-clearing, the use of
// the lines as set/clear and the output pairing are this design's reading
// of the gain 4V/2pi.
//
// Circuit note: the asynchronous clear of each flip-flop is the OR of the
// other input pulse, a control line and the reset. This is intended: the
// clear pulse must be short (pulse-shaped inputs) so it has ended before the
// flip-flop's own clock edge, and the dead zone this leaves lies near
// phi = 0, away from the bias point.
module phase_det
  import frac_pkg::*;
(
  input  logic     rst_n,
  input  logic     r,        // pulse-shaped reference
  input  logic     v,        // pulse-shaped divider output
  input  pd_ctrl_t ctrl,     // control lines from the frequency detector
  output logic     q_r,
  output logic     qn_r,
  output logic     q_v,
  output logic     qn_v
);

  logic clr_r_any, clr_v_any;
  logic ff_r, ff_v;

  assign clr_r_any = v | ctrl.clr_r | ~rst_n;
  assign clr_v_any = r | ctrl.clr_v | ~rst_n;

  always_ff @(posedge r or posedge clr_r_any) begin
    if (clr_r_any) ff_r <= 1'b0;
    else           ff_r <= 1'b1;
  end

  always_ff @(posedge v or posedge clr_v_any) begin
    if (clr_v_any) ff_v <= 1'b0;
    else           ff_v <= 1'b1;
  end

  // Preset lines act on the outputs
  assign q_r  = ff_r | ctrl.set_r;
  assign q_v  = ff_v | ctrl.set_v;
  assign qn_r = ~q_r;
  assign qn_v = ~q_v;

endmodule
