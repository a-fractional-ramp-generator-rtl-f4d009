// Frequency detector of the linear PFD.
//
// Watches the same R and V pulses as the phase detector and steps in only
// when the phase leaves the range the phase detector can handle. A phase
// follower counts R pulses up and V pulses down; in lock at the bias point
// the pulses alternate and the count stays at 0 or 1 (phase within one
// period). Two R pulses without a V between push it to 2: the divided VCO is
// slower than the reference (LD2). Two V pulses push it to -1: the VCO is
// faster (LD1). While either holds, the control lines force the phase
// detector to its extreme output in the needed direction (LD2: q_r set,
// q_v cleared; LD1: q_r cleared, q_v set). The count saturates SLIP_MAX
// steps beyond the normal range, which makes the release hysteretic: after
// a large frequency error the VCO has to catch up the slipped cycles before
// the phase detector takes over again. In lock both LDs and all four lines
// are low, so nothing disturbs the phase detector.
// The outputs LD1/LD2, their meaning, the four control lines and their being
// idle in lock follow the document; its internal structure is not given, and
// this counter, its sampling clock and SLIP_MAX are this design's choices.
//
// Interface: clk is a sampling clock several times faster than R and V (a
// pulse must be high for at least one clk period). R and V pass through two
// synchroniser flip-flops; LD and control outputs are registered, so they
// react 3 to 4 clk periods after a pulse. Asynchronous active-low reset.
module freq_det
  import frac_pkg::*;
#(
  parameter int SLIP_MAX = 4
)(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     r,
  input  logic     v,
  output logic     ld1,      // f_v > f_ref
  output logic     ld2,      // f_v < f_ref
  output pd_ctrl_t ctrl
);

  localparam int CW = $clog2(SLIP_MAX + 2) + 2;   // signed counter width
  typedef logic signed [CW-1:0] cnt_t;
  localparam cnt_t CNT_MIN = cnt_t'(-SLIP_MAX);
  localparam cnt_t CNT_MAX = cnt_t'(SLIP_MAX + 1);

  logic [2:0] r_sr, v_sr;
  logic       r_edge, v_edge;
  cnt_t       cnt;

  assign r_edge = r_sr[1] & ~r_sr[2];
  assign v_edge = v_sr[1] & ~v_sr[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_sr <= '0;
      v_sr <= '0;
      cnt  <= '0;
      ld1  <= 1'b0;
      ld2  <= 1'b0;
    end else begin
      r_sr <= {r_sr[1:0], r};
      v_sr <= {v_sr[1:0], v};
      if (r_edge && !v_edge && cnt < CNT_MAX) cnt <= cnt + 1'b1;
      if (v_edge && !r_edge && cnt > CNT_MIN) cnt <= cnt - 1'b1;
      ld1 <= (cnt < 0);
      ld2 <= (cnt > 1);
    end
  end

  always_comb begin
    ctrl.set_r = ld2;
    ctrl.clr_v = ld2;
    ctrl.clr_r = ld1;
    ctrl.set_v = ld1;
  end

endmodule
