// Digital part of the linear phase-frequency detector.
//
// The phase detector (two D flip-flops) stays in the low-noise signal path
// on its own; the frequency detector, only needed while pulling in, sits
// beside it and acts on it through four control lines. The outputs q_r/qn_r
// and q_v/qn_v go to the balanced analog stage (subtractors, low-pass,
// summation, loop filter), which is not part of this RTL.
// The split into phase and frequency detector and the lines between them
// follow the document.
//
// Interface: r, v pulse-shaped reference and divider pulses; clk_fd sampling
// clock of the frequency detector; see phase_det and freq_det for timing.
module pfd
  import frac_pkg::*;
#(
  parameter int SLIP_MAX = 4
)(
  input  logic clk_fd,
  input  logic rst_n,
  input  logic r,
  input  logic v,
  output logic q_r,
  output logic qn_r,
  output logic q_v,
  output logic qn_v,
  output logic ld1,
  output logic ld2
);

  pd_ctrl_t ctrl;

  freq_det #(.SLIP_MAX(SLIP_MAX)) u_fd (
    .clk (clk_fd), .rst_n, .r, .v, .ld1, .ld2, .ctrl
  );

  phase_det u_pd (
    .rst_n, .r, .v, .ctrl, .q_r, .qn_r, .q_v, .qn_v
  );

endmodule
