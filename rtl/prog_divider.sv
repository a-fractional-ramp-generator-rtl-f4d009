// Programmable divider (divide by N).
//
// Divides the prescaled VCO signal by an integer N that may change every
// output cycle: a down-counter is reloaded with n_in when it reaches 1, and
// the output pulses for one input clock at that moment, so consecutive output
// pulses are exactly N input clocks apart, N being the value of n_in sampled
// at the pulse before. The output clocks the fractional logic, which
// presents the next N well before the counter needs it (N >= 8).
// The division by a changing N follows the document (8 <= N <= 28 in use);
// the counter form, the clamp of N below N_MIN and the reset are this
// design's choices.
//
// Interface: clk_in prescaled VCO signal, n_in unsigned division factor,
// div_out one-clk_in-wide pulse per division cycle. Asynchronous reset.
module prog_divider
  import frac_pkg::*;
#(
  parameter int unsigned N_MIN = 2
)(
  input  logic           clk_in,
  input  logic           rst_n,
  input  logic [N_W-1:0] n_in,
  output logic           div_out
);

  logic [N_W-1:0] cnt;
  logic [N_W-1:0] n_eff;

  assign n_eff = (n_in < N_W'(N_MIN)) ? N_W'(N_MIN) : n_in;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= N_W'(N_MIN);
      div_out <= 1'b0;
    end else if (cnt <= N_W'(1)) begin
      cnt     <= n_eff;
      div_out <= 1'b1;
    end else begin
      cnt     <= cnt - 1'b1;
      div_out <= 1'b0;
    end
  end

endmodule
