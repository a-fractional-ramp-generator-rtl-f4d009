// Input compensation FIR of the fractional logic.
//
// The four-stage fractional core has the signal transfer z^-1 / V(z), where
//   V(z) = K2 D^3 + (1 - 2 K2 + K1) D^2 + (K2 - 2 K1) D + K1,  D = 1 - z^-1.
// This filter realises V(z) itself, so that the cascade FIR -> core passes the
// division factor F through with nothing but a delay. With K1 = 3/16 and
// K2 = 1/2, V(z) expands to
//   h = { 1, -2, 27/16, -1/2 }   (taps for z^0 .. z^-3, DC gain 3/16 = K1)
// which is computed exactly as 16*x[n] - 32*x[n-1] + 27*x[n-2] - 8*x[n-3] in
// a word with four more fraction bits than the input.
// The document states only that the FIR compensates the core's transfer
// function up to a residual delay; deriving the taps from V(z) and the
// single output register are this design's choices.
//
// Interface: f_in (FRAC_W fraction bits) is taken every clock; y_out
// (CORE_FRAC_W = FRAC_W + 4 fraction bits) is registered: latency one clock.
// Asynchronous active-low reset clears the taps and the output.
module fir_comp
  import frac_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  fword_t f_in,
  output cword_t y_out
);

  cword_t x0, x1, x2, x3;   // sign-extended taps, in units of 2^-FRAC_W
  fword_t h1, h2, h3;       // delay line of past inputs

  always_comb begin
    x0 = cword_t'(f_in);
    x1 = cword_t'(h1);
    x2 = cword_t'(h2);
    x3 = cword_t'(h3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h1    <= '0;
      h2    <= '0;
      h3    <= '0;
      y_out <= '0;
    end else begin
      h1    <= f_in;
      h2    <= h1;
      h3    <= h2;
      // Coefficients in sixteenths; the result is read with 4 more fraction bits
      y_out <= (x0 <<< 4) - (x1 <<< 5) + (x2 * cword_t'(27)) - (x3 <<< 3);
    end
  end

endmodule
