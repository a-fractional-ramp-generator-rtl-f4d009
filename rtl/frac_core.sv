// Four-stage fractional core with an extra pipeline delay.
//
// A chain of four integrators I(z) = 1/(1 - z^-1) shapes the quantisation
// noise of the final rounding to high frequencies. The quantised output Nf,
// delayed by one clock, is fed back and subtracted at every adder: with
// weight K1 = 3/16 at the first, K2 = 1/2 at the second, and 1 at the third
// and fourth. A delay z^-1 between the second integrator and the third adder
// splits the adder chain into two halves of about equal depth, which roughly
// doubles the usable clock rate. The resulting transfer is
//   Nf(z) = (X(z) z^-1 + nq(z) D^4(z)) / V(z),
//   V(z)  = K2 D^3 + (1 - 2 K2 + K1) D^2 + (K2 - 2 K1) D + K1,
// and with these coefficients the output of a constant input swings over
// at most five neighbouring integers (peak-to-peak deviation 4).
// The structure, the coefficients and the deviation follow the document.
// The rounding to the nearest integer, the word widths and the reset are
// this design's choices.
//
// Each integrator is a register holding its last output; the register of the
// second integrator is at the same time the z^-1 of the main path, so the
// first half ends in b_q and the second half starts from it.
//
// Interface: x_in is the FIR-compensated input (CORE_FRAC_W fraction bits),
// taken every clock. p_off is the integer offset P. n_out = Nf + P and
// nf_out = Nf are registered; X reaches them after two clocks (X z^-1 / V,
// plus the output register). Asynchronous active-low reset clears all state.
module frac_core
  import frac_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cword_t x_in,
  input  nint_t  p_off,
  output nint_t  nf_out,
  output nint_t  n_out
);

  localparam cword_t HALF = cword_t'(1) <<< (CORE_FRAC_W - 1);

  cword_t a_q, b_q, d_q, e_q;      // integrator states
  nint_t  fb_q;                    // Nf delayed by one clock (feedback z^-1)

  cword_t fb_w, k1_fb, k2_fb;
  cword_t a, b, d, e, e_rnd;
  nint_t  nf;

  always_comb begin
    // Feedback value aligned to the core word; K1, K2 applied in sixteenths
    fb_w  = cword_t'(fb_q) <<< CORE_FRAC_W;
    k1_fb = (cword_t'(fb_q) * cword_t'(K1_NUM)) <<< (CORE_FRAC_W - 4);
    k2_fb = (cword_t'(fb_q) * cword_t'(K2_NUM)) <<< (CORE_FRAC_W - 4);
    // First half: adder, integrator, adder, integrator
    a = a_q + x_in - k1_fb;
    b = b_q + a - k2_fb;
    // Second half starts from the delayed second integrator (b_q = z^-1 b)
    d = d_q + b_q - fb_w;
    e = e_q + d - fb_w;
    // Quantiser: round to nearest integer
    e_rnd = (e + HALF) >>> CORE_FRAC_W;
    nf    = e_rnd[N_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= '0;
      b_q    <= '0;
      d_q    <= '0;
      e_q    <= '0;
      fb_q   <= '0;
      nf_out <= '0;
      n_out  <= '0;
    end else begin
      a_q    <= a;
      b_q    <= b;
      d_q    <= d;
      e_q    <= e;
      fb_q   <= nf;
      nf_out <= nf;
      n_out  <= nf + p_off;
    end
  end

endmodule
