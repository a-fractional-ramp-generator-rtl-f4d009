// Counter-based linear ramp unit.
//
// Produces an exactly linear sequence of division factors: after a start
// pulse the output is f_start + k * slope for k = 0 .. len, one step per
// clock, and then holds the end value. Because the ramp is a pure
// accumulation with no frequency modulation on it, every ramp started with
// the same settings is bit-identical, which gives the reproducibility the
// synthesiser needs. The slope word carries SLOPE_EXT more fraction bits than
// the output, so slopes far below one output LSB per clock can be set; the
// output is the accumulator truncated to FRAC_W fraction bits.
// The document names a counter-based ramp unit producing exactly linear
// ramps; the accumulator form, the widths and the start/busy/done handshake
// are this design's choices.
//
// Interface: start is a one-clock pulse that loads f_start and len (len >= 1).
// busy is high while the ramp runs, done pulses for one clock with the last
// step, valid is high from the first start after reset on. f_out is registered and moves on the clock after each step decision.
module lin_ramp
  import frac_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  fword_t           f_start,
  input  slope_t           slope,
  input  logic [LEN_W-1:0] len,
  output fword_t           f_out,
  output logic             busy,
  output logic             done,
  output logic             valid     // f_out holds a ramp value (start seen)
);

  slope_t           acc;    // value with FRAC_W + SLOPE_EXT fraction bits
  logic [LEN_W-1:0] left;   // steps still to take

  assign f_out = fword_t'(acc >>> SLOPE_EXT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      left <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      valid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc  <= slope_t'(f_start) <<< SLOPE_EXT;
        left <= len;
        busy <= (len != '0);
        valid <= 1'b1;
      end else if (busy) begin
        acc  <= acc + slope;
        left <= left - 1'b1;
        if (left == LEN_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
