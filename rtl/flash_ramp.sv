// Flash-memory ramp unit with 4x interpolation.
//
// Arbitrary ramp shapes (for instance a ramp carrying a frequency modulation
// that cancels a measured frequency error) are stored as a table of division
// factors in an external flash memory. The flash cannot follow the core clock,
// so it is read at a quarter of it: one sample s[k] per four clocks, and the
// three values in between are interpolated linearly,
//   f = s[k] + j * (s[k+1] - s[k]) / 4,   j = 0 .. 3   (rounded down),
// which also cuts the table to a quarter of the ramp length.
// Undersampling by four and an interpolation stage follow the document; the
// linear interpolation, the memory interface and its timing are this
// design's choices.
//
// Timing: a free-running phase ph = 0..3 counts core clocks in each memory
// cycle. The unit raises flash_rd with flash_addr during ph = 0 and samples
// flash_data at ph = 3, so the memory has three clocks to answer. Memory
// cycle p reads address p; from cycle 2 on, the output interpolates between
// s[p-2] and s[p-1]. After start, samples 0 .. len-1 (len >= 2) are played:
// the first ramp value appears 9 clocks after the start pulse, the ramp lasts
// 4*(len-1) clocks, then f_out holds s[len-1] and done pulses. valid goes
// low at start and high with the first ramp value.
module flash_ramp
  import frac_pkg::*;
#(
  parameter int unsigned AW = FLASH_AW     // flash address width
)(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] len,            // number of stored samples
  output logic [AW-1:0]    flash_addr,
  output logic             flash_rd,
  input  fword_t           flash_data,
  output fword_t           f_out,
  output logic             busy,
  output logic             done,
  output logic             valid     // f_out holds a value of the current ramp
);

  typedef logic signed [F_W+1:0] iword_t;  // two more bits for 4*s and j*diff

  logic [1:0]       ph;      // phase within the memory cycle
  logic [LEN_W:0]   pcnt;    // memory cycle number
  logic [LEN_W-1:0] len_q;
  fword_t           s_cur, s_next;
  iword_t           interp;

  always_comb begin
    interp = (iword_t'(s_cur) <<< 2)
           + iword_t'(ph) * (iword_t'(s_next) - iword_t'(s_cur));
  end

  assign flash_addr = AW'(pcnt);
  assign flash_rd   = busy && (ph == 2'd0) && (pcnt < {1'b0, len_q});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= '0;
      pcnt     <= '0;
      len_q    <= '0;
      s_cur    <= '0;
      s_next   <= '0;
      f_out    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      valid    <= 1'b0;
    end else begin
      done     <= 1'b0;
      if (start) begin
        ph       <= '0;
        pcnt     <= '0;
        len_q    <= len;
        busy     <= 1'b1;
        valid    <= 1'b0;
      end else if (busy) begin
        ph <= ph + 2'd1;
        if (ph == 2'd3) pcnt <= pcnt + 1'b1;
        // Memory access: the read is issued combinationally at ph = 0
        if (ph == 2'd3 && pcnt < {1'b0, len_q}) begin
          s_cur  <= s_next;
          s_next <= flash_data;
        end
        // Interpolation stage
        if (pcnt >= 2 && pcnt <= {1'b0, len_q}) begin
          f_out <= fword_t'(interp >>> 2);
          valid <= 1'b1;
        end
        if (pcnt == {1'b0, len_q} + 1'b1) begin
          f_out <= s_next;
          busy  <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

endmodule
