// Behavioural model of the external ramp flash memory, for testbenches.
//
// A word array read synchronously: one clock after a read strobe the
// addressed word appears on data and stays until the next read. The
// contents are loaded by the testbench through the mem array (hierarchical
// access) or with the fill task: a smooth ramp from a start value with a
// small sinusoidal modulation, as a compensated ramp would carry.
module flash_model
  import frac_pkg::*;
#(
  parameter int unsigned AW    = 10,
  parameter int unsigned DEPTH = 1 << AW
)(
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  output fword_t        data
);

  fword_t mem [DEPTH];
  int     reads = 0;

  initial data = '0;

  always @(posedge clk) begin
    if (rd) begin
      data  <= mem[addr];
      reads <= reads + 1;
    end
  end

  task automatic fill(input real f0, input real step, input real fm_amp, input int n);
    for (int i = 0; i < n && i < DEPTH; i++)
      mem[i] = fword_t'(longint'((f0 + step * i + fm_amp * $sin(6.2831853 * i / 37.0))
                                 * (2.0 ** FRAC_W)));
  endtask

endmodule
