// Dual fractional ramp system: digital part.
//
// Two ramp synthesiser channels run from one crystal reference. In each, the
// VCO signal is divided by 8 in the prescaler and by a changing integer N in
// the programmable divider; the divider output is compared with the
// reference in the PFD and also clocks the channel's fractional logic, which
// computes the next N. Channel 0 is the master: a start pulse begins its
// ramp and is passed over the Sync line to channel 1, the slave, which starts
// its own ramp on it. Each channel has its own settings, so the two can use
// different ramps and division sequences (an offset of a few kHz between the
// two VCOs gives the i.f. signal of the measurement).
// The analog parts (pulse shapers, the PFD's balanced stage and loop filter,
// VCOs, mixer) are outside: the VCO signals enter as clocks, the reference
// as a pulse train, and the phase-detector outputs leave as ports.
// The channel structure and the Sync link follow the document's dual ramp
// system; the port list is this design's choice.
//
// Interface: vco_clk[i] VCO signal of channel i (in a digital simulation any
// fast clock); ref_pulse pulse-shaped reference; clk_fd sampling clock of the
// frequency detectors; cfg[i] channel settings, held steady while running;
// start one-pulse in the master's clock (div_out[0]). Flash ports per channel.
module dual_ramp_top
  import frac_pkg::*;
#(
  parameter int unsigned AW       = FLASH_AW,
  parameter int          SLIP_MAX = 4
)(
  input  logic                rst_n,
  input  logic [1:0]          vco_clk,
  input  logic                ref_pulse,
  input  logic                clk_fd,
  input  chan_cfg_t           cfg [2],
  input  logic                start,
  output logic [1:0][AW-1:0]  flash_addr,
  output logic [1:0]          flash_rd,
  input  fword_t              flash_data [2],
  output logic [1:0]          div_out,     // divided VCO = fractional logic clock
  output nint_t               n_out [2],
  output fword_t              f_sel [2],
  output logic [1:0]          ramp_busy,
  output logic [1:0]          ramp_done,
  output logic [1:0]          q_r,
  output logic [1:0]          qn_r,
  output logic [1:0]          q_v,
  output logic [1:0]          qn_v,
  output logic [1:0]          ld1,
  output logic [1:0]          ld2
);

  logic [1:0] pre_clk;
  logic [1:0] sync_to;        // Sync out of each channel
  logic [1:0] sync_from;      // Sync into each channel
  logic [1:0] start_ch;

  // Master drives Sync, slave listens
  assign sync_from = {sync_to[0], 1'b0};
  assign start_ch  = {1'b0, start};

  for (genvar i = 0; i < 2; i++) begin : g_ch
    prescaler u_pre (
      .clk_in (vco_clk[i]), .rst_n, .clk_out (pre_clk[i])
    );

    prog_divider u_div (
      .clk_in (pre_clk[i]), .rst_n, .n_in (n_out[i]), .div_out (div_out[i])
    );

    frac_logic #(.AW(AW)) u_fl (
      .clk        (div_out[i]),
      .rst_n,
      .cfg        (cfg[i]),
      .start      (start_ch[i]),
      .sync_in    (sync_from[i]),
      .sync_out   (sync_to[i]),
      .flash_addr (flash_addr[i]),
      .flash_rd   (flash_rd[i]),
      .flash_data (flash_data[i]),
      .f_sel      (f_sel[i]),
      .nf_out     (),
      .n_out      (n_out[i]),
      .ramp_busy  (ramp_busy[i]),
      .ramp_done  (ramp_done[i])
    );

    pfd #(.SLIP_MAX(SLIP_MAX)) u_pfd (
      .clk_fd, .rst_n,
      .r    (ref_pulse),
      .v    (div_out[i]),
      .q_r  (q_r[i]),  .qn_r (qn_r[i]),
      .q_v  (q_v[i]),  .qn_v (qn_v[i]),
      .ld1  (ld1[i]),  .ld2  (ld2[i])
    );
  end

endmodule
