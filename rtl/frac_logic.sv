// Fractional logic of one ramp synthesiser channel.
//
// Generates the sequence of integer division factors N for the programmable
// divider so that their running mean follows the wanted (fractional)
// division factor F. F comes from one of three sources, chosen by cfg.mode:
// a fixed value (static mode), the counter-based linear ramp unit, or the
// flash ramp unit with its 4x interpolation. F passes the compensation FIR
// and the four-stage fractional core; the core output Nf plus the integer
// offset P (cfg.p_off) is N.
//
// Two channels run side by side in the dual ramp system. A master starts its
// ramp on a start pulse and toggles sync_out; a slave (start tied low)
// re-times sync_in with two flip-flops into its own clock and starts its
// ramp on every change, so both ramps begin within a few clocks of each
// other although the two channels run on different clocks.
// In a ramp mode F stays at f_start until the ramp unit delivers its first
// value (after the first start in the linear mode, after each start in the
// flash mode), so a mode change is glitch-free.
// The three ramp sources and the Sync link follow the document; the toggle
// form of Sync and the synchroniser are this design's choices.
//
// Timing: clk is the divided VCO signal (one clock per divider cycle). From
// F to N the latency is 3 clocks (FIR register, core delay, output register).
module frac_logic
  import frac_pkg::*;
#(
  parameter int unsigned AW = FLASH_AW
)(
  input  logic          clk,
  input  logic          rst_n,
  input  chan_cfg_t     cfg,
  input  logic          start,        // local ramp start (master)
  input  logic          sync_in,      // Sync from the master (slave)
  output logic          sync_out,     // Sync to the slave
  output logic [AW-1:0] flash_addr,
  output logic          flash_rd,
  input  fword_t        flash_data,
  output fword_t        f_sel,        // selected division factor F
  output nint_t         nf_out,       // core output Nf (before adding P)
  output nint_t         n_out,        // division factor for the divider
  output logic          ramp_busy,
  output logic          ramp_done
);

  logic   [2:0] sync_sr;     // two synchroniser stages and one for the edge
  logic         go;          // start of a ramp in this channel
  fword_t       f_lin, f_flash;
  logic         lin_busy, lin_done, fl_busy, fl_done, lin_valid, fl_valid;
  cword_t       x_fir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_sr  <= '0;
      sync_out <= 1'b0;
    end else begin
      sync_sr <= {sync_sr[1:0], sync_in};
      if (start) sync_out <= ~sync_out;
    end
  end

  assign go = start | (sync_sr[2] ^ sync_sr[1]);

  lin_ramp u_lin (
    .clk, .rst_n,
    .start   (go && cfg.mode == MODE_LINEAR),
    .f_start (cfg.f_start),
    .slope   (cfg.slope),
    .len     (cfg.len),
    .f_out   (f_lin),
    .busy    (lin_busy),
    .done    (lin_done),
    .valid   (lin_valid)
  );

  flash_ramp #(.AW(AW)) u_flash (
    .clk, .rst_n,
    .start      (go && cfg.mode == MODE_FLASH),
    .len        (cfg.len),
    .flash_addr,
    .flash_rd,
    .flash_data,
    .f_out      (f_flash),
    .busy       (fl_busy),
    .done       (fl_done),
    .valid      (fl_valid)
  );

  always_comb begin
    // A ramp unit takes over only once it holds a value of its ramp, so a
    // change of mode never passes a stale value to the core
    if (cfg.mode == MODE_LINEAR && lin_valid)     f_sel = f_lin;
    else if (cfg.mode == MODE_FLASH && fl_valid)  f_sel = f_flash;
    else                                          f_sel = cfg.f_start;
  end

  assign ramp_busy = lin_busy | fl_busy;
  assign ramp_done = lin_done | fl_done;

  fir_comp u_fir (
    .clk, .rst_n,
    .f_in  (f_sel),
    .y_out (x_fir)
  );

  frac_core u_core (
    .clk, .rst_n,
    .x_in   (x_fir),
    .p_off  (cfg.p_off),
    .nf_out,
    .n_out
  );

endmodule
