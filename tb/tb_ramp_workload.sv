// Workload testbench: the full measured ramp of the dual ramp system.
//
// A VCO ramp from 4.5 to 9 GHz in 50 ms, behind a divide-by-8 prescaler and
// with a 50 MHz comparison frequency, is a division-factor ramp from 11.25
// to 22.5 over 2.5 million core clocks. The channel's fractional logic, at
// its default parameters, runs it twice:
//  1. with the linear ramp unit (slope 11.25 / 2.5e6 per clock);
//  2. with the flash ramp unit: 625,001 stored samples (one per 4 clocks),
//     the same ramp plus a small frequency modulation as a compensated ramp
//     would carry.
// For both, every N must lie within 3 of F (the static deviation is 4 peak
// to peak; a ramp widens it slightly, to about +-2.52 here), and the mean
// of N over each block of 4096 clocks must equal the mean of F over the same
// block, delayed by the 3-clock latency, within 4/4096 (the shaped
// quantisation error summed over a block stays within a few units). The
// ramp length and the end values are checked too.
module tb_ramp_workload;
  import frac_pkg::*;

  localparam int    CLOCKS  = 2_500_000;
  localparam int    SAMPLES = CLOCKS / 4 + 1;
  localparam real   F0 = 11.25, F1 = 22.5;

  logic                clk = 1'b0, rst_n = 1'b1;
  chan_cfg_t           cfg;
  logic                start = 1'b0, sync_out;
  logic [FLASH_AW-1:0] flash_addr;
  logic                flash_rd;
  fword_t              flash_data, f_sel;
  nint_t               nf_out, n_out;
  logic                ramp_busy, ramp_done;
  int                  checks = 0, failures = 0;

  frac_logic dut (.clk, .rst_n, .cfg, .start, .sync_in(1'b0), .sync_out,
    .flash_addr, .flash_rd, .flash_data, .f_sel, .nf_out, .n_out, .ramp_busy, .ramp_done);
  flash_model #(.AW(FLASH_AW)) mem (.clk, .addr(flash_addr), .rd(flash_rd), .data(flash_data));

  always #10ns clk = ~clk;   // 50 MHz

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one ramp; returns the number of clocks it was busy
  task automatic run_ramp(output int busy_clocks, output int bad_range, output int bad_mean);
    real    fq [4];           // F of the last clocks, for the latency
    real    sum_n, sum_f, f_now;
    real    dmin, dmax;
    int     k;
    busy_clocks = 0; bad_range = 0; bad_mean = 0;
    sum_n = 0.0; sum_f = 0.0; k = 0; dmin = 0.0; dmax = 0.0;
    for (int i = 0; i < 4; i++) fq[i] = real'(f_sel) / (2.0 ** FRAC_W);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    busy_clocks = 1;   // the start edge raises busy
    while (ramp_busy || k < 64) begin
      f_now = real'(f_sel) / (2.0 ** FRAC_W);
      @(posedge clk); #1;
      if (ramp_busy) busy_clocks++;
      // N after this edge belongs to F three clocks earlier
      fq[3] = fq[2]; fq[2] = fq[1]; fq[1] = fq[0]; fq[0] = f_now;
      if (real'(n_out) - fq[2] < dmin) dmin = real'(n_out) - fq[2];
      if (real'(n_out) - fq[2] > dmax) dmax = real'(n_out) - fq[2];
      if (real'(n_out) < fq[2] - 3.0 || real'(n_out) > fq[2] + 3.0) bad_range++;
      sum_n += real'(n_out);
      sum_f += fq[2];
      k++;
      if (k % 4096 == 0) begin
        if (sum_n - sum_f > 4.0 || sum_f - sum_n > 4.0) begin
          bad_mean++;
          if (bad_mean < 5) $display("block %0d: sum N - sum F = %f", k / 4096, sum_n - sum_f);
        end
        sum_n = 0.0; sum_f = 0.0;
      end
    end
    $display("N - F within %f .. %f", dmin, dmax);
  endtask

  initial begin
    int  busy_clocks, bad_range, bad_mean;
    real slope;
    slope = (F1 - F0) / CLOCKS;
    cfg = '0;
    cfg.mode    = MODE_STATIC;
    cfg.f_start = fword_t'(longint'(F0 * (2.0 ** FRAC_W)));
    cfg.slope   = slope_t'(longint'(slope * (2.0 ** (FRAC_W + SLOPE_EXT))));
    cfg.len     = LEN_W'(CLOCKS);
    cfg.p_off   = '0;
    // Flash table: the same ramp with a 0.002 frequency modulation
    for (int i = 0; i < SAMPLES; i++)
      mem.mem[i] = fword_t'(longint'((F0 + slope * 4 * i + 0.002 * $sin(6.2831853 * i / 5000.0))
                                     * (2.0 ** FRAC_W)));
    #1ns rst_n = 1'b0;
    #50ns rst_n = 1'b1;
    repeat (500) @(posedge clk);
    #1;

    // 1. Linear ramp unit
    cfg.mode = MODE_LINEAR;
    run_ramp(busy_clocks, bad_range, bad_mean);
    $display("linear ramp: %0d clocks, %0d N out of range, %0d blocks off, end F %f",
             busy_clocks, bad_range, bad_mean, real'(f_sel) / (2.0 ** FRAC_W));
    checks++; if (busy_clocks != CLOCKS) failures++;
    checks++; if (bad_range != 0) failures++;
    checks++; if (bad_mean != 0) failures++;
    checks++;
    if (real'(f_sel) / (2.0 ** FRAC_W) < F1 - 1e-6 || real'(f_sel) / (2.0 ** FRAC_W) > F1 + 1e-6) failures++;

    // 2. Flash ramp unit, quarter-rate table with interpolation
    cfg.mode = MODE_FLASH;
    cfg.len  = LEN_W'(SAMPLES);
    repeat (500) @(posedge clk);   // F is back at f_start: let the step settle
    #1;
    run_ramp(busy_clocks, bad_range, bad_mean);
    $display("flash ramp: %0d clocks, %0d reads, %0d N out of range, %0d blocks off",
             busy_clocks, mem.reads, bad_range, bad_mean);
    checks++; if (mem.reads != SAMPLES) failures++;
    checks++; if (bad_range != 0) failures++;
    checks++; if (bad_mean != 0) failures++;
    checks++; if (f_sel != mem.mem[SAMPLES - 1]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
