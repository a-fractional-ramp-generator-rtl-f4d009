// Testbench of frac_logic: for the static and the linear ramp mode it
// predicts F independently (f_start, and f_start + k * slope from the clock
// the ramp starts) and checks f_sel and, through the reference model of FIR
// and core, every N. The linear ramp is started once locally and once
// through Sync (a toggle of sync_in must start it three clocks later, and a
// local start must toggle sync_out). The flash mode plays a stored ramp and
// its N must follow the reference model fed with the selected F; the mean
// N over a static interval must equal F.
module tb_frac_logic;
  import frac_pkg::*;
  import frac_ref_pkg::*;

  localparam int AW = 10;

  logic          clk = 1'b0, rst_n = 1'b0;
  chan_cfg_t     cfg;
  logic          start = 1'b0, sync_in = 1'b0, sync_out;
  logic [AW-1:0] flash_addr;
  logic          flash_rd;
  fword_t        flash_data, f_sel;
  nint_t         nf_out, n_out;
  logic          ramp_busy, ramp_done;
  int            checks = 0, failures = 0;
  FracRef        ref_m;

  frac_logic #(.AW(AW)) dut (.clk, .rst_n, .cfg, .start, .sync_in, .sync_out,
    .flash_addr, .flash_rd, .flash_data, .f_sel, .nf_out, .n_out, .ramp_busy, .ramp_done);
  flash_model #(.AW(AW)) mem (.clk, .addr(flash_addr), .rd(flash_rd), .data(flash_data));

  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Testbench's own model of the linear ramp accumulator
  longint acc_e = 0;
  int     left_e = 0;
  bit     use_dut_f = 0;
  bit     lin_seen = 0;        // linear ramp started at least once      // flash mode: reference fed with the DUT's F
  longint sum_n = 0;
  int     cnt_n = 0;

  // One clock: predict F before the edge, step the reference, compare after
  task automatic tick(input bit go_lin);
    longint f_before, n_exp;
    #1;   // let the selection settle after a change of the settings
    case (cfg.mode)
      MODE_STATIC: f_before = longint'(cfg.f_start);
      MODE_LINEAR: f_before = lin_seen ? (acc_e >>> SLOPE_EXT) : longint'(cfg.f_start);
      default:     f_before = longint'(f_sel);
    endcase
    if (!use_dut_f) begin
      checks++;
      if (longint'(f_sel) != f_before) begin
        failures++;
        if (failures < 10) $display("FAIL f_sel %0d exp %0d at %0t mode %0d", longint'(f_sel), f_before, $time, cfg.mode);
      end
    end
    n_exp = ref_m.step(f_before, longint'(cfg.p_off));
    if (go_lin) begin
      lin_seen = 1;
      acc_e  = longint'(cfg.f_start) <<< SLOPE_EXT;
      left_e = int'(cfg.len);
    end else if (left_e > 0) begin
      acc_e += longint'(cfg.slope);
      left_e--;
    end
    @(posedge clk); #1;
    checks++;
    if (longint'(n_out) != n_exp || nf_out != nint_t'(n_exp - longint'(cfg.p_off))) begin
      failures++;
      if (failures < 10) $display("FAIL N %0d exp %0d at %0t", n_out, n_exp, $time);
    end
    sum_n += longint'(n_out);
    cnt_n++;
  endtask

  initial begin
    real mean;
    logic so;
    ref_m = new(CORE_FRAC_W, K1_NUM, K2_NUM);
    mem.fill(20.0, 0.01, 0.003, 64);
    cfg = '0;
    cfg.mode    = MODE_STATIC;
    cfg.f_start = fword_t'(longint'(20.05 * (2.0 ** FRAC_W)));
    cfg.p_off   = '0;
    cfg.slope   = slope_t'(longint'(0.002 * (2.0 ** (FRAC_W + SLOPE_EXT))));
    cfg.len     = LEN_W'(300);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Static mode, F = 20.05
    for (int i = 0; i < 200; i++) tick(0);
    sum_n = 0; cnt_n = 0;
    for (int i = 0; i < 20000; i++) tick(0);
    mean = real'(sum_n) / real'(cnt_n);
    checks++;
    if (mean < 20.049 || mean > 20.051) begin failures++; $display("FAIL static mean %f", mean); end

    // Linear ramp, local start; F given as fraction + offset P = 12
    cfg.mode    = MODE_LINEAR;
    cfg.f_start = fword_t'(longint'(0.3 * (2.0 ** FRAC_W)));
    cfg.p_off   = nint_t'(12);
    so = sync_out;
    start = 1'b1;
    tick(1);
    start = 1'b0;
    checks++;
    if (sync_out == so || !ramp_busy) begin failures++; $display("FAIL start: sync_out or busy"); end
    for (int i = 0; i < 320; i++) tick(0);
    checks++;
    if (ramp_busy) begin failures++; $display("FAIL ramp still busy"); end

    // Linear ramp started through Sync
    sync_in = ~sync_in;
    tick(0);
    tick(0);
    checks++;
    if (ramp_busy) begin failures++; $display("FAIL Sync started too early"); end
    tick(1);
    checks++;
    if (!ramp_busy) begin failures++; $display("FAIL Sync did not start the ramp"); end
    for (int i = 0; i < 320; i++) tick(0);

    // Flash ramp
    cfg.mode  = MODE_FLASH;
    cfg.p_off = '0;
    cfg.len   = LEN_W'(64);
    use_dut_f = 1;
    start = 1'b1;
    tick(0);
    start = 1'b0;
    for (int i = 0; i < 4 * 64 + 20; i++) tick(0);
    checks++;
    if (longint'(f_sel) != longint'(mem.mem[63]) || mem.reads != 64) begin
      failures++; $display("FAIL flash end %0d reads %0d", longint'(f_sel), mem.reads);
    end
    sum_n = 0; cnt_n = 0;
    for (int i = 0; i < 20000; i++) tick(0);
    mean = real'(sum_n) / real'(cnt_n);
    checks++;
    if (mean < real'(mem.mem[63]) / (2.0 ** FRAC_W) - 0.001 ||
        mean > real'(mem.mem[63]) / (2.0 ** FRAC_W) + 0.001) begin failures++; $display("FAIL flash hold mean %f", mean); end
    $display("flash hold mean %f", mean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
