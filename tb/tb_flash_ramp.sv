// Testbench of flash_ramp with the flash model: checks that the flash is
// read once every four clocks at increasing addresses, that every output
// value equals the linear interpolation s[k] + j (s[k+1] - s[k]) / 4
// computed here, that the first value appears 9 clocks after start, and
// that the ramp lasts 4 (len - 1) clocks before holding the last sample.
module tb_flash_ramp;
  import frac_pkg::*;

  localparam int AW = 10;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start = 1'b0;
  logic [LEN_W-1:0] len;
  logic [AW-1:0]    flash_addr;
  logic             flash_rd;
  fword_t           flash_data, f_out;
  logic             busy, done;
  int               checks = 0, failures = 0;

  flash_ramp #(.AW(AW)) dut (.clk, .rst_n, .start, .len, .flash_addr, .flash_rd,
                             .flash_data, .f_out, .busy, .done);
  flash_model #(.AW(AW)) mem (.clk, .addr(flash_addr), .rd(flash_rd), .data(flash_data));

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read monitor: strobes 4 clocks apart, addresses 0, 1, 2, ...
  int last_rd_t = -100, rd_t = 0, next_addr = 0;
  always @(posedge clk) begin
    rd_t++;
    if (flash_rd) begin
      checks++;
      if (flash_addr != AW'(next_addr) || (next_addr != 0 && rd_t - last_rd_t != 4)) begin
        failures++;
        $display("FAIL read addr %0d (exp %0d) after %0d clocks", flash_addr, next_addr, rd_t - last_rd_t);
      end
      next_addr++;
      last_rd_t = rd_t;
    end
  end

  initial begin
    len = '0;
    mem.fill(11.25, 0.0123, 0.002, 1 << AW);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      int n;
      n = (t == 0) ? 2 : (t == 1) ? 17 : 200;
      next_addr = 0;
      @(posedge clk); #1;
      len = LEN_W'(n);
      start = 1'b1;
      @(posedge clk); #1;     // start taken at this edge
      start = 1'b0;
      repeat (9) @(posedge clk);
      #1;
      for (int k = 0; k < 4 * (n - 1) + 3; k++) begin
        longint s0, s1, e;
        int     i, j;
        i  = k / 4; j = k % 4;
        if (i >= n - 1) begin i = n - 1; j = 0; end
        s0 = longint'(mem.mem[i]);
        s1 = (i + 1 < n) ? longint'(mem.mem[i + 1]) : s0;
        e  = (4 * s0 + j * (s1 - s0)) >>> 2;
        checks++;
        if (longint'(f_out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d f=%0d exp=%0d", t, k, longint'(f_out), e);
        end
        if (k == 4 * (n - 1)) begin
          checks++;
          if (!done) begin failures++; $display("FAIL no done at end of ramp %0d", t); end
        end
        @(posedge clk); #1;
      end
      checks++;
      if (next_addr != n || busy) begin
        failures++; $display("FAIL %0d reads for len %0d, busy %0d", next_addr, n, busy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
