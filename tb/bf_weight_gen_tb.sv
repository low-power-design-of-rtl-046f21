// bf_weight_gen_tb: checks the weight tables built by bf_weight_gen.
//
// For several settings (including a zero sigma, treated as 1, and both
// kernel sizes) it starts a rebuild, records every range-LUT write, and
// checks: each of the 256 range entries is written exactly once with
//   w = floor((255*S + (S+v)/2) / (S+v)), v = D^2, S = 2*sigma_r^2,
// every tap's spatial weight uses v = dx^2 + dy^2 and S = 2*sigma_s^2 and is
// 0 outside the centred 3 x 3 kernel in 3 x 3 mode (where tap_en is low
// too), and the rebuild keeps
// `busy` high for exactly 10 clocks per entry plus the final write.
module bf_weight_gen_tb;
  import bf_pkg::*;

  localparam int unsigned BUSY_CYCLES = 10 * (NSPAT + 256) + 1;

  logic    clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  bf_cfg_t cfg = '0;
  logic    busy, lut_we;
  pixel_t  lut_addr;
  weight_t lut_data;
  weight_t ws_win [NTAP];
  logic [NTAP-1:0] tap_en;

  int unsigned checks = 0, failures = 0;
  int          lut [256];
  int unsigned nwrites [256];

  bf_weight_gen dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (lut_we) begin
      lut[lut_addr] = lut_data;
      nwrites[lut_addr]++;
    end
  end

  function automatic int unsigned wtab(int unsigned s, int unsigned v);
    if (s == 0) s = 1;
    return (255 * s + (s + v) / 2) / (s + v);
  endfunction

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
    end
  endtask

  task automatic run(int unsigned ss, int unsigned sr, logic k5);
    int unsigned nbusy = 0;
    foreach (nwrites[i]) nwrites[i] = 0;
    @(negedge clk);
    cfg   = '{s2_spatial: SIG_W'(ss), s2_range: SIG_W'(sr), ksize: k5 ? KSIZE_5X5 : KSIZE_3X3};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cfg   = '0;   // settings must have been captured
    while (busy) begin
      nbusy++;
      @(negedge clk);
    end
    check("busy cycles", nbusy, BUSY_CYCLES);
    for (int d = 0; d < 256; d++) begin
      check($sformatf("writes of range entry %0d", d), nwrites[d], 1);
      check($sformatf("range entry %0d (S=%0d)", d, sr), lut[d], wtab(sr, d * d));
    end
    for (int t = 0; t < int'(NTAP); t++) begin
      int dy, dx, want;
      dy = t / WIN - 2;
      dx = t % WIN - 2;
      want = (!k5 && (dx < -1 || dx > 1 || dy < -1 || dy > 1)) ? 0 : wtab(ss, dx*dx + dy*dy);
      check($sformatf("spatial weight tap %0d (S=%0d)", t, ss), ws_win[t], want);
      check($sformatf("tap_en %0d", t), tap_en[t], (k5 || (dx >= -1 && dx <= 1 && dy >= -1 && dy <= 1)));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(8, 800, 1'b1);
    run(3, 50, 1'b0);
    run(0, 65535, 1'b1);
    run(65535, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
