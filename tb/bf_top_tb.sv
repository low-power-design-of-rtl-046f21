// bf_top_tb: end-to-end test of the approximate bilateral filter.
//
// Streams four frames of a noisy step-edge image through bf_top and checks
// every output pixel against a reference model computed here from the
// filter's defining formulas (weight tables by direct integer division,
// then the weighted average of the full window). The frames exercise:
//   1 default settings after reset, 5 x 5 kernel, random input gaps
//   2 new settings written between frames, 3 x 3 kernel, continuous input
//     (checks LANES pixels per clock and the 17-clock latency)
//   3 settings rewritten in the middle of the frame: the input stalls while
//     the tables are rebuilt
//   4 clock gates forced on by test_en, random gaps
// For each frame the PSNR of the noisy input and of the filtered output
// against the noise-free image is printed; filtering must raise it, except
// in frame 3 whose second half uses a very small range sigma.
// Each mechanism (table rebuild, input stall, pipeline, buffer and
// outer-ring PE clock gating, both kernel sizes, test enable, frame done) is counted, and one
// that never happened counts as a failure. It runs a 16 x 12 image with two
// lanes (two pixels per clock); bf_top_full_tb runs the same test with
// bf_top at its defaults, 512 x 512 and one lane.
module bf_top_tb;
  import bf_pkg::*;

  parameter int unsigned W = 16;
  parameter int unsigned H = 12;
  parameter int unsigned LANES = 2;
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);
  localparam int unsigned LATENCY = 17;
  localparam int unsigned NFRAMES = 4;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          test_en = 1'b0;
  logic          cfg_we = 1'b0;
  bf_cfg_t       cfg_in = '0;
  logic          cfg_busy;
  logic          in_valid = 1'b0;
  logic          in_sof = 1'b0;
  pixel_t        in_pixel [LANES];
  logic          in_ready;
  logic [LANES-1:0] out_valid;
  pixel_t        out_pixel [LANES];
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;
  logic          frame_done;

  bf_top #(.IMG_W(W), .IMG_H(H), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // reference model state
  pixel_t          img [W][H];
  int              clean [W][H];
  real             se_noisy = 0.0, se_out = 0.0;   // squared errors vs clean
  int unsigned     n_se = 0;
  int              expv [W][H];
  longint unsigned acc_at [W][H];
  int unsigned     ref_ss = 8, ref_sr = 800;   // reset settings of the design
  logic            ref_k5 = 1'b1;

  // mechanism counters
  int unsigned n_rebuild = 0, n_stall = 0, n_pipe_off = 0, n_buf_off = 0, n_outer_off = 0;
  int unsigned n_frames3 = 0, n_frames5 = 0, n_testen = 0, n_done = 0;
  int unsigned n_out = 0, n_lat_ok = 0;

  function automatic int unsigned wtab(int unsigned s, int unsigned v);
    if (s == 0) s = 1;
    return (255 * s + (s + v) / 2) / (s + v);
  endfunction

  function automatic int ref_pixel(int cx, int cy);
    int unsigned sw = 0, swi = 0;
    for (int dy = -2; dy <= 2; dy++) begin
      for (int dx = -2; dx <= 2; dx++) begin
        int unsigned ws, wr, w, d;
        int nb, c;
        if (!ref_k5 && (dx < -1 || dx > 1 || dy < -1 || dy > 1)) continue;
        nb = img[cx+dx][cy+dy];
        c  = img[cx][cy];
        d  = (nb > c) ? nb - c : c - nb;
        ws = wtab(ref_ss, dx*dx + dy*dy);
        wr = wtab(ref_sr, d*d);
        w  = (ws * wr + 128) / 256;
        sw  += w;
        swi += w * nb;
      end
    end
    return (swi + sw / 2) / sw;
  endfunction

  // noise-free image of frame f: two step edges
  function automatic int clean_pixel(int x, int y, int f);
    return ((x + f) < int'(W / 2) ? 60 : 190) + (y > int'(H / 2) ? 20 : 0);
  endfunction

  // input pixel of frame f: the clean image plus uniform noise of +-20
  function automatic pixel_t gen_pixel(int x, int y, int f);
    int v;
    v = clean_pixel(x, y, f);
    v += int'($urandom_range(40)) - 20;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return pixel_t'(v);
  endfunction

  task automatic write_cfg(int unsigned ss, int unsigned sr, logic k5);
    cfg_in = '{s2_spatial: SIG_W'(ss), s2_range: SIG_W'(sr), ksize: k5 ? KSIZE_5X5 : KSIZE_3X3};
    cfg_we = 1'b1;
  endtask

  // Settings written in this cycle apply to every pixel accepted after it.
  task automatic take_cfg();
    if (cfg_we) begin
      ref_ss = cfg_in.s2_spatial;
      ref_sr = cfg_in.s2_range;
      ref_k5 = (cfg_in.ksize == KSIZE_5X5);
    end
  endtask

  // Drive one frame. gap_pct: percentage of cycles without a transfer.
  // mid_cfg: write new settings after this many transfers (0 = never).
  task automatic run_frame(int f, int gap_pct, int mid_cfg);
    int n = 0;
    for (int y = 0; y < int'(H); y++) begin
      for (int x = 0; x < int'(W); x += LANES) begin
        for (int l = 0; l < int'(LANES); l++) begin
          img[x+l][y]   = gen_pixel(x + l, y, f);
          clean[x+l][y] = clean_pixel(x + l, y, f);
        end
        forever begin
          @(negedge clk);
          cfg_we = 1'b0;
          if (mid_cfg != 0 && n == mid_cfg) begin
            write_cfg(3, 50, 1'b1);
            mid_cfg = 0;
          end
          if (gap_pct != 0 && int'($urandom_range(99)) < gap_pct) begin
            in_valid = 1'b0;
            take_cfg();
            continue;
          end
          in_valid = 1'b1;
          in_sof   = (x == 0 && y == 0);
          for (int l = 0; l < int'(LANES); l++) in_pixel[l] = img[x+l][y];
          if (!in_ready) begin
            n_stall++;
            take_cfg();
            continue;
          end
          // accepted at the next rising edge, under the tables in force now
          for (int l = 0; l < int'(LANES); l++) begin
            if (x + l >= 4 && y >= 4) begin
              expv[x+l-2][y-2]   = ref_pixel(x + l - 2, y - 2);
              acc_at[x+l-2][y-2] = cyc + 1;
            end
          end
          take_cfg();
          n++;
          break;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_sof   = 1'b0;
    cfg_we   = 1'b0;
  endtask

  task automatic wait_ready();
    do @(negedge clk); while (!in_ready);
  endtask

  // output monitor
  always @(negedge clk) begin
    if (rst_n) begin
      if (!dut.en_pipe) n_pipe_off++;
      if (!dut.en_buf)  n_buf_off++;
      if (dut.en_pipe && !dut.en_outer) n_outer_off++;
      if (dut.gen_start) n_rebuild++;
      if (frame_done) n_done++;
      for (int l = 0; l < int'(LANES); l++) begin
        if (out_valid[l]) begin
          int cx;
          cx = (int'(out_x) + l) % (1 << XW);
          n_out++;
          if (cx < int'(W)) begin
            se_noisy += real'((int'(img[cx][out_y]) - clean[cx][out_y]) ** 2);
            se_out   += real'((int'(out_pixel[l]) - clean[cx][out_y]) ** 2);
            n_se++;
          end
          checks++;
          if (cx >= int'(W) || int'(out_pixel[l]) != expv[cx][out_y]) begin
            failures++;
            $display("FAIL pixel (%0d,%0d): got %0d expected %0d", cx, out_y,
                     out_pixel[l], expv[cx % W][out_y]);
          end
          checks++;
          if (cyc - acc_at[cx % W][out_y] != LATENCY) begin
            failures++;
            $display("FAIL latency (%0d,%0d): %0d cycles", cx, out_y,
                     cyc - acc_at[cx % W][out_y]);
          end else n_lat_ok++;
        end
      end
    end
  end

  task automatic check_count(string what, int unsigned got, int unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, want);
    end
  endtask

  // PSNR (10 log10(255^2 / MSE)) of the noisy input and of the filtered
  // output against the clean image, over the filtered pixels of one frame.
  // must_improve: count a failure unless filtering raised the PSNR.
  task automatic report_psnr(string what, logic must_improve);
    real p_in, p_out;
    p_in  = 10.0 * $log10(255.0 * 255.0 / (se_noisy / real'(n_se)));
    p_out = 10.0 * $log10(255.0 * 255.0 / (se_out / real'(n_se)));
    $display("PSNR %-26s noisy %5.2f dB  filtered %5.2f dB", what, p_in, p_out);
    if (must_improve) begin
      checks++;
      if (!(p_out > p_in)) begin
        failures++;
        $display("FAIL filtering did not raise the PSNR: %s", what);
      end
    end
    se_noisy = 0.0;
    se_out = 0.0;
    n_se = 0;
  endtask

  task automatic check_seen(string what, int unsigned n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    longint unsigned t0, t1;
    int unsigned out0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait_ready();

    // frame 1: reset settings, 5 x 5, random gaps
    n_frames5++;
    run_frame(0, 30, 0);
    repeat (LATENCY + 4) @(negedge clk);
    check_count("outputs after frame 1", n_out, (W-4)*(H-4));
    report_psnr("frame 1 (5x5, reset)", 1'b1);

    // new settings between frames, 3 x 3 kernel; written while the last
    // windows may still be in flight
    @(negedge clk);
    write_cfg(4, 200, 1'b0);
    ref_ss = 4; ref_sr = 200; ref_k5 = 1'b0;
    @(negedge clk);
    cfg_we = 1'b0;
    wait_ready();

    // frame 2: continuous input, one pixel per clock
    n_frames3++;
    out0 = n_out;
    t0 = cyc;
    run_frame(1, 0, 0);
    t1 = cyc;
    check_count("cycles for a gap-free frame", int'(t1 - t0), W*H/LANES + 1);
    repeat (LATENCY + 4) @(negedge clk);
    check_count("outputs after frame 2", n_out - out0, (W-4)*(H-4));
    report_psnr("frame 2 (3x3)", 1'b1);

    // frame 3: settings rewritten mid-frame (5 x 5 again)
    n_frames5++;
    out0 = n_out;
    run_frame(2, 10, W*H/(2*LANES) + 3);
    repeat (LATENCY + 4) @(negedge clk);
    check_count("outputs after frame 3", n_out - out0, (W-4)*(H-4));
    report_psnr("frame 3 (settings change)", 1'b0);

    // frame 4: clock gates forced on
    test_en = 1'b1;
    n_testen++;
    n_frames5++;
    out0 = n_out;
    run_frame(3, 30, 0);
    repeat (LATENCY + 4) @(negedge clk);
    check_count("outputs after frame 4", n_out - out0, (W-4)*(H-4));
    report_psnr("frame 4 (5x5, test_en)", 1'b1);

    check_count("frame_done pulses", n_done, NFRAMES);
    check_seen("table rebuilds", n_rebuild);
    check_seen("input stall cycles", n_stall);
    check_seen("pipeline clock gated cycles", n_pipe_off);
    check_seen("buffer clock gated cycles", n_buf_off);
    check_seen("outer-ring PEs gated cycles", n_outer_off);
    check_seen("3x3 kernel frames", n_frames3);
    check_seen("5x5 kernel frames", n_frames5);
    check_seen("test-enable frames", n_testen);
    check_seen("outputs with exact latency", n_lat_ok);
    checks++;
    if (n_rebuild != 3) begin
      failures++;
      $display("FAIL rebuilds: %0d, expected 3", n_rebuild);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * W * H + 40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
