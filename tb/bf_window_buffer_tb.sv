// bf_window_buffer_tb: checks the 5 x 5 sliding window of bf_window_buffer.
//
// Streams two frames of random pixels of a 9-pixel-wide image, with random
// idle cycles, and after every shift compares all 25 window taps of every
// lane with the pixels (x-4..x, y-4..y) around that lane's newest pixel,
// wherever that window lies inside the image. Idle cycles must leave the
// windows unchanged. It runs with LANES = 3 by default (three pixels per
// shift) and also passes with LANES = 1; LANES must divide the width.
module bf_window_buffer_tb;
  import bf_pkg::*;

  parameter int unsigned LANES = 3;
  localparam int unsigned W = 9;
  localparam int unsigned H = 8;

  logic   clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  pixel_t din [LANES];
  pixel_t win [LANES][NTAP];
  pixel_t img [W][H];
  int unsigned checks = 0, failures = 0;

  bf_window_buffer #(.IMG_W(W), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  // check lane l, whose newest pixel is (x, y)
  task automatic check_window(int l, int x, int y);
    for (int r = 0; r < int'(WIN); r++)
      for (int c = 0; c < int'(WIN); c++) begin
        checks++;
        if (win[l][r*WIN + c] != img[x - 4 + c][y - 4 + r]) begin
          failures++;
          $display("FAIL lane %0d (%0d,%0d) tap %0d: %0h expected %0h", l, x, y, r*WIN + c,
                   win[l][r*WIN + c], img[x - 4 + c][y - 4 + r]);
        end
      end
  endtask

  task automatic check_group(int x0, int y);
    for (int l = 0; l < int'(LANES); l++)
      if (x0 + l >= 4 && y >= 4) check_window(l, x0 + l, y);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < int'(H); y++)
        for (int x = 0; x < int'(W); x += LANES) begin
          @(negedge clk);
          while ($urandom_range(2) == 0) begin
            shift = 1'b0;
            @(negedge clk);
            if (x > 0) check_group(x - int'(LANES), y);   // unchanged
          end
          for (int l = 0; l < int'(LANES); l++) begin
            img[x+l][y] = pixel_t'($urandom);
            din[l] = img[x+l][y];
          end
          shift = 1'b1;
          @(negedge clk);
          shift = 1'b0;
          check_group(x, y);
        end
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
