// bf_divider_tb: checks the pipelined divider bf_divider.
//
// Every clock it applies a random divisor sum_w and a dividend sum_wi that a
// weighted average can produce (sum_wi <= 255 * sum_w), including the
// extremes, and checks q = floor((sum_wi + floor(sum_w/2)) / sum_w) nine
// clocks later.
module bf_divider_tb;
  import bf_pkg::*;

  localparam int unsigned LAT = 9;
  localparam int unsigned N = 1000;

  logic   clk = 1'b0;
  sumw_t  sum_w = '0;
  sump_t  sum_wi = '0;
  pixel_t q;

  int unsigned checks = 0, failures = 0;
  int exp_q [N];

  bf_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < int'(N + LAT); n++) begin
      int k, d, p;
      if (n < int'(N)) begin
        unique case (n)
          0: begin d = 6375; p = 6375 * 255; end
          1: begin d = 1;    p = 255;        end
          2: begin d = 254;  p = 0;          end
          3: begin d = 6375; p = 6375 * 255 - 1; end
          default: begin
            d = 1 + $urandom_range(6374);
            p = $urandom_range(d * 255);
          end
        endcase
        sum_w  = sumw_t'(d);
        sum_wi = sump_t'(p);
        exp_q[n] = (p + d / 2) / d;
      end
      @(posedge clk);
      #1;
      k = n - int'(LAT - 1);
      if (k >= 0 && k < int'(N)) begin
        checks++;
        if (int'(q) != exp_q[k]) begin
          failures++;
          $display("FAIL division %0d: q %0d expected %0d", k, q, exp_q[k]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
