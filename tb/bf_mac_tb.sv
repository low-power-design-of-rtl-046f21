// bf_mac_tb: checks the adder tree of bf_mac.
//
// Applies a new set of 25 random weights, 25 random weighted pixels and a
// tap-enable mask (all taps, the inner 3 x 3, or random) every clock, plus
// an all-maximum set, and checks two clocks later that both sums cover
// exactly the enabled taps.
module bf_mac_tb;
  import bf_pkg::*;

  localparam int unsigned LAT = 2;
  localparam int unsigned N = 300;

  logic    clk = 1'b0;
  logic [NTAP-1:0] tap_en;
  weight_t w  [NTAP];
  wprod_t  wi [NTAP];
  sumw_t   sum_w;
  sump_t   sum_wi;

  int unsigned checks = 0, failures = 0;
  int exp_w [N], exp_wi [N];

  bf_mac dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < int'(N + LAT); n++) begin
      int k;
      if (n < int'(N)) begin
        exp_w[n] = 0;
        exp_wi[n] = 0;
        for (int t = 0; t < int'(NTAP); t++) begin
          unique case (n % 3)
            0: tap_en[t] = 1'b1;
            1: tap_en[t] = tap_in_3x3(t);
            default: tap_en[t] = 1'($urandom);
          endcase
          w[t]  = (n == 0) ? '1 : weight_t'($urandom);
          wi[t] = (n == 0) ? 16'hfe01 : wprod_t'($urandom);
          if (tap_en[t]) begin
            exp_w[n]  += int'(w[t]);
            exp_wi[n] += int'(wi[t]);
          end
        end
      end
      @(posedge clk);
      #1;
      k = n - int'(LAT - 1);
      if (k >= 0 && k < int'(N)) begin
        checks += 2;
        if (int'(sum_w) != exp_w[k] || int'(sum_wi) != exp_wi[k]) begin
          failures++;
          $display("FAIL set %0d: %0d %0d expected %0d %0d", k, sum_w, sum_wi, exp_w[k], exp_wi[k]);
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
