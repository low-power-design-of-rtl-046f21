// bf_line_fifo_tb: checks the one-line delay of bf_line_fifo.
//
// Writes a random stream with random idle cycles into a FIFO of depth 7 and
// checks that, at each shift, the output registered by the previous shift is
// the word written DEPTH shifts before the current input, and that idle
// cycles move nothing.
module bf_line_fifo_tb;

  localparam int unsigned DEPTH = 7;
  localparam int unsigned N = 200;

  logic       clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  logic [7:0] din = '0, dout;
  logic [7:0] hist [N];
  int unsigned checks = 0, failures = 0;

  bf_line_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (n < N) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        shift = 1'b0;
      end else begin
        // dout now holds what the consumer would take with this input
        if (n >= int'(DEPTH)) begin
          checks++;
          if (dout != hist[n - DEPTH]) begin
            failures++;
            $display("FAIL shift %0d: dout %0h expected %0h", n, dout, hist[n - DEPTH]);
          end
        end
        shift = 1'b1;
        din = 8'($urandom);
        hist[n] = din;
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
