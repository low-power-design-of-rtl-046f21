// bf_line_fifo: delay of one image line, built as a circular buffer.
//
// A shift (rising edge of `clk` with `shift` high) writes `din` into the
// slot at the pointer, loads the word that was stored there into the output
// register `dout`, and advances the pointer. The memory has DEPTH-1 words, so
// with the output register the delay is DEPTH shifts as seen by a consumer
// that samples `dout` at its next shift: that consumer receives the word
// written DEPTH shifts before its own input. With DEPTH equal to the image
// width this is the pixel one line above. The memory is a plain array (block
// or distributed RAM on an FPGA). Words read before DEPTH-1 shifts have been
// written are undefined; the window logic marks such windows invalid.
// The source draws this element as "Fifo"; building it as a RAM with one
// pointer is this design's choice.
module bf_line_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 512   // at least 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned NW = DEPTH - 1;
  localparam int unsigned AW = (NW > 1) ? $clog2(NW) : 1;

  logic [WIDTH-1:0] mem [NW];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (shift) begin
      ptr <= (ptr == AW'(NW - 1)) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (shift) begin
      mem[ptr] <= din;
      dout     <= mem[ptr];
    end
  end

endmodule
