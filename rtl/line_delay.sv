// line_delay: programmable-length delay line held in a RAM.
//
// The caller supplies a pointer that cycles through 0 .. L-1 (L = delay in
// steps). On each enabled step the word stored at 'ptr' is presented on
// dout (asynchronous read) and replaced by din, so dout is din from L steps
// earlier. One such line sits between consecutive kernel rows of the
// convolver ("[W-K] delays" in the CNP paper); writing it as a separate
// one-dimensional memory lets synthesis map it onto a RAM block.
module line_delay #(
  parameter int unsigned W     = 40,
  parameter int unsigned DEPTH = 633
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] ptr,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);

  logic [W-1:0] mem [DEPTH];

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

endmodule
