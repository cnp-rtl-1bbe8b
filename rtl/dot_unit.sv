// dot_unit: dot product between n 2-D planes and an n-element vector.
//
// The n planes arrive interleaved in one stream: for each pixel, the samples
// x^0 .. x^(n-1) follow one another. A single multiply-accumulate sums
// v[k] * x^k; on the last channel of a pixel the completed sum is presented
// (combinationally, in the cycle of that sample) and the accumulator
// restarts. The operation is the one the CNP paper lists for its vector ALU;
// the interleaved layout, the vector registers and the widths are this
// design's choices.
//
// Interface: start clears the channel counter; vw_* loads v[k]; step/x
// consume one sample; o_valid/o_acc give, combinationally for the sample
// presented on x, whether it completes a pixel and the Q16.16 result.
module dot_unit
  import cnp_pkg::*;
#(
  parameter int unsigned N_MAX = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(N_MAX):0]   cfg_n,
  input  logic                     vw_en,
  input  logic [$clog2(N_MAX)-1:0] vw_addr,
  input  sample_t                  vw_data,
  input  logic                     step,
  input  sample_t                  x,
  output logic                     o_valid,
  output acc_t                     o_acc
);

  localparam int unsigned CW = $clog2(N_MAX);

  sample_t       vec [N_MAX];
  acc_t          acc;
  logic [CW-1:0] ch;
  logic          ch_last;

  always_ff @(posedge clk) begin
    if (vw_en) vec[vw_addr] <= vw_data;
  end

  assign ch_last = ({1'b0, ch} == cfg_n - 1);
  assign o_acc   = ((ch == '0) ? acc_t'(0) : acc) + acc_t'(x) * acc_t'(vec[ch]);
  assign o_valid = ch_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch <= '0;
    end else if (start) begin
      ch <= '0;
    end else if (step) begin
      ch <= ch_last ? '0 : ch + 1;
    end
  end

  always_ff @(posedge clk) begin
    if (step) acc <= o_acc;
  end

endmodule
