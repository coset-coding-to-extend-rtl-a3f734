// conv_label_gen: streaming coset label generator of the convolutional coset code.
//
// Maps data bits to the coset label c = (a = 0, b) whose syndrome equals the data:
// b * G1 = d, solved step by step by the recursive (inverse) filter
//   b_j = d_j ^ XOR_{k=1..7} G1[k] b_{j-k}
// (G1 has a constant term, so the division always exists). One trellis step per clock:
// `clear` empties the filter history at the start of a block, and each cycle with `step`
// high consumes d_j and advances. The label pair of the current step is combinational
// ({b_j, a_j} with a_j = 0). The inverse-syndrome construction is this design's way of
// realising the label matrix H# for a convolutional code; only its function is specified by the scheme.
module conv_label_gen
  import flash_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  input  logic       d,
  output logic [1:0] label     // {b_j, a_j}
);

  logic [M-1:0] hist;   // hist[k-1] = b_{j-k}
  logic         b;

  assign b     = d ^ (^(hist & G1[M:1]));
  assign label = {b, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      hist <= '0;
    else if (clear)  hist <= '0;
    else if (step)   hist <= {hist[M-2:0], b};
  end

endmodule
