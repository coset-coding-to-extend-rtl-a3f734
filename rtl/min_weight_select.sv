// min_weight_select: exhaustive search for the translate coset leader, with coset erasure
// matching (CEM).
//
// Every candidate's weight (number of 1s, i.e. cells it would flip) is counted and the
// lightest one wins; ties go to the lowest index (this design's choice). A candidate that has
// a 1 where the fault mask marks a stuck-at cell would have to change that cell and is not
// eligible. If no candidate is eligible, `found` is low and the plain minimum weight candidate
// is returned so the caller can still decide what to do. Purely combinational.
module min_weight_select #(
  parameter int N  = 72,
  parameter int NC = 256,
  localparam int WW = $clog2(N + 1),
  localparam int IW = (NC > 1) ? $clog2(NC) : 1
) (
  input  logic [NC-1:0][N-1:0] cand,
  input  logic [N-1:0]         fault_mask,   // 1 = stuck-at cell, may not flip
  output logic [N-1:0]         leader,
  output logic [IW-1:0]        leader_idx,
  output logic [WW-1:0]        leader_weight,
  output logic                 found         // an eligible candidate exists
);

  always_comb begin
    logic [WW-1:0] w, best_w, any_w;
    logic [IW-1:0] best_i, any_i;
    best_w = '1;
    best_i = '0;
    any_w  = '1;
    any_i  = '0;
    found  = 1'b0;
    for (int e = 0; e < NC; e++) begin
      w = WW'($countones(cand[e]));
      if (w < any_w) begin
        any_w = w;
        any_i = IW'(e);
      end
      if ((cand[e] & fault_mask) == '0 && (!found || w < best_w)) begin
        best_w = w;
        best_i = IW'(e);
        found  = 1'b1;
      end
    end
    leader_idx    = found ? best_i : any_i;
    leader_weight = found ? best_w : any_w;
    leader        = cand[leader_idx];
  end

endmodule
