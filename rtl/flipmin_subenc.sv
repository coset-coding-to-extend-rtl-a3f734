// flipmin_subenc: FlipMin encoder for one sub-vector of a word.
//
// Steps, as in the FlipMin encoder: (1) the dataword is multiplied by H# to give the coset
// label; (2) the label is XORed with the previously written coset representative to give a
// translate coset representative; (3) the translate coset is enumerated against the zero
// coset ROM; (4) the minimum weight member (the translate coset leader) is found, skipping
// members that would flip a stuck-at cell; (5) the leader is XORed with the previous data
// to give the coset representative to write, which flips the fewest cells of its coset.
// Purely combinational; `cem_ok` is low when every member would flip a stuck-at cell.
module flipmin_subenc
  import flipmin_pkg::*;
#(
  parameter code_e CODE = FM_RM_1_7T,
  localparam int   N    = sub_n(CODE),
  localparam int   K    = sub_k(CODE),
  localparam int   NC   = 1 << sub_r(CODE),
  localparam int   WW   = $clog2(N + 1)
) (
  input  logic [K-1:0]  data,
  input  logic [N-1:0]  prev,         // coset representative currently stored
  input  logic [N-1:0]  fault_mask,   // 1 = stuck-at cell
  output logic [N-1:0]  rep,          // coset representative to write
  output logic [WW-1:0] flips,        // cells that the write changes
  output logic          cem_ok
);

  function automatic logic [N-1:0][K-1:0] lbl_masks();
    mmat_t m;
    logic [N-1:0][K-1:0] s;
    m = label_masks(CODE);
    for (int o = 0; o < N; o++) s[o] = m[o][K-1:0];
    return s;
  endfunction

  logic [N-1:0]         label, t_label, leader;
  logic [NC-1:0][N-1:0] t_coset;
  logic [$clog2(NC)-1:0] leader_idx;

  gf2_matmul #(.IN(K), .OUT(N), .MASKS(lbl_masks())) u_label (
    .vec_in (data),
    .vec_out(label)
  );

  assign t_label = label ^ prev;

  translate_coset_gen #(.CODE(CODE)) u_tcoset (
    .t_label(t_label),
    .t_coset(t_coset)
  );

  min_weight_select #(.N(N), .NC(NC)) u_select (
    .cand         (t_coset),
    .fault_mask   (fault_mask),
    .leader       (leader),
    .leader_idx   (leader_idx),
    .leader_weight(flips),
    .found        (cem_ok)
  );

  assign rep = leader ^ prev;

endmodule
