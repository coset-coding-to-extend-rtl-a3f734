// translate_coset_gen: enumerates the translate coset of one sub-vector.
//
// The 2^R zero coset representatives of the selected code sit in a constant ROM built at
// elaboration from the code's generator rows. Each one is XORed with the translate coset
// label (one XOR per representative); the results are all members of the translate coset,
// whose 1s mark the cells a write of the matching dataword coset member would flip.
// Purely combinational. Representative e of the zero coset is the XOR of the generator rows
// selected by the bits of e.
module translate_coset_gen
  import flipmin_pkg::*;
#(
  parameter code_e CODE = FM_RM_1_7T,
  localparam int   N    = sub_n(CODE),
  localparam int   NC   = 1 << sub_r(CODE)
) (
  input  logic [N-1:0]          t_label,   // translate coset label (coset label ^ previous data)
  output logic [NC-1:0][N-1:0]  t_coset    // all translate coset representatives
);

  function automatic logic [NC-1:0][N-1:0] build_rom();
    logic [NC-1:0][N-1:0] rom;
    logic [MAXN-1:0] v;
    for (int e = 0; e < NC; e++) begin
      v = zero_rep(CODE, e);
      rom[e] = v[N-1:0];
    end
    return rom;
  endfunction

  localparam logic [NC-1:0][N-1:0] ZERO_COSET = build_rom();

  always_comb begin
    for (int e = 0; e < NC; e++) t_coset[e] = ZERO_COSET[e] ^ t_label;
  end

endmodule
