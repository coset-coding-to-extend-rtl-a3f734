// gf2_matmul: vector-by-matrix multiply over GF(2).
//
// Each output bit o has its own bit mask MASKS[o] (one column of the matrix): the mask ANDs
// away the input bits whose matrix entry is 0 and an XOR tree reduces the rest to one bit.
// This is the structure used both for the coset label generator (dataword times H#) and for
// the FlipMin decoder (coset representative times H). Purely combinational, no handshake.
// The default matrix is the coset label generator of the truncated RM(1,7) code.
module gf2_matmul
  import flipmin_pkg::*;
#(
  parameter int                          IN    = 64,
  parameter int                          OUT   = 72,
  parameter logic [OUT-1:0][IN-1:0]      MASKS = mask_slice(label_masks(FM_RM_1_7T))
) (
  input  logic [IN-1:0]  vec_in,
  output logic [OUT-1:0] vec_out
);

  function automatic logic [OUT-1:0][IN-1:0] mask_slice(mmat_t m);
    logic [OUT-1:0][IN-1:0] s;
    for (int o = 0; o < OUT; o++) s[o] = m[o][IN-1:0];
    return s;
  endfunction

  always_comb begin
    for (int o = 0; o < OUT; o++) vec_out[o] = ^(vec_in & MASKS[o]);
  end

endmodule
