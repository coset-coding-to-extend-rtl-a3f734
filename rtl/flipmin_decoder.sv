// flipmin_decoder: FlipMin decoder for one PCM word.
//
// Each N-bit slice of the read-out coset representative is multiplied over GF(2) by the
// code's decoder matrix H (bit mask + XOR per dataword bit), giving K dataword bits; the
// slices are concatenated back into the 64-bit dataword. Every member of a coset decodes to
// the same dataword, so the decoder needs no side information. Purely combinational.
module flipmin_decoder
  import flipmin_pkg::*;
#(
  parameter code_e CODE = FM_RM_1_7T,
  localparam int   N    = sub_n(CODE),
  localparam int   K    = sub_k(CODE),
  localparam int   NSUB = num_sub(CODE),
  localparam int   CW   = NSUB * N
) (
  input  logic [CW-1:0]   rep,
  output logic [WORD-1:0] data
);

  function automatic logic [K-1:0][N-1:0] dec_masks();
    mmat_t m;
    logic [K-1:0][N-1:0] s;
    m = decode_masks(CODE);
    for (int o = 0; o < K; o++) s[o] = m[o][N-1:0];
    return s;
  endfunction

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    gf2_matmul #(.IN(N), .OUT(K), .MASKS(dec_masks())) u_dec (
      .vec_in (rep[s*N +: N]),
      .vec_out(data[s*K +: K])
    );
  end

endmodule
