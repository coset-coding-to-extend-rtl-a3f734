// flipmin_pkg: coset code definitions shared by the FlipMin (PCM) encoder and decoder.
//
// A coset code is described by its zero coset generator Z (R rows of N bits; the zero coset is
// the set of 2^R GF(2) combinations of those rows). The dataword of a sub-vector has K = N - R
// bits. Three codes are supported, each applied to a 64-bit word split into sub-vectors:
//   FM_PARITY_72_64 : zero coset = {000000000, 111111111} (9-bit repetition, the dual of the
//                     (9,8) parity code), 8 sub-vectors of 8 data bits -> 72 bits.
//   FM_RM_1_3       : zero coset = RM(1,3) (self-dual, 16 words of 8 bits), 16 sub-vectors of
//                     4 data bits -> 128 bits.
//   FM_RM_1_7T      : zero coset = RM(1,7) punctured to its first 72 coordinates (256 words),
//                     one 64-bit sub-vector -> 72 bits.
// Reed-Muller RM(1,m) words are built as z_j = u0 ^ (u[m:1] . j) for coordinate j, so Z row 0
// is all ones and row r (1..m) holds bit r-1 of the coordinate index.
//
// The coset label matrix H# and the decoder matrix H are derived here from Z by GF(2)
// Gauss-Jordan elimination (a design choice: the code constructions are the standard ones, the
// concrete matrices are this design's own). Elimination puts Z in reduced row-echelon form
// with pivot columns p_r (lowest columns first). The coset label of dataword d places d in the
// non-pivot columns, in increasing order, and zeros in the pivot columns. Because every zero
// coset word is fixed by its pivot bits, any coset member x decodes as
//   d_m = x[np_m] ^ XOR_r ( x[p_r] & Zrref[r][np_m] ),
// which satisfies Z H^T = 0 and H# H = I. For the repetition code this gives "append a 0"
// as in the 2-to-3 bit example (label = {d, 1'b0}).
package flipmin_pkg;

  typedef enum logic [1:0] {
    FM_PARITY_72_64 = 2'd0,
    FM_RM_1_3       = 2'd1,
    FM_RM_1_7T      = 2'd2
  } code_e;

  localparam int MAXN = 72;   // longest sub-vector code length
  localparam int MAXR = 8;    // largest zero coset dimension (256 representatives)
  localparam int WORD = 64;   // dataword width of the encoder and decoder

  typedef logic [MAXR-1:0][MAXN-1:0] zmat_t;   // Z rows
  typedef logic [MAXN-1:0][MAXN-1:0] mmat_t;   // output-bit masks of a GF(2) multiply

  function automatic int sub_n(code_e c);
    case (c)
      FM_PARITY_72_64: return 9;
      FM_RM_1_3:       return 8;
      default:         return 72;
    endcase
  endfunction

  function automatic int sub_r(code_e c);
    case (c)
      FM_PARITY_72_64: return 1;
      FM_RM_1_3:       return 4;
      default:         return 8;
    endcase
  endfunction

  function automatic int sub_k(code_e c);
    return sub_n(c) - sub_r(c);
  endfunction

  function automatic int num_sub(code_e c);
    return WORD / sub_k(c);
  endfunction

  function automatic int code_width(code_e c);
    return num_sub(c) * sub_n(c);
  endfunction

  // Zero coset generator rows (unused rows/columns are zero).
  function automatic zmat_t zero_gen(code_e c);
    zmat_t z;
    int n, r;
    z = '0;
    n = sub_n(c);
    r = sub_r(c);
    for (int j = 0; j < n; j++) begin
      z[0][j] = 1'b1;
      for (int row = 1; row < r; row++) z[row][j] = j[row-1];
    end
    return z;
  endfunction

  // Reduced row-echelon form of Z; piv[r] receives the pivot column of row r.
  function automatic zmat_t zero_rref(code_e c);
    zmat_t z;
    logic [MAXN-1:0] tmp;
    int n, r, row;
    z = zero_gen(c);
    n = sub_n(c);
    r = sub_r(c);
    row = 0;
    for (int col = 0; col < n; col++) begin
      if (row < r) begin
        int sel;
        sel = -1;
        for (int i = row; i < r; i++) if (sel < 0 && z[i][col]) sel = i;
        if (sel >= 0) begin
          tmp = z[sel]; z[sel] = z[row]; z[row] = tmp;
          for (int i = 0; i < r; i++) if (i != row && z[i][col]) z[i] = z[i] ^ z[row];
          row++;
        end
      end
    end
    return z;
  endfunction

  // Bit set at every pivot column of the reduced Z.
  function automatic logic [MAXN-1:0] pivot_cols(code_e c);
    zmat_t z;
    logic [MAXN-1:0] p;
    z = zero_rref(c);
    p = '0;
    for (int row = 0; row < sub_r(c); row++) begin
      int first;
      first = -1;
      for (int col = 0; col < sub_n(c); col++) if (first < 0 && z[row][col]) first = col;
      if (first >= 0) p[first] = 1'b1;
    end
    return p;
  endfunction

  // Coset label generator H#: mask m[o] selects the dataword bit feeding label bit o.
  function automatic mmat_t label_masks(code_e c);
    mmat_t m;
    logic [MAXN-1:0] p;
    int k;
    m = '0;
    p = pivot_cols(c);
    k = 0;
    for (int col = 0; col < sub_n(c); col++)
      if (!p[col]) begin
        m[col][k] = 1'b1;
        k++;
      end
    return m;
  endfunction

  // Decoder H: mask m[o] selects the coset representative bits XORed into dataword bit o.
  function automatic mmat_t decode_masks(code_e c);
    mmat_t m;
    zmat_t z;
    logic [MAXN-1:0] p;
    int k;
    m = '0;
    z = zero_rref(c);
    p = pivot_cols(c);
    k = 0;
    for (int col = 0; col < sub_n(c); col++)
      if (!p[col]) begin
        m[k][col] = 1'b1;
        for (int row = 0; row < sub_r(c); row++)
          if (z[row][col]) begin
            for (int pc = 0; pc < sub_n(c); pc++)
              if (z[row][pc] && p[pc]) m[k][pc] = 1'b1;
          end
        k++;
      end
    return m;
  endfunction

  // Zero coset representative e: XOR of the Z rows selected by the bits of e.
  function automatic logic [MAXN-1:0] zero_rep(code_e c, int e);
    zmat_t z;
    logic [MAXN-1:0] v;
    z = zero_gen(c);
    v = '0;
    for (int row = 0; row < sub_r(c); row++) if (e[row]) v = v ^ z[row];
    return v;
  endfunction

endpackage
