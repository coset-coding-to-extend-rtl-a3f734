// tb_flipmin_decoder: checks the FlipMin decoders of all three codes.
//  - Repetition code: for the label {d,0} and its complement the data is d (the classic
//    "append a 0" example, generalised to 8 bits): x decodes to x[8:1] ^ {8{x[0]}}.
//  - Every code: adding any zero coset word (built here from the code definitions) to a
//    random word leaves the decoded data unchanged, and the decoder is linear.
//  - RM codes: decoding is onto: 200 random words give a matching number of distinct
//    cosets as a direct syndrome-style comparison (pairs decode equal iff their XOR is a
//    zero coset word) on sampled pairs.
module tb_flipmin_decoder;
  import flipmin_pkg::*;
  logic [71:0]  xp, xt, xp2, xt2;
  logic [127:0] xr, xr2;
  logic [63:0]  dp, dr, dt, dp2, dr2, dt2;
  int checks = 0, failures = 0;

  flipmin_decoder #(.CODE(FM_PARITY_72_64)) u_p (.rep(xp), .data(dp));
  flipmin_decoder #(.CODE(FM_RM_1_3))       u_r (.rep(xr), .data(dr));
  flipmin_decoder #(.CODE(FM_RM_1_7T))      u_t (.rep(xt), .data(dt));
  flipmin_decoder #(.CODE(FM_PARITY_72_64)) v_p (.rep(xp2), .data(dp2));
  flipmin_decoder #(.CODE(FM_RM_1_3))       v_r (.rep(xr2), .data(dr2));
  flipmin_decoder #(.CODE(FM_RM_1_7T))      v_t (.rep(xt2), .data(dt2));

  function automatic logic [71:0] zc(int n, int r, int u);
    logic [71:0] z = '0;
    for (int j = 0; j < n; j++) begin
      z[j] = u[0];
      for (int k = 1; k < r; k++) z[j] ^= u[k] & ((j >> (k - 1)) & 1);
    end
    return z;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [63:0] ref_p;
      xp = {$urandom, $urandom, $urandom};
      xr = {$urandom, $urandom, $urandom, $urandom};
      xt = {$urandom, $urandom, $urandom};
      #1;
      for (int s = 0; s < 8; s++) ref_p[8*s +: 8] = xp[9*s+1 +: 8] ^ {8{xp[9*s]}};
      checks++;
      if (dp != ref_p) begin failures++; $display("parity %h %h", dp, ref_p); end
      // coset invariance
      xp2 = xp; xr2 = xr; xt2 = xt;
      for (int s = 0; s < 8; s++) xp2[9*s +: 9] ^= 9'(zc(9, 1, $urandom % 2));
      for (int s = 0; s < 16; s++) xr2[8*s +: 8] ^= 8'(zc(8, 4, $urandom % 16));
      xt2 ^= zc(72, 8, $urandom % 256);
      #1;
      checks++;
      if (dp2 != dp || dr2 != dr || dt2 != dt) begin failures++; $display("coset invariance"); end
      // linearity: dec(a ^ b) == dec(a) ^ dec(b), and a non-zero-coset difference changes data
      xt2 = xt ^ (72'(1) << ($urandom % 72));
      xr2 = xr ^ (128'(1) << ($urandom % 128));
      #1;
      checks++;
      if (dt2 == dt || dr2 == dr) begin failures++; $display("single-bit change not seen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
