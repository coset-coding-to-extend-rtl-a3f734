// conv_decoder: recovers a block's data from the read-out coset representative.
//
// The written word is x = c ^ z with c the coset label and z a code sequence that started in
// trellis state `start_state` (kept in the map table). The zero-input response of that state
// (only the first 7 steps are affected) is removed first, leaving c plus a code sequence from
// state 0; the syndrome former sigma_j = XOR_k G2[k] a_{j-k} ^ G1[k] b_{j-k} then returns the
// syndrome of c, whose low DW bits are the data. The reserved high syndrome bits must be zero;
// `syn_err` flags a read error that reached them. Purely combinational.
module conv_decoder
  import flash_pkg::*;
(
  input  logic [NCELL-1:0] rep,
  input  logic [M-1:0]     start_state,
  output logic [DW-1:0]    data,
  output logic             syn_err
);

  logic [NCELL-1:0] y;
  logic [L-1:0]     syn;

  always_comb begin
    logic [M-1:0] s;
    logic [1:0]   o;
    y = rep;
    s = start_state;
    for (int j = 0; j < M; j++) begin
      o = conv_out(s, 1'b0);
      y[2*j]   = y[2*j]   ^ o[0];
      y[2*j+1] = y[2*j+1] ^ o[1];
      s = {s[M-2:0], 1'b0};
    end
    for (int j = 0; j < L; j++) begin
      syn[j] = 1'b0;
      for (int k = 0; k <= M; k++)
        if (j >= k) syn[j] = syn[j] ^ (G2[k] & y[2*(j-k)]) ^ (G1[k] & y[2*(j-k)+1]);
    end
  end

  assign data    = syn[DW-1:0];
  assign syn_err = |syn[L-1:DW];

endmodule
