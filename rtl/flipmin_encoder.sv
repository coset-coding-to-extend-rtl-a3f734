// flipmin_encoder: FlipMin encoder for one 64-bit PCM word.
//
// The dataword is split into sub-vectors of K bits and each is encoded on its own by a
// flipmin_subenc against the matching N-bit slice of the word's previously written contents
// and of its fault mask (sub-vector 0 uses the least significant bits). The written word is
// NSUB*N bits: 72 for FM-Parity(72,64) (8-bit sub-vectors) and FM-RM(1,7)T (one 64-bit
// vector), 128 for FM-RM(1,3) (4-bit sub-vectors). The encode itself is combinational; this
// design registers the result, so `out_valid` follows `in_valid` by exactly one clock, with no
// back-pressure. `cem_ok` is low when some sub-vector found no member that spares its
// stuck-at cells (coset erasure matching failed); `flips` counts the cells the write changes.
module flipmin_encoder
  import flipmin_pkg::*;
#(
  parameter code_e CODE = FM_RM_1_7T,
  localparam int   N    = sub_n(CODE),
  localparam int   K    = sub_k(CODE),
  localparam int   NSUB = num_sub(CODE),
  localparam int   CW   = NSUB * N,
  localparam int   FW   = $clog2(CW + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [WORD-1:0] data,
  input  logic [CW-1:0]   prev,
  input  logic [CW-1:0]   fault_mask,
  output logic            out_valid,
  output logic [CW-1:0]   rep,
  output logic [FW-1:0]   flips,
  output logic            cem_ok
);

  localparam int SW = $clog2(N + 1);

  logic [CW-1:0]            rep_c;
  logic [NSUB-1:0][SW-1:0]  flips_s;
  logic [NSUB-1:0]          ok_s;

  for (genvar s = 0; s < NSUB; s++) begin : g_sub
    flipmin_subenc #(.CODE(CODE)) u_sub (
      .data      (data[s*K +: K]),
      .prev      (prev[s*N +: N]),
      .fault_mask(fault_mask[s*N +: N]),
      .rep       (rep_c[s*N +: N]),
      .flips     (flips_s[s]),
      .cem_ok    (ok_s[s])
    );
  end

  logic [FW-1:0] flips_c;
  always_comb begin
    flips_c = '0;
    for (int s = 0; s < NSUB; s++) flips_c = flips_c + FW'(flips_s[s]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      rep       <= '0;
      flips     <= '0;
      cem_ok    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        rep    <= rep_c;
        flips  <= flips_c;
        cem_ok <= &ok_s;
      end
    end
  end

endmodule
