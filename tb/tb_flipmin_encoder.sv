// tb_flipmin_encoder: 64-bit FlipMin encoders for all three codes, clocked.
// For random data, previous contents and fault masks it checks, per code and sub-vector:
//  - the output appears exactly one clock after in_valid;
//  - the written word decodes back to the data (through flipmin_decoder);
//  - coset membership: the two words written for the same data from two different previous
//    contents differ by a zero coset word (zero coset built here from the code definitions);
//  - no other coset member (rep ^ z) that spares the stuck-at cells flips fewer cells;
//  - cem_ok matches whether such a member exists, and flips equals the changed cell count.
module tb_flipmin_encoder;
  import flipmin_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        vld;
  logic [63:0] d;
  logic [71:0] prev_p, mask_p, rep_p, prev_t, mask_t, rep_t;
  logic [127:0] prev_r, mask_r, rep_r;
  logic        ov_p, ov_r, ov_t, ok_p, ok_r, ok_t;
  logic [6:0]  fl_p, fl_t;
  logic [7:0]  fl_r;
  logic [63:0] dd_p, dd_r, dd_t;
  int checks = 0, failures = 0;

  flipmin_encoder #(.CODE(FM_PARITY_72_64)) e_p (.clk, .rst_n, .in_valid(vld), .data(d),
    .prev(prev_p), .fault_mask(mask_p), .out_valid(ov_p), .rep(rep_p), .flips(fl_p), .cem_ok(ok_p));
  flipmin_encoder #(.CODE(FM_RM_1_3)) e_r (.clk, .rst_n, .in_valid(vld), .data(d),
    .prev(prev_r), .fault_mask(mask_r), .out_valid(ov_r), .rep(rep_r), .flips(fl_r), .cem_ok(ok_r));
  flipmin_encoder #(.CODE(FM_RM_1_7T)) e_t (.clk, .rst_n, .in_valid(vld), .data(d),
    .prev(prev_t), .fault_mask(mask_t), .out_valid(ov_t), .rep(rep_t), .flips(fl_t), .cem_ok(ok_t));
  flipmin_decoder #(.CODE(FM_PARITY_72_64)) d_p (.rep(rep_p), .data(dd_p));
  flipmin_decoder #(.CODE(FM_RM_1_3))       d_r (.rep(rep_r), .data(dd_r));
  flipmin_decoder #(.CODE(FM_RM_1_7T))      d_t (.rep(rep_t), .data(dd_t));

  // zero coset word u of a code: n bits, r generator rows
  function automatic logic [71:0] zc(int n, int r, int u);
    logic [71:0] z = '0;
    for (int j = 0; j < n; j++) begin
      z[j] = u[0];
      for (int k = 1; k < r; k++) z[j] ^= u[k] & ((j >> (k - 1)) & 1);
    end
    return z;
  endfunction

  function automatic bit in_zero(logic [71:0] v, int n, int r);
    for (int u = 0; u < (1 << r); u++) if (v == zc(n, r, u)) return 1;
    return 0;
  endfunction

  // checks one sub-vector: returns 1 if a member sparing the mask exists
  task automatic chk_sub(logic [71:0] x, logic [71:0] p, logic [71:0] m, int n, int r, string nm);
    int fx = $countones((x ^ p) & ((72'd1 << n) - 1));
    for (int u = 1; u < (1 << r); u++) begin
      logic [71:0] y = x ^ zc(n, r, u);
      if ((((y ^ p) & m) == 0) && $countones((y ^ p) & ((72'd1 << n) - 1)) < fx &&
          (((x ^ p) & m) == 0)) begin
        failures++; $display("%s: lighter member exists", nm); return;
      end
    end
  endtask

  function automatic bit any_ok(logic [71:0] x, logic [71:0] p, logic [71:0] m, int n, int r);
    for (int u = 0; u < (1 << r); u++) if ((((x ^ zc(n, r, u)) ^ p) & m) == 0) return 1;
    return 0;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [71:0]  keep_p, keep_t;
  logic [127:0] keep_r;
  initial begin
    vld = 0; d = '0; prev_p = '0; prev_r = '0; prev_t = '0; mask_p = '0; mask_r = '0; mask_t = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic bit exp_ok_p = 1, exp_ok_r = 1, exp_ok_t = 1;
      d = {$urandom, $urandom};
      for (int pass = 0; pass < 2; pass++) begin
        prev_p = {$urandom, $urandom, $urandom};
        prev_r = {$urandom, $urandom, $urandom, $urandom};
        prev_t = {$urandom, $urandom, $urandom};
        mask_p = (t % 4 == 1) ? 72'(1) << ($urandom % 72) : '0;
        mask_r = (t % 4 == 2) ? (128'(1) << ($urandom % 128)) | (128'(1) << ($urandom % 128)) : '0;
        mask_t = (t % 4 == 3) ? (72'(1) << ($urandom % 72)) | (72'(1) << ($urandom % 72)) : '0;
        @(negedge clk); vld = 1;
        @(negedge clk); vld = 0;
        checks++;
        if (!(ov_p && ov_r && ov_t)) begin failures++; $display("latency"); end
        @(negedge clk);
        checks++;
        if (ov_p || ov_r || ov_t) begin failures++; $display("valid held"); end
        checks++;
        if (dd_p != d || dd_r != d || dd_t != d) begin failures++; $display("roundtrip %h %h %h %h", d, dd_p, dd_r, dd_t); end
        checks++;
        if (int'(fl_p) != $countones(rep_p ^ prev_p) || int'(fl_r) != $countones(rep_r ^ prev_r) ||
            int'(fl_t) != $countones(rep_t ^ prev_t)) begin failures++; $display("flip count"); end
        exp_ok_p = 1; exp_ok_r = 1; exp_ok_t = 1;
        for (int s = 0; s < 8; s++) begin
          chk_sub(72'(rep_p >> (9 * s)), 72'(prev_p >> (9 * s)), 72'((mask_p >> (9 * s)) & 9'h1FF), 9, 1, "parity");
          exp_ok_p &= any_ok(72'((rep_p >> (9 * s)) & 9'h1FF), 72'((prev_p >> (9 * s)) & 9'h1FF), 72'((mask_p >> (9 * s)) & 9'h1FF), 9, 1);
        end
        for (int s = 0; s < 16; s++) begin
          chk_sub(72'(rep_r >> (8 * s)), 72'(prev_r >> (8 * s)), 72'((mask_r >> (8 * s)) & 8'hFF), 8, 4, "rm13");
          exp_ok_r &= any_ok(72'((rep_r >> (8 * s)) & 8'hFF), 72'((prev_r >> (8 * s)) & 8'hFF), 72'((mask_r >> (8 * s)) & 8'hFF), 8, 4);
        end
        chk_sub(rep_t, prev_t, mask_t, 72, 8, "rm17t");
        exp_ok_t = any_ok(rep_t, prev_t, mask_t, 72, 8);
        checks += 3;
        if (ok_p != exp_ok_p || ok_r != exp_ok_r || ok_t != exp_ok_t) begin failures++; $display("cem_ok"); end
        if (pass == 0) begin
          keep_p = rep_p; keep_r = rep_r; keep_t = rep_t;
        end else begin
          checks++;
          for (int s = 0; s < 8; s++)
            if (!in_zero(72'(((keep_p ^ rep_p) >> (9 * s)) & 9'h1FF), 9, 1)) begin failures++; $display("parity coset"); end
          for (int s = 0; s < 16; s++)
            if (!in_zero(72'(((keep_r ^ rep_r) >> (8 * s)) & 8'hFF), 8, 4)) begin failures++; $display("rm13 coset"); end
          if (!in_zero(keep_t ^ rep_t, 72, 8)) begin failures++; $display("rm17t coset"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
