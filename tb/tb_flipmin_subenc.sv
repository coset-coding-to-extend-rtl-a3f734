// tb_flipmin_subenc: one-sub-vector FlipMin encode on the 9-bit repetition code.
// Reference: the coset of d is {{d,0}, ~{d,0}} (the "append a 0" label and its complement);
// the encoder must write whichever of the two flips fewer cells (the label on a tie), or the
// one that spares a stuck-at cell. Worked example: previous data all ones, d = 00000001:
// label 000000010 flips 8 cells, its complement 111111101 flips 1, so 111111101 is written.
module tb_flipmin_subenc;
  import flipmin_pkg::*;
  logic [7:0] d;
  logic [8:0] prev, mask, rep;
  logic [3:0] flips;
  logic       ok;
  int checks = 0, failures = 0;

  flipmin_subenc #(.CODE(FM_PARITY_72_64)) dut (.data(d), .prev(prev), .fault_mask(mask),
    .rep(rep), .flips(flips), .cem_ok(ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'b0000_0001; prev = 9'h1FF; mask = '0;
    #1;
    checks++;
    if (rep != 9'b111111101 || flips != 4'd1) begin failures++; $display("example rep=%b", rep); end
    for (int t = 0; t < 3000; t++) begin
      logic [8:0] a, b, exp_rep;
      int fa, fb;
      bit ea, eb;
      d = 8'($urandom); prev = 9'($urandom);
      mask = (t % 2) ? 9'(1 << ($urandom % 9)) : '0;
      a = {d, 1'b0}; b = ~a;
      fa = $countones(a ^ prev); fb = $countones(b ^ prev);
      ea = ((a ^ prev) & mask) == 0; eb = ((b ^ prev) & mask) == 0;
      if (ea && eb) exp_rep = (fb < fa) ? b : a;
      else if (ea) exp_rep = a;
      else if (eb) exp_rep = b;
      else exp_rep = (fb < fa) ? b : a;
      #1;
      checks++;
      if (rep != exp_rep || int'(flips) != $countones(rep ^ prev) || ok != (ea || eb)) begin
        failures++;
        $display("d=%b prev=%b mask=%b rep=%b exp=%b ok=%b", d, prev, mask, rep, exp_rep, ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
