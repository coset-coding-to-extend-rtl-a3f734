// tb_gf2_matmul: checks the GF(2) vector-matrix multiply against a bit-by-bit reference.
// A 20x12 matrix built from a fixed pattern is used; 500 random input vectors are applied and
// every output bit is recomputed as the parity of the AND of input and matrix column.
module tb_gf2_matmul;
  localparam int IN = 20, OUT = 12;

  function automatic logic [OUT-1:0][IN-1:0] mk();
    logic [OUT-1:0][IN-1:0] m;
    for (int o = 0; o < OUT; o++)
      for (int i = 0; i < IN; i++) m[o][i] = ((o * 7 + i * 3 + (o * i) % 5) % 3) == 0;
    return m;
  endfunction
  localparam logic [OUT-1:0][IN-1:0] M = mk();

  logic [IN-1:0]  v;
  logic [OUT-1:0] y;
  int checks = 0, failures = 0;

  gf2_matmul #(.IN(IN), .OUT(OUT), .MASKS(M)) dut (.vec_in(v), .vec_out(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [OUT-1:0] ref_y;
      v = IN'($urandom);
      if (t == 0) v = '0;
      #1;
      for (int o = 0; o < OUT; o++) begin
        ref_y[o] = 1'b0;
        for (int i = 0; i < IN; i++) if (((o * 7 + i * 3 + (o * i) % 5) % 3) == 0) ref_y[o] ^= v[i];
      end
      checks++;
      if (y !== ref_y) begin
        failures++;
        $display("mismatch v=%h y=%h ref=%h", v, y, ref_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
