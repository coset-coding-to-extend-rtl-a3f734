// tb_translate_coset_gen: checks the translate coset enumeration.
// 1) RM(1,3): the translate coset of label 11101110 must be exactly the 16 words of the
//    coset erasure matching example (order free).
// 2) Truncated RM(1,7): for random labels, every output must be label ^ z with z a codeword
//    built here from the RM definition (z_j = u0 ^ (u[7:1] . j)), and all 256 must differ.
module tb_translate_coset_gen;
  import flipmin_pkg::*;

  logic [7:0]        lbl8;
  logic [15:0][7:0]  co8;
  logic [71:0]       lbl72;
  logic [255:0][71:0] co72;
  int checks = 0, failures = 0;

  translate_coset_gen #(.CODE(FM_RM_1_3))  dut8  (.t_label(lbl8),  .t_coset(co8));
  translate_coset_gen #(.CODE(FM_RM_1_7T)) dut72 (.t_label(lbl72), .t_coset(co72));

  logic [7:0] expect8 [16] = '{8'b11101110, 8'b10111011, 8'b11011101, 8'b11100001,
                              8'b10110100, 8'b11010010, 8'b00010001, 8'b01000100,
                              8'b00100010, 8'b00011110, 8'b01001011, 8'b00101101,
                              8'b10001000, 8'b10000111, 8'b01110111, 8'b01111000};

  function automatic logic [71:0] rm7(logic [7:0] u);
    logic [71:0] z;
    for (int j = 0; j < 72; j++) z[j] = u[0] ^ (^(u[7:1] & 7'(j)));
    return z;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lbl8 = 8'b11101110;
    #1;
    for (int i = 0; i < 16; i++) begin
      automatic bit hit = 0;
      for (int e = 0; e < 16; e++) if (co8[e] == expect8[i]) hit = 1;
      checks++;
      if (!hit) begin failures++; $display("missing %b", expect8[i]); end
    end
    for (int t = 0; t < 20; t++) begin
      lbl72 = {$urandom, $urandom, $urandom};
      #1;
      for (int e = 0; e < 256; e++) begin
        automatic bit hit = 0;
        for (int u = 0; u < 256; u++) if ((co72[e] ^ lbl72) == rm7(8'(u))) hit = 1;
        for (int f = 0; f < e; f++) if (co72[f] == co72[e]) hit = 0;
        checks++;
        if (!hit) begin failures++; $display("bad member %0d", e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
