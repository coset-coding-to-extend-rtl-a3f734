// tb_conv_decoder: builds written words as (label of d) ^ (code sequence from a random start
// state and random inputs) with the reference model and checks the decoder returns d with
// no syndrome error; then checks that an error in the last cell raises syn_err.
module tb_conv_decoder;
  import tb_flash_ref_pkg::*;
  logic [N-1:0]  x;
  logic [6:0]    ss;
  logic [DW-1:0] data;
  logic          err;
  int checks = 0, failures = 0;

  conv_decoder dut (.rep(x), .start_state(ss), .data(data), .syn_err(err));

  // label with a = 0 and b = d / g1 (reference recursion)
  function automatic word_t label_of(bit [L-1:0] d);
    word_t c = '0;
    for (int j = 0; j < L; j++) begin
      bit b = d[j];
      for (int k = 1; k <= 7; k++) if (j >= k) b ^= ((T1 >> k) & 1) & c[2*(j-k)+1];
      c[2*j+1] = b;
    end
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      bit [L-1:0] d, u;
      automatic int s = $urandom % 128;
      for (int j = 0; j < L; j++) begin d[j] = (j < DW) ? $urandom % 2 : 0; u[j] = $urandom % 2; end
      x = label_of(d) ^ encode(s, u);
      ss = 7'(s);
      #1;
      checks++;
      if (data != d[DW-1:0] || err) begin failures++; $display("t=%0d s=%0d decode mismatch err=%b", t, s, err); end
      x[N-1] = ~x[N-1];
      #1;
      checks++;
      if (!err) begin failures++; $display("error in last cell not flagged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
