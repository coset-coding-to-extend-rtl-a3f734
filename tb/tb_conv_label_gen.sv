// tb_conv_label_gen: streams random data blocks through the label generator and checks that
// each label has a = 0 and that its syndrome (computed by the reference) equals the data,
// and that `clear` restarts the filter between blocks.
module tb_conv_label_gen;
  import tb_flash_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, step = 0, d = 0;
  logic [1:0] lbl;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  conv_label_gen dut (.clk, .rst_n, .clear, .step, .d, .label(lbl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      bit [L-1:0] data;
      word_t c;
      for (int j = 0; j < L; j++) data[j] = $urandom % 2;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int j = 0; j < L; j++) begin
        d = data[j]; step = 1;
        #1;
        c[2*j] = lbl[0]; c[2*j+1] = lbl[1];
        @(negedge clk);
        // idle cycles must not advance the filter
        if (j % 97 == 5) begin step = 0; @(negedge clk); end
      end
      step = 0;
      checks++;
      if (syndrome(c) != data) begin failures++; $display("block %0d: syndrome != data", b); end
      for (int j = 0; j < L; j++) if (c[2*j]) begin failures++; $display("a not zero"); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
