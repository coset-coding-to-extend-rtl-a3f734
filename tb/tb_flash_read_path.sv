// tb_flash_read_path: builds a block's cell levels from a reference-coded word (label of the
// data XOR a code sequence from a random start state): each level is random with the right
// parity, and a few cells get a wrong parity but are covered by SCPs carrying the right bit.
// The read path must return the data with no syndrome error, NCELL + 1 clocks after start.
module tb_flash_read_path;
  import tb_flash_ref_pkg::*;
  import flash_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, err;
  logic [6:0] blk;
  logic [NCELL-1:0][LVW-1:0] lin;
  scp_t [NSCP-1:0] sin;
  logic [M-1:0] ss;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flash_read_path dut (.clk, .rst_n, .start, .blk, .level_in(lin), .scp_in(sin),
    .start_state(ss), .done, .data, .syn_err(err));

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
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk = '0; lin = '0; sin = '0; ss = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      automatic bit [L-1:0] d, u;
      automatic word_t x;
      automatic int s = $urandom % 128, cyc = 0;
      for (int j = 0; j < L; j++) begin d[j] = (j < DW) ? $urandom % 2 : 0; u[j] = $urandom % 2; end
      x = label_of(d) ^ encode(s, u);
      blk = 7'(r * 9);
      ss = M'(s);
      sin = '0;
      for (int i = 0; i < N; i++) lin[i] = LVW'((($urandom % 8) << 1) | int'(x[i]));
      for (int e = 0; e < 10 * (r % 3); e++) begin
        automatic int c = $urandom % N;
        lin[c] = lin[c] ^ 5'd1;                       // the cell itself holds the wrong bit
        sin[e] = '{valid: 1, ptr: PTRW'(int'(blk) * N + c), repl: x[c]};
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (data != d[DW-1:0] || err) begin failures++; $display("run %0d: data mismatch err=%b", r, err); end
      if (cyc != N + 2) begin failures++; $display("run %0d: latency %0d", r, cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
