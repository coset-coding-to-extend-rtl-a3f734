// tb_flash_write_path: writes several successive blocks into a modelled page (levels and SCP
// table kept here) with flip limit F = 1 and Metric Function BFR+SCI+WL, then checks for
// each write:
//  - the bits read back (level mod 2, SCP replacement) decode, by the reference, to the data;
//  - each level rose by at most one and only where the read bit changed;
//  - without `fail`, the newly replaced cells fit in the free SCPs; with `fail`, every SCP
//    is in use and the page does not hold the data;
// and that repeated writes eventually use SCPs and finally fail (page needs an erase). The reference decode uses the start state.
module tb_flash_write_path;
  import tb_flash_ref_pkg::*;
  import flash_pkg::*;
  localparam int FL = 1;
  logic clk = 0, rst_n = 0, start = 0, done, fail;
  metric_e mf;
  logic [6:0] blk;
  logic [DW-1:0] data;
  logic [NCELL-1:0][LVW-1:0] lin, lout;
  scp_t [NSCP-1:0] sin, sout;
  logic [M-1:0] ss;
  logic [10:0] flips;
  int checks = 0, failures = 0, scp_total = 0, fails_seen = 0;
  always #5 clk = ~clk;

  flash_write_path #(.F(FL)) dut (.clk, .rst_n, .start, .mf, .blk, .data, .level_in(lin),
    .scp_in(sin), .done, .level_out(lout), .scp_out(sout), .start_state(ss), .flips, .fail);

  function automatic bit rd(scp_t [NSCP-1:0] t, int idx, logic [LVW-1:0] l);
    bit b = l[0];
    for (int e = 0; e < NSCP; e++) if (t[e].valid && int'(t[e].ptr) == idx) b = t[e].repl;
    return b;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mf = MF_BFR_SCI_WL; blk = 7'd3; lin = '0; sin = '0; data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      automatic word_t rb;
      automatic int need_scp = 0, free0 = 0;
      for (int j = 0; j < DW; j++) data[j] = $urandom % 2;
      for (int e = 0; e < NSCP; e++) if (!sin[e].valid) free0++;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      for (int i = 0; i < N; i++) rb[i] = rd(sout, 3 * N + i, lout[i]);
      checks++;
      if (!fail && decode(rb, int'(ss)) != {11'b0, data}) begin failures++; $display("write %0d: read-back decode mismatch", w); end
      for (int i = 0; i < N; i++) begin
        automatic bit ob = rd(sin, 3 * N + i, lin[i]);
        automatic bit was_scp = rd(sin, 3 * N + i, 5'd0) != 0 || rd(sin, 3 * N + i, 5'd1) != 1;
        if (!was_scp && rb[i] != ob && int'(lin[i]) >= FL) need_scp++;
        if (!(lout[i] == lin[i] || (lout[i] == lin[i] + 1 && int'(lin[i]) < FL))) begin
          failures++; $display("write %0d: level %0d -> %0d", w, lin[i], lout[i]); break;
        end
      end
      scp_total = 0;
      for (int e = 0; e < NSCP; e++) scp_total += int'(sout[e].valid);
      checks++;
      if (fail ? (scp_total != NSCP || decode(rb, int'(ss)) == {11'b0, data}) : (need_scp > free0)) begin
        failures++; $display("write %0d fail=%b need=%0d free=%0d", w, fail, need_scp, free0);
      end
      if (fail) fails_seen++;
      lin = lout; sin = sout;
      @(negedge clk);
    end
    checks++;
    if (scp_total == 0 || fails_seen == 0) begin failures++; $display("SCP use or page failure never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
