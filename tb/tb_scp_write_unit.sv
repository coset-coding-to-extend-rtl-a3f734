// tb_scp_write_unit: streams random cells through the unit (flip limit F = 3) against a
// reference model of Waterfall levels and SCP allocation. Each "page" starts with a table
// loaded with a few pointers; checks new levels cell by cell, the final table (first free
// entry is used), the failure flag once the pointers run out, and that `load` clears it.
module tb_scp_write_unit;
  import flash_pkg::*;
  localparam int FL = 3;
  logic clk = 0, rst_n = 0, load = 0, cv = 0, cb = 0;
  scp_t [NSCP-1:0] tin, tout;
  logic [PTRW-1:0] idx;
  logic [LVW-1:0]  lvl, nl;
  logic            fail;
  logic [6:0]      used;
  int checks = 0, failures = 0;
  int fails_seen = 0, allocs = 0;
  always #5 clk = ~clk;

  scp_write_unit #(.F(FL)) dut (.clk, .rst_n, .load, .table_in(tin), .cell_valid(cv),
    .cell_idx(idx), .cell_level(lvl), .cell_bit(cb), .new_level(nl), .table_out(tout),
    .fail(fail), .used(used));

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pg = 0; pg < 4; pg++) begin
      scp_t [NSCP-1:0] mdl;
      automatic bit mfail = 0;
      tin = '0;
      for (int e = 0; e < 5; e++) tin[e*3] = '{valid: 1, ptr: PTRW'(e * 1000 + 7), repl: 0};
      mdl = tin;
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      checks++;
      if (fail || tout != tin) begin failures++; $display("load"); end
      for (int c = 0; c < 2500; c++) begin
        automatic int hit = -1, fr = -1;
        logic [LVW-1:0] exp_l;
        idx = PTRW'((c < 5) ? c * 1000 + 7 : c * 13 + pg);
        lvl = LVW'((pg == 3) ? FL : $urandom % (FL + 1));
        cb  = $urandom % 2;
        cv  = 1;
        for (int e = NSCP - 1; e >= 0; e--) begin
          if (mdl[e].valid && mdl[e].ptr == idx) hit = e;
          if (!mdl[e].valid) fr = e;
        end
        exp_l = lvl;
        if (hit >= 0) mdl[hit].repl = cb;
        else if (cb != lvl[0]) begin
          if (int'(lvl) < FL) exp_l = lvl + 1;
          else if (fr >= 0) begin mdl[fr] = '{valid: 1, ptr: idx, repl: cb}; allocs++; end
          else mfail = 1;
        end
        #1;
        checks++;
        if (nl != exp_l) begin failures++; $display("level idx=%0d lvl=%0d bit=%b nl=%0d exp=%0d", idx, lvl, cb, nl, exp_l); end
        @(negedge clk);
        checks++;
        if (tout != mdl || fail != mfail) begin failures++; $display("table/fail mismatch at %0d", c); break; end
      end
      cv = 0;
      if (mfail) fails_seen++;
    end
    checks++;
    if (fails_seen == 0 || allocs == 0) begin failures++; $display("no SCP exhaustion exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
