// tb_scp_read_unit: random levels and SCP tables; the read bit must be the level's parity
// unless a valid pointer names the cell, in which case it is that pointer's replacement bit.
module tb_scp_read_unit;
  import flash_pkg::*;
  scp_t [NSCP-1:0] tbl;
  logic [PTRW-1:0] idx;
  logic [LVW-1:0]  lvl;
  logic            b, rep;
  int checks = 0, failures = 0;

  scp_read_unit dut (.scp_table(tbl), .cell_idx(idx), .cell_level(lvl), .cell_bit(b), .replaced(rep));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int hit = -1;
      for (int e = 0; e < NSCP; e++) begin
        tbl[e].valid = ($urandom % 2);
        tbl[e].ptr   = PTRW'($urandom % 300);
        tbl[e].repl  = $urandom % 2;
      end
      idx = PTRW'($urandom % 300);
      lvl = LVW'($urandom);
      #1;
      for (int e = 0; e < NSCP; e++) if (tbl[e].valid && tbl[e].ptr == idx) hit = e;
      checks++;
      if (hit >= 0 ? (b != tbl[hit].repl || !rep) : (b != lvl[0] || rep)) begin
        failures++; $display("idx=%0d lvl=%0d b=%b rep=%b hit=%0d repl=%b", idx, lvl, b, rep, hit, (hit>=0) ? tbl[hit].repl : 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
