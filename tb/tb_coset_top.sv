// tb_coset_top: end-to-end test of both designs in coset_top with a small Flash geometry
// (one 1024-cell code block per page, 8 blocks of 8 pages, 40 logical pages, erase threshold 1 Sealed page, one Waterfall
// level per cell) so that wear-out, retries and cleaning happen within a short run.
//  - PCM: random 64-bit words with random previous contents and a few stuck cells are
//    encoded (FM-RM(1,7)T); the representative must decode to the data, report its flip
//    count, and, when cem_ok, keep every stuck cell at its stuck value.
//  - Flash: the array (levels and pointer tables of the 64 pages) is modelled here; erase
//    sets a block's levels to 0 and clears its pointer tables. Random host writes of random
//    data go to the 40 LBAs, alternating the two metrics; every 4th request is a read of a
//    random written LBA, which must return the last data written there. At the end all LBAs
//    are read back.
// The test fails if any mechanism never happened: host stall (not ready), page write
// retry, SCP use, eraseless clean, full erase, page move, Waterfall level rise, PCM stuck
// cells matched (CEM) and PCM flips saved versus a plain write.
module tb_coset_top;
  import flipmin_pkg::*;
  import flash_pkg::*;
  localparam int NB = 8, PPB = 8, NPG = NB * PPB, ADV = 40;
  localparam int CW = code_width(FM_RM_1_7T);
  localparam int FW = $clog2(CW + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pcm_in_valid = 0, pcm_out_valid, pcm_cem_ok;
  logic [WORD-1:0] pcm_data, pcm_rd_data;
  logic [CW-1:0] pcm_prev, pcm_fault_mask, pcm_rep, pcm_rd_rep;
  logic [FW-1:0] pcm_flips;
  metric_e mf;
  logic host_req = 0, host_we = 0, host_ready, host_ack, host_rd_err;
  logic [LBAW-1:0] host_lba;
  logic [PAGE_BITS-1:0] host_wdata, host_rdata;
  logic [PPNW-1:0] arr_ppn;
  logic [6:0] arr_blk;
  logic [NCELL-1:0][LVW-1:0] arr_level, arr_level_wr;
  scp_t [NSCP-1:0] arr_scp, arr_scp_wr;
  logic arr_we, arr_scp_we, erase_en;
  logic [BLKW-1:0] erase_blk;
  logic [31:0] st_page_writes, st_retries, st_eraseless, st_erase, st_moves;
  logic [BLKW:0] st_clean_blocks;

  coset_top #(.NCB(1), .NB(NB), .PPB(PPB), .ADVERTISED(ADV), .ERASE_THRESH(1)) dut (.*);

  // ---------------- Flash array model ----------------
  logic [NCELL-1:0][LVW-1:0] lv [NPG];
  scp_t [NSCP-1:0]           sc [NPG];
  int n_scp_used = 0, n_level_rise = 0;
  assign arr_level = lv[int'(arr_ppn) % NPG];
  assign arr_scp   = sc[int'(arr_ppn) % NPG];

  function automatic int nvalid(scp_t [NSCP-1:0] t);
    int n = 0;
    for (int e = 0; e < NSCP; e++) n += int'(t[e].valid);
    return n;
  endfunction

  always @(posedge clk) begin
    if (arr_we) begin
      for (int c = 0; c < NCELL; c++) if (arr_level_wr[c] > lv[arr_ppn][c]) n_level_rise++;
      lv[arr_ppn] <= arr_level_wr;
    end
    if (arr_scp_we) begin
      if (nvalid(arr_scp_wr) > nvalid(sc[arr_ppn])) n_scp_used++;
      sc[arr_ppn] <= arr_scp_wr;
    end
    if (erase_en)
      for (int p = 0; p < PPB; p++) begin
        lv[int'(erase_blk) * PPB + p] <= '0;
        sc[int'(erase_blk) * PPB + p] <= '0;
      end
  end

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0, n_stall = 0, n_cem = 0, n_pcm_saved = 0;
  logic [DW-1:0] ref_data [ADV];
  bit written [ADV];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic host_op(bit we, int lba, logic [DW-1:0] d);
    @(negedge clk);
    if (!host_ready) n_stall++;
    while (!host_ready) @(negedge clk);
    host_req   = 1;
    host_we    = we;
    host_lba   = LBAW'(lba);
    host_wdata = PAGE_BITS'(d);
    @(negedge clk);
    host_req = 0;
    while (!host_ack) @(negedge clk);
    if (we) begin
      ref_data[lba] = d;
      written[lba]  = 1;
    end else begin
      check(host_rdata[DW-1:0] == (written[lba] ? ref_data[lba] : '0) && !host_rd_err,
            $sformatf("read lba %0d", lba));
      check(host_rdata[PAGE_BITS-1:DW] == '0, "unused page bits read as zero");
    end
  endtask

  function automatic logic [DW-1:0] rnd_data();
    logic [DW-1:0] d;
    for (int i = 0; i < DW; i += 32) d[i +: 32] = 32'($urandom);
    return d;
  endfunction

  // watchdog
  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPG; p++) begin
      lv[p] = '0;
      sc[p] = '0;
    end
    mf = MF_BFR_SCI_WL;
    pcm_prev = '0; pcm_fault_mask = '0; pcm_data = '0; pcm_rd_rep = '0;
    host_lba = '0; host_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- PCM FlipMin ----------------
    for (int i = 0; i < 300; i++) begin
      automatic logic [CW-1:0] stuck = '0;
      automatic int nst = $urandom_range(0, 2);
      @(negedge clk);
      pcm_data = {32'($urandom), 32'($urandom)};
      pcm_prev = {8'($urandom), 32'($urandom), 32'($urandom)};
      for (int k = 0; k < nst; k++) stuck[$urandom_range(0, CW - 1)] = 1'b1;
      pcm_fault_mask = stuck;
      pcm_in_valid   = 1;
      @(negedge clk);
      pcm_in_valid = 0;
      check(pcm_out_valid, "pcm out_valid");
      pcm_rd_rep = pcm_rep;
      #1;
      check(pcm_rd_data == pcm_data, "pcm round trip");
      check(int'(pcm_flips) == $countones(pcm_rep ^ pcm_prev), "pcm flip count");
      if (pcm_cem_ok) begin
        check(((pcm_rep ^ pcm_prev) & stuck) == '0, "pcm stuck cells kept");
        if (stuck != '0) n_cem++;
      end
      // a plain write would flip every differing data bit of the 64; coset coding flips fewer
      if (int'(pcm_flips) < $countones(pcm_data ^ pcm_prev[WORD-1:0])) n_pcm_saved++;
    end

    // ---------------- Flash SSD ----------------
    for (int i = 0; i < 480; i++) begin
      automatic int lba = $urandom_range(0, ADV - 1);
      mf = (i % 2 == 0) ? MF_BFR_SCI_WL : MF_BFR;
      if (i % 4 == 3) host_op(0, lba, '0);
      else host_op(1, lba, rnd_data());
    end
    for (int l = 0; l < ADV; l++) host_op(0, l, '0);

    $display("page writes %0d retries %0d eraseless %0d erase %0d moves %0d scp %0d rises %0d stalls %0d cem %0d saved %0d",
             st_page_writes, st_retries, st_eraseless, st_erase, st_moves, n_scp_used,
             n_level_rise, n_stall, n_cem, n_pcm_saved);
    check(n_stall > 0, "host stall seen");
    check(st_retries > 0, "write retry seen");
    check(n_scp_used > 0, "SCP use seen");
    check(st_eraseless > 0, "eraseless clean seen");
    check(st_erase > 0, "full erase seen");
    check(st_moves > 0, "page move seen");
    check(n_level_rise > 0, "Waterfall level rise seen");
    check(n_cem > 0, "PCM CEM seen");
    check(n_pcm_saved > 0, "PCM flips saved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
