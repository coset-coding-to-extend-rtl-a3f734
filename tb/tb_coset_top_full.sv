// tb_coset_top_full: coset_top at its default parameters (FM-RM(1,7)T, 66 code blocks per
// 4 KB page, 848 blocks of 256 pages, 188744 logical pages). One complete operation on
// each design:
//  - PCM: a few 64-bit words are encoded and decoded;
//  - Flash: a host write of a random 4 KB page, then a read of the same LBA and of an
//    unwritten LBA. The array model here holds one page (the first page written goes to
//    physical page 0); every program must address that page. The write is checked for
//    success (no retry), the read for the data and the unwritten LBA for zeros.
module tb_coset_top_full;
  import flipmin_pkg::*;
  import flash_pkg::*;
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

  coset_top dut (.*);

  logic [NCELL-1:0][LVW-1:0] lv [NBLK];
  scp_t [NSCP-1:0]           sc;
  int checks = 0, failures = 0, wrong_page = 0;
  assign arr_level = lv[int'(arr_blk) % NBLK];
  assign arr_scp   = sc;
  always @(posedge clk) begin
    if (arr_we) begin
      if (arr_ppn != '0) wrong_page++;
      lv[int'(arr_blk) % NBLK] <= arr_level_wr;
    end
    if (arr_scp_we) sc <= arr_scp_wr;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic host_op(bit we, int lba, logic [PAGE_BITS-1:0] d);
    @(negedge clk);
    while (!host_ready) @(negedge clk);
    host_req   = 1;
    host_we    = we;
    host_lba   = LBAW'(lba);
    host_wdata = d;
    @(negedge clk);
    host_req = 0;
    while (!host_ack) @(negedge clk);
  endtask

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [PAGE_BITS-1:0] page;
    for (int b = 0; b < NBLK; b++) lv[b] = '0;
    sc = '0;
    mf = MF_BFR_SCI_WL;
    pcm_prev = '0; pcm_fault_mask = '0; pcm_data = '0; pcm_rd_rep = '0;
    host_lba = '0; host_wdata = '0;
    for (int i = 0; i < PAGE_BITS; i += 32) page[i +: 32] = 32'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      pcm_data = {32'($urandom), 32'($urandom)};
      pcm_prev = {8'($urandom), 32'($urandom), 32'($urandom)};
      pcm_in_valid = 1;
      @(negedge clk);
      pcm_in_valid = 0;
      pcm_rd_rep = pcm_rep;
      #1;
      check(pcm_out_valid && pcm_rd_data == pcm_data, "pcm round trip");
      check(int'(pcm_flips) == $countones(pcm_rep ^ pcm_prev), "pcm flips");
    end

    host_op(1, 1234, page);
    check(st_page_writes == 1 && st_retries == 0, "one page program, no retry");
    check(wrong_page == 0, "program addressed physical page 0");
    host_op(0, 1234, '0);
    check(host_rdata == page && !host_rd_err, "4 KB page read back");
    host_op(0, 77, '0);
    check(host_rdata == '0, "unwritten LBA reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
