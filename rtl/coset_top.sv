// coset_top: the two coset coding designs side by side.
//
// 1) PCM FlipMin write/read datapath (flipmin_encoder + flipmin_decoder). A 64-bit data
//    word is mapped to the member of its coset that needs the fewest bit flips against the
//    word already stored (prev) while agreeing with known stuck-at cells (fault_mask).
//    pcm_in_valid -> pcm_out_valid one clock later; the read decoder is combinational.
// 2) Flash SSD controller with coset coding: a host port (write/read of 4 KB logical
//    pages), the page coder (66 convolutional-code coset blocks per page, Viterbi coset
//    selection, Waterfall level coding and stuck-at cell pointers), the map table
//    (LBA -> physical page + start states), the write controller (page allocation, retry
//    of failed writes) and the garbage collector (eraseless clean, full erase, capacity
//    restore). The Flash array itself is outside: it is reached through the arr_* port
//    (cell levels and pointer table of the addressed page/block in the same clock, program
//    strobes) and the erase strobe.
// The two designs share only clock and reset. Parameter defaults are the full-size design;
// tests may shrink the Flash geometry (NCB code blocks per page, NB blocks of PPB pages).
module coset_top
  import flipmin_pkg::*;
  import flash_pkg::*;
#(
  parameter code_e CODE       = FM_RM_1_7T,
  parameter int    F          = 1,
  parameter int    NCB        = NBLK,
  parameter int    NB         = NUM_BLOCKS,
  parameter int    PPB        = PAGES_PER_BLOCK,
  parameter int    ADVERTISED = NUM_LBA,
  parameter int    ERASE_THRESH = PPB / 2,
  localparam int   CW         = code_width(CODE),
  localparam int   FW         = $clog2(CW + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // PCM FlipMin write path
  input  logic                       pcm_in_valid,
  input  logic [WORD-1:0]            pcm_data,
  input  logic [CW-1:0]              pcm_prev,
  input  logic [CW-1:0]              pcm_fault_mask,
  output logic                       pcm_out_valid,
  output logic [CW-1:0]              pcm_rep,
  output logic [FW-1:0]              pcm_flips,
  output logic                       pcm_cem_ok,
  // PCM FlipMin read path
  input  logic [CW-1:0]              pcm_rd_rep,
  output logic [WORD-1:0]            pcm_rd_data,
  // Flash host port
  input  metric_e                    mf,
  input  logic                       host_req,
  input  logic                       host_we,
  input  logic [LBAW-1:0]            host_lba,
  input  logic [PAGE_BITS-1:0]       host_wdata,
  output logic                       host_ready,
  output logic                       host_ack,
  output logic [PAGE_BITS-1:0]       host_rdata,
  output logic                       host_rd_err,
  // Flash array port
  output logic [PPNW-1:0]            arr_ppn,
  output logic [6:0]                 arr_blk,
  input  logic [NCELL-1:0][LVW-1:0]  arr_level,
  input  scp_t [NSCP-1:0]            arr_scp,
  output logic                       arr_we,
  output logic [NCELL-1:0][LVW-1:0]  arr_level_wr,
  output logic                       arr_scp_we,
  output scp_t [NSCP-1:0]            arr_scp_wr,
  output logic                       erase_en,
  output logic [BLKW-1:0]            erase_blk,
  // Flash statistics
  output logic [31:0]                st_page_writes,
  output logic [31:0]                st_retries,
  output logic [31:0]                st_eraseless,
  output logic [31:0]                st_erase,
  output logic [31:0]                st_moves,
  output logic [BLKW:0]              st_clean_blocks
);

  localparam int NP = NB * PPB;
  localparam int PW = $clog2(NP);
  localparam int BW = $clog2(NB);

  // ---------------- PCM FlipMin ----------------
  flipmin_encoder #(.CODE(CODE)) u_fm_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pcm_in_valid),
    .data      (pcm_data),
    .prev      (pcm_prev),
    .fault_mask(pcm_fault_mask),
    .out_valid (pcm_out_valid),
    .rep       (pcm_rep),
    .flips     (pcm_flips),
    .cem_ok    (pcm_cem_ok)
  );

  flipmin_decoder #(.CODE(CODE)) u_fm_dec (
    .rep (pcm_rd_rep),
    .data(pcm_rd_data)
  );

  // ---------------- Flash controller ----------------
  logic                 map_rd_en, map_rd_valid, map_wr_en;
  logic [LBAW-1:0]      map_rd_lba, map_wr_lba;
  logic [PPNW-1:0]      map_rd_ppn, map_wr_ppn;
  logic [SSW-1:0]       map_rd_ss, map_wr_ss;
  logic [PW-1:0]        pg_q_ppn, pg_set_ppn, mv_ppn;
  page_state_e          pg_q_state, pg_set_state;
  logic                 pg_set_en, next_blk, blk_ready, kick, gc_busy, mv_req, mv_done;
  logic [LBAW-1:0]      pg_set_lba, mv_lba;
  logic [BW-1:0]        active_blk, gc_erase_blk;
  logic [BW:0]          gc_clean_blocks;
  logic                 pc_wr_start, pc_rd_start, pc_done, pc_fail, pc_rd_err, pc_busy;
  logic [PPNW-1:0]      pc_ppn;
  logic [PAGE_BITS-1:0] pc_wdata, pc_rd_data;
  logic [SSW-1:0]       pc_rd_ss, pc_wr_ss;
  logic [$clog2(PAGE_CELLS+1)-1:0] pc_flips;
  logic [31:0]          new_blocks;

  assign erase_blk       = BLKW'(gc_erase_blk);
  assign st_clean_blocks = (BLKW+1)'(gc_clean_blocks);

  write_controller #(.NB(NB), .PPB(PPB)) u_wc (
    .clk          (clk),
    .rst_n        (rst_n),
    .host_req     (host_req),
    .host_we      (host_we),
    .host_lba     (host_lba),
    .host_wdata   (host_wdata),
    .host_ready   (host_ready),
    .host_ack     (host_ack),
    .host_rdata   (host_rdata),
    .host_rd_err  (host_rd_err),
    .map_rd_en    (map_rd_en),
    .map_rd_lba   (map_rd_lba),
    .map_rd_valid (map_rd_valid),
    .map_rd_ppn   (map_rd_ppn),
    .map_rd_ss    (map_rd_ss),
    .map_wr_en    (map_wr_en),
    .map_wr_lba   (map_wr_lba),
    .map_wr_ppn   (map_wr_ppn),
    .map_wr_ss    (map_wr_ss),
    .pg_q_ppn     (pg_q_ppn),
    .pg_q_state   (pg_q_state),
    .pg_set_en    (pg_set_en),
    .pg_set_ppn   (pg_set_ppn),
    .pg_set_state (pg_set_state),
    .pg_set_lba   (pg_set_lba),
    .next_blk     (next_blk),
    .blk_ready    (blk_ready),
    .active_blk   (active_blk),
    .kick         (kick),
    .gc_busy      (gc_busy),
    .mv_req       (mv_req),
    .mv_lba       (mv_lba),
    .mv_done      (mv_done),
    .pc_wr_start  (pc_wr_start),
    .pc_rd_start  (pc_rd_start),
    .pc_ppn       (pc_ppn),
    .pc_wdata     (pc_wdata),
    .pc_rd_ss     (pc_rd_ss),
    .pc_done      (pc_done),
    .pc_fail      (pc_fail),
    .pc_wr_ss     (pc_wr_ss),
    .pc_rd_data   (pc_rd_data),
    .pc_rd_err    (pc_rd_err),
    .n_page_writes(st_page_writes),
    .n_retries    (st_retries),
    .n_new_blocks (new_blocks)
  );

  map_table #(.ENTRIES(ADVERTISED)) u_map (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_en   (map_rd_en),
    .rd_lba  (map_rd_lba),
    .rd_valid(map_rd_valid),
    .rd_ppn  (map_rd_ppn),
    .rd_ss   (map_rd_ss),
    .wr_en   (map_wr_en),
    .wr_lba  (map_wr_lba),
    .wr_ppn  (map_wr_ppn),
    .wr_ss   (map_wr_ss),
    .inv_en  (1'b0),
    .inv_lba ('0)
  );

  garbage_collector #(.NB(NB), .PPB(PPB), .ADVERTISED(ADVERTISED),
                      .ERASE_THRESH(ERASE_THRESH)) u_gc (
    .clk           (clk),
    .rst_n         (rst_n),
    .pg_q_ppn      (pg_q_ppn),
    .pg_q_state    (pg_q_state),
    .pg_set_en     (pg_set_en),
    .pg_set_ppn    (pg_set_ppn),
    .pg_set_state  (pg_set_state),
    .pg_set_lba    (pg_set_lba),
    .next_blk      (next_blk),
    .blk_ready     (blk_ready),
    .active_blk    (active_blk),
    .kick          (kick),
    .busy          (gc_busy),
    .mv_req        (mv_req),
    .mv_ppn        (mv_ppn),
    .mv_lba        (mv_lba),
    .mv_done       (mv_done),
    .erase_en      (erase_en),
    .erase_blk     (gc_erase_blk),
    .n_eraseless   (st_eraseless),
    .n_erase       (st_erase),
    .n_moves       (st_moves),
    .n_clean_blocks(gc_clean_blocks)
  );

  page_coder #(.F(F), .NCB(NCB)) u_pc (
    .clk         (clk),
    .rst_n       (rst_n),
    .mf          (mf),
    .wr_start    (pc_wr_start),
    .rd_start    (pc_rd_start),
    .ppn         (pc_ppn),
    .wr_data     (pc_wdata),
    .rd_ss       (pc_rd_ss),
    .done        (pc_done),
    .fail        (pc_fail),
    .wr_ss       (pc_wr_ss),
    .rd_data     (pc_rd_data),
    .rd_err      (pc_rd_err),
    .wr_flips    (pc_flips),
    .arr_ppn     (arr_ppn),
    .arr_blk     (arr_blk),
    .arr_level   (arr_level),
    .arr_scp     (arr_scp),
    .arr_we      (arr_we),
    .arr_level_wr(arr_level_wr),
    .arr_scp_we  (arr_scp_we),
    .arr_scp_wr  (arr_scp_wr),
    .busy        (pc_busy)
  );

endmodule
