// garbage_collector: block and page bookkeeping of the coset coded SSD, with eraseless
// cleaning.
//
// Every page is Clean (writable), Valid (current data), Stale (old data) or Sealed (a
// coset coded re-program failed; unwritable until the block is erased). Every block is
// Clean, Active (being written) or Sealed. Per block the unit counts Valid, Stale and Sealed
// pages; it also keeps, for each Valid page, the LBA it holds (as a page's spare area would)
// so that a full erase can move the data out.
//
// Active block: when the write controller has no writable page left it pulses `next_blk`;
// the current Active block becomes Sealed and the lowest-numbered Clean block becomes Active
// (`blk_ready` one clock later).
//
// Cleaning, started by `kick` after each host write:
//  * capacity check: if the writable pages (all pages minus Sealed pages) fall below the
//    advertised NUM_LBA pages, Sealed blocks with the most Sealed pages are fully erased until
//    capacity is back;
//  * free pool: if at most MIN_FREE blocks are Clean (one is kept so that page moves always
//    find room), Sealed blocks with the fewest Valid
//    pages are cleaned until MAX_FREE are Clean. A victim with at least ERASE_THRESH Sealed
//    pages, or without any Stale page (only used pages), is fully erased: its Valid pages are
//    moved out one by one through the write controller (mv_req/mv_done), then `erase_en`
//    erases it and all its pages become Clean. Otherwise it is eraselessly cleaned: it is
//    marked Clean without touching the Flash, its Stale pages become writable again, and its
//    Valid and Sealed pages stay as they are.
// Victims are found by a scan over all blocks, one block per clock; ties go to the lowest
// block number (the simulated drive picked randomly among the tied blocks).
// Page state changes from the write controller arrive on pg_set_*; the write controller
// reads page states through pg_q_*. `busy` is high while a cleaning run is in progress.
module garbage_collector
  import flash_pkg::*;
#(
  parameter int NB           = NUM_BLOCKS,
  parameter int PPB          = PAGES_PER_BLOCK,
  parameter int ADVERTISED   = NUM_LBA,
  parameter int MIN_FREE     = (NB * 5 + 99) / 100,
  parameter int MAX_FREE     = (NB * 15 + 99) / 100,
  parameter int ERASE_THRESH = PPB / 2,
  localparam int NP          = NB * PPB,
  localparam int PW          = $clog2(NP),
  localparam int BW          = $clog2(NB),
  localparam int CW          = $clog2(PPB + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // page state query and update (write controller)
  input  logic [PW-1:0]      pg_q_ppn,
  output page_state_e        pg_q_state,
  input  logic               pg_set_en,
  input  logic [PW-1:0]      pg_set_ppn,
  input  page_state_e        pg_set_state,
  input  logic [LBAW-1:0]    pg_set_lba,
  // active block
  input  logic               next_blk,
  output logic               blk_ready,
  output logic [BW-1:0]      active_blk,
  // cleaning
  input  logic               kick,
  output logic               busy,
  output logic               mv_req,
  output logic [PW-1:0]      mv_ppn,
  output logic [LBAW-1:0]    mv_lba,
  input  logic               mv_done,
  output logic               erase_en,
  output logic [BW-1:0]      erase_blk,
  // statistics
  output logic [31:0]        n_eraseless,
  output logic [31:0]        n_erase,
  output logic [31:0]        n_moves,
  output logic [BW:0]        n_clean_blocks
);

  localparam int PBW = $clog2(PPB);

  page_state_e       page_st [NP];
  logic [LBAW-1:0]   p2l     [NP];
  block_state_e      blk_st  [NB];
  logic [CW-1:0]     n_valid [NB];
  logic [CW-1:0]     n_stale [NB];
  logic [CW-1:0]     n_sealed[NB];
  logic [PW:0]       sealed_total;

  typedef enum logic [3:0] {G_IDLE, G_EVAL, G_SCAN, G_DECIDE, G_ECLEAN, G_MOVE, G_MOVEWAIT,
                            G_ERASE} gstate_e;
  gstate_e gst;
  logic    cap_mode;          // 1: capacity restore, 0: free pool refill
  logic    refill;            // free pool refill in progress (until MAX_FREE)
  logic [BW:0]  scan_i;
  logic [BW-1:0] victim;
  logic          have_victim;
  logic [CW-1:0] victim_key;
  logic [PBW:0]  pg_i;

  logic cap_low, free_low, free_full;
  assign cap_low   = (NP - int'(sealed_total)) < ADVERTISED;
  assign free_low  = int'(n_clean_blocks) <= MIN_FREE;
  assign free_full = int'(n_clean_blocks) >= MAX_FREE;
  assign busy      = (gst != G_IDLE);

  assign pg_q_state = page_st[pg_q_ppn];

  // lowest-numbered Clean block
  logic [BW-1:0] first_clean;
  logic          any_clean;
  always_comb begin
    first_clean = '0;
    any_clean   = 1'b0;
    for (int i = NB - 1; i >= 0; i--)
      if (blk_st[i] == BK_CLEAN) begin
        first_clean = BW'(i);
        any_clean   = 1'b1;
      end
  end

  // page being visited by a cleaning pass
  logic [PW-1:0] vpage;
  assign vpage = PW'(victim) * PW'(PPB) + PW'(pg_i[PBW-1:0]);

  logic [BW-1:0] set_blk;
  assign set_blk = BW'(pg_set_ppn / PW'(PPB));

  logic full_erase;
  assign full_erase = cap_mode || (int'(n_sealed[victim]) >= ERASE_THRESH) ||
                      (n_stale[victim] == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) page_st[i] <= PG_CLEAN;
      for (int i = 0; i < NB; i++) begin
        blk_st[i]   <= BK_CLEAN;
        n_valid[i]  <= '0;
        n_stale[i]  <= '0;
        n_sealed[i] <= '0;
      end
      sealed_total   <= '0;
      n_clean_blocks <= (BW+1)'(NB);
      active_blk     <= '0;
      blk_ready      <= 1'b0;
      gst            <= G_IDLE;
      cap_mode       <= 1'b0;
      refill         <= 1'b0;
      scan_i         <= '0;
      victim         <= '0;
      have_victim    <= 1'b0;
      victim_key     <= '0;
      pg_i           <= '0;
      mv_req         <= 1'b0;
      mv_ppn         <= '0;
      mv_lba         <= '0;
      erase_en       <= 1'b0;
      erase_blk      <= '0;
      n_eraseless    <= '0;
      n_erase        <= '0;
      n_moves        <= '0;
    end else begin
      blk_ready <= 1'b0;
      mv_req    <= 1'b0;
      erase_en  <= 1'b0;

      // page state updates from the write controller
      if (pg_set_en) begin
        case (page_st[pg_set_ppn])
          PG_VALID:  n_valid[set_blk]  <= n_valid[set_blk]  - CW'(1);
          PG_STALE:  n_stale[set_blk]  <= n_stale[set_blk]  - CW'(1);
          PG_SEALED: n_sealed[set_blk] <= n_sealed[set_blk] - CW'(1);
          default: ;
        endcase
        case (pg_set_state)
          PG_VALID:  n_valid[set_blk]  <= n_valid[set_blk]  + CW'(1);
          PG_STALE:  n_stale[set_blk]  <= n_stale[set_blk]  + CW'(1);
          PG_SEALED: begin
            n_sealed[set_blk] <= n_sealed[set_blk] + CW'(1);
            sealed_total      <= sealed_total + (PW+1)'(1);
          end
          default: ;
        endcase
        page_st[pg_set_ppn] <= pg_set_state;
        if (pg_set_state == PG_VALID) p2l[pg_set_ppn] <= pg_set_lba;
      end

      // active block hand-over
      if (next_blk) begin
        if (blk_st[active_blk] == BK_ACTIVE) blk_st[active_blk] <= BK_SEALED;
        if (any_clean) begin
          blk_st[first_clean] <= BK_ACTIVE;
          active_blk          <= first_clean;
          n_clean_blocks      <= n_clean_blocks - (BW+1)'(1);
          blk_ready           <= 1'b1;
        end
      end

      case (gst)
        G_IDLE: if (kick) gst <= G_EVAL;
        G_EVAL: begin
          if (cap_low || free_low || (refill && !free_full)) begin
            cap_mode    <= cap_low;
            refill      <= !cap_low;
            scan_i      <= '0;
            have_victim <= 1'b0;
            gst         <= G_SCAN;
          end else begin
            refill <= 1'b0;
            gst    <= G_IDLE;
          end
        end
        G_SCAN: begin
          if (int'(scan_i) == NB) begin
            if (!have_victim) refill <= 1'b0;
            gst <= have_victim ? G_DECIDE : G_IDLE;
          end else begin
            if (blk_st[scan_i[BW-1:0]] == BK_SEALED) begin
              if (cap_mode) begin
                if (n_sealed[scan_i[BW-1:0]] != '0 &&
                    (!have_victim || n_sealed[scan_i[BW-1:0]] > victim_key)) begin
                  victim      <= scan_i[BW-1:0];
                  victim_key  <= n_sealed[scan_i[BW-1:0]];
                  have_victim <= 1'b1;
                end
              end else if (!have_victim || n_valid[scan_i[BW-1:0]] < victim_key) begin
                victim      <= scan_i[BW-1:0];
                victim_key  <= n_valid[scan_i[BW-1:0]];
                have_victim <= 1'b1;
              end
            end
            scan_i <= scan_i + (BW+1)'(1);
          end
        end
        G_DECIDE: begin
          pg_i <= '0;
          gst  <= full_erase ? G_MOVE : G_ECLEAN;
        end
        G_ECLEAN: begin
          // eraseless clean: Stale pages become writable, nothing is erased
          if (int'(pg_i) == PPB) begin
            blk_st[victim]  <= BK_CLEAN;
            n_stale[victim] <= '0;
            n_clean_blocks  <= n_clean_blocks + (BW+1)'(1);
            n_eraseless     <= n_eraseless + 32'd1;
            gst             <= G_EVAL;
          end else begin
            if (page_st[vpage] == PG_STALE) page_st[vpage] <= PG_CLEAN;
            pg_i <= pg_i + (PBW+1)'(1);
          end
        end
        G_MOVE: begin
          if (int'(pg_i) == PPB) begin
            erase_en  <= 1'b1;
            erase_blk <= victim;
            pg_i      <= '0;
            gst       <= G_ERASE;
          end else if (page_st[vpage] == PG_VALID) begin
            mv_req  <= 1'b1;
            mv_ppn  <= vpage;
            mv_lba  <= p2l[vpage];
            n_moves <= n_moves + 32'd1;
            gst     <= G_MOVEWAIT;
          end else begin
            pg_i <= pg_i + (PBW+1)'(1);
          end
        end
        G_MOVEWAIT: if (mv_done) begin
          pg_i <= pg_i + (PBW+1)'(1);
          gst  <= G_MOVE;
        end
        G_ERASE: begin
          if (int'(pg_i) == PPB) begin
            blk_st[victim]   <= BK_CLEAN;
            sealed_total     <= sealed_total - (PW+1)'(n_sealed[victim]);
            n_valid[victim]  <= '0;
            n_stale[victim]  <= '0;
            n_sealed[victim] <= '0;
            n_clean_blocks   <= n_clean_blocks + (BW+1)'(1);
            n_erase          <= n_erase + 32'd1;
            gst              <= G_EVAL;
          end else begin
            page_st[vpage] <= PG_CLEAN;
            pg_i <= pg_i + (PBW+1)'(1);
          end
        end
        default: gst <= G_IDLE;
      endcase
    end
  end

endmodule
