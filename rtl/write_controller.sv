// write_controller: host request handling of the coset coded SSD, with retry of failed
// page writes.
//
// Writes are out of place: the data goes to the next writable (Clean) page of the Active
// block, found by scanning the block's pages in order and skipping Valid and Sealed pages
// that an eraseless clean left in place. A coset coded re-program can fail (a cell would
// have to change and no stuck-at cell pointer is left); the page is then marked Sealed and
// the same data is tried on the next writable page, until a write succeeds. When the block
// has no writable page left, the garbage collector is asked for a new Active block. After a
// successful write the map table gets the new PPN and start states, the page becomes Valid
// and the page that held the LBA before becomes Stale. Reads look the LBA up and decode the
// page with the stored start states; an unmapped LBA reads as zeros.
//
// Host port: when `host_ready`, pulse `host_req` with host_we/host_lba/host_wdata; `host_ack`
// pulses when done (with host_rdata/host_rd_err for reads). After each host write the garbage
// collector is kicked; host requests wait while it runs. Page moves asked by the garbage
// collector (mv_req) are served as a read of the page followed by a write of the same LBA.
module write_controller
  import flash_pkg::*;
#(
  parameter int NB = NUM_BLOCKS,
  parameter int PPB = PAGES_PER_BLOCK,
  localparam int NP = NB * PPB,
  localparam int PW = $clog2(NP),
  localparam int BW = $clog2(NB)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host
  input  logic                   host_req,
  input  logic                   host_we,
  input  logic [LBAW-1:0]        host_lba,
  input  logic [PAGE_BITS-1:0]   host_wdata,
  output logic                   host_ready,
  output logic                   host_ack,
  output logic [PAGE_BITS-1:0]   host_rdata,
  output logic                   host_rd_err,
  // map table
  output logic                   map_rd_en,
  output logic [LBAW-1:0]        map_rd_lba,
  input  logic                   map_rd_valid,
  input  logic [PPNW-1:0]        map_rd_ppn,
  input  logic [SSW-1:0]         map_rd_ss,
  output logic                   map_wr_en,
  output logic [LBAW-1:0]        map_wr_lba,
  output logic [PPNW-1:0]        map_wr_ppn,
  output logic [SSW-1:0]         map_wr_ss,
  // garbage collector
  output logic [PW-1:0]          pg_q_ppn,
  input  page_state_e            pg_q_state,
  output logic                   pg_set_en,
  output logic [PW-1:0]          pg_set_ppn,
  output page_state_e            pg_set_state,
  output logic [LBAW-1:0]        pg_set_lba,
  output logic                   next_blk,
  input  logic                   blk_ready,
  input  logic [BW-1:0]          active_blk,
  output logic                   kick,
  input  logic                   gc_busy,
  input  logic                   mv_req,
  input  logic [LBAW-1:0]        mv_lba,
  output logic                   mv_done,
  // page coder
  output logic                   pc_wr_start,
  output logic                   pc_rd_start,
  output logic [PPNW-1:0]        pc_ppn,
  output logic [PAGE_BITS-1:0]   pc_wdata,
  output logic [SSW-1:0]         pc_rd_ss,
  input  logic                   pc_done,
  input  logic                   pc_fail,
  input  logic [SSW-1:0]         pc_wr_ss,
  input  logic [PAGE_BITS-1:0]   pc_rd_data,
  input  logic                   pc_rd_err,
  // statistics
  output logic [31:0]            n_page_writes,
  output logic [31:0]            n_retries,
  output logic [31:0]            n_new_blocks
);

  localparam int PBW = $clog2(PPB);

  typedef enum logic [3:0] {S_IDLE, S_LOOK, S_RWAIT, S_FIND, S_BLKWAIT, S_PROG, S_STALE,
                            S_DONE, S_GAP} wstate_e;
  wstate_e st;

  logic            is_move, is_write, have_active;
  logic [LBAW-1:0] lba;
  logic [PBW:0]    ptr;
  logic            old_valid;
  logic [PW-1:0]   old_ppn;
  logic [PW-1:0]   cur_ppn;

  assign cur_ppn    = PW'(active_blk) * PW'(PPB) + PW'(ptr[PBW-1:0]);
  assign pg_q_ppn   = cur_ppn;
  assign host_ready = (st == S_IDLE) && !gc_busy && !mv_req;
  assign map_rd_lba = lba;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= S_IDLE;
      is_move       <= 1'b0;
      is_write      <= 1'b0;
      have_active   <= 1'b0;
      lba           <= '0;
      ptr           <= '0;
      old_valid     <= 1'b0;
      old_ppn       <= '0;
      host_ack      <= 1'b0;
      host_rdata    <= PAGE_BITS'(0);
      host_rd_err   <= 1'b0;
      map_rd_en     <= 1'b0;
      map_wr_en     <= 1'b0;
      map_wr_lba    <= '0;
      map_wr_ppn    <= '0;
      map_wr_ss     <= '0;
      pg_set_en     <= 1'b0;
      pg_set_ppn    <= '0;
      pg_set_state  <= PG_CLEAN;
      pg_set_lba    <= '0;
      next_blk      <= 1'b0;
      kick          <= 1'b0;
      mv_done       <= 1'b0;
      pc_wr_start   <= 1'b0;
      pc_rd_start   <= 1'b0;
      pc_ppn        <= '0;
      pc_wdata      <= PAGE_BITS'(0);
      pc_rd_ss      <= '0;
      n_page_writes <= '0;
      n_retries     <= '0;
      n_new_blocks  <= '0;
    end else begin
      host_ack    <= 1'b0;
      map_rd_en   <= 1'b0;
      map_wr_en   <= 1'b0;
      pg_set_en   <= 1'b0;
      next_blk    <= 1'b0;
      kick        <= 1'b0;
      mv_done     <= 1'b0;
      pc_wr_start <= 1'b0;
      pc_rd_start <= 1'b0;
      case (st)
        S_IDLE: begin
          if (mv_req) begin
            is_move   <= 1'b1;
            is_write  <= 1'b0;
            lba       <= mv_lba;
            map_rd_en <= 1'b1;
            st        <= S_LOOK;
          end else if (host_req && !gc_busy) begin
            is_move   <= 1'b0;
            is_write  <= host_we;
            lba       <= host_lba;
            pc_wdata  <= host_wdata;
            map_rd_en <= 1'b1;
            st        <= S_LOOK;
          end
        end
        S_LOOK: if (!map_rd_en) begin
          // map entry is available one clock after the lookup
          old_valid <= map_rd_valid;
          old_ppn   <= PW'(map_rd_ppn);
          if (is_write) begin
            st <= S_FIND;
          end else if (!map_rd_valid) begin
            host_rdata  <= PAGE_BITS'(0);
            host_rd_err <= 1'b0;
            st          <= S_DONE;
          end else begin
            pc_ppn      <= map_rd_ppn;
            pc_rd_ss    <= map_rd_ss;
            pc_rd_start <= 1'b1;
            st          <= S_RWAIT;
          end
        end
        S_RWAIT: if (pc_done) begin
          if (is_move) begin
            pc_wdata <= pc_rd_data;
            st       <= S_FIND;
          end else begin
            host_rdata  <= pc_rd_data;
            host_rd_err <= pc_rd_err;
            st          <= S_DONE;
          end
        end
        S_FIND: begin
          if (!have_active || int'(ptr) == PPB) begin
            next_blk <= 1'b1;
            st       <= S_BLKWAIT;
          end else if (pg_q_state == PG_CLEAN) begin
            pc_ppn      <= PPNW'(cur_ppn);
            pc_wr_start <= 1'b1;
            st          <= S_PROG;
          end else begin
            ptr <= ptr + (PBW+1)'(1);
          end
        end
        S_BLKWAIT: if (blk_ready) begin
          have_active  <= 1'b1;
          ptr          <= '0;
          n_new_blocks <= n_new_blocks + 32'd1;
          st           <= S_FIND;
        end
        S_PROG: if (pc_done) begin
          pg_set_en     <= 1'b1;
          pg_set_ppn    <= PW'(pc_ppn);
          pg_set_lba    <= lba;
          ptr           <= ptr + (PBW+1)'(1);
          n_page_writes <= n_page_writes + 32'd1;
          if (pc_fail) begin
            pg_set_state <= PG_SEALED;
            n_retries    <= n_retries + 32'd1;
            st           <= S_FIND;
          end else begin
            pg_set_state <= PG_VALID;
            map_wr_en    <= 1'b1;
            map_wr_lba   <= lba;
            map_wr_ppn   <= pc_ppn;
            map_wr_ss    <= pc_wr_ss;
            st           <= S_STALE;
          end
        end
        S_STALE: begin
          if (old_valid && old_ppn != PW'(pc_ppn)) begin
            pg_set_en    <= 1'b1;
            pg_set_ppn   <= old_ppn;
            pg_set_state <= PG_STALE;
          end
          st <= S_DONE;
        end
        S_DONE: begin
          if (is_move) begin
            mv_done <= 1'b1;
            st      <= S_GAP;
          end else begin
            host_ack <= 1'b1;
            kick     <= is_write;
            st       <= S_GAP;
          end
        end
        S_GAP: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
