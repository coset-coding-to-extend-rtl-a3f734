// page_coder: writes and reads whole 4 KB Flash pages through the block-level coset coding
// paths.
//
// A page holds NBLK = 66 code blocks of 1024 cells; block b carries data bits
// [b*DW +: DW] of the page (the last block is padded with zeros past the 4 KB). The unit
// talks to the Flash array through a simple port: it presents the page (arr_ppn) and block
// (arr_blk) and expects that block's cell levels and the page's SCP table on arr_level and
// arr_scp in the same clock; it programs new levels with arr_we and the SCP table with
// arr_scp_we.
//   Write (`wr_start`): for b = 0..65 a flash_write_path run (read, encode, SCP/Waterfall)
//   followed by one program cycle. The 66 start states are collected for the map table.
//   The first block that cannot be written (no SCP left) ends the operation with `fail`;
//   the page must then be marked unwritable by the caller.
//   Read (`rd_start`): for b = 0..65 a flash_read_path run with the block's start state.
// `done` pulses at the end of either operation. One operation at a time; requests while
// busy are ignored. The page/block sequencing is this design's choice. Parameter NCB
// (default 66) sets how many code blocks of a page are used; tests reduce it for speed.
module page_coder
  import flash_pkg::*;
#(
  parameter int F   = 1,
  parameter int NCB = NBLK   // code blocks used per page (NBLK for a full 4 KB page)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  metric_e                    mf,
  input  logic                       wr_start,
  input  logic                       rd_start,
  input  logic [PPNW-1:0]            ppn,
  input  logic [PAGE_BITS-1:0]       wr_data,
  input  logic [SSW-1:0]             rd_ss,        // start states for a read
  output logic                       done,
  output logic                       fail,
  output logic [SSW-1:0]             wr_ss,        // start states produced by a write
  output logic [PAGE_BITS-1:0]       rd_data,
  output logic                       rd_err,
  output logic [$clog2(PAGE_CELLS+1)-1:0] wr_flips,
  // Flash array port
  output logic [PPNW-1:0]            arr_ppn,
  output logic [6:0]                 arr_blk,
  input  logic [NCELL-1:0][LVW-1:0]  arr_level,
  input  scp_t [NSCP-1:0]            arr_scp,
  output logic                       arr_we,
  output logic [NCELL-1:0][LVW-1:0]  arr_level_wr,
  output logic                       arr_scp_we,
  output scp_t [NSCP-1:0]            arr_scp_wr,
  output logic                       busy
);

  localparam int PADW = NBLK * DW;

  typedef enum logic [2:0] {C_IDLE, C_WSTART, C_WWAIT, C_RSTART, C_RWAIT} cstate_e;
  cstate_e st;

  logic [6:0]           b;
  logic [PADW-1:0]      wbuf, rbuf;
  logic                 wp_start, wp_done, wp_fail, rp_start, rp_done, rp_err;
  logic [M-1:0]         wp_ss;
  logic [10:0]          wp_flips;
  logic [DW-1:0]        rp_data;
  logic [NCELL-1:0][LVW-1:0] wp_level;
  scp_t [NSCP-1:0]      wp_scp;

  assign arr_ppn = ppn;
  assign arr_blk = b;
  assign busy    = (st != C_IDLE);

  flash_write_path #(.F(F)) u_wp (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (wp_start),
    .mf         (mf),
    .blk        (b),
    .data       (wbuf[b*DW +: DW]),
    .level_in   (arr_level),
    .scp_in     (arr_scp),
    .done       (wp_done),
    .level_out  (wp_level),
    .scp_out    (wp_scp),
    .start_state(wp_ss),
    .flips      (wp_flips),
    .fail       (wp_fail)
  );

  flash_read_path u_rp (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (rp_start),
    .blk        (b),
    .level_in   (arr_level),
    .scp_in     (arr_scp),
    .start_state(rd_ss[b*M +: M]),
    .done       (rp_done),
    .data       (rp_data),
    .syn_err    (rp_err)
  );

  // programming happens in the clock where the block write path reports done
  assign arr_we       = (st == C_WWAIT) && wp_done && !wp_fail;
  assign arr_level_wr = wp_level;
  assign arr_scp_we   = arr_we;
  assign arr_scp_wr   = wp_scp;
  assign rd_data      = rbuf[PAGE_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= C_IDLE;
      b        <= '0;
      wbuf     <= PADW'(0);
      rbuf     <= PADW'(0);
      wp_start <= 1'b0;
      rp_start <= 1'b0;
      done     <= 1'b0;
      fail     <= 1'b0;
      wr_ss    <= '0;
      rd_err   <= 1'b0;
      wr_flips <= '0;
    end else begin
      wp_start <= 1'b0;
      rp_start <= 1'b0;
      done     <= 1'b0;
      case (st)
        C_IDLE: begin
          b <= '0;
          if (wr_start) begin
            wbuf     <= PADW'(wr_data);
            fail     <= 1'b0;
            wr_flips <= '0;
            st       <= C_WSTART;
          end else if (rd_start) begin
            rd_err <= 1'b0;
            st     <= C_RSTART;
          end
        end
        C_WSTART: begin
          wp_start <= 1'b1;
          st       <= C_WWAIT;
        end
        C_WWAIT: if (wp_done) begin
          wr_ss[b*M +: M] <= wp_ss;
          wr_flips        <= wr_flips + $clog2(PAGE_CELLS+1)'(wp_flips);
          if (wp_fail || b == 7'(NCB - 1)) begin
            fail <= wp_fail;
            done <= 1'b1;
            st   <= C_IDLE;
          end else begin
            b  <= b + 7'd1;
            st <= C_WSTART;
          end
        end
        C_RSTART: begin
          rp_start <= 1'b1;
          st       <= C_RWAIT;
        end
        C_RWAIT: if (rp_done) begin
          rbuf[b*DW +: DW] <= rp_data;
          rd_err           <= rd_err | rp_err;
          if (b == 7'(NCB - 1)) begin
            done <= 1'b1;
            st   <= C_IDLE;
          end else begin
            b  <= b + 7'd1;
            st <= C_RSTART;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
