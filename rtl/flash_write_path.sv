// flash_write_path: coset coding write of one 1024-cell code block of a Flash page.
//
// Follows the coset coding write process: read before write, coset coding encode, SCP
// generation, Waterfall coding. A `start` pulse (with all inputs held until `done`) runs:
//   READ  (NCELL clocks): each cell's current bit is read through scp_read_unit (level mod 2,
//                         or the replacement bit of an SCP) into `prev`;
//   ENC   (2L + 2 clocks): flash_coset_encoder picks the coset representative `rep`, using
//                         the cells' levels for the metric;
//   WRITE (NCELL clocks): scp_write_unit raises the level of every cell whose bit changes,
//                         or gives it an SCP when it is at the flip limit F;
// then `done` pulses with the new levels, the updated SCP table, the start state for the
// map table, the number of flipped cells, and `fail` if the page cannot take the write (an
// SCP was needed and none was free). `blk` selects which of the page's blocks this is, so
// SCP pointers hold page-wide cell indices (blk * NCELL + i).
module flash_write_path
  import flash_pkg::*;
#(
  parameter int F = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  metric_e                     mf,
  input  logic [6:0]                  blk,
  input  logic [DW-1:0]               data,
  input  logic [NCELL-1:0][LVW-1:0]   level_in,
  input  scp_t [NSCP-1:0]             scp_in,
  output logic                        done,
  output logic [NCELL-1:0][LVW-1:0]   level_out,
  output scp_t [NSCP-1:0]             scp_out,
  output logic [M-1:0]                start_state,
  output logic [$clog2(NCELL+1)-1:0]  flips,
  output logic                        fail
);

  typedef enum logic [2:0] {P_IDLE, P_READ, P_ENC, P_LOAD, P_WRITE} phase_e;
  phase_e ph;

  logic [9:0]       i;
  logic [NCELL-1:0] prev, rep;
  logic [PTRW-1:0]  cidx;
  logic             rd_bit, rd_repl, enc_start, enc_done, wr_valid;
  logic [LVW-1:0]   nl;
  logic [PMW-1:0]   metric;
  logic [$clog2(NSCP+1)-1:0] scp_used;

  assign cidx = PTRW'(blk) * PTRW'(NCELL) + PTRW'(i);

  scp_read_unit u_rd (
    .scp_table (scp_in),
    .cell_idx  (cidx),
    .cell_level(level_in[i]),
    .cell_bit  (rd_bit),
    .replaced  (rd_repl)
  );

  flash_coset_encoder #(.F(F)) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (enc_start),
    .mf         (mf),
    .data       (data),
    .prev       (prev),
    .level      (level_in),
    .done       (enc_done),
    .rep        (rep),
    .start_state(start_state),
    .metric     (metric),
    .flips      (flips)
  );

  assign wr_valid = (ph == P_WRITE);

  scp_write_unit #(.F(F)) u_wr (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (ph == P_LOAD),
    .table_in  (scp_in),
    .cell_valid(wr_valid),
    .cell_idx  (cidx),
    .cell_level(level_in[i]),
    .cell_bit  (rep[i]),
    .new_level (nl),
    .table_out (scp_out),
    .fail      (fail),
    .used      (scp_used)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph        <= P_IDLE;
      i         <= '0;
      prev      <= '0;
      level_out <= '0;
      enc_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      enc_start <= 1'b0;
      done      <= 1'b0;
      case (ph)
        P_IDLE: if (start) begin
          ph <= P_READ;
          i  <= '0;
        end
        P_READ: begin
          prev[i] <= rd_bit;
          if (i == 10'(NCELL - 1)) begin
            ph        <= P_ENC;
            enc_start <= 1'b1;
          end
          i <= i + 10'd1;
        end
        P_ENC: if (enc_done) begin
          ph <= P_LOAD;
          i  <= '0;
        end
        P_LOAD: ph <= P_WRITE;
        P_WRITE: begin
          level_out[i] <= nl;
          if (i == 10'(NCELL - 1)) begin
            ph   <= P_IDLE;
            done <= 1'b1;
          end
          i <= i + 10'd1;
        end
        default: ph <= P_IDLE;
      endcase
    end
  end

endmodule
