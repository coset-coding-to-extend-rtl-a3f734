// flash_read_path: coset coding read of one 1024-cell code block of a Flash page.
//
// Follows the coset coding read process: each cell's level is read modulo 2 and cells named
// by a stuck-at cell pointer take the pointer's replacement bit (scp_read_unit, one cell per
// clock for NCELL clocks); the assembled coset representative is then decoded with the
// block's start state from the map table (conv_decoder). `done` pulses NCELL + 1 clocks
// after `start` with the data and `syn_err` (a read error reached the reserved syndrome
// bits). Inputs must be held from `start` to `done`.
module flash_read_path
  import flash_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [6:0]                 blk,
  input  logic [NCELL-1:0][LVW-1:0]  level_in,
  input  scp_t [NSCP-1:0]            scp_in,
  input  logic [M-1:0]               start_state,
  output logic                       done,
  output logic [DW-1:0]              data,
  output logic                       syn_err
);

  logic             busy;
  logic [10:0]      i;
  logic [NCELL-1:0] bits;
  logic             rd_bit, rd_repl;
  logic [DW-1:0]    dec_data;
  logic             dec_err;

  scp_read_unit u_rd (
    .scp_table (scp_in),
    .cell_idx  (PTRW'(blk) * PTRW'(NCELL) + PTRW'(i[9:0])),
    .cell_level(level_in[i[9:0]]),
    .cell_bit  (rd_bit),
    .replaced  (rd_repl)
  );

  conv_decoder u_dec (
    .rep        (bits),
    .start_state(start_state),
    .data       (dec_data),
    .syn_err    (dec_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      i       <= '0;
      bits    <= '0;
      done    <= 1'b0;
      data    <= '0;
      syn_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          i    <= '0;
        end
      end else if (i == 11'(NCELL)) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        data    <= dec_data;
        syn_err <= dec_err;
      end else begin
        bits[i[9:0]] <= rd_bit;
        i            <= i + 11'd1;
      end
    end
  end

endmodule
