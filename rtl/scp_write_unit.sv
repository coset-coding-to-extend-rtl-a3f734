// scp_write_unit: stuck-at cell pointer (SCP) generation and Waterfall level update for the
// cells of a page write.
//
// Waterfall coding stores one bit per cell as the parity of its level: writing a bit that
// differs from the stored one raises the level by one, so both 0->1 and 1->0 bit changes are
// programs, never erases. A cell whose level has reached the flip limit F cannot change
// again before an erase. When such a cell must change, the unit hands out a free SCP: the
// pointer records the cell index and its replacement bit holds the value from now on, until
// the page is erased. Cells already covered by an SCP only update the replacement bit.
// If a cell must change and no SCP is left, `fail` is set: the page cannot take this write.
//
// Interface: `load` copies the page's SCP table in and clears `fail`. Then one cell per clock
// with `cell_valid`: its page index, current level and the new bit. `new_level` is the
// level to program, combinational on the inputs; the table and `fail` update on the clock.
// One replaced cell per pointer (C = 1) is this design's choice.
module scp_write_unit
  import flash_pkg::*;
#(
  parameter int F = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  scp_t [NSCP-1:0]       table_in,
  input  logic                  cell_valid,
  input  logic [PTRW-1:0]       cell_idx,
  input  logic [LVW-1:0]        cell_level,
  input  logic                  cell_bit,
  output logic [LVW-1:0]        new_level,
  output scp_t [NSCP-1:0]       table_out,
  output logic                  fail,
  output logic [$clog2(NSCP+1)-1:0] used
);

  logic                      hit, need, can_raise, have_free;
  logic [$clog2(NSCP)-1:0]   hit_i, free_i;

  always_comb begin
    hit = 1'b0;
    hit_i = '0;
    have_free = 1'b0;
    free_i = '0;
    for (int e = NSCP - 1; e >= 0; e--) begin
      if (table_out[e].valid && table_out[e].ptr == cell_idx) begin
        hit = 1'b1;
        hit_i = $clog2(NSCP)'(e);
      end
      if (!table_out[e].valid) begin
        have_free = 1'b1;
        free_i = $clog2(NSCP)'(e);
      end
    end
    need      = !hit && (cell_bit != cell_level[0]);
    can_raise = cell_level < LVW'(F);
    new_level = (need && can_raise) ? cell_level + LVW'(1) : cell_level;
  end

  always_comb begin
    used = '0;
    for (int e = 0; e < NSCP; e++) used = used + $clog2(NSCP+1)'(table_out[e].valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      table_out <= '0;
      fail      <= 1'b0;
    end else if (load) begin
      table_out <= table_in;
      fail      <= 1'b0;
    end else if (cell_valid) begin
      if (hit) begin
        table_out[hit_i].repl <= cell_bit;
      end else if (need && !can_raise) begin
        if (have_free) table_out[free_i] <= '{valid: 1'b1, ptr: cell_idx, repl: cell_bit};
        else           fail <= 1'b1;
      end
    end
  end

endmodule
