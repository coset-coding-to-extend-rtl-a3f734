// scp_read_unit: reads one cell's bit value.
//
// The analog level is turned into a bit by taking it modulo 2 (Waterfall coding), and a cell
// that a valid stuck-at cell pointer names is replaced by that pointer's replacement bit.
// Purely combinational, one cell per use.
module scp_read_unit
  import flash_pkg::*;
(
  input  scp_t [NSCP-1:0]  scp_table,
  input  logic [PTRW-1:0]  cell_idx,
  input  logic [LVW-1:0]   cell_level,
  output logic             cell_bit,
  output logic             replaced
);

  always_comb begin
    cell_bit = cell_level[0];
    replaced = 1'b0;
    for (int e = 0; e < NSCP; e++)
      if (scp_table[e].valid && scp_table[e].ptr == cell_idx) begin
        cell_bit = scp_table[e].repl;
        replaced = 1'b1;
      end
  end

endmodule
