// map_table: logical-to-physical map of the coset coded SSD.
//
// One entry per logical page (LBA): a valid bit, the physical page number (PPN) holding the
// data, and the start states of the page's 66 convolutional code blocks (7 bits each), which
// the decoder needs. A write with `wr_en` stores an entry; `inv_en` clears an entry's valid
// bit. A lookup with `rd_en` returns the entry on the next clock (synchronous read, like a
// RAM; a read and a write of the same entry in one clock return the old contents). Reset
// clears every valid bit. Entry layout and the one-clock read are this design's
// choices; the three fields are those of the coset code map table entry.
module map_table
  import flash_pkg::*;
#(
  parameter int ENTRIES = NUM_LBA
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [LBAW-1:0]  rd_lba,
  output logic             rd_valid,
  output logic [PPNW-1:0]  rd_ppn,
  output logic [SSW-1:0]   rd_ss,
  input  logic             wr_en,
  input  logic [LBAW-1:0]  wr_lba,
  input  logic [PPNW-1:0]  wr_ppn,
  input  logic [SSW-1:0]   wr_ss,
  input  logic             inv_en,
  input  logic [LBAW-1:0]  inv_lba
);

  typedef struct packed {
    logic [PPNW-1:0] ppn;
    logic [SSW-1:0]  ss;
  } entry_t;

  entry_t               mem [ENTRIES];
  logic [ENTRIES-1:0]   valid;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_lba] <= '{ppn: wr_ppn, ss: wr_ss};
    if (rd_en) {rd_ppn, rd_ss} <= mem[rd_lba];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= ENTRIES'(0);
      rd_valid <= 1'b0;
    end else begin
      if (wr_en)  valid[wr_lba]  <= 1'b1;
      if (inv_en) valid[inv_lba] <= 1'b0;
      if (rd_en)  rd_valid       <= valid[rd_lba];
    end
  end

endmodule
