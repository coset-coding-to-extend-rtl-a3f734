// flash_pkg: constants and helpers of the Flash coset code.
//
// The coset code is a rate-1/2 feedforward convolutional code with 7 memory bits (128 trellis
// states). A code block is L = 512 trellis steps, i.e. 1024 coded bits (cells), written as
// pairs (a_j, b_j) with a_j at cell 2j and b_j at cell 2j+1. The encoder state s holds the
// last 7 input bits (s[0] the most recent); a step with input u outputs
//   a = ^({s, u} & G1),  b = ^({s, u} & G2)
// and moves to {s[5:0], u}. The generator polynomials 247/371 (octal) are this design's
// choice (a standard maximum free distance pair for 8 taps); the coding scheme fixes only the rate
// and the number of states.
//
// The coset of a block is named by its syndrome sigma_j = (a*G2 + b*G1)_j, j = 0..L-1, which
// is zero for every code sequence that starts in state 0. DW = 501 syndrome bits carry data
// and the top L-DW = 11 are held at zero (read back as an error flag); a page of 4 KB is 66
// such blocks, 8448 coded bytes.
package flash_pkg;

  localparam int          M       = 7;            // encoder memory bits
  localparam int          NSTATE  = 1 << M;       // 128 trellis states
  localparam logic [M:0]  G1      = 8'o247;       // taps of the a output, bit k = delay k
  localparam logic [M:0]  G2      = 8'o371;       // taps of the b output
  localparam int          L       = 512;          // trellis steps per block
  localparam int          NCELL   = 2 * L;        // coded bits (cells) per block
  localparam int          DW      = 501;          // data bits per block
  localparam int          NBLK    = 66;           // blocks per 4 KB page
  localparam int          LVW     = 5;            // width of a cell write count (level)
  localparam int          COSTW   = 17;           // width of a per-cell metric cost
  localparam int          PMW     = 28;           // width of a path metric
  localparam logic [COSTW-1:0] INF_COST = 17'h10000;  // stands for the infinite metric

  // Stuck-at cell pointers: a page keeps NSCP one-cell pointers with one replacement bit each.
  localparam int          PAGE_CELLS = NBLK * NCELL;          // 67584 cells per page
  localparam int          PTRW       = $clog2(PAGE_CELLS);    // 17-bit pointer
  localparam int          NSCP       = 100;

  typedef struct packed {
    logic            valid;
    logic [PTRW-1:0] ptr;
    logic            repl;
  } scp_t;

  // Solid state drive organisation (flash translation layer).
  localparam int          PAGE_BITS       = 4096 * 8;          // un-coded page: 4 KB
  localparam int          PAGES_PER_BLOCK = 256;
  localparam int          NUM_BLOCKS      = 848;               // physical blocks
  localparam int          NUM_LBA         = 188744;            // advertised pages (0.72 GB)
  localparam int          PPNW            = $clog2(NUM_BLOCKS * PAGES_PER_BLOCK);
  localparam int          BLKW            = $clog2(NUM_BLOCKS);
  localparam int          LBAW            = $clog2(NUM_LBA);
  localparam int          SSW             = NBLK * M;          // start states of a page: 462 bits

  typedef enum logic [1:0] {PG_CLEAN, PG_VALID, PG_STALE, PG_SEALED} page_state_e;
  typedef enum logic [1:0] {BK_CLEAN, BK_ACTIVE, BK_SEALED} block_state_e;

  typedef enum logic {MF_BFR = 1'b0, MF_BFR_SCI_WL = 1'b1} metric_e;

  // Encoder outputs {b, a} for a step from state s with input u.
  function automatic logic [1:0] conv_out(logic [M-1:0] s, logic u);
    logic [M:0] r;
    r = {s, u};
    return {^(r & G2), ^(r & G1)};
  endfunction

  // Cost of flipping one cell: 1 for Metric Function BFR; for BFR+SCI+WL the cell's write
  // count plus one, or "infinite" once the count has reached the flip limit f.
  function automatic logic [COSTW-1:0] cell_cost(metric_e mf, logic [LVW-1:0] w,
                                                 logic [LVW-1:0] f);
    if (mf == MF_BFR) return COSTW'(1);
    if (w >= f)       return INF_COST;
    return COSTW'(w) + COSTW'(1);
  endfunction

endpackage
