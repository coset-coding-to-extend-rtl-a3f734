// flash_coset_encoder: coset coding encoder for one 1024-cell Flash code block.
//
// Chains the steps of the Viterbi-based coset representative selector:
//  1. conv_label_gen turns the data bits (DW, the reserved syndrome bits forced to 0) into
//     the coset label c, one trellis step per clock;
//  2. in the same clock the translate label pair t_j = c_j ^ prev_j and the two cells'
//     metric costs (from their write counts, the metric function `mf` and the flip limit F)
//     are fed to viterbi_selector;
//  3. the selector returns the best zero coset sequence z, and the written representative
//     is rep = z ^ c (equivalently the translate leader z ^ t XORed with prev).
// Interface: pulse `start` with data, prev (current bit value of each cell) and level (each
// cell's write count since erase) held stable until `done`. `done` pulses 2L + 2 clocks after
// `start` with rep, the start state for the map table, the path metric and the number of
// cells the write flips. F is the flip limit f of the cells, fixed at build time.
module flash_coset_encoder
  import flash_pkg::*;
#(
  parameter int F = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  metric_e                     mf,
  input  logic [DW-1:0]               data,
  input  logic [NCELL-1:0]            prev,
  input  logic [NCELL-1:0][LVW-1:0]   level,
  output logic                        done,
  output logic [NCELL-1:0]            rep,
  output logic [M-1:0]                start_state,
  output logic [PMW-1:0]              metric,
  output logic [$clog2(NCELL+1)-1:0]  flips
);

  logic             fwd_active, z_we, vdone;
  logic [8:0]       step_idx, z_idx;
  logic [1:0]       label_pair, z_pair, t_pair;
  logic [NCELL-1:0] c, z;
  logic [COSTW-1:0] cost_a, cost_b;
  logic             d_bit;

  assign d_bit = (int'(step_idx) < DW) ? data[step_idx] : 1'b0;

  conv_label_gen u_label (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start),
    .step (fwd_active),
    .d    (d_bit),
    .label(label_pair)
  );

  assign t_pair = label_pair ^ prev[2*step_idx +: 2];
  assign cost_a = cell_cost(mf, level[2*step_idx],     LVW'(F));
  assign cost_b = cell_cost(mf, level[2*step_idx + 1], LVW'(F));

  viterbi_selector u_vit (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .fwd_active (fwd_active),
    .step_idx   (step_idx),
    .t_pair     (t_pair),
    .cost_a     (cost_a),
    .cost_b     (cost_b),
    .z_we       (z_we),
    .z_idx      (z_idx),
    .z_pair     (z_pair),
    .done       (vdone),
    .start_state(start_state),
    .best_metric(metric)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0;
      z <= '0;
    end else begin
      if (fwd_active) c[2*step_idx +: 2] <= label_pair;
      if (z_we)       z[2*z_idx +: 2]    <= z_pair;
    end
  end

  // z and c are complete one clock after the selector's done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= vdone;
  end

  assign rep   = z ^ c;
  assign flips = $clog2(NCELL+1)'($countones(rep ^ prev));

endmodule
