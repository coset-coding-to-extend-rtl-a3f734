// viterbi_selector: Viterbi search of the zero coset (the convolutional code) for the code
// sequence z that minimises a per-cell metric against the translate coset label t.
//
// The metric of z is sum_i [t_i != z_i] * cost_i, where cost_i comes from the metric
// function (1 for BFR; write count + 1 or "infinite" for BFR+SCI+WL), so the chosen z marks
// the cells that the write will flip. Because the metric is a non-negative sum over cells,
// dynamic programming over the 128-state trellis finds the exact minimum.
//
// Operation: a `start` pulse begins a search. During the forward pass (fwd_active high, L
// cycles) the unit presents `step_idx` = j and expects, in the same cycle, the translate
// label pair t_j = {t_2j+1, t_2j} and the two cell costs. All 128 add-compare-select units
// work in parallel, one trellis step per clock, and each step's 128 decision bits go into a
// decision memory. Every start state begins with metric 0 (free start) and the lowest-metric
// end state wins (ties to the lower state number, and to predecessor bit 0 within ACS).
// One clock then picks the end state, and the traceback pass (L cycles) walks the decisions backwards and emits z two cells per clock
// on z_we/z_idx/z_pair, from the last step to the first. `done` pulses for one clock with
// the start state of the chosen path (stored by the map table for decoding) and its metric.
// `done` goes high 2L + 1 clock edges after the edge that samples `start`; the last
// z pair is written on that same edge.
module viterbi_selector
  import flash_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             fwd_active,
  output logic [8:0]       step_idx,
  input  logic [1:0]       t_pair,
  input  logic [COSTW-1:0] cost_a,
  input  logic [COSTW-1:0] cost_b,
  output logic             z_we,
  output logic [8:0]       z_idx,
  output logic [1:0]       z_pair,
  output logic             done,
  output logic [M-1:0]     start_state,
  output logic [PMW-1:0]   best_metric
);

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_END, S_TB} state_e;
  state_e st;

  logic [PMW-1:0]    pm [NSTATE];
  logic [NSTATE-1:0] dec_mem [L];
  logic [8:0]        j;
  logic [M-1:0]      cur;

  // add-compare-select for every state
  logic [PMW-1:0]    pm_nxt [NSTATE];
  logic [NSTATE-1:0] dec_nxt;

  function automatic logic [PMW-1:0] branch(logic [M-1:0] s, logic u, logic [1:0] t,
                                            logic [COSTW-1:0] ca, logic [COSTW-1:0] cb);
    logic [1:0] z;
    z = conv_out(s, u);
    return (z[0] != t[0] ? PMW'(ca) : '0) + (z[1] != t[1] ? PMW'(cb) : '0);
  endfunction

  always_comb begin
    for (int ns = 0; ns < NSTATE; ns++) begin
      logic [M-1:0] p0, p1, nsv;
      logic [PMW-1:0] m0, m1;
      nsv = M'(ns);
      p0  = {1'b0, nsv[M-1:1]};
      p1  = {1'b1, nsv[M-1:1]};
      m0  = pm[p0] + branch(p0, nsv[0], t_pair, cost_a, cost_b);
      m1  = pm[p1] + branch(p1, nsv[0], t_pair, cost_a, cost_b);
      dec_nxt[ns] = (m1 < m0);
      pm_nxt[ns]  = (m1 < m0) ? m1 : m0;
    end
  end

  // best end state
  logic [M-1:0]   best_s;
  logic [PMW-1:0] best_m;
  always_comb begin
    best_s = '0;
    best_m = pm[0];
    for (int s = 1; s < NSTATE; s++)
      if (pm[s] < best_m) begin
        best_m = pm[s];
        best_s = M'(s);
      end
  end

  // traceback step
  logic [M-1:0] prev_s;
  assign prev_s = {dec_mem[j][cur], cur[M-1:1]};

  assign fwd_active = (st == S_FWD);
  assign step_idx   = j;

  always_ff @(posedge clk) begin
    if (st == S_FWD) dec_mem[j] <= dec_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      j           <= '0;
      cur         <= '0;
      z_we        <= 1'b0;
      z_idx       <= '0;
      z_pair      <= '0;
      done        <= 1'b0;
      start_state <= '0;
      best_metric <= '0;
      for (int s = 0; s < NSTATE; s++) pm[s] <= '0;
    end else begin
      z_we <= 1'b0;
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_FWD;
          j  <= '0;
          for (int s = 0; s < NSTATE; s++) pm[s] <= '0;
        end
        S_FWD: begin
          for (int s = 0; s < NSTATE; s++) pm[s] <= pm_nxt[s];
          if (j == 9'(L - 1)) st <= S_END;
          else                j  <= j + 9'd1;
        end
        S_END: begin
          cur         <= best_s;
          best_metric <= best_m;
          st          <= S_TB;
        end
        S_TB: begin
          z_we   <= 1'b1;
          z_idx  <= j;
          z_pair <= conv_out(prev_s, cur[0]);
          cur    <= prev_s;
          if (j == '0) begin
            st          <= S_IDLE;
            done        <= 1'b1;
            start_state <= prev_s;
          end else begin
            j <= j - 9'd1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
