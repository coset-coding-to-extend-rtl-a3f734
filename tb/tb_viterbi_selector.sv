// tb_viterbi_selector: drives random translate labels and cell costs into the selector and
// checks against the reference dynamic program:
//  - the reported metric equals the reference optimum;
//  - the returned z is a code sequence from the reported start state;
//  - the metric of z recomputed from t and the costs equals the reported metric;
//  - `done` rises 2L + 1 clock edges after the edge that samples `start` (seen here on the
//    2L + 2nd falling edge after start is dropped) and every pair index is written once.
module tb_viterbi_selector;
  import tb_flash_ref_pkg::*;
  import flash_pkg::COSTW;
  import flash_pkg::PMW;
  logic clk = 0, rst_n = 0, start = 0;
  logic fwd, z_we, done;
  logic [8:0] idx, z_idx;
  logic [1:0] t_pair, z_pair;
  logic [COSTW-1:0] ca, cb;
  logic [6:0] ss;
  logic [PMW-1:0] bm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  viterbi_selector dut (.clk, .rst_n, .start, .fwd_active(fwd), .step_idx(idx), .t_pair(t_pair),
    .cost_a(ca), .cost_b(cb), .z_we(z_we), .z_idx(z_idx), .z_pair(z_pair), .done(done),
    .start_state(ss), .best_metric(bm));

  word_t t, z;
  int cost [];
  int written [L];

  always_comb begin
    t_pair = {t[2*idx+1], t[2*idx]};
    ca = COSTW'(cost[2*idx]);
    cb = COSTW'(cost[2*idx+1]);
  end

  always @(posedge clk) if (z_we) begin
    z[2*z_idx] <= z_pair[0]; z[2*z_idx+1] <= z_pair[1];
    written[z_idx]++;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cost = new[N];
    for (int i = 0; i < N; i++) cost[i] = 1;
    t = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      longint ref_m, zm;
      automatic int cyc = 0;
      for (int i = 0; i < N; i++) begin
        t[i] = $urandom % 2;
        case (r % 3)
          0: cost[i] = 1;                                   // BFR
          1: cost[i] = 1 + $urandom % 4;                    // write counts + 1
          default: cost[i] = ($urandom % 8 == 0) ? 'h10000 : 1 + $urandom % 3;  // with stuck cells
        endcase
      end
      for (int i = 0; i < L; i++) written[i] = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      ref_m = best_metric(t, cost);
      zm = 0;
      for (int i = 0; i < N; i++) if (z[i] != t[i]) zm += cost[i];
      checks += 4;
      if (longint'(bm) != ref_m) begin failures++; $display("run %0d metric %0d ref %0d", r, bm, ref_m); end
      if (!is_code(z, int'(ss))) begin failures++; $display("run %0d z not a code sequence", r); end
      if (zm != ref_m) begin failures++; $display("run %0d z metric %0d ref %0d", r, zm, ref_m); end
      if (cyc != 2 * L + 2) begin failures++; $display("run %0d latency %0d", r, cyc); end
      for (int i = 0; i < L; i++) if (written[i] != 1) begin failures++; $display("pair %0d written %0d", i, written[i]); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
