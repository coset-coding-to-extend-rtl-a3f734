// tb_flash_coset_encoder: encodes random blocks and checks
//  - the written word decodes (reference syndrome, start state removed) to the data with the
//    reserved syndrome bits zero;
//  - with Metric Function BFR the metric equals the number of flipped cells and no coset
//    member built from the reference optimum flips fewer;
//  - with BFR+SCI+WL (F = 2) the metric equals the weighted flip sum, and no cell at the
//    flip limit is flipped when a finite-metric choice exists;
//  - done arrives 2L + 2 clocks after start.
module tb_flash_coset_encoder;
  import tb_flash_ref_pkg::*;
  import flash_pkg::metric_e;
  import flash_pkg::MF_BFR;
  import flash_pkg::MF_BFR_SCI_WL;
  import flash_pkg::LVW;
  import flash_pkg::PMW;
  localparam int FL = 2;
  logic clk = 0, rst_n = 0, start = 0, done;
  metric_e mf;
  logic [DW-1:0] data;
  logic [N-1:0]  prev, rep;
  logic [N-1:0][LVW-1:0] lvl;
  logic [6:0]    ss;
  logic [PMW-1:0] metric;
  logic [10:0]   flips;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flash_coset_encoder #(.F(FL)) dut (.clk, .rst_n, .start, .mf, .data, .prev, .level(lvl),
    .done, .rep, .start_state(ss), .metric, .flips);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mf = MF_BFR; data = '0; prev = '0; lvl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      automatic int cyc = 0, cost[];
      bit [L-1:0] dd;
      automatic longint wsum = 0, refm;
      cost = new[N];
      mf = (r % 2) ? MF_BFR_SCI_WL : MF_BFR;
      for (int j = 0; j < DW; j++) data[j] = $urandom % 2;
      for (int i = 0; i < N; i++) begin
        lvl[i] = LVW'($urandom % (FL + 1));
        if (r % 2 == 0) lvl[i] = LVW'(0);
        prev[i] = lvl[i][0] ^ ($urandom % 2 == 0);
        cost[i] = (mf == MF_BFR) ? 1 : ((int'(lvl[i]) >= FL) ? 'h10000 : int'(lvl[i]) + 1);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      dd = decode(rep, int'(ss));
      checks++;
      if (dd[DW-1:0] != data || dd[L-1:DW] != 0) begin failures++; $display("run %0d decode mismatch", r); end
      for (int i = 0; i < N; i++) if (rep[i] != prev[i]) wsum += cost[i];
      checks++;
      if (longint'(metric) != wsum || int'(flips) != $countones(rep ^ prev)) begin
        failures++; $display("run %0d metric %0d wsum %0d", r, metric, wsum);
      end
      // the optimum over the translate coset, from the reference dynamic program
      begin
        automatic word_t c = '0;
        for (int j = 0; j < L; j++) begin
          automatic bit b = (j < DW) ? data[j] : 0;
          for (int k = 1; k <= 7; k++) if (j >= k) b ^= ((T1 >> k) & 1) & c[2*(j-k)+1];
          c[2*j+1] = b;
        end
        refm = best_metric(c ^ prev, cost);
      end
      checks++;
      if (refm != wsum) begin failures++; $display("run %0d not optimal %0d vs %0d", r, wsum, refm); end
      if (mf == MF_BFR_SCI_WL && wsum < 'h10000) begin
        checks++;
        for (int i = 0; i < N; i++)
          if (rep[i] != prev[i] && int'(lvl[i]) >= FL) begin failures++; $display("stuck cell flipped"); break; end
      end
      checks++;
      if (cyc != 2 * L + 3) begin failures++; $display("latency %0d", cyc); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
