// tb_min_weight_select: random candidate sets and fault masks against a reference search.
// The reference keeps the first eligible candidate of least weight; when none is eligible
// it expects found=0 and the first candidate of least weight overall. Also runs the coset
// erasure matching example: mask 00100000 over the listed RM(1,3) translate coset.
module tb_min_weight_select;
  localparam int N = 12, NC = 16;
  logic [NC-1:0][N-1:0] cand;
  logic [N-1:0]         mask, leader;
  logic [3:0]           idx;
  logic [3:0]           wt;
  logic                 found;
  int checks = 0, failures = 0;

  min_weight_select #(.N(N), .NC(NC)) dut (.cand(cand), .fault_mask(mask), .leader(leader),
    .leader_idx(idx), .leader_weight(wt), .found(found));

  function automatic int pop(logic [N-1:0] v);
    int c = 0;
    for (int i = 0; i < N; i++) c += int'(v[i]);
    return c;
  endfunction

  task automatic check();
    int bi = -1, bw = 99, ai = 0, aw = 99;
    #1;
    for (int e = 0; e < NC; e++) begin
      if (pop(cand[e]) < aw) begin aw = pop(cand[e]); ai = e; end
      if ((cand[e] & mask) == 0 && pop(cand[e]) < bw) begin bw = pop(cand[e]); bi = e; end
    end
    checks++;
    if (bi >= 0) begin
      if (!found || int'(idx) != bi || leader != cand[bi] || int'(wt) != bw) begin
        failures++; $display("eligible mismatch idx=%0d ref=%0d", idx, bi);
      end
    end else if (found || int'(idx) != ai || int'(wt) != aw) begin
      failures++; $display("none-eligible mismatch idx=%0d ref=%0d", idx, ai);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int e = 0; e < NC; e++) cand[e] = N'($urandom) & N'($urandom);
      mask = (t % 3 == 0) ? '0 : N'(1 << ($urandom % N)) | ((t % 5 == 0) ? N'($urandom) : '0);
      check();
    end
    // coset erasure matching example (8-bit words placed in the low bits)
    cand = '0;
    begin
      logic [7:0] ex [16] = '{8'b11101110, 8'b10111011, 8'b11011101, 8'b11100001,
                              8'b10110100, 8'b11010010, 8'b00010001, 8'b01000100,
                              8'b00100010, 8'b00011110, 8'b01001011, 8'b00101101,
                              8'b10001000, 8'b10000111, 8'b01110111, 8'b01111000};
      for (int e = 0; e < 16; e++) cand[e] = {4'b1111, ex[e]};
      mask = 12'b0000_0010_0000;
      check();
      checks++;
      if (leader[5] != 1'b0 || !found) begin failures++; $display("CEM example flips stuck cell"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
