// tb_flash_ref_pkg: reference models for the Flash coset code testbenches, written from the
// code definition (rate 1/2, 7 memory bits, taps 247/371 octal, pairs {b_j, a_j} at cells
// 2j+1 / 2j) independently of the RTL.
package tb_flash_ref_pkg;
  localparam int L = 512, N = 1024, DW = 501;
  localparam int T1 = 'o247, T2 = 'o371;

  typedef bit [N-1:0] word_t;

  // code sequence of inputs u from start state s (s bit k-1 = input k steps back)
  function automatic word_t encode(int s, bit [L-1:0] u);
    word_t z;
    int st = s;
    for (int j = 0; j < L; j++) begin
      int r = (st << 1) | int'(u[j]);
      z[2*j]   = ^(r & T1);
      z[2*j+1] = ^(r & T2);
      st = r & 'h7F;
    end
    return z;
  endfunction

  function automatic bit [L-1:0] syndrome(word_t x);
    bit [L-1:0] s;
    for (int j = 0; j < L; j++) begin
      s[j] = 0;
      for (int k = 0; k <= 7; k++)
        if (j >= k) s[j] ^= (((T2 >> k) & 1) & x[2*(j-k)]) ^ (((T1 >> k) & 1) & x[2*(j-k)+1]);
    end
    return s;
  endfunction

  // data bits of a written word, given its start state
  function automatic bit [L-1:0] decode(word_t x, int s);
    return syndrome(x ^ encode(s, '0));
  endfunction

  // optimal metric by dynamic programming over all start states
  function automatic longint best_metric(word_t t, int cost []);
    longint pm [128], nm [128];
    for (int s = 0; s < 128; s++) pm[s] = 0;
    for (int j = 0; j < L; j++) begin
      for (int s = 0; s < 128; s++) nm[s] = 64'h7FFF_FFFF_FFFF_FFFF;
      for (int s = 0; s < 128; s++)
        for (int u = 0; u < 2; u++) begin
          int r = (s << 1) | u;
          longint m = pm[s];
          if ((^(r & T1)) != t[2*j])   m += cost[2*j];
          if ((^(r & T2)) != t[2*j+1]) m += cost[2*j+1];
          if (m < nm[r & 'h7F]) nm[r & 'h7F] = m;
        end
      pm = nm;
    end
    begin
      longint b = pm[0];
      for (int s = 1; s < 128; s++) if (pm[s] < b) b = pm[s];
      return b;
    end
  endfunction

  // is x a code sequence starting in state s? (inputs are read off the a/b outputs)
  function automatic bit is_code(word_t x, int s);
    int st = s;
    for (int j = 0; j < L; j++) begin
      int r0 = st << 1, r1 = (st << 1) | 1, r;
      bit ok0 = ((^(r0 & T1)) == x[2*j]) && ((^(r0 & T2)) == x[2*j+1]);
      bit ok1 = ((^(r1 & T1)) == x[2*j]) && ((^(r1 & T2)) == x[2*j+1]);
      if (!ok0 && !ok1) return 0;
      r = ok0 ? r0 : r1;
      st = r & 'h7F;
    end
    return 1;
  endfunction
endpackage
