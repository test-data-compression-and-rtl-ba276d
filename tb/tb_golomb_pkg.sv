// Reference encoder used by the testbenches.
//
// golomb_encode turns a difference stream into its Golomb code with group
// size m (a power of two): every run of L zeros ended by a one becomes
// floor(L/m) ones, a zero and the log2(m)-bit binary value of L mod m, most
// significant bit first. A stream that ends in zeros is closed with a one
// that is not part of the data, as the coding assumes a stream ending in
// one.
//
// interleave builds the composite stream T_C for m cores: it visits the
// cores in turn, taking from each one symbol, a prefix one or a separator
// zero with its whole tail. A core whose code is used up gets a one, a
// filler that only shifts zeros into a chain that is already done.
package tb_golomb_pkg;

  typedef bit bitq_t[$];

  function automatic int unsigned clog2u(int unsigned m);
    return (m < 2) ? 1 : $clog2(m);
  endfunction

  function automatic bitq_t golomb_encode(bitq_t d, int unsigned m);
    bitq_t code;
    int unsigned run = 0;
    int unsigned n = clog2u(m);
    bitq_t dd = d;
    if (dd.size() == 0 || dd[dd.size()-1] == 1'b0) dd.push_back(1'b1);
    foreach (dd[k]) begin
      if (dd[k] == 1'b0) run++;
      else begin
        for (int unsigned q = 0; q < run / m; q++) code.push_back(1'b1);
        code.push_back(1'b0);
        for (int b = int'(n) - 1; b >= 0; b--) code.push_back(bit'(((run % m) >> b) & 1));
        run = 0;
      end
    end
    return code;
  endfunction

  // Composite stream; also returns the number of filler ones inserted.
  function automatic bitq_t interleave(bitq_t codes[], int unsigned m, output int unsigned fillers);
    bitq_t tc;
    int unsigned n = clog2u(m);
    int unsigned pos[] = new[codes.size()];
    bit busy = 1'b1;
    fillers = 0;
    while (busy) begin
      busy = 1'b0;
      foreach (pos[c]) if (pos[c] < codes[c].size()) busy = 1'b1;
      if (!busy) break;
      for (int c = 0; c < int'(m); c++) begin
        if (pos[c] >= codes[c].size()) begin
          tc.push_back(1'b1);
          fillers++;
        end else if (codes[c][pos[c]] == 1'b1) begin
          tc.push_back(1'b1);
          pos[c]++;
        end else begin
          for (int unsigned k = 0; k <= n; k++) tc.push_back(codes[c][pos[c] + k]);
          pos[c] += n + 1;
        end
      end
    end
    return tc;
  endfunction

  // Fault-free response of the stand-in core logic used by the tests: a
  // fixed nonlinear function of the pattern, CAP output bits.
  function automatic bitq_t core_response(bitq_t t, int unsigned cap);
    bitq_t r;
    int unsigned n = t.size();
    for (int unsigned j = 0; j < cap; j++)
      r.push_back(t[j] ^ (t[(j + 1) % n] & t[(j + 2) % n]) ^ t[(j * 7 + 3) % n] ^ bit'(j % 5 == 0));
    return r;
  endfunction

  // Test data for one core: npat random sparse difference vectors (a one
  // with probability pct/100), the patterns they give with the stand-in core
  // (pats, npat*len bits, pattern i cell j at i*len + j) and the difference
  // stream in shift order. Shift k of a pattern lands in cell len-1-k, and
  // t_i = d_i XOR (t_(i-1) with its first cap cells replaced by r_(i-1)).
  task automatic make_patterns(input int unsigned len, input int unsigned cap,
                               input int unsigned npat, input int unsigned pct,
                               output bitq_t stream, output bitq_t pats);
    bitq_t prev, t, r, dc;
    stream = {};
    pats = {};
    repeat (len) prev.push_back(1'b0);
    for (int unsigned i = 0; i < npat; i++) begin
      dc = {};
      t = {};
      for (int unsigned j = 0; j < len; j++) dc.push_back(($urandom % 100) < pct);
      for (int unsigned j = 0; j < len; j++) t.push_back(dc[j] ^ prev[j]);
      for (int unsigned k = 0; k < len; k++) stream.push_back(dc[len - 1 - k]);
      foreach (t[j]) pats.push_back(t[j]);
      r = core_response(t, cap);
      prev = t;
      for (int unsigned j = 0; j < cap; j++) prev[j] = r[j];
    end
  endtask

endpackage
