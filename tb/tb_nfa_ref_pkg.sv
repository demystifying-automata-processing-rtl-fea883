// tb_nfa_ref_pkg: reference model of the default NFA of nfa_pkg, used by the
// testbenches. It does not simulate states: it tests each pattern directly
// against the characters of the current stream, scanning backwards from the
// newest one, and keeps the counter's match count itself.
//
// Report bit order (element order of the default NFA):
//   0 a+bc   1 bcd+   2 cde   3 ab+[cd]e   4 counter (>= 2 matches of
//   ab+[cd]e in this stream, latched)   5 boolean (a+bc and "bc" both end here)
package tb_nfa_ref_pkg;

  typedef byte unsigned stream_t[$];

  function automatic bit at(const ref stream_t q, input int i, input byte unsigned c);
    return (i >= 0) && (i < q.size()) && (q[i] == c);
  endfunction

  function automatic bit m_apbc(const ref stream_t q);
    int t = q.size() - 1;
    return at(q, t, "c") && at(q, t-1, "b") && at(q, t-2, "a");
  endfunction

  function automatic bit m_bcdp(const ref stream_t q);
    int t = q.size() - 1;
    int k = 0;
    while (at(q, t-k, "d")) k++;
    return (k >= 1) && at(q, t-k, "c") && at(q, t-k-1, "b");
  endfunction

  function automatic bit m_cde(const ref stream_t q);
    int t = q.size() - 1;
    return at(q, t, "e") && at(q, t-1, "d") && at(q, t-2, "c");
  endfunction

  function automatic bit m_abpcde(const ref stream_t q);
    int t = q.size() - 1;
    int k = 0;
    if (!(at(q, t, "e") && (at(q, t-1, "c") || at(q, t-1, "d")))) return 0;
    while (at(q, t-2-k, "b")) k++;
    return (k >= 1) && at(q, t-2-k, "a");
  endfunction

  function automatic bit m_bc(const ref stream_t q);
    int t = q.size() - 1;
    return at(q, t, "c") && at(q, t-1, "b");
  endfunction

  // Appends ch to the stream (a new stream when sod) and returns the report
  // bits after it. n_match counts ab+[cd]e matches in the stream.
  function automatic logic [5:0] step(ref stream_t q, ref int n_match,
                                      input byte unsigned ch, input bit sod);
    logic [5:0] r;
    if (sod) begin
      q.delete();
      n_match = 0;
    end
    q.push_back(ch);
    if (q.size() > 64) void'(q.pop_front());   // patterns never need more
    r[0] = m_apbc(q);
    r[1] = m_bcdp(q);
    r[2] = m_cde(q);
    r[3] = m_abpcde(q);
    if (r[3]) n_match++;
    r[4] = (n_match >= 2);
    r[5] = m_apbc(q) && m_bc(q);
    return r;
  endfunction

  // Random character biased toward the pattern alphabet a..e.
  function automatic byte unsigned rand_char();
    int unsigned r = $urandom_range(0, 99);
    if (r < 90) return byte'("a" + $urandom_range(0, 4));
    return byte'($urandom_range(0, 255));
  endfunction

endpackage
