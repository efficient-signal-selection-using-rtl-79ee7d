// fg_debug_pkg -- shared types and elaboration-time arithmetic of the
// fine-grained trace/scan debug architecture.
//
// The trace buffer is bw bits wide. Its first omega columns are trace slots
// (chains of length 1, dumped every cycle). The remaining bw-omega columns are
// split into alpha partitions of (bw-omega)/alpha scan chains each; all chains
// of a partition have the same length. Lengths grow by a step function phi
// starting from l_0 = 1: partition p (1..alpha) has length phi^p(1). The step
// functions used for evaluation are additive (phi(i) = k + phi(i-1)) and
// multiplicative (phi(i) = k * phi(i-1)); both are covered by STEP_ADD /
// STEP_MUL with a constant k.
//
// Column order of the trace buffer and of the flat signal vector is fixed by
// this package (a choice of this design): trace slots first, then partition 1
// chain 0, partition 1 chain 1, ..., partition alpha last chain. The selected
// signals of chain c occupy sig_offset(c) .. sig_offset(c)+chain_len(c)-1, and
// the signal at offset 0 of a chain is the one dumped in the capture cycle.
package fg_debug_pkg;

  typedef enum logic [0:0] {
    STEP_ADD = 1'b0,   // phi(i) = STEP_K + phi(i-1)
    STEP_MUL = 1'b1    // phi(i) = STEP_K * phi(i-1)
  } step_op_e;

  // Apply the step function once.
  function automatic int unsigned step_fn(int unsigned prev, step_op_e op,
                                          int unsigned k);
    return (op == STEP_MUL) ? prev * k : prev + k;
  endfunction

  // Length of the scan chains in partition p (p = 0 means the trace slots).
  function automatic int unsigned part_len(int unsigned p, step_op_e op,
                                           int unsigned k);
    int unsigned l;
    l = 1;
    for (int unsigned i = 0; i < p; i++) l = step_fn(l, op, k);
    return l;
  endfunction

  // Number of scan chains per partition.
  function automatic int unsigned chains_per_part(int unsigned bw,
                                                  int unsigned omega,
                                                  int unsigned alpha);
    return (alpha == 0) ? 0 : (bw - omega) / alpha;
  endfunction

  // Partition index (0 = trace slots) of buffer column c.
  function automatic int unsigned col_part(int unsigned c, int unsigned bw,
                                           int unsigned omega,
                                           int unsigned alpha);
    if (c < omega) return 0;
    return 1 + (c - omega) / chains_per_part(bw, omega, alpha);
  endfunction

  // Length (dumping period T) of the chain behind buffer column c.
  function automatic int unsigned chain_len(int unsigned c, int unsigned bw,
                                            int unsigned omega,
                                            int unsigned alpha, step_op_e op,
                                            int unsigned k);
    return part_len(col_part(c, bw, omega, alpha), op, k);
  endfunction

  // Position in the flat signal vector of the first signal of column c.
  function automatic int unsigned sig_offset(int unsigned c, int unsigned bw,
                                             int unsigned omega,
                                             int unsigned alpha, step_op_e op,
                                             int unsigned k);
    int unsigned o;
    o = 0;
    for (int unsigned i = 0; i < c; i++) o += chain_len(i, bw, omega, alpha, op, k);
    return o;
  endfunction

  // Total number of monitored flip-flops.
  function automatic int unsigned num_signals(int unsigned bw,
                                              int unsigned omega,
                                              int unsigned alpha, step_op_e op,
                                              int unsigned k);
    return sig_offset(bw, bw, omega, alpha, op, k);
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // T_c = LCM of all chain lengths: the period after which the dump pattern
  // of the whole buffer repeats.
  function automatic int unsigned dump_lcm(int unsigned omega, int unsigned alpha,
                                           step_op_e op,
                                           int unsigned k);
    int unsigned m, l;
    m = 1;
    for (int unsigned p = (omega > 0 ? 0 : 1); p <= alpha; p++) begin
      l = part_len(p, op, k);
      m = m / gcd(m, l) * l;
    end
    return m;
  endfunction

endpackage
