// par_fir_pkg: types, constants and elaboration-time functions shared by the
// parallel FIR filters.
//
// Coefficient sets travel between modules as a fixed-size packed vector of
// 32-bit signed integers (coef_vec_t) plus a separate tap count; entries past
// the tap count are ignored. The functions below run only at elaboration:
//   * coefficient-set algebra for the Fast FIR Algorithm (FFA) recursion:
//     even taps (H0), odd taps (H1) and their sum (H0+H1);
//   * a multiple-constant-multiplication (MCM) adder-graph builder that turns
//     a coefficient set into a graph of shift-and-add nodes, which mcm_block
//     then turns into pipelined hardware;
//   * word-length and latency helpers used by the top.
//
// The adder graph is built by a simple greedy method, this design's own
// choice: the fundamentals to build are the distinct odd parts of the
// coefficient magnitudes. Any target that is one adder away from the nodes
// already built, i.e. t = (a<<s) + b, (a<<s) - b or b - (a<<s), is added,
// taking the operand pair of least pipeline depth. When none is, the smallest
// remaining target t is split by its lowest canonical-signed-digit: the odd
// part of t-1 (t mod 4 == 1) or t+1 (t mod 4 == 3) becomes a new target, which
// has one signed digit fewer, so the process always ends. Even coefficients
// are shifts of an odd fundamental and negative ones become a subtraction in
// the filter's adder chain, so neither costs an adder.
package par_fir_pkg;

  localparam int MAX_TAPS  = 256;  // longest coefficient set a vector holds
  localparam int MAX_NODES = 255;  // largest adder graph (node 0 is the input)

  typedef logic signed [31:0] coef_t;
  typedef coef_t [MAX_TAPS-1:0] coef_vec_t;

  // How an adder-graph node combines its operands a and b.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,   // (a << s) + b
    OP_SUB  = 2'd1,   // (a << s) - b
    OP_RSUB = 2'd2    // b - (a << s)
  } mcm_op_e;

  // Adder graph. Node 0 is the input itself (fundamental 1, depth 0).
  // Node k > 0 has fundamental value[k] = op(value[src_a[k]], value[src_b[k]])
  // and is registered at pipeline stage depth[k].
  typedef struct packed {
    logic [7:0]                       n;       // number of nodes, input included
    logic [7:0]                       max_depth;
    logic [MAX_NODES-1:0][31:0]       value;
    logic [MAX_NODES-1:0][7:0]        src_a;
    logic [MAX_NODES-1:0][7:0]        src_b;
    logic [MAX_NODES-1:0][4:0]        shift_a;
    logic [MAX_NODES-1:0][1:0]        op;
    logic [MAX_NODES-1:0][7:0]        depth;
  } mcm_graph_t;

  // Half-band decimation filter fir0 of the RFSoC ADC's hardened DDC
  // (15 taps, symmetric), padded with one zero to 16 taps.
  localparam int FIR0_TAPS = 16;
  localparam coef_vec_t FIR0_COEFS = coef_vec_t'({
      32'sd0,                       // padding zero, tap 15
      -32'sd6, 32'sd0, 32'sd54, 32'sd0, -32'sd256, 32'sd0, 32'sd1230,
      32'sd2048,
      32'sd1230, 32'sd0, -32'sd256, 32'sd0, 32'sd54, 32'sd0, -32'sd6  // tap 0
  });

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Odd part of a positive integer (v divided by its largest power of two).
  function automatic int odd_part(int v);
    int r;
    r = v;
    while (r != 0 && (r % 2) == 0) r = r / 2;
    return r;
  endfunction

  // Number of trailing zero bits of a positive integer.
  function automatic int tz_count(int v);
    int r, k;
    r = v;
    k = 0;
    while (r != 0 && (r % 2) == 0) begin
      r = r / 2;
      k++;
    end
    return k;
  endfunction

  // log2 of v when v is a power of two of at least 2, else -1.
  function automatic int pow2_shift(int v);
    if (v < 2) return -1;
    if ((v & (v - 1)) != 0) return -1;
    return tz_count(v);
  endfunction

  // FFA decomposition of a coefficient set: part 0 = even taps (H0),
  // part 1 = odd taps (H1), part 2 = H0 + H1. Result has n/2 taps.
  function automatic coef_vec_t ffa_part(coef_vec_t c, int n, int part);
    coef_vec_t r;
    r = '0;
    for (int i = 0; i < n / 2; i++) begin
      case (part)
        0:       r[i] = c[2*i];
        1:       r[i] = c[2*i+1];
        default: r[i] = c[2*i] + c[2*i+1];
      endcase
    end
    return r;
  endfunction

  // Polyphase component r of a P-phase decomposition: taps r, r+P, r+2P ...
  function automatic coef_vec_t phase_part(coef_vec_t c, int n, int p, int r);
    coef_vec_t v;
    v = '0;
    for (int i = 0; i < n / p; i++) v[i] = c[p*i + r];
    return v;
  endfunction

  // Index of the graph node whose fundamental is f, or -1.
  function automatic int mcm_find(mcm_graph_t g, int f);
    for (int k = 0; k < MAX_NODES; k++)
      if (k < int'(g.n) && int'(g.value[k]) == f) return k;
    return -1;
  endfunction

  // Build the adder graph realising every odd fundamental of c[0..n-1].
  // Works on plain integer arrays and fills the packed graph at the end.
  function automatic mcm_graph_t mcm_build(coef_vec_t c, int n);
    mcm_graph_t g;
    int tgt [MAX_NODES];
    int val [MAX_NODES];
    int dep [MAX_NODES];
    int sa  [MAX_NODES];
    int sb  [MAX_NODES];
    int sh  [MAX_NODES];
    int opc [MAX_NODES];
    int nt, nn, dmax;
    int v, best_d, best_a, best_b, best_s, best_op, d, s, t, u, q;
    bit found, progress, done, seen, have;

    nt = 0;
    nn = 1;
    dmax = 0;
    for (int k = 0; k < MAX_NODES; k++) begin
      tgt[k] = 0; val[k] = 0; dep[k] = 0; sa[k] = 0; sb[k] = 0; sh[k] = 0; opc[k] = 0;
    end
    val[0] = 1;

    // Distinct odd fundamentals above 1.
    for (int i = 0; i < n; i++) begin
      v = iabs(int'(c[i]));
      if (v != 0) begin
        v = odd_part(v);
        seen = 0;
        for (int k = 0; k < nt; k++) if (tgt[k] == v) seen = 1;
        if (v > 1 && !seen && nt < MAX_NODES) begin
          tgt[nt] = v;
          nt++;
        end
      end
    end

    done = (nt == 0);
    while (!done) begin
      // Add every target that is one adder away, repeatedly.
      progress = 1;
      while (progress) begin
        progress = 0;
        for (int ti = 0; ti < nt; ti++) begin
          t = tgt[ti];
          have = 0;
          for (int k = 0; k < nn; k++) if (val[k] == t) have = 1;
          if (!have && nn < MAX_NODES) begin
            found  = 0;
            best_d = 1 << 20;
            best_a = 0; best_b = 0; best_s = 0; best_op = 0;
            for (int a = 0; a < nn; a++) begin
              for (int b = 0; b < nn; b++) begin
                d = ((dep[a] > dep[b]) ? dep[a] : dep[b]) + 1;
                if (d < best_d) begin
                  // t = (a << s) + b
                  q = t - val[b];
                  if (q > 0 && (q % val[a]) == 0) begin
                    s = pow2_shift(q / val[a]);
                    if (s > 0 && s < 32) begin
                      found = 1; best_d = d; best_a = a; best_b = b; best_s = s; best_op = int'(OP_ADD);
                    end
                  end
                  // t = (a << s) - b
                  q = t + val[b];
                  if (d < best_d && (q % val[a]) == 0) begin
                    s = pow2_shift(q / val[a]);
                    if (s > 0 && s < 32) begin
                      found = 1; best_d = d; best_a = a; best_b = b; best_s = s; best_op = int'(OP_SUB);
                    end
                  end
                  // t = b - (a << s)
                  q = val[b] - t;
                  if (d < best_d && q > 0 && (q % val[a]) == 0) begin
                    s = pow2_shift(q / val[a]);
                    if (s > 0 && s < 32) begin
                      found = 1; best_d = d; best_a = a; best_b = b; best_s = s; best_op = int'(OP_RSUB);
                    end
                  end
                end
              end
            end
            if (found) begin
              val[nn] = t;
              sa[nn]  = best_a;
              sb[nn]  = best_b;
              sh[nn]  = best_s;
              opc[nn] = best_op;
              dep[nn] = best_d;
              if (best_d > dmax) dmax = best_d;
              nn++;
              progress = 1;
            end
          end
        end
      end

      // Smallest target still missing, if any.
      u = 0;
      for (int ti = 0; ti < nt; ti++) begin
        have = 0;
        for (int k = 0; k < nn; k++) if (val[k] == tgt[ti]) have = 1;
        if (!have && (u == 0 || tgt[ti] < u)) u = tgt[ti];
      end
      if (u == 0 || nt >= MAX_NODES || nn >= MAX_NODES) begin
        done = 1;
      end else begin
        // Strip the lowest signed digit: the rest becomes a new target.
        tgt[nt] = ((u % 4) == 1) ? odd_part(u - 1) : odd_part(u + 1);
        nt++;
      end
    end

    g.n = 8'(nn);
    g.max_depth = 8'(dmax);
    for (int k = 0; k < MAX_NODES; k++) begin
      g.value[k]   = 32'(val[k]);
      g.src_a[k]   = 8'(sa[k]);
      g.src_b[k]   = 8'(sb[k]);
      g.shift_a[k] = 5'(sh[k]);
      g.op[k]      = 2'(opc[k]);
      g.depth[k]   = 8'(dep[k]);
    end
    return g;
  endfunction

  // True when every non-zero coefficient's fundamental exists in the graph.
  function automatic bit mcm_complete(mcm_graph_t g, coef_vec_t c, int n);
    for (int i = 0; i < n; i++)
      if (c[i] != 0 && mcm_find(g, odd_part(iabs(int'(c[i])))) < 0) return 0;
    return 1;
  endfunction

  // Deepest adder graph over all 3^p subfilters of a nested 2-parallel FFA
  // with P = 2^p lanes; at least 1 so that every MCM registers its input.
  function automatic int ffa_mcm_depth(coef_vec_t c, int n, int p_lanes);
    int levels, count, idx, nn, dmax;
    coef_vec_t cc;
    mcm_graph_t g;
    levels = 0;
    while ((1 << levels) < p_lanes) levels++;
    count = 1;
    for (int l = 0; l < levels; l++) count = count * 3;
    dmax = 1;
    for (int s = 0; s < count; s++) begin
      cc  = c;
      nn  = n;
      idx = s;
      for (int l = 0; l < levels; l++) begin
        cc  = ffa_part(cc, nn, idx % 3);
        nn  = nn / 2;
        idx = idx / 3;
      end
      g = mcm_build(cc, nn);
      if (int'(g.max_depth) > dmax) dmax = int'(g.max_depth);
    end
    return dmax;
  endfunction

  // Adder-graph depth of one coefficient set, at least 1.
  function automatic int mcm_depth(coef_vec_t c, int n);
    mcm_graph_t g;
    g = mcm_build(c, n);
    return (int'(g.max_depth) > 1) ? int'(g.max_depth) : 1;
  endfunction

  // Word length that holds any output of the filter exactly:
  // |y| <= 2^(in_w-1) * sum|h|. Internal sums wrap modulo 2^w and are exact
  // again at the output, so this width serves for every internal node too.
  function automatic int acc_width(coef_vec_t c, int n, int in_w);
    longint sum;
    int b;
    sum = 0;
    for (int i = 0; i < n; i++) sum += longint'(iabs(int'(c[i])));
    b = 0;
    while ((64'sd1 << b) < sum) b++;
    return in_w + b + 1;
  endfunction

  // ceil(log2(v)) for v >= 1.
  function automatic int clog2i(int v);
    int b;
    b = 0;
    while ((1 << b) < v) b++;
    return b;
  endfunction

endpackage
