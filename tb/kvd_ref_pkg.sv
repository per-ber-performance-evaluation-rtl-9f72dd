// kvd_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL, in a software style: the encoder uses a
// 7-bit window and the generator polynomials as octal masks, path metrics
// are computed with integers, sort_Knode is a greedy "best remaining
// candidate whose status value is not taken yet" loop, and trace-back walks
// per-layer lists. Tie rule shared with the RTL: of equal metrics the
// candidate generated first (parent slot order, input bit 0 before 1) wins.
package kvd_ref_pkg;

  localparam int G0 = 'o133;
  localparam int G1 = 'o171;

  // window bit 6 = current input, bit 6-j = input delayed by j
  function automatic int parity7(int v);
    int p = 0;
    for (int i = 0; i < 7; i++) p ^= (v >> i) & 1;
    return p;
  endfunction

  // returns {A,B} for input bit `in` leaving state `st` (bit j = delay j+1)
  function automatic int ref_enc(int st, int in);
    int win = in << 6;
    for (int j = 0; j < 6; j++) win |= ((st >> j) & 1) << (5 - j);
    return (parity7(win & G0) << 1) | parity7(win & G1);
  endfunction

  function automatic int ref_next(int st, int in);
    return ((st * 2) % 64) + in;
  endfunction

  function automatic int ref_pm(int ea, int eb, int ra, int rb, int ea_era,
                                int eb_era, int d, bit soft_dec);
    int top = (1 << d) - 1;
    int ta, tb;
    if (soft_dec) begin
      ta = (ea * top - ra) * (ea * top - ra);
      tb = (eb * top - rb) * (eb * top - rb);
    end else begin
      ta = (ea != (ra >> (d - 1))) ? 1 : 0;
      tb = (eb != (rb >> (d - 1))) ? 1 : 0;
    end
    if (ea_era != 0) ta = 0;
    if (eb_era != 0) tb = 0;
    return ta + tb;
  endfunction

  typedef struct {
    int node;
    int metric;
    int surv;   // 0: s = 1, 1: s = 2
  } ref_node_t;

  // greedy selection of up to k distinct nodes, best first
  function automatic void ref_select(input ref_node_t cand[$], input int k,
                                     output ref_node_t sel[$], output bit dup);
    bit taken[64];
    bit used[];
    used = new[cand.size()];
    sel.delete();
    dup = 0;
    forever begin
      int best = -1;
      for (int i = 0; i < cand.size(); i++)
        if (!used[i] && (best < 0 || cand[i].metric < cand[best].metric)) best = i;
      if (best < 0) break;
      used[best] = 1;
      if (taken[cand[best].node]) begin
        dup = 1;
      end else begin
        taken[cand[best].node] = 1;
        if (sel.size() < k) sel.push_back(cand[best]);
      end
    end
  endfunction

  // expand parents into children (parent slot order, bit 0 then 1)
  function automatic void ref_expand(input ref_node_t par[$], input int ra,
                                     input int rb, input int era_a, input int era_b,
                                     input int d, input bit soft_dec,
                                     output ref_node_t cand[$]);
    cand.delete();
    foreach (par[i]) begin
      for (int b = 0; b < 2; b++) begin
        ref_node_t c;
        int ab = ref_enc(par[i].node, b);
        c.node   = ref_next(par[i].node, b);
        c.metric = par[i].metric +
                   ref_pm(ab >> 1, ab & 1, ra, rb, era_a, era_b, d, soft_dec);
        c.surv   = (par[i].node >= 32) ? 1 : 0;
        cand.push_back(c);
      end
    end
  endfunction

  // Decode one packet of n received pairs in blocks of l layers with k
  // parents. ra/rb/era hold the received values; dec receives n bits.
  function automatic void ref_decode(input int ra[], input int rb[],
                                     input int era_a[], input int era_b[],
                                     input int n, input int k, input int l,
                                     input int d, input bit soft_dec,
                                     output int dec[]);
    int start = 0;
    int pos = 0;
    dec = new[n];
    while (pos < n) begin
      int nl = (n - pos < l) ? n - pos : l;
      ref_node_t par[$];
      ref_node_t hist[$][$];
      ref_node_t cand[$];
      ref_node_t sel[$];
      ref_node_t p0;
      int node;
      bit dup;
      p0.node = start; p0.metric = 0; p0.surv = 0;
      par.push_back(p0);
      for (int t = 0; t < nl; t++) begin
        ref_expand(par, ra[pos+t], rb[pos+t], era_a[pos+t], era_b[pos+t], d, soft_dec, cand);
        ref_select(cand, k, sel, dup);
        hist.push_back(sel);
        par = sel;
      end
      node = par[0].node;
      start = node;
      for (int t = nl - 1; t >= 0; t--) begin
        int s = -1;
        dec[pos+t] = node % 2;
        foreach (hist[t][j]) if (hist[t][j].node == node) s = hist[t][j].surv;
        if (s < 0) $error("reference trace-back lost node %0d", node);
        node = node / 2 + 32 * s;
      end
      pos += nl;
    end
  endfunction

endpackage
