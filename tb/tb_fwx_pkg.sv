// tb_fwx_pkg: reference models and stimulus helpers shared by the
// testbenches of the BDT evaluation processor.
//
// A variable's binning is described by its cut edges: bin k holds the values
// x with cut[k-1] <= x < cut[k], so the reference bin of x is the number of
// edges <= x. The same edges drive both bin engines: the look up engine loads
// them as thresholds, the bit shift engine loads them as aligned slices,
// each slice being the largest power-of-two block that starts at the current
// value and fits in the bin.
package tb_fwx_pkg;

  localparam int MAXB = 64;
  localparam int MAXE = 512;

  typedef struct {
    int          nedge;
    int unsigned cut [MAXB];
  } cuts_t;

  typedef struct {
    int          n;
    int unsigned layer [MAXE];
    int unsigned pfx   [MAXE];
    int unsigned bin   [MAXE];
  } slices_t;

  // Random ascending cut edges: 0..B-1 edges, each with its low bits cleared
  // by a random amount up to align_max (coarser edges need fewer slices).
  function automatic cuts_t rand_cuts(int n_bits, int nbins, int align_max);
    cuts_t c;
    int unsigned r;
    c.nedge = $urandom_range(nbins - 1, 0);
    for (int k = 0; k < c.nedge; k++) begin
      r = $urandom_range(align_max, 0);
      c.cut[k] = ($urandom % (1 << n_bits)) & ~((1 << r) - 1);
    end
    return sort_cuts(c);
  endfunction

  function automatic cuts_t sort_cuts(cuts_t c);
    int unsigned tmp;
    for (int i = 0; i < c.nedge; i++)
      for (int j = i + 1; j < c.nedge; j++)
        if (c.cut[j] < c.cut[i]) begin
          tmp = c.cut[i]; c.cut[i] = c.cut[j]; c.cut[j] = tmp;
        end
    return c;
  endfunction

  function automatic int unsigned ref_bin(cuts_t c, int unsigned x);
    int unsigned b = 0;
    for (int k = 0; k < c.nedge; k++)
      if (c.cut[k] <= x) b++;
    return b;
  endfunction

  // Look up engine threshold k (unused thresholds stay at all ones).
  function automatic int unsigned lube_thr(cuts_t c, int n_bits, int k);
    return (k < c.nedge) ? c.cut[k] : (1 << n_bits) - 1;
  endfunction

  // Aligned-slice cover of every bin, at most layer n_bits, at least layer 1.
  function automatic slices_t to_slices(cuts_t c, int n_bits);
    slices_t s;
    int unsigned lo, hi, sz;
    int sh;
    s.n = 0;
    for (int k = 0; k <= c.nedge; k++) begin
      lo = (k == 0) ? 0 : c.cut[k-1];
      hi = (k == c.nedge) ? (1 << n_bits) : c.cut[k];
      while (lo < hi) begin
        sh = n_bits - 1;
        while (sh > 0 && (((lo % (1 << sh)) != 0) || (lo + (1 << sh) > hi))) sh--;
        sz = 1 << sh;
        if (s.n < MAXE) begin
          s.layer[s.n] = n_bits - sh;
          s.pfx[s.n]   = lo >> sh;
          s.bin[s.n]   = k;
        end
        s.n++;
        lo += sz;
      end
    end
    return s;
  endfunction

  // Random cuts whose slice cover fits in max_e entries.
  function automatic cuts_t rand_bsbe_cuts(int n_bits, int nbins, int max_e);
    cuts_t c;
    slices_t s;
    do begin
      c = rand_cuts(n_bits, nbins, n_bits - 1);
      s = to_slices(c, n_bits);
    end while (s.n > max_e);
    return c;
  endfunction

  // Exactly nbins bins, each one aligned slice: start from the whole range
  // and halve randomly chosen slices until there are nbins of them.
  function automatic cuts_t split_cuts(int n_bits, int nbins);
    cuts_t c;
    int unsigned lo [MAXB], sz [MAXB];
    int n = 1, pick, tries;
    lo[0] = 0; sz[0] = 1 << n_bits;
    while (n < nbins) begin
      tries = 0;
      do begin
        pick = $urandom_range(n - 1, 0);
        tries++;
      end while (sz[pick] < 2 && tries < 1000);
      sz[pick] = sz[pick] / 2;
      lo[n] = lo[pick] + sz[pick];
      sz[n] = sz[pick];
      n++;
    end
    c.nedge = 0;
    for (int i = 0; i < n; i++)
      if (lo[i] != 0) begin
        c.cut[c.nedge] = lo[i];
        c.nedge++;
      end
    return sort_cuts(c);
  endfunction

  // Configuration word of one bit shift engine entry.
  function automatic logic [31:0] bsbe_word(bit valid, int unsigned layer,
                                            int unsigned bin, int unsigned pfx);
    return {valid, 2'b00, 5'(layer), 8'(bin), 16'(pfx)};
  endfunction

  // True when some bin of the cover needs more than one slice.
  function automatic bit multi_slice_bin(slices_t s, int unsigned bin);
    int cnt = 0;
    for (int i = 0; i < s.n; i++) if (s.bin[i] == bin) cnt++;
    return cnt > 1;
  endfunction

endpackage
