// me_ref_pkg: word-level reference model of the MSD-first block matcher,
// for the testbenches.
//
// Works directly on pixel values, not on digits: after the planes down to z,
// the SAD prefix of a candidate is sum_p |(c_p >> z) - (r_p >> z)|, because the
// signed-digit difference of a pixel, read to plane z, has that value and the
// sign of its leading nonzero digit. The digit SAD of plane z is the prefix at
// z minus twice the prefix at z+1. From these the model replays the
// plane-major search: same visiting orders, same discard rule (certainly
// larger when the prefix exceeds the running minimum by at least 2*N*N; exact
// comparison after the last plane, earlier minimum wins ties), and prefixes
// kept as offsets from the previous plane's minimum, clipped at 2*N*N.
// It also gives the plain full-search SAD of every candidate, which the
// testbenches use to check that the result is the true minimum.
package me_ref_pkg;

  typedef struct {
    int mv_idx;
    int min_sad;
    bit exact;
    int count;
    int discards;
    int newmins;
  } ref_result_t;

  // Prefix of the SAD of candidate k after planes BITS-1 .. z.
  function automatic int prefix(input int cur[], input int win[], int n, int cw,
                                int ww, int k, int z);
    int s, r0, c0, d;
    s  = 0;
    r0 = k / cw;
    c0 = k % cw;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        d = (cur[i*n + j] >> z) - (win[(r0 + i)*ww + c0 + j] >> z);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  function automatic ref_result_t search(input int cur[], input int win[], int n,
                                         int bits, int cw, int ch, bit pred);
    ref_result_t res;
    int ncand, ww, start, minidx, minrel, base, macc, e, d, rel, nalive, clip;
    bit alive[];
    int relv[];
    bit minvalid;
    int order[$];
    ncand = cw * ch;
    ww    = cw + n - 1;
    clip  = 2 * n * n;
    alive = new[ncand];
    relv  = new[ncand];
    foreach (alive[k]) begin alive[k] = 1; relv[k] = 0; end
    res = '{default: 0};
    start = pred ? (ch / 2) * cw + cw / 2 : 0;
    minidx = 0;
    minrel = 0;
    base = 0;
    macc = 0;
    for (int z = bits - 1; z >= 0; z--) begin
      order.delete();
      if (pred) begin
        order.push_back(start);
        for (int k = 0; k < ncand; k++) if (k != start && alive[k]) order.push_back(k);
      end else begin
        for (int k = 0; k < ncand; k++) if (alive[k]) order.push_back(k);
      end
      minvalid = 0;
      foreach (order[o]) begin
        int k = order[o];
        // digit SAD of plane z, from pixel values
        d = prefix(cur, win, n, cw, ww, k, z)
            - ((z == bits - 1) ? 0 : 2 * prefix(cur, win, n, cw, ww, k, z + 1));
        e = relv[k] - base;
        if (e > clip) e = clip;
        rel = 2 * e + d;
        relv[k] = rel;
        res.count++;
        if (!minvalid) begin
          minidx = k; minrel = rel; minvalid = 1;
        end else if ((z == 0 && rel >= minrel) || (z > 0 && rel - minrel >= clip)) begin
          alive[k] = 0;
          res.discards++;
        end else if (rel < minrel) begin
          minidx = k; minrel = rel;
          res.newmins++;
        end
      end
      macc = 2 * macc + minrel;
      base = minrel;
      nalive = 0;
      foreach (alive[k]) nalive += alive[k];
      res.mv_idx  = minidx;
      res.min_sad = macc;
      res.exact   = (z == 0);
      if (nalive == 1) break;
      start = minidx;
    end
    return res;
  endfunction

  // Plain full-search SAD of candidate k.
  function automatic int full_sad(input int cur[], input int win[], int n, int cw,
                                  int ww, int k);
    return prefix(cur, win, n, cw, ww, k, 0);
  endfunction

  // Test images. Scenario 0: the block is a copy of a random window
  // position plus small noise (one clear winner); 1: unrelated random data;
  // 2: flat image, every candidate ties at SAD 0; 3: smooth ramp with a faint
  // block (many close candidates); 4: values straddling 127/128, so pixel
  // differences whose leading digits cancel.
  function automatic void gen_case(int scn, int n, int cw, int ch,
                                   ref int cur[], ref int win[]);
    int ww, wh, k0, r0, c0, v;
    ww = cw + n - 1;
    wh = ch + n - 1;
    cur = new[n*n];
    win = new[ww*wh];
    case (scn)
      0: begin
        foreach (win[k]) win[k] = $urandom_range(0, 255);
        k0 = $urandom_range(0, cw*ch - 1);
        r0 = k0 / cw; c0 = k0 % cw;
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++) begin
            v = win[(r0 + i)*ww + c0 + j] + $urandom_range(0, 4) - 2;
            cur[i*n + j] = (v < 0) ? 0 : (v > 255) ? 255 : v;
          end
      end
      1: begin
        foreach (win[k]) win[k] = $urandom_range(0, 255);
        foreach (cur[k]) cur[k] = $urandom_range(0, 255);
      end
      2: begin
        v = $urandom_range(0, 255);
        foreach (win[k]) win[k] = v;
        foreach (cur[k]) cur[k] = v;
      end
      3: begin
        v = $urandom_range(0, 100);
        foreach (win[k]) win[k] = v + 4 * (k / ww) + 3 * (k % ww) + $urandom_range(0, 3);
        foreach (cur[k]) cur[k] = v + 10 + $urandom_range(0, 6);
      end
      default: begin
        foreach (win[k]) win[k] = 124 + $urandom_range(0, 8);
        foreach (cur[k]) cur[k] = 124 + $urandom_range(0, 8);
      end
    endcase
  endfunction

endpackage
