// iecc_ref_pkg: reference model of an integer error control code for the
// testbenches. Independent of the RTL: every residue is computed with the
// % operator on 128-bit integers. The class iecc_code also performs the
// offline code construction the hardware relies on: a search for
// coefficients C_1..C_k whose correctable error patterns all have distinct
// nonzero syndromes, and the generation of the syndrome table sorted by
// ascending syndrome. Three code classes are covered: a single-bit error
// in one byte (t = 1, error values +-2^r), a double-bit error in one byte
// (t = 1, +-2^r +-2^s), both with a greedy search for small b and a
// random one for large b — and a single-bit error in each of up to two
// bytes (t = 2; random search).
package iecc_ref_pkg;
  typedef logic [63:0]  u64;
  typedef logic [127:0] u128;

  function automatic u64 modulus(input int b);
    return (u64'(1) << b) - 1;
  endfunction

  function automatic u64 mred(input u128 x, input int b);
    u128 m = u128'(modulus(b));
    return u64'(x % m);
  endfunction

  function automatic u64 madd(input u64 a, input u64 c, input int b);
    return mred(u128'(a) + u128'(c), b);
  endfunction

  function automatic u64 mmul(input u64 a, input u64 c, input int b);
    return mred(u128'(a) * u128'(c), b);
  endfunction

  function automatic u64 mneg(input u64 a, input int b);
    return mred(u128'(modulus(b)) - u128'(mred(u128'(a), b)), b);
  endfunction

  class iecc_code;
    int b;
    int k;
    u64 coef [];
    // syndrome table, sorted by st_s
    u64 st_s   [];
    int st_loc [];   // 0-based byte index, k = check byte
    u64 st_e   [];
    // second (location, value) pair of a t = 2 table; for single-byte
    // patterns the value is zero and the location another byte
    int st_loc2 [];
    u64 st_e2   [];

    // error values one byte can take (single-bit class by default)
    u64 errs [$];

    function new(int b_i, int k_i);
      b = b_i;
      k = k_i;
      coef = new[k];
      for (int r = 0; r < b; r++)
        for (int n = 0; n < 2; n++) errs.push_back(err_val(r, n[0]));
    endfunction

    // error value e = sign*2^r as a residue
    function u64 err_val(int r, bit neg);
      u64 e = u64'(1) << r;
      return neg ? mneg(e, b) : e;
    endfunction

    // syndrome caused by error e at byte loc
    function u64 syn_of(int loc, u64 e);
      if (loc == k) return mneg(e, b);
      return mmul(coef[loc], e, b);
    endfunction

    // greedy/random search over the error values in errs; returns 1 on
    // success
    function bit search(int seed_start);
      bit used [u64];
      u64 cand = u64'(seed_start);
      // the check byte's syndromes first (coefficient -1)
      foreach (errs[j]) used[mneg(errs[j], b)] = 1'b1;
      for (int i = 0; i < k; i++) begin
        bit ok = 1'b0;
        int tries = 0;
        while (!ok && tries < 100000) begin
          bit mine [u64];
          tries++;
          if (b > 20) cand = mred(u128'({$urandom, $urandom}), b);
          else        cand = cand + 1;
          if (cand >= modulus(b)) return 1'b0;
          ok = 1'b1;
          foreach (errs[j]) begin
            u64 sy = mmul(cand, errs[j], b);
            if (sy == 0 || used.exists(sy) || mine.exists(sy)) begin
              ok = 1'b0;
              break;
            end
            mine[sy] = 1'b1;
          end
          if (ok) begin
            coef[i] = cand;
            foreach (mine[q]) used[q] = 1'b1;
          end
        end
        if (!ok) return 1'b0;
      end
      return 1'b1;
    endfunction

    // one entry per byte and error value in errs, sorted by syndrome
    function void build_table();
      int n = errs.size() * (k + 1);
      int idx = 0;
      st_s = new[n];
      st_loc = new[n];
      st_e = new[n];
      for (int loc = 0; loc <= k; loc++)
        foreach (errs[j]) begin
          st_s[idx]   = syn_of(loc, errs[j]);
          st_loc[idx] = loc;
          st_e[idx]   = mneg(errs[j], b);
          idx++;
        end
      sort_table(1'b0);
    endfunction

    // switch to the class correcting a double-bit error inside one byte:
    // error values +-2^r +-2^s, r < s, with duplicates modulo 2^b-1 removed
    function void use_double_bit();
      bit seen [u64];
      errs.delete();
      for (int r = 0; r < b; r++)
        for (int q = r + 1; q < b; q++)
          for (int sg = 0; sg < 4; sg++) begin
            u64 e = madd(sg[0] ? mneg(u64'(1) << r, b) : u64'(1) << r,
                         sg[1] ? mneg(u64'(1) << q, b) : u64'(1) << q, b);
            if (e != 0 && !seen.exists(e)) begin
              seen[e] = 1'b1;
              errs.push_back(e);
            end
          end
    endfunction

    // t = 2 class: errors +-2^r in up to two bytes. Draws random
    // coefficients until the syndromes of all single-byte and two-byte
    // patterns are distinct and nonzero; then builds the sorted table of
    // 2*b*(b*k+1)*(k+1) entries. Returns 1 on success.
    function bit search_t2(int tries);
      for (int n = 0; n < tries; n++) begin
        bit used [u64];
        bit ok = 1'b1;
        for (int i = 0; i < k; i++) coef[i] = 1 + mred(u128'({$urandom, $urandom}), b) % (modulus(b) - 1);
        for (int a = 0; a <= k && ok; a++)
          for (int r = 0; r < 2 * b && ok; r++) begin
            u64 sa = syn_of(a, err_val(r / 2, r[0]));
            if (sa == 0 || used.exists(sa)) ok = 1'b0;
            used[sa] = 1'b1;
            for (int c = a + 1; c <= k && ok; c++)
              for (int q = 0; q < 2 * b && ok; q++) begin
                u64 sp = madd(sa, syn_of(c, err_val(q / 2, q[0])), b);
                if (sp == 0 || used.exists(sp)) ok = 1'b0;
                used[sp] = 1'b1;
              end
          end
        if (ok) begin
          build_table_t2();
          return 1'b1;
        end
      end
      return 1'b0;
    endfunction

    function void build_table_t2();
      int n = 2 * b * (b * k + 1) * (k + 1);
      int idx = 0;
      st_s = new[n]; st_loc = new[n]; st_e = new[n]; st_loc2 = new[n]; st_e2 = new[n];
      for (int a = 0; a <= k; a++)
        for (int r = 0; r < 2 * b; r++) begin
          u64 ea = err_val(r / 2, r[0]);
          st_s[idx] = syn_of(a, ea); st_loc[idx] = a; st_e[idx] = mneg(ea, b);
          st_loc2[idx] = (a + 1) % (k + 1); st_e2[idx] = 0;
          idx++;
          for (int c = a + 1; c <= k; c++)
            for (int q = 0; q < 2 * b; q++) begin
              u64 ec = err_val(q / 2, q[0]);
              st_s[idx] = madd(syn_of(a, ea), syn_of(c, ec), b);
              st_loc[idx] = a; st_e[idx] = mneg(ea, b);
              st_loc2[idx] = c; st_e2[idx] = mneg(ec, b);
              idx++;
            end
        end
      sort_table(1'b1);
    endfunction

    // sort all table columns by syndrome (heap sort)
    function void sift(int root, int n, bit two);
      int r = root;
      while (2 * r + 1 < n) begin
        int c = 2 * r + 1;
        if (c + 1 < n && st_s[c + 1] > st_s[c]) c++;
        if (st_s[r] >= st_s[c]) return;
        swap(r, c, two);
        r = c;
      end
    endfunction

    function void swap(int x, int y, bit two);
      u64 ts; int tl; u64 te;
      ts = st_s[x]; st_s[x] = st_s[y]; st_s[y] = ts;
      tl = st_loc[x]; st_loc[x] = st_loc[y]; st_loc[y] = tl;
      te = st_e[x]; st_e[x] = st_e[y]; st_e[y] = te;
      if (two) begin
        tl = st_loc2[x]; st_loc2[x] = st_loc2[y]; st_loc2[y] = tl;
        te = st_e2[x]; st_e2[x] = st_e2[y]; st_e2[y] = te;
      end
    endfunction

    function void sort_table(bit two);
      int n = st_s.size();
      for (int i = n / 2 - 1; i >= 0; i--) sift(i, n, two);
      for (int i = n - 1; i > 0; i--) begin
        swap(0, i, two);
        sift(0, i, two);
      end
    endfunction

    // table lookup by linear scan: index or -1
    function int lookup(u64 s);
      foreach (st_s[i]) if (st_s[i] == s) return i;
      return -1;
    endfunction

    function u64 check_byte(u64 data []);
      u64 acc = 0;
      for (int i = 0; i < k; i++) acc = madd(acc, mmul(coef[i], data[i], b), b);
      return acc;
    endfunction

    function u64 syndrome(u64 cw []);
      u64 acc = mneg(cw[k], b);
      for (int i = 0; i < k; i++) acc = madd(acc, mmul(coef[i], cw[i], b), b);
      return acc;
    endfunction
  endclass
endpackage
