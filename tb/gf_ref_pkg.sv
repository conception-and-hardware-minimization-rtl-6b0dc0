// gf_ref_pkg: reference Galois-field arithmetic for the testbenches.
//
// Independent of the RTL's shift-and-add multiplier: the class builds the
// exponent (antilog) and logarithm tables of GF(2^m) by stepping alpha^k, and
// multiplies through them, a*b = exp[(log a + log b) mod (2^m - 1)]. eval()
// evaluates a polynomial in the plain Horner form, not in the factored form of
// the design, and locator() builds Lambda(x) = prod (1 + X_i x) from error
// locations X_i = alpha^e_i.
package gf_ref_pkg;

  class gf_ref;
    int m;
    int n;           // 2^m - 1
    int prim;
    int exp_t[];
    int log_t[];

    function new(int m_i, int prim_i);
      int v;
      m = m_i;
      prim = prim_i;
      n = (1 << m) - 1;
      exp_t = new[2 * n];
      log_t = new[n + 1];
      v = 1;
      for (int k = 0; k < 2 * n; k++) begin
        exp_t[k] = v;
        if (k < n) log_t[v] = k;
        v = v << 1;
        if (v > n) v = v ^ prim;
      end
      log_t[0] = -1;
    endfunction

    function int mul(int a, int b);
      if (a == 0 || b == 0) return 0;
      return exp_t[(log_t[a] + log_t[b]) % n];
    endfunction

    // alpha^e for any integer e (negative allowed)
    function int apow(int e);
      int r;
      r = e % n;
      if (r < 0) r += n;
      return exp_t[r];
    endfunction

    // coef[k] is the coefficient of x^k
    function int eval(int coef[], int x);
      int acc;
      acc = 0;
      for (int k = coef.size() - 1; k >= 0; k--) acc = mul(acc, x) ^ coef[k];
      return acc;
    endfunction

    // Lambda(x) = prod_i (1 + X_i x), returned with deg+1 entries (upper ones zero)
    function void locator(int xs[], int deg, ref int coef[]);
      coef = new[deg + 1];
      foreach (coef[k]) coef[k] = 0;
      coef[0] = 1;
      foreach (xs[i]) begin
        for (int k = deg; k >= 1; k--) coef[k] = coef[k] ^ mul(coef[k-1], xs[i]);
      end
    endfunction
  endclass

endpackage
