// collatz_ref_pkg -- reference arithmetic for the testbenches, written from
// the plain Collatz map rather than from the B/C/S tables, so that the
// design's tables and datapath are checked against an independent model.
package collatz_ref_pkg;

  typedef logic [127:0] big_t;

  // Apply the Collatz map (odd: 3n+1, even: n/2) until d halvings have been
  // made; this is what one table operation with base bits d must compute.
  function automatic big_t collatz_halvings(input big_t n, input int unsigned d);
    big_t t;
    int unsigned h;
    t = n;
    h = 0;
    while (h < d) begin
      if (t[0]) t = 3 * t + 1;
      else begin
        t = t >> 1;
        h++;
      end
    end
    return t;
  endfunction

  // A d-bit residue r is mandatory when, for a generic n = 2^d x + r, the
  // coefficient of x (2^(d-i) * 3^j after i halvings and j triplings) never
  // falls below 2^d, i.e. 3^j >= 2^i at every point of the walk.
  function automatic bit is_mandatory(input int unsigned d, input longint unsigned r);
    longint unsigned c, p3, p2;
    int unsigned i;
    c  = r;
    p3 = 1;
    p2 = 1;
    i  = 0;
    while (i < d) begin
      if (c[0]) begin
        c  = 3 * c + 1;
        p3 = 3 * p3;
      end else begin
        c  = c >> 1;
        p2 = 2 * p2;
        i++;
      end
      if (p3 < p2) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Number of 17-bit digits in use in n >> d (at least one).
  function automatic int unsigned digits_in_use(input big_t n, input int unsigned d);
    big_t h;
    int unsigned k;
    h = n >> d;
    k = 1;
    for (int unsigned i = 0; i < 7; i++)
      if (((h >> (17 * i)) & big_t'(17'h1ffff)) != 0) k = i + 1;
    return k;
  endfunction

  // Result of verifying one range the way a coprocessor does it.
  typedef struct {
    big_t   ovf_list [$];  // start values whose trajectory overflowed
    int     ops;           // table operations
    int     multi_ops;     // operations on more than one digit
    int     repeats;       // operations whose result was still >= m
    longint cycles;        // clocks from start to done (2 + sum of k+4)
  } range_ref_t;

  // Verify the range {mb, m_H, S[i]} with the plain Collatz map grouped in
  // runs of ten halvings; nw is the width of the interim register.
  function automatic void range_reference(input big_t mb, input int mhw,
                                          input int nw, ref logic [14:0] mand [$],
                                          ref range_ref_t r);
    big_t m, n;
    int   k;
    r.ovf_list.delete();
    r.ops = 0; r.multi_ops = 0; r.repeats = 0;
    r.cycles = 2;
    for (int mh = 0; mh < (1 << mhw); mh++)
      foreach (mand[i]) begin
        m = (mb << (mhw + 15)) | (big_t'(mh) << 15) | big_t'(mand[i]);
        n = m;
        forever begin
          k = digits_in_use(n, 10);
          r.cycles += k + 4;
          r.ops++;
          if (k > 1) r.multi_ops++;
          n = collatz_halvings(n, 10);
          if (n >= (big_t'(1) << nw)) begin
            r.ovf_list.push_back(m);
            break;
          end
          if (n < m) break;
          r.repeats++;
        end
      end
  endfunction

endpackage
