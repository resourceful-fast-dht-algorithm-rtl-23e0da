// dht_pkg: constants and elaboration-time helpers shared by the split-radix
// DHT datapath.
//
// The DHT kernel is cas(2*pi*n*k/N) = cos + sin. Every twiddle the split-radix
// decomposition needs is +/- cos(2*pi*j/N) for some j in 0..N/4, so a level of
// length N only ever multiplies by the N/4-1 magnitudes C_j = cos(2*pi*j/N),
// j = 1..N/4-1. The functions here reduce any angle index m (angle 2*pi*m/N)
// to such a magnitude index and a sign, quantise C_j to CW fractional bits,
// and give the pipeline latency of a length-N core in frames. Nothing here
// is hardware; it is all evaluated while the design elaborates.
package dht_pkg;

  localparam real PI = 3.14159265358979323846;

  // round(cos(2*pi*j/n) * 2^cw)
  function automatic int qcos(int n, int j, int cw);
    return int'($cos(2.0 * PI * real'(j) / real'(n)) * (2.0 ** cw));
  endfunction

  // magnitude index j of cos(2*pi*m/n), so that |cos| = C_j
  function automatic int cos_j(int n, int m);
    int q, r;
    q = n / 4;
    r = m % n;
    if (r < 0) r += n;
    if (r <= q)          return r;
    else if (r <= 2 * q) return 2 * q - r;
    else if (r <= 3 * q) return r - 2 * q;
    else                 return n - r;
  endfunction

  // sign of cos(2*pi*m/n): 1 when negative
  function automatic bit cos_neg(int n, int m);
    int q, r;
    q = n / 4;
    r = m % n;
    if (r < 0) r += n;
    return (r > q) && (r < 3 * q);
  endfunction

  // sin(2*pi*m/n) = cos(2*pi*(n/4 - m)/n)
  function automatic int  sin_j  (int n, int m); return cos_j  (n, n / 4 - m); endfunction
  function automatic bit  sin_neg(int n, int m); return cos_neg(n, n / 4 - m); endfunction

  // Twiddle product slots of one level of length n (M = n/4, K = M-1):
  // slot s -> branch br = s/(2K) (0: X(4k+1), 1: X(4k+3)), index
  // i = 1 + (s mod 2K)/2, term t = s mod 2 (0: cosine term, 1: sine term).
  function automatic int slot_br(int n, int s); return s / (2 * (n / 4 - 1)); endfunction
  function automatic int slot_i (int n, int s); return 1 + (s % (2 * (n / 4 - 1))) / 2; endfunction
  function automatic int slot_t (int s);        return s % 2; endfunction

  // angle index of slot s: i for the X(4k+1) branch, 3i for X(4k+3)
  function automatic int slot_m(int n, int s);
    return (slot_br(n, s) == 0) ? slot_i(n, s) : 3 * slot_i(n, s);
  endfunction

  function automatic int slot_j(int n, int s);
    return (slot_t(s) == 0) ? cos_j(n, slot_m(n, s)) : sin_j(n, slot_m(n, s));
  endfunction

  function automatic bit slot_neg(int n, int s);
    return (slot_t(s) == 0) ? cos_neg(n, slot_m(n, s)) : sin_neg(n, slot_m(n, s));
  endfunction

  // number of slots that multiply by C_j
  function automatic int uses_of(int n, int j);
    int c;
    c = 0;
    for (int s = 0; s < 4 * (n / 4 - 1); s++)
      if (slot_j(n, s) == j) c++;
    return c;
  endfunction

  // the q-th slot (in slot order) that multiplies by C_j
  function automatic int slot_of(int n, int j, int q);
    int c;
    c = 0;
    for (int s = 0; s < 4 * (n / 4 - 1); s++)
      if (slot_j(n, s) == j) begin
        if (c == q) return s;
        c++;
      end
    return 0;
  endfunction

  // latency in frames of the length-n core (n a power of two)
  function automatic int lat_of(int n);
    int l [0:31];
    int k, lg, odd;
    lg = $clog2(n);
    l[0] = 0;
    l[1] = 1;
    for (k = 2; k <= lg; k++) begin
      odd  = 1 + ((k > 2) ? 1 : 0) + l[k - 2];
      l[k] = 1 + ((l[k - 1] > odd) ? l[k - 1] : odd);
    end
    return l[lg];
  endfunction

  // width of the phase counter for a sharing factor
  function automatic int phase_w(int share);
    return (share > 1) ? $clog2(share) : 1;
  endfunction

endpackage
