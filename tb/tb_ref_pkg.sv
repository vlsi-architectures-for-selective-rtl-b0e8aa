// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: polar encoding from the generator-matrix rule
// G[i][j] = 1 iff (i & j) == j, a level-by-level Bhattacharyya construction,
// a byte-wise CRC-16-CCITT, the scrambler as a recurrence
// c[n] = c[n-3] ^ c[n-4], and an integer successive-cancellation decoder.
package tb_ref_pkg;

  typedef bit bv256 [256];

  // x = u * G, G[i][j] = 1 iff j's bits are a subset of i's bits
  function automatic void polar_encode(input int n, input bit u [], output bit x []);
    x = new[n];
    for (int j = 0; j < n; j++) begin
      bit acc = 0;
      for (int i = 0; i < n; i++) if ((i & j) == j) acc ^= u[i];
      x[j] = acc;
    end
  endfunction

  // frozen[i]=1 for the n-k least reliable indices (BEC, eps 0.5)
  function automatic void frozen_set(input int n, input int k, output bit fz []);
    real z [], zn [];
    int  len;
    z = new[1]; z[0] = 0.5; len = 1;
    while (len < n) begin
      zn = new[2*len];
      // index i = (prefix << 1) | b : upper branch for b = 0, lower for b = 1
      for (int p = 0; p < len; p++) begin
        zn[2*p]   = 2.0*z[p] - z[p]*z[p];
        zn[2*p+1] = z[p]*z[p];
      end
      z = zn; len = 2*len;
    end
    fz = new[n];
    for (int i = 0; i < n; i++) begin
      int better = 0;
      for (int j = 0; j < n; j++)
        if (z[j] < z[i] || (z[j] == z[i] && j > i)) better++;
      fz[i] = (better >= k);
    end
  endfunction

  function automatic logic [15:0] crc16_bytes(input byte unsigned msg [], input int len);
    logic [15:0] c = 16'hFFFF;
    for (int b = 0; b < len; b++) begin
      c ^= {msg[b], 8'h00};
      for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [15:0] frame_crc(input logic [7:0] t, input logic [127:0] id);
    byte unsigned m [];
    m = new[17];
    m[0] = t;
    for (int i = 0; i < 16; i++) m[i+1] = id[127-8*i -: 8];
    return crc16_bytes(m, 17);
  endfunction

  // cipher bits of one frame: c[n] = c[n-3] ^ c[n-4]; the first four are set by
  // the seed 0001 of the RTL register s[3:0] (c[0]=s3^s2, state shifts left)
  function automatic void cipher(input int len, output bit c []);
    bit a [];
    a = new[len + 4];
    // a[0..3] = s[3], s[2], s[1], s[0] of the seed; cipher bit n = a[n] ^ a[n+1]
    a[0] = 0; a[1] = 0; a[2] = 0; a[3] = 1;
    for (int n = 4; n < len + 4; n++) a[n] = a[n-4] ^ a[n-3];
    c = new[len];
    for (int n = 0; n < len; n++) c[n] = a[n] ^ a[n+1];
  endfunction

  // integer SC decoder (min-sum), natural order, returns decoded u
  function automatic void sc_node(input int llr [], input bit fz [], input int base,
                                  inout bit u [], output bit x []);
    int n = llr.size();
    if (n == 1) begin
      bit d = fz[base] ? 1'b0 : (llr[0] < 0);
      u[base] = d;
      x = new[1]; x[0] = d;
    end else begin
      int la [], lb [];
      bit xa [], xb [];
      la = new[n/2]; lb = new[n/2];
      for (int i = 0; i < n/2; i++) begin
        int a = llr[i], b = llr[i+n/2];
        int ma = a < 0 ? -a : a, mb = b < 0 ? -b : b;
        int m = ma < mb ? ma : mb;
        la[i] = ((a < 0) ^ (b < 0)) ? -m : m;
      end
      sc_node(la, fz, base, u, xa);
      for (int i = 0; i < n/2; i++) lb[i] = llr[i+n/2] + (xa[i] ? -llr[i] : llr[i]);
      sc_node(lb, fz, base + n/2, u, xb);
      x = new[n];
      for (int i = 0; i < n/2; i++) begin x[i] = xa[i] ^ xb[i]; x[i+n/2] = xb[i]; end
    end
  endfunction

  function automatic void sc_decode(input int llr [], input bit fz [], output bit u []);
    bit x [];
    u = new[llr.size()];
    sc_node(llr, fz, 0, u, x);
  endfunction

endpackage
