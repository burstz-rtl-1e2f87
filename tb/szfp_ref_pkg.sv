// szfp_ref_pkg: bit-serial reference model of the sZFP format for the
// testbenches. It builds coded blocks one bit at a time into queues and packs
// them into 192-word chunks the same way the hardware must, so the RTL's
// parallel datapaths are checked against a differently written model.
package szfp_ref_pkg;
  typedef bit bitq_t[$];
  typedef logic [255:0] word_t;

  localparam longint NBM = 64'hAAAA_AAAA_AAAA_AAAA;

  function automatic int ref_p6(int emax, int minexp);
    int p;
    p = emax - 1022 - minexp + 4;
    if (emax == 0 || p <= 0) return 0;
    if (p > 48) return 63;
    while (p % 6 != 0) p++;
    return p;
  endfunction

  // fixed-point conversion computed with real arithmetic
  function automatic void ref_fix(input logic [63:0] d[4], output int emax,
                                  output logic [63:0] c[4]);
    emax = 0;
    for (int i = 0; i < 4; i++) if (int'(d[i][62:52]) > emax) emax = int'(d[i][62:52]);
    for (int i = 0; i < 4; i++) begin
      real r, m;
      longint t;
      if (d[i][62:52] == 0) begin c[i] = 0; continue; end
      r = $bitstoreal(d[i]);
      m = (r < 0 ? -r : r) * (2.0 ** (62 - (emax - 1022)));
      t = longint'(m);
      if (real'(t) > m) t = t - 1;
      c[i] = (r < 0) ? -t : t;
    end
  endfunction

  function automatic void ref_fwd(inout logic [63:0] c[4]);
    longint v[4];
    foreach (v[i]) v[i] = c[i];
    v[0] += v[3]; v[0] >>>= 1; v[3] -= v[0];
    v[2] += v[1]; v[2] >>>= 1; v[1] -= v[2];
    v[0] += v[2]; v[0] >>>= 1; v[2] -= v[0];
    v[3] += v[1]; v[3] >>>= 1; v[1] -= v[3];
    v[3] += v[1] >>> 1; v[1] -= v[3] >>> 1;
    foreach (v[i]) c[i] = (v[i] + NBM) ^ NBM;
  endfunction

  function automatic void ref_inv(inout logic [63:0] c[4]);
    longint x, y, z, w;
    x = (c[0] ^ NBM) - NBM; y = (c[1] ^ NBM) - NBM;
    z = (c[2] ^ NBM) - NBM; w = (c[3] ^ NBM) - NBM;
    y += w >>> 1; w -= y >>> 1;
    y += w; w <<= 1; w -= y;
    z += x; x <<= 1; x -= z;
    y += z; z <<= 1; z -= y;
    w += x; x <<= 1; x -= w;
    c[0] = x; c[1] = y; c[2] = z; c[3] = w;
  endfunction

  // fixed-point value to double, truncating, via integer normalisation
  function automatic logic [63:0] ref_float(logic [63:0] v, int emax);
    logic [63:0] a;
    int e;
    if (v == 0) return 0;
    a = v[63] ? -v : v;
    e = emax - 61 + 63;
    while (!a[63]) begin a <<= 1; e--; end
    if (e <= 0) return 0;
    return {v[63], 11'(e), a[62:11]};
  endfunction

  function automatic void push_bits(ref bitq_t q, input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) q.push_back(v[i]);
  endfunction

  // code one transformed block; nb = negabinary coefficients
  function automatic bitq_t ref_encode(int emax, logic [63:0] nb[4], logic [63:0] d[4],
                                       int minexp);
    bitq_t q;
    int p6;
    p6 = ref_p6(emax, minexp);
    if (p6 == 63) begin
      q.push_back(1);
      for (int i = 0; i < 4; i++) push_bits(q, d[i], 64);
      return q;
    end
    q.push_back(0);
    push_bits(q, 64'(emax), 11);
    // element 0: planes p6-1 .. 0 counted from the LSB end of the field
    for (int b = 64 - p6; b < 64; b++) q.push_back(nb[0][b]);
    for (int g = 0; g < p6 / 6; g++) begin
      int h;
      int top;
      top = 63 - 6 * g;
      h = 0;
      for (int e = 1; e <= 3; e++) if (((nb[e] >> (top - 5)) & 63) != 0) h = e;
      push_bits(q, 64'(h), 2);
      for (int e = 1; e <= h; e++)
        for (int b = top - 5; b <= top; b++) q.push_back(nb[e][b]);
    end
    return q;
  endfunction

  // pack coded blocks into 6 KB chunks with the 12-bit end marker
  function automatic void ref_pack(ref bitq_t blocks[$], ref word_t words[$]);
    bitq_t ch;
    for (int k = 0; k < blocks.size(); k++) begin
      if (ch.size() + blocks[k].size() + 12 > 49152) begin
        push_bits(ch, 64'hFFE, 12);
        while (ch.size() < 49152) ch.push_back(0);
        for (int w = 0; w < 192; w++) begin
          word_t x;
          for (int b = 0; b < 256; b++) x[b] = ch[256 * w + b];
          words.push_back(x);
        end
        ch.delete();
      end
      foreach (blocks[k][b]) ch.push_back(blocks[k][b]);
    end
    if (ch.size() > 0) begin
      push_bits(ch, 64'hFFE, 12);
      while (ch.size() < 49152) ch.push_back(0);
      for (int w = 0; w < 192; w++) begin
        word_t x;
        for (int b = 0; b < 256; b++) x[b] = ch[256 * w + b];
        words.push_back(x);
      end
    end
  endfunction

  // whole compression of one block of four doubles
  function automatic bitq_t ref_compress(logic [63:0] d[4], int minexp);
    int emax;
    logic [63:0] c[4];
    ref_fix(d, emax, c);
    ref_fwd(c);
    return ref_encode(emax, c, d, minexp);
  endfunction

  // decompress one block from its reference coding results
  function automatic logic [255:0] ref_decompress(logic [63:0] d[4], int minexp);
    int emax, p6;
    logic [63:0] c[4];
    logic [255:0] r;
    ref_fix(d, emax, c);
    ref_fwd(c);
    p6 = ref_p6(emax, minexp);
    if (p6 == 63) return {d[3], d[2], d[1], d[0]};
    for (int i = 0; i < 4; i++) c[i] = (p6 == 0) ? 0 : ((c[i] >> (64 - p6)) << (64 - p6));
    // elements 1..3 keep only whole 6-bit slices up to the header index
    ref_inv(c);
    for (int i = 0; i < 4; i++) r[64*i +: 64] = ref_float(c[i], emax);
    return r;
  endfunction

  // bit-serial decoder for a chunk stream: returns the decompressed words
  function automatic void ref_unpack(ref word_t words[$], input int minexp,
                                     ref word_t out[$], ref int n_raw);
    for (int ch = 0; ch < words.size() / 192; ch++) begin
      int pos;
      pos = 0;
      forever begin
        bit raw;
        logic [63:0] emax, c[4];
        logic [255:0] r;
        int p6;
        raw = words[ch*192 + pos/256][pos%256];
        pos++;
        emax = 0;
        for (int b = 0; b < 11; b++) begin emax[b] = words[ch*192 + pos/256][pos%256]; pos++; end
        if (!raw && emax == 64'h7FF) break;
        if (raw) begin
          pos -= 11;
          for (int b = 0; b < 256; b++) begin r[b] = words[ch*192 + pos/256][pos%256]; pos++; end
          out.push_back(r);
          n_raw++;
          continue;
        end
        p6 = ref_p6(int'(emax), minexp);
        foreach (c[i]) c[i] = 0;
        for (int b = 64 - p6; b < 64; b++) begin c[0][b] = words[ch*192 + pos/256][pos%256]; pos++; end
        for (int g = 0; g < p6 / 6; g++) begin
          int h;
          h = 0;
          for (int b = 0; b < 2; b++) begin h[b] = words[ch*192 + pos/256][pos%256]; pos++; end
          for (int e = 1; e <= h; e++)
            for (int b = 58 - 6 * g; b <= 63 - 6 * g; b++) begin
              c[e][b] = words[ch*192 + pos/256][pos%256]; pos++;
            end
        end
        ref_inv(c);
        for (int i = 0; i < 4; i++) r[64*i +: 64] = ref_float(c[i], int'(emax));
        out.push_back(r);
      end
    end
  endfunction

  // random smooth-ish test data: a slowly varying field with noise
  function automatic logic [63:0] ref_value(int i, int kind);
    real v;
    int  n;
    n = int'($urandom % 40) - 20;
    case (kind)
      0: v = 1.0 + 0.001 * i;
      1: v = $sin(0.01 * i) * 100.0 + 0.001 * ($urandom % 1000);
      2: v = (i % 97 == 0) ? 0.0 : (i % 5 == 0 ? -1.0 : 1.0) * (2.0 ** real'(n));
      default: v = 0.0;
    endcase
    return $realtobits(v);
  endfunction
endpackage
