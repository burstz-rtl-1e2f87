// szfp_pkg: constants, types and small pure functions shared by the sZFP
// compressor and decompressor.
//
// sZFP compresses 1-D blocks of four doubles. A block is converted to block
// floating point (common exponent emax, 62-bit fixed-point fraction), run
// through the ZFP lifting transform, mapped to negabinary and then coded with
// a coarse header scheme:
//   bit 0            raw flag (1: the four doubles follow unmodified, 256 bits)
//   bits 1..11       emax, the largest biased exponent of the block
//   region 1         the top P6 bit planes of element 0, sent as one field
//   regions 2 and 3  for each group of six bit planes of elements 1..3, a
//                    2-bit header h and then the 6-bit slices of the first h
//                    of elements 1, 2, 3 (h = index of the last non-zero slice)
// P6 is the number of coded bit planes, the ZFP fixed-accuracy precision
// emax-minexp+4 rounded up to a multiple of six. Region 2 holds groups 0..3
// (planes 0..23), region 3 groups 4..7 (planes 24..47). A block needing more
// than 48 planes is sent raw. Bits are serialised LSB first: stream bit i of a
// chunk is bit i%256 of word i/256.
//
// The division into a blue element and green/red groups of six planes with a
// 2-bit header, the 48-plane limit, the raw fallback and the 6 KB aligned chunk
// follow the source design. The meaning of the header value, the bit order,
// the negabinary mapping (taken from ZFP), the field layout and the
// 12-bit end-of-chunk marker (raw=0, emax=7FF) are this design's choices.
package szfp_pkg;

  localparam int WORD_W        = 256;            // datapath width, 32 bytes
  localparam int CHUNK_BYTES   = 6144;           // 6 KB aligned chunk
  localparam int CHUNK_WORDS   = CHUNK_BYTES * 8 / WORD_W;  // 192
  localparam int CHUNK_BITS    = CHUNK_BYTES * 8;            // 49152
  localparam int GROUP_PLANES  = 6;
  localparam int MAX_PLANES    = 48;
  localparam int N_GROUPS      = MAX_PLANES / GROUP_PLANES;  // 8
  localparam int BLK_MAX_BITS  = 257;            // raw block
  localparam int MARKER_BITS   = 12;
  localparam logic [11:0] MARKER = {11'h7FF, 1'b0};
  localparam logic [63:0] NB_MASK = 64'hAAAA_AAAA_AAAA_AAAA;

  typedef logic [63:0] u64_t;

  // Block after fixed-point conversion / before float conversion.
  typedef struct packed {
    logic        raw;      // coefficients hold the original doubles
    logic [10:0] emax;     // largest biased exponent
    u64_t [3:0]  c;        // c[0] is element 0
  } szfp_blk_t;

  // Block on the compression side: fixed-point (later negabinary)
  // coefficients plus the original doubles, kept for the raw fallback.
  typedef struct packed {
    logic [10:0] emax;
    u64_t [3:0]  c;
    u64_t [3:0]  d;
  } szfp_fix_t;

  // Number of coded bit planes (multiple of 6), or 63 to request a raw block.
  function automatic logic [5:0] planes6(input logic [10:0] emax,
                                         input logic signed [11:0] minexp);
    logic signed [13:0] p;
    logic [5:0] q;
    p = $signed({3'b000, emax}) - 14'sd1022 - 14'(minexp) + 14'sd4;
    if (emax == 11'd0 || p <= 0) return 6'd0;
    if (p > 14'sd48) return 6'd63;
    q = 6'(p);
    return 6'(((q + 6'd5) / 6'd6) * 6'd6);
  endfunction

  function automatic u64_t int2nb(input u64_t x);
    return (x + NB_MASK) ^ NB_MASK;
  endfunction

  function automatic u64_t nb2int(input u64_t x);
    return (x ^ NB_MASK) - NB_MASK;
  endfunction

  // 2-bit group header: index of the last non-zero 6-bit slice.
  function automatic logic [1:0] grp_hdr(input logic [5:0] s1, input logic [5:0] s2,
                                         input logic [5:0] s3);
    if (s3 != 0) return 2'd3;
    if (s2 != 0) return 2'd2;
    if (s1 != 0) return 2'd1;
    return 2'd0;
  endfunction

endpackage
