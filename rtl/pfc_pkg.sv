// pfc_pkg: types, sizes and hash helpers shared by the packet forwarding cache
// switch.
//
// A packet carries a 24-bit destination address (2^24 = 16M nodes, as in the
// evaluated design). The switchable hash turns that address into a cache key:
// {hash mode, link-aggregation member, 24-bit payload}. In the k-ary n-cube
// and fat-tree modes the payload is a small output-link tag, so every
// destination that leaves through the same link shares one cache entry; in the
// arbitrary-topology mode the payload is the address itself. The same key is
// the key of the external CAM routing table, so cache and CAM stay consistent.
//
// The cache has 2,048 entries, four-way set-associative (512 sets), as chosen
// in the design. The CRC polynomials, the key layout, the set-index mapping,
// the flit format, the VC count and the buffer depth are this design's own
// choices; the text does not give them.
package pfc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ADDR_W        = 24;   // destination address bits
  localparam int unsigned PORT_W        = 6;    // output port id (up to 64 ports)
  localparam int unsigned LAG_W         = 4;    // up to a 16-link bundle
  localparam int unsigned CACHE_ENTRIES = 2048;
  localparam int unsigned CACHE_WAYS    = 4;
  localparam int unsigned CACHE_SETS    = CACHE_ENTRIES / CACHE_WAYS;   // 512
  localparam int unsigned IDX_W         = $clog2(CACHE_SETS);           // 9
  localparam int unsigned WAY_W         = $clog2(CACHE_WAYS);           // 2
  localparam int unsigned NUM_VC        = 2;    // virtual channels per port
  localparam int unsigned VC_W          = 1;
  localparam int unsigned BUF_DEPTH     = 4;    // flits per VC buffer
  localparam int unsigned DATA_W        = 64;   // flit payload bits

  // ---------------------------------------------------------------- hash modes
  typedef enum logic [1:0] {
    HASH_ARB   = 2'd0,  // arbitrary topology: CRC of the address
    HASH_KARY  = 2'd1,  // k-ary n-cube (mesh or torus), dimension-order routing
    HASH_FTREE = 2'd2   // fat tree / Dragonfly, up*/down* routing
  } hash_mode_e;

  // Supported k-ary n-cube shapes (all use the whole 24-bit address).
  typedef enum logic [2:0] {
    KC_256X3 = 3'd0,    // 256-ary 3-cube, 8-bit digits
    KC_64X4  = 3'd1,    // 64-ary 4-cube,  6-bit digits
    KC_16X6  = 3'd2,    // 16-ary 6-cube,  4-bit digits
    KC_8X8   = 3'd3,    // 8-ary 8-cube,   3-bit digits
    KC_4X12  = 3'd4     // 4-ary 12-cube,  2-bit digits
  } kary_shape_e;

  // Direction codes of a k-ary n-cube tag X_{i,dir}.
  typedef enum logic [1:0] {
    DIR_A     = 2'd0,   // positive offset beyond half the ring
    DIR_PLUS  = 2'd1,
    DIR_B     = 2'd2,   // negative offset beyond half the ring
    DIR_MINUS = 2'd3
  } kary_dir_e;

  localparam logic [5:0] KARY_LOCAL = 6'h3C;  // tag of the local compute node

  // Switch configuration written before a job starts.
  typedef struct packed {
    hash_mode_e          mode;
    kary_shape_e         kary_shape;
    logic [8:0]          kary_k;     // radix actually used (<= 2^digit bits)
    logic [ADDR_W-1:0]   kary_cur;   // this switch's coordinates, packed digits
    logic [3:0]          ft_bits;    // fat tree: log2(k), 1..8
    logic [4:0]          ft_n;       // fat tree: n
    logic [4:0]          ft_dim;     // fat tree: layer of this switch
    logic [ADDR_W-1:0]   ft_cur;     // fat tree: (c_{n-1}..c_0), packed digits
    logic [2:0]          lag_bits;   // bundle of 2^lag_bits links, 0..4
  } hash_cfg_t;

  // 2 + LAG_W + ADDR_W = 30 bits
  typedef struct packed {
    hash_mode_e          mode;
    logic [LAG_W-1:0]    lag;
    logic [ADDR_W-1:0]   payload;
  } cache_key_t;

  // ---------------------------------------------------------------- flits
  typedef enum logic [1:0] {
    FLIT_HEAD     = 2'd0,
    FLIT_BODY     = 2'd1,
    FLIT_TAIL     = 2'd2,
    FLIT_HEADTAIL = 2'd3    // single-flit packet
  } flit_kind_e;

  typedef struct packed {
    flit_kind_e          kind;
    logic [VC_W-1:0]     vc;
    logic [DATA_W-1:0]   data;     // head flit: data[ADDR_W-1:0] = destination
  } flit_t;

  function automatic logic is_head(flit_kind_e k);
    return (k == FLIT_HEAD) || (k == FLIT_HEADTAIL);
  endfunction

  function automatic logic is_tail(flit_kind_e k);
    return (k == FLIT_TAIL) || (k == FLIT_HEADTAIL);
  endfunction

  // ---------------------------------------------------------------- CRCs
  // CRC-16-CCITT (x^16+x^12+x^5+1, init 0xFFFF), address fed MSB first.
  function automatic logic [15:0] crc16_addr(logic [ADDR_W-1:0] a);
    logic [15:0] c;
    logic        fb;
    c = 16'hFFFF;
    for (int i = ADDR_W - 1; i >= 0; i--) begin
      fb = c[15] ^ a[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // CRC-4-ITU (x^4+x+1, init 0), address fed MSB first.
  function automatic logic [3:0] crc4_addr(logic [ADDR_W-1:0] a);
    logic [3:0] c;
    logic       fb;
    c = 4'h0;
    for (int i = ADDR_W - 1; i >= 0; i--) begin
      fb = c[3] ^ a[i];
      c  = {c[2:0], 1'b0};
      if (fb) c = c ^ 4'h3;
    end
    return c;
  endfunction

  // ---------------------------------------------------------------- set index
  // The set a key lives in. Topology tags are laid out so that the tags of one
  // switch never put more than four entries in a set (no conflict misses);
  // arbitrary addresses are spread by the CRC.
  function automatic logic [IDX_W-1:0] key_index(cache_key_t k);
    logic [IDX_W-1:0] idx;
    unique case (k.mode)
      HASH_KARY:  idx = {k.lag[2:0], k.payload[5:0]};
      HASH_FTREE: idx = {k.lag, k.payload[8], k.payload[3:0]}
                        ^ {k.payload[7:4], 5'b0};
      default:    idx = crc16_addr(k.payload)[IDX_W-1:0] ^ {5'b0, k.lag};
    endcase
    return idx;
  endfunction

endpackage
