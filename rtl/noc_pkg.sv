// noc_pkg: types, constants and layer-mapping functions shared by the
// reconfigurable 3D photonic network-on-chip.
//
// The network joins 64 tiles (four cores each) arranged in four groups of 16.
// Every ordered pair of groups (source group s, destination group g) has its
// own 16x16 nanophotonic crossbar, so there are 16 crossbars in all, placed
// four to an optical layer. Each crossbar holds 16 MWSR home channels, one per
// destination tile. A flit is 128 bits and a packet is four flits; the first
// flit of a packet carries the header in its low 16 bits.
//
// Layer placement: layer L holds the crossbars s -> s ^ LAYER_KEY[L], with
// LAYER_KEY = {0, 2, 3, 1} for layers 0..3. Layer 0 therefore carries the
// intra-group crossbars, layer 1 carries 1 -> 3, layer 2 carries 0 -> 3, as
// in the reconfiguration example (group 0 borrowing group 1's channel to
// tile 63). Reconfiguration MRRs only join layers 0/1 and 2/3.
package noc_pkg;

  localparam int N_GRP     = 4;    // tile groups
  localparam int TPG       = 16;   // tiles per group
  localparam int N_TILES   = N_GRP * TPG;
  localparam int CPT       = 4;    // cores per tile (concentration)
  localparam int FLIT_W    = 128;  // bits per flit
  localparam int PKT_FLITS = 4;    // flits per packet (one 64-byte line)
  localparam int BUF_DEPTH = 16;   // flits per input buffer

  localparam int GRP_W  = $clog2(N_GRP);
  localparam int TIDX_W = $clog2(TPG);
  localparam int TILE_W = GRP_W + TIDX_W;
  localparam int CORE_W = $clog2(CPT);

  // Utilisation values are unsigned fixed point: UTIL_ONE means 1.0.
  localparam int UTIL_FRAC = 8;
  localparam int UTIL_W    = UTIL_FRAC + 1;
  localparam int UTIL_ONE  = 1 << UTIL_FRAC;

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [TILE_W-1:0] tile_t;
  typedef logic [GRP_W-1:0]  grp_t;
  typedef logic [UTIL_W-1:0] util_t;

  // Header, held in flit[15:0] of the first flit of each packet.
  typedef struct packed {
    tile_t              src_tile;
    logic [CORE_W-1:0]  src_core;
    tile_t              dst_tile;
    logic [CORE_W-1:0]  dst_core;
  } hdr_t;

  // Link classes of the reconfiguration algorithm (Step 4). The value is the
  // index of the threshold beta_n that gives the share of the channel that
  // may be offered: beta4 = 90 %, beta3 = 50 %, beta2 = 25 %, beta1 = 0 %.
  typedef enum logic [1:0] {
    CLS_OVER   = 2'd0,  // beta1
    CLS_NORMAL = 2'd1,  // beta2
    CLS_UNDER  = 2'd2,  // beta3
    CLS_NOT    = 2'd3   // beta4
  } util_cls_e;

  // Messages between reconfiguration controllers.
  typedef enum logic [1:0] {
    MSG_ACCEPT  = 2'd0,  // borrower -> owner RC: will use the offered channel
    MSG_CONFIRM = 2'd1,  // owner RC -> borrower: MRRs switched, channel usable
    MSG_NACK    = 2'd2,  // owner RC -> borrower: offer no longer valid
    MSG_REVOKE  = 2'd3   // owner RC -> borrower: channel taken back
  } rc_msg_e;

  typedef struct packed {
    logic     valid;
    rc_msg_e  kind;
    grp_t     src_rc;   // sending controller
    grp_t     dst_rc;   // receiving controller
    grp_t     lender;   // nominal source group of the lent channel
    grp_t     borrower; // group that borrows it
    tile_t    tile;     // destination tile of the lent channel
  } rc_msg_t;

  function automatic grp_t tile_grp(tile_t t);
    return t[TILE_W-1 -: GRP_W];
  endfunction

  function automatic logic [TIDX_W-1:0] tile_idx(tile_t t);
    return t[TIDX_W-1:0];
  endfunction

  function automatic tile_t mk_tile(grp_t g, logic [TIDX_W-1:0] i);
    return {g, i};
  endfunction

  function automatic grp_t layer_key(logic [1:0] layer);
    case (layer)
      2'd0:    return grp_t'(0);
      2'd1:    return grp_t'(2);
      2'd2:    return grp_t'(3);
      default: return grp_t'(1);
    endcase
  endfunction

  // Optical layer that holds crossbar s -> g.
  function automatic logic [1:0] xbar_layer(grp_t s, grp_t g);
    for (int l = 0; l < 4; l++)
      if ((s ^ layer_key(2'(l))) == g) return 2'(l);
    return 2'd0;
  endfunction

  // Source waveguide that borrower group b drives when it borrows the home
  // channel of tile d in lender group l's crossbar: b's own waveguide that
  // runs above it on the paired layer, at the same channel position.
  function automatic tile_t src_wg_tile(grp_t l, grp_t b, tile_t d);
    logic [1:0] lp;
    lp = xbar_layer(l, tile_grp(d)) ^ 2'd1;
    return mk_tile(b ^ layer_key(lp), tile_idx(d));
  endfunction

  // Index of channel (nominal source group s, destination tile d) inside the
  // 64-entry table of the destination group's controller.
  function automatic logic [5:0] rc_ch_index(grp_t s, tile_t d);
    return {tile_idx(d), s};
  endfunction

  // Waveguide flight time in cycles from the physical distance between the
  // source and destination groups (1 cycle within a group, up to 5 across).
  function automatic int unsigned flight_cycles(grp_t s, grp_t g);
    int unsigned gdist;
    gdist = (s > g) ? int'(s) - int'(g) : int'(g) - int'(s);
    return (gdist == 0) ? 1 : gdist + 2;
  endfunction

endpackage
