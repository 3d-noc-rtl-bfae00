// r3d_noc: reconfigurable 3D nanophotonic network-on-chip for 256 cores.
//
// 64 tiles of four cores are split into four groups of 16. The single large
// optical crossbar is decomposed into 16 crossbars of 16x16, one per ordered
// pair of groups, spread four to a layer over four optical layers (see
// noc_pkg for the placement). Every destination tile therefore owns four
// Multiple-Write-Single-Read home channels, one from each group, each a
// 64-wavelength bundle carrying one 128-bit flit per cycle. Writers of a
// channel arbitrate with a circulating token.
//
// Each receiver has a utilisation counter. Every R_W = 2**RW_LOG2 cycles the
// window timer pulses win_end; each group's reconfiguration controller reads
// and classifies its 64 counters, publishes idle and over-utilised channels,
// and may lend an idle channel to another group that is short of bandwidth
// to the same tile, by switching micro-rings between paired layers (0/1,
// 2/3). The borrowing group then drives its own waveguide on the paired
// layer (the "source waveguide", which is blocked for normal use) into the
// lent channel; its tiles alternate between their static and the borrowed
// channel. Each tile has one transmit lane per destination group, so
// its four cores can hold up to four optical requests at once. A lending group takes the channel back as soon as one of its
// tiles wants it (reclaim), as does the borrower if a tile of its own needs
// the blocked source waveguide.
//
// Interface: per tile and core, inj_* accept packets of PKT_FLITS flits
// (header in the low bits of the first flit, see noc_pkg::hdr_t) and ej_*
// deliver them. lend_active shows, per destination group, which channels are
// lent (index {tile index, source group}). Ports are plain arrays.
//
// Timing: a packet whose last flit enters in cycle t can win a token from
// t+2 on; the token is captured within 1..3 cycles when the channel is free;
// flits then take 1 cycle E/O, 1-5 cycles of flight and 1 cycle O/E to the
// receiving buffer, and are ejected one per cycle.
module r3d_noc
  import noc_pkg::*;
#(
  parameter int RW_LOG2 = 10,   // reconfiguration window R_W = 1024 cycles
  parameter int HOPS    = 6     // writers the token passes per cycle
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic  [N_TILES-1:0][CPT-1:0] inj_valid,
  input  flit_t [N_TILES-1:0][CPT-1:0] inj_flit,
  output logic  [N_TILES-1:0][CPT-1:0] inj_ready,
  output logic  [N_TILES-1:0][CPT-1:0] ej_valid,
  output flit_t [N_TILES-1:0][CPT-1:0] ej_flit,
  input  logic  [N_TILES-1:0][CPT-1:0] ej_ready,
  output logic  [N_GRP-1:0][63:0]      lend_active
);
  // ---------------- reconfiguration window timer ----------------
  logic [RW_LOG2-1:0] win_cnt;
  logic               win_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_cnt <= '0;
    else        win_cnt <= win_cnt + 1'b1;
  end
  assign win_end = (win_cnt == '1);

  // ---------------- tiles ----------------
  // transmit lanes: lane g of a tile sends to destination group g
  logic  [N_TILES-1:0][N_GRP-1:0] tx_req, tx_gnt;
  grp_t  [N_TILES-1:0][N_GRP-1:0] tx_xbar;
  tile_t [N_TILES-1:0][N_GRP-1:0] tx_dst;
  flit_t [N_TILES-1:0][N_GRP-1:0] tx_flit;
  // the same lanes regrouped per destination group, as the crossbars see them
  logic  [N_GRP-1:0][N_TILES-1:0] ln_req;
  grp_t  [N_GRP-1:0][N_TILES-1:0] ln_xbar;
  tile_t [N_GRP-1:0][N_TILES-1:0] ln_dst;
  flit_t [N_GRP-1:0][N_TILES-1:0] ln_flit;
  logic  [N_TILES-1:0][N_GRP-1:0] rx_valid, rx_pop;
  flit_t [N_TILES-1:0][N_GRP-1:0] rx_flit;
  util_t [N_TILES-1:0][N_GRP-1:0] link_util, buf_util;

  // per-group controller signals
  logic  [N_GRP-1:0][5:0]          gath_idx;
  util_t [N_GRP-1:0]               gath_link, gath_buf;
  logic  [N_GRP-1:0][63:0]         avail, over, lend_on, lend_claim, hold, ch_idle, blocked, reclaim;
  grp_t  [N_GRP-1:0][63:0]         lend_borr;
  logic  [N_GRP-1:0]               stat_done;
  logic  [N_GRP-1:0][N_TILES-1:0]  dyn_valid;
  grp_t  [N_GRP-1:0][N_TILES-1:0]  dyn_lender;
  rc_msg_t [N_GRP-1:0]             msg_o;
  logic  [N_GRP-1:0]               msg_req, msg_gnt;
  rc_msg_t                         bus;

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    tile_router #(.RW_LOG2(RW_LOG2)) u_rt (
      .clk, .rst_n, .my_tile(tile_t'(t)),
      .inj_valid(inj_valid[t]), .inj_flit(inj_flit[t]), .inj_ready(inj_ready[t]),
      .ej_valid(ej_valid[t]), .ej_flit(ej_flit[t]), .ej_ready(ej_ready[t]),
      .dyn_valid(dyn_valid[t / TPG]), .dyn_lender(dyn_lender[t / TPG]),
      .tx_req(tx_req[t]), .tx_xbar(tx_xbar[t]), .tx_dst(tx_dst[t]), .tx_flit(tx_flit[t]),
      .tx_gnt(tx_gnt[t]),
      .rx_valid(rx_valid[t]), .rx_flit(rx_flit[t]), .rx_pop(rx_pop[t]),
      .win_end, .link_util(link_util[t]), .buf_util(buf_util[t])
    );
  end

  // ---------------- 16 crossbars ----------------
  always_comb begin
    for (int g = 0; g < N_GRP; g++)
      for (int t = 0; t < N_TILES; t++) begin
        ln_req[g][t]  = tx_req[t][g];
        ln_xbar[g][t] = tx_xbar[t][g];
        ln_dst[g][t]  = tx_dst[t][g];
        ln_flit[g][t] = tx_flit[t][g];
      end
  end

  logic [N_GRP-1:0][N_GRP-1:0][N_TILES-1:0] xb_gnt;
  logic [N_GRP-1:0][N_GRP-1:0][TPG-1:0]     xb_idle, xb_starved, xb_rx_valid;
  flit_t [N_GRP-1:0][N_GRP-1:0][TPG-1:0]    xb_rx_flit;

  for (genvar s = 0; s < N_GRP; s++) begin : g_src
    for (genvar g = 0; g < N_GRP; g++) begin : g_dst
      logic [TPG-1:0] x_lend_on, x_hold, x_blocked, x_credit;
      grp_t [TPG-1:0] x_borr;
      always_comb begin
        for (int c = 0; c < TPG; c++) begin
          x_lend_on[c] = lend_on[g][rc_ch_index(grp_t'(s), mk_tile(grp_t'(g), TIDX_W'(c)))];
          x_borr[c]    = lend_borr[g][rc_ch_index(grp_t'(s), mk_tile(grp_t'(g), TIDX_W'(c)))];
          x_hold[c]    = hold[g][rc_ch_index(grp_t'(s), mk_tile(grp_t'(g), TIDX_W'(c)))];
          x_blocked[c] = blocked[g][rc_ch_index(grp_t'(s), mk_tile(grp_t'(g), TIDX_W'(c)))];
          x_credit[c]  = rx_pop[g*TPG + c][s];
        end
      end
      photonic_xbar #(.SRC(s), .DST(g), .HOPS(HOPS)) u_xb (
        .clk, .rst_n,
        .tx_req(ln_req[g]), .tx_xbar(ln_xbar[g]), .tx_dst(ln_dst[g]), .tx_flit(ln_flit[g]),
        .gnt(xb_gnt[s][g]),
        .lend_on(x_lend_on), .lend_borr(x_borr), .hold(x_hold), .blocked(x_blocked),
        .credit_ret(x_credit),
        .rx_valid(xb_rx_valid[s][g]), .rx_flit(xb_rx_flit[s][g]),
        .idle(xb_idle[s][g]), .starved(xb_starved[s][g])
      );
    end
  end

  always_comb begin
    tx_gnt = '0;
    for (int s = 0; s < N_GRP; s++)
      for (int g = 0; g < N_GRP; g++)
        for (int t = 0; t < N_TILES; t++)
          tx_gnt[t][g] |= xb_gnt[s][g][t];
    for (int t = 0; t < N_TILES; t++)
      for (int s = 0; s < N_GRP; s++) begin
        rx_valid[t][s] = xb_rx_valid[s][t / TPG][t % TPG];
        rx_flit[t][s]  = xb_rx_flit[s][t / TPG][t % TPG];
      end
  end

  // ---------------- source waveguides and reclaim requests ----------------
  // Channel (x -> t) is blocked while group x uses it as the source waveguide
  // of a lent channel (l -> d), where d has t's index and l's crossbar lies on
  // the layer paired with that of x -> group(t).
  always_comb begin
    for (int gt = 0; gt < N_GRP; gt++)
      for (int i = 0; i < 64; i++) begin
        tile_t t, d, sw;
        grp_t  x, l;
        logic [1:0] lp;
        x  = grp_t'(i % N_GRP);
        t  = mk_tile(grp_t'(gt), TIDX_W'(i / N_GRP));
        blocked[gt][i] = 1'b0;
        ch_idle[gt][i] = xb_idle[x][gt][i / N_GRP];
        for (int gd = 0; gd < N_GRP; gd++) begin
          lp = xbar_layer(x, grp_t'(gt)) ^ 2'd1;
          l  = grp_t'(gd) ^ layer_key(lp);
          d  = mk_tile(grp_t'(gd), tile_idx(t));
          sw = src_wg_tile(l, x, d);
          if (l != x && sw == t && lend_claim[gd][rc_ch_index(l, d)]
              && lend_borr[gd][rc_ch_index(l, d)] == x)
            blocked[gt][i] = 1'b1;
        end
      end
  end

  // A tile that needs a lent channel of its own group, or the blocked source
  // waveguide, makes the owning controller take the channel back.
  always_comb begin
    for (int gd = 0; gd < N_GRP; gd++)
      for (int i = 0; i < 64; i++) begin
        tile_t d, sw;
        grp_t  l, b;
        l  = grp_t'(i % N_GRP);
        d  = mk_tile(grp_t'(gd), TIDX_W'(i / N_GRP));
        b  = lend_borr[gd][i];
        sw = src_wg_tile(l, b, d);
        reclaim[gd][i] = xb_starved[l][gd][i / N_GRP]
                      || xb_starved[b][tile_grp(sw)][tile_idx(sw)];
      end
  end

  // ---------------- reconfiguration controllers ----------------
  for (genvar g = 0; g < N_GRP; g++) begin : g_rc
    assign gath_link[g] = link_util[g*TPG + int'(gath_idx[g][5:GRP_W])][gath_idx[g][GRP_W-1:0]];
    assign gath_buf[g]  = buf_util[g*TPG + int'(gath_idx[g][5:GRP_W])][gath_idx[g][GRP_W-1:0]];

    recfg_controller #(.GID(g)) u_rc (
      .clk, .rst_n, .win_end,
      .gath_idx(gath_idx[g]), .gath_link(gath_link[g]), .gath_buf(gath_buf[g]),
      .avail_o(avail[g]), .over_o(over[g]), .stat_done(stat_done[g]),
      .avail_i(avail), .over_i(over),
      .lend_on(lend_on[g]), .lend_claim(lend_claim[g]), .lend_borr(lend_borr[g]),
      .hold(hold[g]), .ch_idle(ch_idle[g]), .blocked(blocked[g]), .reclaim(reclaim[g]),
      .dyn_valid(dyn_valid[g]), .dyn_lender(dyn_lender[g]),
      .msg_o(msg_o[g]), .msg_req(msg_req[g]), .msg_gnt(msg_gnt[g]), .bus
    );
  end

  // ---------------- controller message bus: round robin ----------------
  grp_t bus_ptr, bus_pick;
  logic bus_any;

  always_comb begin
    bus_any  = 1'b0;
    bus_pick = bus_ptr;
    for (int i = N_GRP - 1; i >= 0; i--)
      if (msg_req[grp_t'(int'(bus_ptr) + i)]) begin
        bus_any  = 1'b1;
        bus_pick = grp_t'(int'(bus_ptr) + i);
      end
    msg_gnt = '0;
    msg_gnt[bus_pick] = bus_any;
    bus = bus_any ? msg_o[bus_pick] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       bus_ptr <= '0;
    else if (bus_any) bus_ptr <= bus_pick + 1'b1;
  end

  assign lend_active = lend_on;
endmodule
