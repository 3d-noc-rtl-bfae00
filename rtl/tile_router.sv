// tile_router: the electrical router of one tile (four cores share it).
//
// Transmit side: the four core ports are served round robin, one whole
// packet (PKT_FLITS flits) at a time. Each packet goes into one of four
// 16-flit transmit lanes, chosen by its destination group, so the tile can
// have a request outstanding on all four crossbars at once. When a lane holds
// a complete packet it requests the home channel of the packet's destination
// tile. It normally uses its own group's crossbar; if the group's
// reconfiguration controller has been granted extra bandwidth to that
// destination (dyn_valid), every second packet of that lane to it is sent
// through the borrowed channel of group dyn_lender instead. While tx_gnt[g]
// is high one flit leaves lane g per cycle.
//
// Receive side: each of the four home channels of the tile (one per source
// group) fills its own 16-flit buffer, watched by a util_counter. The buffers
// are drained round robin, a packet at a time, to the core named in the
// header; each drained flit returns a credit to its channel (rx_pop).
//
// Timing: a core flit accepted in cycle t is in its lane in t+1; a complete
// packet can request in the cycle after its last flit is buffered.
// Single-cycle routing, four cores per tile, several requests from the four
// cores in flight at once and the 16-flit buffers follow the document; one
// lane per destination group, the packet-atomic round robin, the alternation
// between the static and the borrowed channel and the credit return are this
// design's. A core whose lane is full stalls injection for the whole tile
// until that lane drains.
module tile_router
  import noc_pkg::*;
#(
  parameter int RW_LOG2 = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  tile_t                     my_tile,
  // cores
  input  logic  [CPT-1:0]           inj_valid,
  input  flit_t [CPT-1:0]           inj_flit,
  output logic  [CPT-1:0]           inj_ready,
  output logic  [CPT-1:0]           ej_valid,
  output flit_t [CPT-1:0]           ej_flit,
  input  logic  [CPT-1:0]           ej_ready,
  // borrowed bandwidth granted to this group, per destination tile
  input  logic  [N_TILES-1:0]       dyn_valid,
  input  grp_t  [N_TILES-1:0]       dyn_lender,
  // optical transmitter, one lane per destination group
  output logic  [N_GRP-1:0]         tx_req,
  output grp_t  [N_GRP-1:0]         tx_xbar,
  output tile_t [N_GRP-1:0]         tx_dst,
  output flit_t [N_GRP-1:0]         tx_flit,
  input  logic  [N_GRP-1:0]         tx_gnt,
  // optical receivers, one per source group
  input  logic  [N_GRP-1:0]         rx_valid,
  input  flit_t [N_GRP-1:0]         rx_flit,
  output logic  [N_GRP-1:0]         rx_pop,
  // utilisation statistics
  input  logic                      win_end,
  output util_t [N_GRP-1:0]         link_util,
  output util_t [N_GRP-1:0]         buf_util
);
  localparam int OCC_W = $clog2(BUF_DEPTH+1);
  localparam int PF_W  = $clog2(PKT_FLITS);

  // ---------------- injection: four cores -> transmit lanes -----------------
  logic [CORE_W-1:0]               in_sel;
  logic                            in_lock;
  logic [PF_W-1:0]                 in_cnt;
  logic [CORE_W-1:0]               in_pick, in_cur;
  logic                            in_any, in_push;
  grp_t                            in_lane, in_lane_r;
  hdr_t                            in_hdr;
  logic [N_GRP-1:0]                tq_push, tq_full;
  flit_t [N_GRP-1:0]               tq_dout;
  logic [N_GRP-1:0][OCC_W-1:0]     pkts_ready;
  logic                            pkt_in_done;

  always_comb begin
    in_any  = 1'b0;
    in_pick = in_sel;
    for (int i = CPT - 1; i >= 0; i--) begin
      if (inj_valid[CORE_W'(int'(in_sel) + i)]) begin
        in_any  = 1'b1;
        in_pick = CORE_W'(int'(in_sel) + i);
      end
    end
  end

  assign in_cur  = in_lock ? in_sel : in_pick;
  // the lane is chosen by the destination group in the header flit
  assign in_hdr  = hdr_t'(inj_flit[in_cur][$bits(hdr_t)-1:0]);
  assign in_lane = in_lock ? in_lane_r : tile_grp(in_hdr.dst_tile);

  always_comb begin
    inj_ready = '0;
    if (in_lock || in_any) inj_ready[in_cur] = !tq_full[in_lane];
    in_push = inj_valid[in_cur] && inj_ready[in_cur];
    tq_push = '0;
    tq_push[in_lane] = in_push;
  end

  assign pkt_in_done = in_push && (in_cnt == PF_W'(PKT_FLITS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sel    <= '0;
      in_lock   <= 1'b0;
      in_cnt    <= '0;
      in_lane_r <= '0;
    end else if (in_push) begin
      in_cnt    <= in_cnt + 1'b1;
      in_lane_r <= in_lane;
      if (pkt_in_done) begin
        in_lock <= 1'b0;
        in_sel  <= in_cur + 1'b1;
      end else begin
        in_lock <= 1'b1;
        in_sel  <= in_cur;
      end
    end
  end

  // ---------------- transmit: one lane per destination group ----------------
  // Lane g requests the home channel of its head packet's destination tile in
  // a crossbar into group g: its own group's, or on alternate packets the
  // borrowed one. The lanes request and send independently.
  logic [N_GRP-1:0][PF_W-1:0] tx_cnt;
  logic [N_GRP-1:0]           alt, pkt_out_done;

  for (genvar g = 0; g < N_GRP; g++) begin : g_tx
    logic             tq_empty;
    logic [OCC_W-1:0] tq_count;
    hdr_t             tx_hdr;
    logic             use_dyn;

    flit_fifo #(.W(FLIT_W), .DEPTH(BUF_DEPTH)) u_txq (
      .clk, .rst_n, .push(tq_push[g]), .din(inj_flit[in_cur]), .pop(tx_gnt[g]),
      .dout(tq_dout[g]), .empty(tq_empty), .full(tq_full[g]), .count(tq_count)
    );

    assign tx_hdr          = hdr_t'(tq_dout[g][$bits(hdr_t)-1:0]);
    assign tx_dst[g]       = tx_hdr.dst_tile;
    assign use_dyn         = dyn_valid[tx_dst[g]] && alt[g];
    assign tx_xbar[g]      = use_dyn ? dyn_lender[tx_dst[g]] : tile_grp(my_tile);
    assign tx_req[g]       = (pkts_ready[g] != '0) && !tx_gnt[g] && (tx_cnt[g] == '0);
    assign tx_flit[g]      = tq_dout[g];
    assign pkt_out_done[g] = tx_gnt[g] && (tx_cnt[g] == PF_W'(PKT_FLITS - 1));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pkts_ready[g] <= '0;
        tx_cnt[g]     <= '0;
        alt[g]        <= 1'b0;
      end else begin
        pkts_ready[g] <= pkts_ready[g] + OCC_W'(pkt_in_done && in_lane == grp_t'(g))
                                       - OCC_W'(pkt_out_done[g]);
        if (tx_gnt[g])       tx_cnt[g] <= tx_cnt[g] + 1'b1;
        if (pkt_out_done[g]) alt[g]    <= !alt[g];
      end
    end
  end

  // ---------------- receive: four home-channel buffers -> cores -------------
  flit_t [N_GRP-1:0]            rq_dout;
  logic  [N_GRP-1:0]            rq_empty;
  logic  [N_GRP-1:0][OCC_W-1:0] rq_count;
  logic  [N_GRP-1:0]            rq_pop;

  for (genvar g = 0; g < N_GRP; g++) begin : g_rx
    logic unused_full;
    flit_fifo #(.W(FLIT_W), .DEPTH(BUF_DEPTH)) u_rxq (
      .clk, .rst_n, .push(rx_valid[g]), .din(rx_flit[g]), .pop(rq_pop[g]),
      .dout(rq_dout[g]), .empty(rq_empty[g]), .full(unused_full), .count(rq_count[g])
    );
    util_counter #(.RW_LOG2(RW_LOG2), .DEPTH(BUF_DEPTH)) u_cnt (
      .clk, .rst_n, .win_end, .activity(rx_valid[g]), .occupy(rq_count[g]),
      .link_util(link_util[g]), .buf_util(buf_util[g]), .stat_valid()
    );
  end

  logic              ej_lock;
  grp_t              ej_sel, ej_pick, ej_cur;
  logic              ej_any;
  logic [PF_W-1:0]   ej_cnt;
  logic [CORE_W-1:0] ej_core, ej_core_cur;
  hdr_t              ej_hdr;
  logic              ej_fire;

  always_comb begin
    ej_any  = 1'b0;
    ej_pick = ej_sel;
    for (int i = N_GRP - 1; i >= 0; i--) begin
      if (!rq_empty[grp_t'(int'(ej_sel) + i)]) begin
        ej_any  = 1'b1;
        ej_pick = grp_t'(int'(ej_sel) + i);
      end
    end
  end

  assign ej_cur      = ej_lock ? ej_sel : ej_pick;
  assign ej_hdr      = hdr_t'(rq_dout[ej_cur][$bits(hdr_t)-1:0]);
  assign ej_core_cur = ej_lock ? ej_core : ej_hdr.dst_core;

  always_comb begin
    ej_valid = '0;
    for (int c = 0; c < CPT; c++) ej_flit[c] = rq_dout[ej_cur];
    if ((ej_lock || ej_any) && !rq_empty[ej_cur]) ej_valid[ej_core_cur] = 1'b1;
    ej_fire = ej_valid[ej_core_cur] && ej_ready[ej_core_cur];
    rq_pop  = '0;
    rq_pop[ej_cur] = ej_fire;
  end

  assign rx_pop = rq_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ej_lock <= 1'b0;
      ej_sel  <= '0;
      ej_cnt  <= '0;
      ej_core <= '0;
    end else if (ej_fire) begin
      ej_cnt <= ej_cnt + 1'b1;
      if (ej_cnt == PF_W'(PKT_FLITS - 1)) begin
        ej_lock <= 1'b0;
        ej_sel  <= ej_cur + 1'b1;
      end else begin
        ej_lock <= 1'b1;
        ej_sel  <= ej_cur;
        ej_core <= ej_core_cur;
      end
    end
  end
endmodule
