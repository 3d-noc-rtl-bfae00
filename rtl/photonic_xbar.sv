// photonic_xbar: one decomposed 16x16 nanophotonic crossbar, from source
// group SRC to destination group DST. It holds one MWSR home channel per
// destination tile; every tile of the source group can write every channel.
// In front of each channel an mrr_switch lets the controller of the
// destination group hand the channel to another (borrowing) group.
//
// Interface: the tx_* inputs are the transmit requests of all 64 tiles, from
// each tile's transmit lane into group DST; a tile requests channel c of this
// crossbar when its tx_dst is tile c of group DST and its tx_xbar names SRC.
// gnt[t] is the grant back to tile t.
// Per channel: lend_on/lend_borr set the rings, hold blocks new grants,
// credit_ret returns receiver buffer slots, rx_* go to the receiving tile,
// idle reports an empty channel and starved flags that a tile of the
// nominal group wants the channel while it is lent or blocked.
// The crossbar decomposition follows the document; the request encoding is
// this design's.
module photonic_xbar
  import noc_pkg::*;
#(
  parameter int SRC       = 0,
  parameter int DST       = 0,
  parameter int HOPS      = 6,
  parameter int CREDITS   = BUF_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic  [N_TILES-1:0]        tx_req,
  input  grp_t  [N_TILES-1:0]        tx_xbar,
  input  tile_t [N_TILES-1:0]        tx_dst,
  input  flit_t [N_TILES-1:0]        tx_flit,
  output logic  [N_TILES-1:0]        gnt,
  input  logic  [TPG-1:0]            lend_on,
  input  grp_t  [TPG-1:0]            lend_borr,
  input  logic  [TPG-1:0]            hold,
  input  logic  [TPG-1:0]            blocked,
  input  logic  [TPG-1:0]            credit_ret,
  output logic  [TPG-1:0]            rx_valid,
  output flit_t [TPG-1:0]            rx_flit,
  output logic  [TPG-1:0]            idle,
  output logic  [TPG-1:0]            starved
);
  localparam int unsigned FLIGHT = flight_cycles(grp_t'(SRC), grp_t'(DST));

  // All groups' writers, split by group.
  flit_t [N_GRP-1:0][TPG-1:0] grp_flit;
  always_comb begin
    for (int g = 0; g < N_GRP; g++)
      for (int k = 0; k < TPG; k++)
        grp_flit[g][k] = tx_flit[g*TPG + k];
  end

  logic [TPG-1:0][N_TILES-1:0] ch_gnt_all;

  for (genvar c = 0; c < TPG; c++) begin : g_ch
    logic [N_GRP-1:0][TPG-1:0] grp_req, grp_gnt;
    logic [TPG-1:0]            ch_req, ch_gnt;
    flit_t [TPG-1:0]           ch_flit;

    always_comb begin
      for (int g = 0; g < N_GRP; g++)
        for (int k = 0; k < TPG; k++)
          grp_req[g][k] = tx_req[g*TPG + k]
                       && tx_dst[g*TPG + k] == mk_tile(grp_t'(DST), TIDX_W'(c))
                       && tx_xbar[g*TPG + k] == grp_t'(SRC);
      ch_gnt_all[c] = grp_gnt;
    end

    assign starved[c] = (|grp_req[SRC]) && (lend_on[c] || blocked[c]);

    mrr_switch #(.N_GRP(N_GRP), .N(TPG), .W(FLIT_W), .HOME(SRC)) u_mrr (
      .on(lend_on[c]), .borrower(lend_borr[c]),
      .grp_req, .grp_flit, .grp_gnt,
      .ch_req, .ch_flit, .ch_gnt
    );

    mwsr_channel #(.N(TPG), .W(FLIT_W), .PKT_FLITS(PKT_FLITS), .CREDITS(CREDITS),
                   .HOPS(HOPS), .FLIGHT(int'(FLIGHT))) u_ch (
      .clk, .rst_n, .wr_req(ch_req), .wr_flit(ch_flit), .wr_gnt(ch_gnt),
      .hold(hold[c] || blocked[c]), .credit_ret(credit_ret[c]),
      .rx_valid(rx_valid[c]), .rx_flit(rx_flit[c]), .idle(idle[c])
    );
  end

  always_comb begin
    gnt = '0;
    for (int c = 0; c < TPG; c++) gnt |= ch_gnt_all[c];
  end
endmodule
