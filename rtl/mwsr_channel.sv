// mwsr_channel: one Multiple-Write-Single-Read nanophotonic home channel.
// Any of the N writers (the tiles of one group) may modulate the channel,
// and only the destination tile's receiver reads it. A token_arbiter decides
// which writer owns the channel for the next packet; the granted writer's
// flits are put on an optical_link that delivers them to the receiver after
// the E/O, flight and O/E delays.
//
// Interface: wr_req[k] asks for the channel for a whole packet whose flits
// writer k presents on wr_flit[k]; while wr_gnt[k] is high writer k's flit is
// taken, one per cycle. rx_valid/rx_flit is the receiver output,
// credit_ret returns a buffer slot freed at the receiver, hold blocks new
// grants and idle is high when nothing is granted or in flight (used before
// the reconfiguration rings switch). The MWSR organisation and token slot
// follow the document; credits and the hold/idle handshake are this
// design's.
module mwsr_channel #(
  parameter int N         = 16,
  parameter int W         = 128,
  parameter int PKT_FLITS = 4,
  parameter int CREDITS   = 16,
  parameter int HOPS      = 6,
  parameter int FLIGHT    = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        wr_req,
  input  logic [N-1:0][W-1:0] wr_flit,
  output logic [N-1:0]        wr_gnt,
  input  logic                hold,
  input  logic                credit_ret,
  output logic                rx_valid,
  output logic [W-1:0]        rx_flit,
  output logic                idle
);
  logic [$clog2(N)-1:0]         gnt_idx;
  logic                         busy;
  logic                         link_empty;
  logic [$clog2(CREDITS+1)-1:0] credits;

  token_arbiter #(.N(N), .HOPS(HOPS), .PKT_FLITS(PKT_FLITS), .CREDITS(CREDITS)) u_arb (
    .clk, .rst_n, .req(wr_req), .hold, .credit_ret,
    .gnt(wr_gnt), .gnt_idx, .busy, .credits
  );

  optical_link #(.W(W), .FLIGHT(FLIGHT)) u_link (
    .clk, .rst_n, .tx_valid(busy), .tx_flit(wr_flit[gnt_idx]),
    .rx_valid, .rx_flit, .empty(link_empty)
  );

  assign idle = !busy && link_empty;
endmodule
