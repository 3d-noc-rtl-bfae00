// mrr_switch: behavioural model of the reconfiguration micro-ring resonators
// in front of one home channel. Normally the channel's writers are the tiles
// of its own source group. When the rings are activated (on = 1) light from
// the waveguide of the borrowing group, routed directly above on the paired
// layer, is coupled into this channel instead, so the writers become the
// tiles of group borrower. The model steers the writers' requests and flits
// into the channel and returns the channel's grants to the group that drives
// it. That one extra group can be switched onto a channel whose receiver
// stays put follows the document; the per-group bus form is this design's.
//
// Purely combinational. grp_* carry all N_GRP groups' writers side by side.
module mrr_switch #(
  parameter int N_GRP = 4,
  parameter int N     = 16,
  parameter int W     = 128,
  parameter int HOME  = 0   // nominal source group of the channel
) (
  input  logic                        on,
  input  logic [$clog2(N_GRP)-1:0]    borrower,
  input  logic [N_GRP-1:0][N-1:0]     grp_req,
  input  logic [N_GRP-1:0][N-1:0][W-1:0] grp_flit,
  output logic [N_GRP-1:0][N-1:0]     grp_gnt,
  output logic [N-1:0]                ch_req,
  output logic [N-1:0][W-1:0]         ch_flit,
  input  logic [N-1:0]                ch_gnt
);
  logic [$clog2(N_GRP)-1:0] drv;

  assign drv     = on ? borrower : ($clog2(N_GRP))'(HOME);
  assign ch_req  = grp_req[drv];
  assign ch_flit = grp_flit[drv];

  always_comb begin
    grp_gnt      = '0;
    grp_gnt[drv] = ch_gnt;
  end
endmodule
