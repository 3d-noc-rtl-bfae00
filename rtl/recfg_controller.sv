// recfg_controller: reconfiguration controller RC_i of tile group GID.
// It plays two roles.
//
// Owner of the 64 home channels that end in its group (16 tiles x 4 source
// groups), whose utilisation counters sit at its tiles' receivers:
//   * Steps 2-4: after each window (win_end) it reads the 64 counters one per
//     cycle over the gather port, classifies each with util_classifier and
//     keeps the Not-utilised and Over-utilised flags.
//   * Step 5: it publishes them (avail_o, over_o) to all controllers; a
//     channel is offered only if it is idle, not lent and not in use as a
//     source waveguide (blocked).
//   * Step 7a: on an ACCEPT for a free offered channel it holds the channel,
//     waits until it is empty, switches the rings (lend_on/lend_borr) and
//     answers CONFIRM; a stale ACCEPT gets a NACK.
//   * Reclaim: when a tile of the lending group needs the channel again
//     (reclaim) it sends REVOKE, holds the channel until it drains and
//     switches the rings back.
// Borrower for its own group's tiles:
//   * Step 6: it scans the 64 destination tiles, one per cycle, for one whose
//     static channel from this group is Over-utilised while the same tile's
//     channel from another group is Not-utilised, the lender's channel lies
//     on the layer paired (0/1, 2/3) with this group's source waveguide, and
//     that source waveguide is idle and not already used. It sends ACCEPT.
//   * Step 7b: on CONFIRM it tells its tiles (dyn_valid/dyn_lender) that the
//     extra bandwidth to that tile may be used; on REVOKE it withdraws it.
// The algorithm, the classes and the accept/confirm handshake follow the
// document. The serial gather over a dedicated port, the shared message bus
// (msg_o/msg_req/msg_gnt, one message per cycle, every controller listens on
// bus), the lending of whole channels only when Not-utilised, the
// drain-before-switch rule and the trigger for reclaiming are this design's.
module recfg_controller
  import noc_pkg::*;
#(
  parameter int GID   = 0,
  parameter int L_MIN = 26,
  parameter int B_CON = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          win_end,
  // gather port to the 64 receiver counters of the group
  output logic [5:0]                    gath_idx,
  input  util_t                         gath_link,
  input  util_t                         gath_buf,
  // published statistics of all controllers (index rc_ch_index)
  output logic [63:0]                   avail_o,
  output logic [63:0]                   over_o,
  output logic                          stat_done,
  input  logic [N_GRP-1:0][63:0]        avail_i,
  input  logic [N_GRP-1:0][63:0]        over_i,
  // owned channels
  output logic [63:0]                   lend_on,
  output logic [63:0]                   lend_claim,
  output grp_t [63:0]                   lend_borr,
  output logic [63:0]                   hold,
  input  logic [63:0]                   ch_idle,
  input  logic [63:0]                   blocked,
  input  logic [63:0]                   reclaim,
  // borrowed bandwidth for the group's tiles
  output logic [N_TILES-1:0]            dyn_valid,
  output grp_t [N_TILES-1:0]            dyn_lender,
  // controller message bus
  output rc_msg_t                       msg_o,
  output logic                          msg_req,
  input  logic                          msg_gnt,
  input  rc_msg_t                       bus
);
  localparam grp_t ME = grp_t'(GID);

  typedef enum logic [1:0] {E_FREE, E_ACT, E_LENT, E_REV} ent_e;
  typedef enum logic [1:0] {B_IDLE, B_SCAN, B_SEND, B_WAIT} bst_e;

  // ---------------- Steps 2-4: gather and classify ----------------
  logic       gathering;
  logic [5:0] gidx;
  logic [63:0] not_sh, over_sh, not_cls;
  util_cls_e   cls;

  util_classifier #(.L_MIN(L_MIN), .B_CON(B_CON)) u_cls (
    .link_util(gath_link), .buf_util(gath_buf), .cls
  );

  assign gath_idx = gidx;

  ent_e [63:0] ent;
  grp_t [63:0] borr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gathering <= 1'b0;
      gidx      <= '0;
      not_sh    <= '0;
      over_sh   <= '0;
      not_cls   <= '0;
      over_o    <= '0;
      stat_done <= 1'b0;
    end else begin
      stat_done <= 1'b0;
      if (win_end) begin
        gathering <= 1'b1;
        gidx      <= '0;
      end else if (gathering) begin
        not_sh[gidx]  <= (cls == CLS_NOT);
        over_sh[gidx] <= (cls == CLS_OVER);
        gidx          <= gidx + 1'b1;
        if (gidx == 6'd63) begin
          gathering <= 1'b0;
          stat_done <= 1'b1;
          not_cls   <= {(cls == CLS_NOT), not_sh[62:0]};
          over_o    <= {(cls == CLS_OVER), over_sh[62:0]};
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 64; i++)
      avail_o[i] = not_cls[i] && ent[i] == E_FREE && !blocked[i];
  end

  // ---------------- owner side: per-channel lending state ----------------
  logic [63:0]      conf_pend, rev_pend;
  logic [N_GRP-1:0] nack_pend;
  logic [N_GRP-1:0][TILE_W+GRP_W-1:0] nack_info;

  // ---------------- borrower side ----------------
  bst_e       bst;
  logic [5:0] sd;            // destination tile being scanned
  logic       cand;
  grp_t       cand_l;
  tile_t      pend_d;
  grp_t       pend_l;
  logic [63:0] sw_used;      // own waveguides in use as source waveguides

  always_comb begin
    tile_t d, sw;
    cand   = 1'b0;
    cand_l = '0;
    sw     = '0;
    d      = tile_t'(sd);
    if (over_i[tile_grp(d)][rc_ch_index(ME, d)] && !dyn_valid[d]) begin
      for (int l = N_GRP - 1; l >= 0; l--) begin
        sw = src_wg_tile(grp_t'(l), ME, d);
        if (grp_t'(l) != ME && sw != d
            && avail_i[tile_grp(d)][rc_ch_index(grp_t'(l), d)]
            && avail_i[tile_grp(sw)][rc_ch_index(ME, sw)]
            && !sw_used[sw]) begin
          cand   = 1'b1;
          cand_l = grp_t'(l);
        end
      end
    end
  end

  // ---------------- outgoing message selection ----------------
  typedef enum logic [1:0] {S_NONE, S_NACK, S_CONF, S_REV} osrc_e;
  osrc_e      osrc;
  logic [5:0] oidx;
  grp_t       onack;

  always_comb begin
    msg_o = '0;
    osrc  = S_NONE;
    oidx  = '0;
    onack = '0;
    for (int r = N_GRP - 1; r >= 0; r--)
      if (nack_pend[r]) begin osrc = S_NACK; onack = grp_t'(r); end
    if (osrc == S_NONE)
      for (int i = 63; i >= 0; i--)
        if (conf_pend[i]) begin osrc = S_CONF; oidx = 6'(i); end
    if (osrc == S_NONE)
      for (int i = 63; i >= 0; i--)
        if (rev_pend[i]) begin osrc = S_REV; oidx = 6'(i); end
    msg_o.src_rc = ME;
    case (osrc)
      S_NACK: begin
        msg_o.valid    = 1'b1;
        msg_o.kind     = MSG_NACK;
        msg_o.dst_rc   = onack;
        msg_o.borrower = onack;
        {msg_o.tile, msg_o.lender} = nack_info[onack];
      end
      S_CONF, S_REV: begin
        msg_o.valid    = 1'b1;
        msg_o.kind     = (osrc == S_CONF) ? MSG_CONFIRM : MSG_REVOKE;
        msg_o.dst_rc   = borr[oidx];
        msg_o.borrower = borr[oidx];
        msg_o.lender   = grp_t'(oidx[GRP_W-1:0]);
        msg_o.tile     = mk_tile(ME, oidx[5:GRP_W]);
      end
      default: begin
        if (bst == B_SEND) begin
          msg_o.valid    = 1'b1;
          msg_o.kind     = MSG_ACCEPT;
          msg_o.dst_rc   = tile_grp(pend_d);
          msg_o.borrower = ME;
          msg_o.lender   = pend_l;
          msg_o.tile     = pend_d;
        end
      end
    endcase
  end

  assign msg_req = msg_o.valid;

  logic bus_for_me;
  assign bus_for_me = bus.valid && bus.dst_rc == ME;

  always_comb begin
    for (int i = 0; i < 64; i++) begin
      lend_on[i]    = (ent[i] == E_LENT) || (ent[i] == E_REV);
      lend_claim[i] = (ent[i] != E_FREE);
      hold[i]       = (ent[i] == E_ACT) || (ent[i] == E_REV);
    end
    lend_borr = borr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent       <= '{default: E_FREE};
      borr      <= '0;
      conf_pend <= '0;
      rev_pend  <= '0;
      nack_pend <= '0;
      nack_info <= '0;
      bst       <= B_IDLE;
      sd        <= '0;
      pend_d    <= '0;
      pend_l    <= '0;
      sw_used   <= '0;
      dyn_valid <= '0;
      dyn_lender <= '0;
    end else begin
      // message leaving this controller
      if (msg_gnt) begin
        case (osrc)
          S_NACK:  nack_pend[onack] <= 1'b0;
          S_CONF:  conf_pend[oidx]  <= 1'b0;
          S_REV:   rev_pend[oidx]   <= 1'b0;
          default: if (bst == B_SEND) bst <= B_WAIT;
        endcase
      end

      // per-channel lending state machines
      for (int i = 0; i < 64; i++) begin
        case (ent[i])
          E_ACT: if (ch_idle[i]) begin
            ent[i]       <= E_LENT;
            conf_pend[i] <= 1'b1;
          end
          E_LENT: if (reclaim[i] && !conf_pend[i]) begin
            ent[i]      <= E_REV;
            rev_pend[i] <= 1'b1;
          end
          E_REV: if (ch_idle[i] && !rev_pend[i]) ent[i] <= E_FREE;
          default: ;
        endcase
      end

      // messages arriving for this controller
      if (bus_for_me) begin
        case (bus.kind)
          MSG_ACCEPT: begin
            if (ent[rc_ch_index(bus.lender, bus.tile)] == E_FREE
                && avail_o[rc_ch_index(bus.lender, bus.tile)]) begin
              ent[rc_ch_index(bus.lender, bus.tile)]  <= E_ACT;
              borr[rc_ch_index(bus.lender, bus.tile)] <= bus.borrower;
            end else begin
              nack_pend[bus.borrower] <= 1'b1;
              nack_info[bus.borrower] <= {bus.tile, bus.lender};
            end
          end
          MSG_CONFIRM: begin
            dyn_valid[bus.tile]  <= 1'b1;
            dyn_lender[bus.tile] <= bus.lender;
            sw_used[src_wg_tile(bus.lender, ME, bus.tile)] <= 1'b1;
            if (bst == B_WAIT) bst <= (sd == 6'd63) ? B_IDLE : B_SCAN;
            if (bst == B_WAIT) sd  <= sd + 1'b1;
          end
          MSG_NACK: begin
            if (bst == B_WAIT) bst <= (sd == 6'd63) ? B_IDLE : B_SCAN;
            if (bst == B_WAIT) sd  <= sd + 1'b1;
          end
          MSG_REVOKE: begin
            dyn_valid[bus.tile] <= 1'b0;
            sw_used[src_wg_tile(bus.lender, ME, bus.tile)] <= 1'b0;
          end
          default: ;
        endcase
      end

      // Step 6: scan for a channel to borrow
      case (bst)
        B_IDLE: if (stat_done) begin
          bst <= B_SCAN;
          sd  <= '0;
        end
        B_SCAN: begin
          if (cand) begin
            bst    <= B_SEND;
            pend_d <= tile_t'(sd);
            pend_l <= cand_l;
          end else begin
            sd <= sd + 1'b1;
            if (sd == 6'd63) bst <= B_IDLE;
          end
        end
        default: ;
      endcase
    end
  end

  a_one_lend_state: assert property (@(posedge clk) disable iff (!rst_n)
    bus_for_me && bus.kind == MSG_CONFIRM |-> bst == B_WAIT);
endmodule
