// tb_recfg_controller: controller of group 0 with the other three
// controllers and the channels modelled here.
//  1. Gather and classify (Steps 2-4): random statistics for its 64
//     receivers; after a window the published Not-utilised (offered) and
//     Over-utilised flags must match the Step 4 rules, minus blocked channels.
//  2. Borrowing (Steps 5-7b): group 0's channel to tile 63 is over-utilised
//     and group 1's channel to tile 63 (layer 1) and group 0's intra-group
//     waveguide to tile 15 (layer 0, the source waveguide) are idle. The
//     controller must ask group 3's controller for that channel, and after
//     CONFIRM give its tiles the extra bandwidth; REVOKE withdraws it.
//  3. Lending (Step 7a and reclaim): an ACCEPT for an offered channel must
//     hold it, switch the rings once it is idle and answer CONFIRM; a
//     reclaim must send REVOKE and switch back once idle; an ACCEPT for a
//     channel not offered gets a NACK.
module tb_recfg_controller;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic win_end;
  logic [5:0] gath_idx;
  util_t gath_link, gath_buf;
  logic [63:0] avail_o, over_o;
  logic stat_done;
  logic [N_GRP-1:0][63:0] avail_i, over_i;
  logic [63:0] lend_on, lend_claim, hold, ch_idle, blocked, reclaim;
  grp_t [63:0] lend_borr;
  logic [N_TILES-1:0] dyn_valid;
  grp_t [N_TILES-1:0] dyn_lender;
  rc_msg_t msg_o, bus;
  logic msg_req, msg_gnt;
  int checks = 0, failures = 0;

  recfg_controller #(.GID(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  util_t lk [64], bf [64];
  assign gath_link = lk[gath_idx];
  assign gath_buf  = bf[gath_idx];
  assign msg_gnt   = msg_req;

  // messages the controller sends, collected
  rc_msg_t sent_q [$];
  always @(posedge clk) if (rst_n && msg_req) sent_q.push_back(msg_o);

  task automatic send(input rc_msg_e k, input int src, input int lender, input int borrower, input int tile);
    @(negedge clk);
    bus = '0;
    bus.valid = 1; bus.kind = k; bus.src_rc = grp_t'(src); bus.dst_rc = grp_t'(0);
    bus.lender = grp_t'(lender); bus.borrower = grp_t'(borrower); bus.tile = tile_t'(tile);
    @(negedge clk);
    bus = '0;
  endtask

  task automatic window();
    @(negedge clk); win_end = 1;
    @(negedge clk); win_end = 0;
    for (int i = 0; i < 80 && !stat_done; i++) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int ci, exp_not, exp_over;
    win_end = 0; bus = '0; ch_idle = '1; blocked = '0; reclaim = '0;
    avail_i = '0; over_i = '0;
    for (int i = 0; i < 64; i++) begin lk[i] = '0; bf[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // 1. classification, three windows of random statistics
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 64; i++) begin
        case ($urandom_range(0, 3))
          0: lk[i] = '0;
          1: lk[i] = util_t'($urandom_range(1, 26));
          default: lk[i] = util_t'($urandom_range(27, 256));
        endcase
        bf[i] = util_t'($urandom_range(0, 256));
      end
      blocked = {$urandom, $urandom} & {$urandom, $urandom};
      window();
      for (int i = 0; i < 64; i++) begin
        exp_not  = (lk[i] == 0);
        exp_over = (lk[i] > 26) && (bf[i] > 128);
        check(avail_o[i] == (exp_not && !blocked[i]), $sformatf("avail[%0d]", i));
        check(over_o[i] == exp_over, $sformatf("over[%0d]", i));
      end
    end
    blocked = '0;

    // 2. borrowing: the example of group 0 taking group 1's channel to tile 63
    for (int i = 0; i < 64; i++) begin lk[i] = util_t'(100); bf[i] = '0; end
    avail_i = '0; over_i = '0;
    over_i[3][rc_ch_index(grp_t'(0), tile_t'(63))]  = 1'b1;  // G0 -> tile 63 congested
    avail_i[3][rc_ch_index(grp_t'(1), tile_t'(63))] = 1'b1;  // G1 -> tile 63 idle (layer 1)
    avail_i[0][rc_ch_index(grp_t'(0), tile_t'(15))] = 1'b1;  // G0 -> tile 15 idle (layer 0)
    avail_i[3][rc_ch_index(grp_t'(2), tile_t'(63))] = 1'b1;  // G2 -> 63 idle, but its source waveguide would be G0's own channel to 63
    sent_q.delete();
    window();
    for (int i = 0; i < 100 && sent_q.size() == 0; i++) @(negedge clk);
    check(sent_q.size() == 1, $sformatf("%0d messages instead of one ACCEPT", sent_q.size()));
    if (sent_q.size() > 0) begin
      check(sent_q[0].kind == MSG_ACCEPT && sent_q[0].dst_rc == grp_t'(3) && sent_q[0].lender == grp_t'(1)
            && sent_q[0].borrower == grp_t'(0) && sent_q[0].tile == tile_t'(63), "wrong ACCEPT");
    end
    check(!dyn_valid[63], "bandwidth used before CONFIRM");
    send(MSG_CONFIRM, 3, 1, 0, 63);
    check(dyn_valid[63] && dyn_lender[63] == grp_t'(1), "CONFIRM not applied");
    // the same idle channel must not be asked for again
    sent_q.delete();
    window();
    repeat (100) @(negedge clk);
    check(sent_q.size() == 0, "asked again for a channel already borrowed");
    send(MSG_REVOKE, 3, 1, 0, 63);
    check(!dyn_valid[63], "REVOKE not applied");
    // NACK path: ask again, get NACK, no bandwidth
    sent_q.delete();
    window();
    for (int i = 0; i < 100 && sent_q.size() == 0; i++) @(negedge clk);
    check(sent_q.size() == 1 && sent_q[0].kind == MSG_ACCEPT, "no second ACCEPT");
    send(MSG_NACK, 3, 1, 0, 63);
    check(!dyn_valid[63], "bandwidth after NACK");
    avail_i = '0; over_i = '0;

    // 3. lending: tile 5 (group 0) channel from group 2 is idle
    for (int i = 0; i < 64; i++) begin lk[i] = util_t'(100); bf[i] = '0; end
    ci = rc_ch_index(grp_t'(2), tile_t'(5));
    lk[ci] = '0;
    window();
    check(avail_o[ci], "idle channel not offered");
    ch_idle[ci] = 0;
    sent_q.delete();
    send(MSG_ACCEPT, 1, 2, 1, 5);
    check(hold[ci] && !lend_on[ci], "channel not held while busy");
    repeat (5) @(negedge clk);
    check(sent_q.size() == 0, "CONFIRM before the channel drained");
    ch_idle[ci] = 1;
    repeat (3) @(negedge clk);
    check(lend_on[ci] && lend_borr[ci] == grp_t'(1) && !hold[ci], "rings not switched");
    check(sent_q.size() == 1 && sent_q[0].kind == MSG_CONFIRM && sent_q[0].dst_rc == grp_t'(1)
          && sent_q[0].tile == tile_t'(5) && sent_q[0].lender == grp_t'(2), "no CONFIRM");
    check(!avail_o[ci], "lent channel still offered");
    // a second borrower is refused
    sent_q.delete();
    send(MSG_ACCEPT, 3, 2, 3, 5);
    repeat (2) @(negedge clk);
    check(sent_q.size() == 1 && sent_q[0].kind == MSG_NACK && sent_q[0].dst_rc == grp_t'(3), "no NACK");
    // reclaim
    sent_q.delete();
    ch_idle[ci] = 0;
    @(negedge clk); reclaim[ci] = 1; @(negedge clk); reclaim[ci] = 0;
    repeat (3) @(negedge clk);
    check(sent_q.size() == 1 && sent_q[0].kind == MSG_REVOKE && sent_q[0].dst_rc == grp_t'(1), "no REVOKE");
    check(lend_on[ci] && hold[ci], "switched back before drained");
    ch_idle[ci] = 1;
    repeat (2) @(negedge clk);
    check(!lend_on[ci] && !hold[ci] && !lend_claim[ci], "rings not switched back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
