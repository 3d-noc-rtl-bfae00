// tb_r3d_noc: end-to-end test of the whole network (64 tiles, 256 cores,
// 16 crossbars, 4 reconfiguration controllers) at its default parameters,
// including the 1024-cycle reconfiguration window.
//  Phase A, uniform random traffic: every core sends packets to random
//    cores; tokens are contended.
//  Phase B, the reconfiguration example: tile k of group 0 streams to tile
//    63-k of group 3 while the receiving cores drain slowly, so the static
//    channels become over-utilised; groups 1 and 2 are silent, so group 1's
//    channels into group 3 and group 0's intra-group waveguides are idle.
//    The controllers must lend channels to group 0, whose tiles then send
//    part of their packets through them.
//  Phase C, reclaim: group 1 now sends to group 3 and group 0 to itself,
//    so the lent channels and the blocked source waveguides are wanted back
//    and must be revoked.
// Every packet is scoreboarded: it must reach the right core exactly once,
// whole and unchanged. Each mechanism (token contention, full receive
// buffer, every link class, lending, borrowed-path packets, blocked source
// waveguide, reclaim, revoke, a tile sending on two lanes at once) is
// counted and must occur at least once.
module tb_r3d_noc;
  import noc_pkg::*;
  localparam int RW = 1024;   // the top's default window
  localparam int MAXP = 64;   // packets per core queue
  logic clk = 0, rst_n = 0;
  logic  [N_TILES-1:0][CPT-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [N_TILES-1:0][CPT-1:0] inj_flit, ej_flit;
  logic  [N_GRP-1:0][63:0]      lend_active;
  int checks = 0, failures = 0;
  int cyc = 0;

  r3d_noc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  // payload word derived from packet identity, checked at the receiver
  function automatic logic [63:0] pay(int st, int sc, int seq, int f);
    return {32'(st * 7919 + sc * 131 + seq * 17 + f), 32'(seq ^ 32'h5a5a0000)};
  endfunction

  function automatic flit_t mk_flit(int st, int sc, int seq, int f, int dt, int dc);
    hdr_t h;
    h.src_tile = tile_t'(st); h.src_core = 2'(sc);
    h.dst_tile = tile_t'(dt); h.dst_core = 2'(dc);
    return flit_t'({pay(st, sc, seq, f), 16'(f), 32'(seq), 16'(h)});
  endfunction

  // ---------------- sources ----------------
  int q_dt [N_TILES][CPT][MAXP];
  int q_dc [N_TILES][CPT][MAXP];
  int q_n  [N_TILES][CPT];     // packets queued
  int q_sent [N_TILES][CPT];   // packets fully injected
  int q_f  [N_TILES][CPT];
  int total_q = 0;

  always_comb
    for (int t = 0; t < N_TILES; t++)
      for (int c = 0; c < CPT; c++) begin
        inj_valid[t][c] = q_sent[t][c] < q_n[t][c];
        inj_flit[t][c]  = inj_valid[t][c]
                        ? mk_flit(t, c, q_sent[t][c], q_f[t][c], q_dt[t][c][q_sent[t][c] % MAXP], q_dc[t][c][q_sent[t][c] % MAXP])
                        : '0;
      end

  always @(posedge clk) if (rst_n)
    for (int t = 0; t < N_TILES; t++)
      for (int c = 0; c < CPT; c++)
        if (inj_valid[t][c] && inj_ready[t][c]) begin
          if (q_f[t][c] == PKT_FLITS - 1) begin q_f[t][c] <= 0; q_sent[t][c] <= q_sent[t][c] + 1; end
          else q_f[t][c] <= q_f[t][c] + 1;
        end

  task automatic enqueue(int st, int sc, int dt, int dc);
    if (q_n[st][sc] - q_sent[st][sc] < MAXP) begin
      q_dt[st][sc][q_n[st][sc] % MAXP] = dt;
      q_dc[st][sc][q_n[st][sc] % MAXP] = dc;
      q_n[st][sc]++;
      total_q++;
    end
  endtask

  // ---------------- sinks and scoreboard ----------------
  int ej_rate [N_TILES];      // percent of cycles a core accepts
  int rx_pkts = 0;
  int exp_seq [N_TILES][CPT][N_TILES][CPT];   // next seq per (src -> dst core) pair
  byte unsigned got [N_TILES][CPT][4096];
  int cur_st [N_TILES][CPT], cur_sc [N_TILES][CPT], cur_seq [N_TILES][CPT], cur_f [N_TILES][CPT];

  always @(posedge clk)
    for (int t = 0; t < N_TILES; t++)
      for (int c = 0; c < CPT; c++)
        ej_ready[t][c] <= ($urandom_range(1, 100) <= ej_rate[t]);

  always @(posedge clk) if (rst_n)
    for (int t = 0; t < N_TILES; t++)
      for (int c = 0; c < CPT; c++)
        if (ej_valid[t][c] && ej_ready[t][c]) begin
          flit_t fl;
          hdr_t h;
          int f, seq;
          fl = ej_flit[t][c];
          h = hdr_t'(fl[15:0]);
          seq = int'(fl[47:16]);
          f = int'(fl[63:48]);
          checks++;
          if (f != cur_f[t][c]) begin failures++; $display("tile %0d core %0d flit %0d expected %0d", t, c, f, cur_f[t][c]); end
          if (f == 0) begin
            cur_st[t][c] = int'(h.src_tile); cur_sc[t][c] = int'(h.src_core); cur_seq[t][c] = seq;
            if (int'(h.dst_tile) != t || int'(h.dst_core) != c) begin failures++; $display("misrouted packet"); end
            // packets of one source core to one destination core stay in order
            // only on one path; borrowed paths may reorder, so check uniqueness
            if (seq < 0 || seq >= 4096) begin failures++; $display("bad seq"); end
          end
          if (fl[127:64] != pay(cur_st[t][c], cur_sc[t][c], cur_seq[t][c], f) || seq != cur_seq[t][c]) begin
            failures++; $display("tile %0d core %0d corrupt flit", t, c);
          end
          if (f == PKT_FLITS - 1) begin
            cur_f[t][c] = 0;
            rx_pkts++;
            got[cur_st[t][c]][cur_sc[t][c]][cur_seq[t][c] % 4096] += 1;
          end else cur_f[t][c] = f + 1;
        end

  // ---------------- mechanism counters ----------------
  int n_contend = 0, n_buf_full = 0, n_cls_not = 0, n_cls_over = 0, n_cls_under = 0, n_cls_normal = 0;
  int n_confirm = 0, n_dyn_pkts = 0, n_blocked = 0, n_reclaim = 0, n_revoke = 0, n_accept = 0;
  int occ [N_TILES][N_GRP];
  int want [N_GRP * N_GRP * N_TILES];
  int n_lanes = 0;

  always @(posedge clk) if (rst_n) begin
    // token contention: two tiles of a group ask for the same home channel
    for (int k = 0; k < N_GRP * N_GRP * N_TILES; k++) want[k] = 0;
    for (int t = 0; t < N_TILES; t++)
      for (int g = 0; g < N_GRP; g++)
        if (dut.tx_req[t][g]) begin
          int k;
          k = (int'(tile_grp(tile_t'(t))) * N_GRP + int'(dut.tx_xbar[t][g])) * N_TILES + int'(dut.tx_dst[t][g]);
          if (want[k] != 0) n_contend++;
          want[k]++;
        end
    // receive buffers filling up (credit back-pressure)
    for (int t = 0; t < N_TILES; t++)
      for (int g = 0; g < N_GRP; g++) begin
        occ[t][g] = occ[t][g] + int'(dut.rx_valid[t][g]) - int'(dut.rx_pop[t][g]);
        if (occ[t][g] == BUF_DEPTH && dut.rx_valid[t][g]) n_buf_full++;
        checks++;
        if (occ[t][g] > BUF_DEPTH) begin failures++; $display("receive buffer overflow"); end
      end
    if (dut.bus.valid) begin
      if (dut.bus.kind == MSG_CONFIRM) n_confirm++;
      if (dut.bus.kind == MSG_REVOKE)  n_revoke++;
      if (dut.bus.kind == MSG_ACCEPT)  n_accept++;
    end
    for (int t = 0; t < N_TILES; t++)
      for (int g = 0; g < N_GRP; g++)
        if (dut.tx_req[t][g] && dut.tx_xbar[t][g] != tile_grp(tile_t'(t))) n_dyn_pkts++;
    for (int t = 0; t < N_TILES; t++) if ($countones(dut.tx_gnt[t]) > 1) n_lanes++;
    if (|dut.blocked) n_blocked++;
    if (|(dut.reclaim & dut.lend_on)) n_reclaim++;
  end

  // classification results, sampled when published
  always @(posedge clk) if (rst_n && dut.stat_done[0]) begin
    for (int g = 0; g < N_GRP; g++) begin
      n_cls_not  += $countones(dut.avail[g]);
      n_cls_over += $countones(dut.over[g]);
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.g_rc[0].u_rc.gathering && dut.g_rc[0].u_rc.cls == CLS_UNDER)  n_cls_under++;
    if (dut.g_rc[3].u_rc.gathering && dut.g_rc[3].u_rc.cls == CLS_UNDER)  n_cls_under++;
    if (dut.g_rc[0].u_rc.gathering && dut.g_rc[0].u_rc.cls == CLS_NORMAL) n_cls_normal++;
    if (dut.g_rc[3].u_rc.gathering && dut.g_rc[3].u_rc.cls == CLS_NORMAL) n_cls_normal++;
  end

  function automatic int outstanding();
    int n = 0;
    for (int t = 0; t < N_TILES; t++) for (int c = 0; c < CPT; c++) n += q_n[t][c] - q_sent[t][c];
    return n;
  endfunction

  task automatic drain(int limit);
    for (int i = 0; i < limit && rx_pkts < total_q; i++) @(negedge clk);
  endtask

  initial begin
    int lent_max = 0;
    for (int t = 0; t < N_TILES; t++) begin
      ej_rate[t] = 100;
      for (int c = 0; c < CPT; c++) begin
        q_n[t][c] = 0; q_sent[t][c] = 0; q_f[t][c] = 0; cur_f[t][c] = 0;
        cur_st[t][c] = 0; cur_sc[t][c] = 0; cur_seq[t][c] = 0;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Phase A: uniform random traffic, a light load then a burst
    for (int r = 0; r < 4; r++) begin
      for (int t = 0; t < N_TILES; t++)
        for (int c = 0; c < CPT; c++)
          if ($urandom_range(0, 1)) enqueue(t, c, $urandom_range(0, N_TILES - 1), $urandom_range(0, CPT - 1));
      repeat (100) @(negedge clk);
    end
    for (int t = 0; t < N_TILES; t++) enqueue(t, 0, (t * 5 + 3) % N_TILES, 1);   // hot spots
    for (int t = 0; t < 16; t++) for (int c = 0; c < CPT; c++) enqueue(t, c, 40, c);
    drain(6000);
    check(rx_pkts == total_q, $sformatf("phase A: %0d of %0d packets", rx_pkts, total_q));
    $display("phase A done at cycle %0d: %0d packets", cyc, rx_pkts);

    // Phase B: group 0 -> group 3 streams, slow sinks in group 3
    for (int k = 0; k < TPG; k++) ej_rate[63 - k] = 45;
    for (int i = 0; i < 5 * RW; i++) begin
      @(negedge clk);
      if (i % 8 == 0)
        for (int k = 0; k < TPG; k++)
          for (int c = 0; c < CPT; c++)
            if (q_n[k][c] - q_sent[k][c] < 4) enqueue(k, c, 63 - k, c);
      for (int g = 0; g < N_GRP; g++) if ($countones(lend_active[g]) > lent_max) lent_max = $countones(lend_active[g]);
    end
    check(n_confirm > 0, "no channel was lent");
    check(lent_max > 0, "lend_active never set");
    $display("phase B done at cycle %0d: lent channels max %0d, confirms %0d", cyc, lent_max, n_confirm);

    // Phase C: owners want their channels back
    for (int i = 0; i < 2 * RW; i++) begin
      @(negedge clk);
      if (i % 16 == 0)
        for (int k = 0; k < TPG; k++) begin
          if (q_n[16 + k][0] - q_sent[16 + k][0] < 2) enqueue(16 + k, 0, 63 - k, 2);  // group 1 -> group 3
          if (q_n[k][1] - q_sent[k][1] < 2) enqueue(k, 1, 15 - k, 3);                  // group 0 intra
        end
    end
    for (int k = 0; k < TPG; k++) ej_rate[63 - k] = 100;
    drain(20000);
    check(rx_pkts == total_q, $sformatf("end: %0d of %0d packets delivered", rx_pkts, total_q));
    for (int t = 0; t < N_TILES; t++)
      for (int c = 0; c < CPT; c++)
        for (int s = 0; s < q_n[t][c]; s++) begin
          checks++;
          if (got[t][c][s] != 1) begin failures++; $display("packet %0d/%0d/%0d delivered %0d times", t, c, s, got[t][c][s]); end
        end

    $display("mechanisms: contention=%0d buffer_full=%0d not=%0d under=%0d normal=%0d over=%0d accept=%0d confirm=%0d borrowed_req=%0d blocked=%0d reclaim=%0d revoke=%0d",
             n_contend, n_buf_full, n_cls_not, n_cls_under, n_cls_normal, n_cls_over, n_accept, n_confirm, n_dyn_pkts, n_blocked, n_reclaim, n_revoke);
    check(n_contend > 0,   "token contention never happened");
    check(n_buf_full > 0,  "receive buffer never filled");
    check(n_cls_not > 0,   "no Not-utilised link");
    check(n_cls_under > 0, "no Under-utilised link");
    check(n_cls_normal > 0,"no Normal link");
    check(n_cls_over > 0,  "no Over-utilised link");
    check(n_accept > 0,    "no ACCEPT");
    check(n_confirm > 0,   "no CONFIRM");
    check(n_dyn_pkts > 0,  "borrowed channel never used");
    check(n_blocked > 0,   "source waveguide never blocked");
    check(n_reclaim > 0,   "no reclaim");
    check(n_revoke > 0,    "no REVOKE");
    check(n_lanes > 0,     "no tile ever sent on two lanes at once");
    $display("parallel lane cycles %0d", n_lanes);
    $display("packets %0d, cycles %0d", rx_pkts, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
