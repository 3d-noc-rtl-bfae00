// tb_tile_router: router of tile 20 (group 1).
//  Transmit: the four cores each inject 12 packets to random tiles. A model
//  channel per transmit lane grants requests after a random wait. Checks
//  that each packet leaves whole on the lane of its destination group, in
//  per-core order within the lane, toward its header's tile, on the own
//  group's crossbar, and on alternate packets of the lane through the
//  borrowed crossbar (group 2) for the one destination with borrowed
//  bandwidth; and that lanes do send at the same time.
//  Receive: the four home channels deliver packets (credit-limited) for the
//  four cores; checks that each core gets its packets whole and in order
//  under random back-pressure, and that rx_pop returns every flit.
//  Statistics: Link_util of each receiver equals the flits counted here in
//  each 64-cycle window.
module tb_tile_router;
  import noc_pkg::*;
  localparam int RW_LOG2 = 6;
  localparam int MY = 20, DYN_DST = 45, NPK = 12;
  logic clk = 0, rst_n = 0;
  tile_t my_tile;
  logic  [CPT-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  flit_t [CPT-1:0] inj_flit, ej_flit;
  logic  [N_TILES-1:0] dyn_valid;
  grp_t  [N_TILES-1:0] dyn_lender;
  logic  [N_GRP-1:0] tx_req, tx_gnt;
  grp_t  [N_GRP-1:0] tx_xbar;
  tile_t [N_GRP-1:0] tx_dst;
  flit_t [N_GRP-1:0] tx_flit;
  logic  [N_GRP-1:0] rx_valid, rx_pop;
  flit_t [N_GRP-1:0] rx_flit;
  logic win_end;
  util_t [N_GRP-1:0] link_util, buf_util;
  int checks = 0, failures = 0;
  int cyc = 0;

  tile_router #(.RW_LOG2(RW_LOG2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign win_end = rst_n && (cyc % 64 == 63);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  function automatic flit_t mk_flit(int src_core, int pkt, int f, int dst, int dcore);
    hdr_t h;
    h.src_tile = tile_t'(MY); h.src_core = 2'(src_core);
    h.dst_tile = tile_t'(dst); h.dst_core = 2'(dcore);
    return flit_t'({32'(src_core), 32'(pkt), 32'(f), 16'h0, 16'(h)});
  endfunction

  // ---------------- injection ----------------
  int dsts [CPT][NPK];
  int inj_pkt [CPT], inj_f [CPT];
  always_comb
    for (int c = 0; c < CPT; c++) begin
      inj_valid[c] = inj_pkt[c] < NPK;
      inj_flit[c]  = mk_flit(c, inj_pkt[c], inj_f[c], inj_valid[c] ? dsts[c][inj_pkt[c] % NPK] : 0, 0);
    end
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < CPT; c++)
      if (inj_valid[c] && inj_ready[c]) begin
        if (inj_f[c] == PKT_FLITS - 1) begin inj_f[c] <= 0; inj_pkt[c] <= inj_pkt[c] + 1; end
        else inj_f[c] <= inj_f[c] + 1;
      end

  // ---------------- model channels, one per transmit lane ----------------
  int gwait [N_GRP], gleft [N_GRP], lane_pkts [N_GRP];
  int out_pkts = 0, dyn_used = 0, dyn_total = 0, n_parallel = 0;
  int next_p [CPT][N_GRP];   // index of the next packet of core c bound for group g
  int cur_core [N_GRP];
  grp_t cur_xbar [N_GRP];
  tile_t cur_dst [N_GRP];

  function automatic int next_for(int c, int g, int from);
    for (int p = from; p < NPK; p++)
      if (int'(tile_grp(tile_t'(dsts[c][p]))) == g) return p;
    return NPK;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin tx_gnt <= '0; end
    else begin
      if ($countones(tx_gnt) > 1) n_parallel++;
      for (int g = 0; g < N_GRP; g++) begin
        if (tx_gnt[g]) begin
          int c, p, f;
          hdr_t h;
          c = int'(tx_flit[g][127:96]); p = int'(tx_flit[g][95:64]); f = int'(tx_flit[g][63:32]);
          checks++;
          if (f != PKT_FLITS - gleft[g]) begin failures++; $display("lane %0d flit order", g); end
          if (f == 0) begin
            h = hdr_t'(tx_flit[g][15:0]);
            cur_core[g] = c;
            if (p != next_p[c][g]) begin failures++; $display("core %0d lane %0d packet %0d expected %0d", c, g, p, next_p[c][g]); end
            if (int'(h.dst_tile) != dsts[c][p % NPK] || h.dst_tile != cur_dst[g]
                || int'(tile_grp(h.dst_tile)) != g) begin failures++; $display("wrong destination"); end
            next_p[c][g] = next_for(c, g, p + 1);
            out_pkts++;
            lane_pkts[g]++;
            if (int'(cur_dst[g]) == DYN_DST) begin
              int now_dyn;
              now_dyn = (cur_xbar[g] == grp_t'(2));
              dyn_total++;
              dyn_used += now_dyn;
              checks++;
              // every second packet of the lane may take the borrowed path
              if (now_dyn != (lane_pkts[g] - 1) % 2) begin failures++; $display("no alternation"); end
            end else begin
              checks++;
              if (cur_xbar[g] != grp_t'(1)) begin failures++; $display("wrong crossbar"); end
            end
          end else if (c != cur_core[g]) begin failures++; $display("packet broken"); end
        end
        if (gleft[g] > 0) begin
          gleft[g] = gleft[g] - 1;
          tx_gnt[g] <= gleft[g] > 0;
        end else if (tx_req[g] && !tx_gnt[g]) begin
          if (gwait[g] == 0) gwait[g] = $urandom_range(1, 4);
          gwait[g]--;
          if (gwait[g] == 0) begin
            cur_xbar[g] = tx_xbar[g]; cur_dst[g] = tx_dst[g];
            tx_gnt[g] <= 1; gleft[g] = PKT_FLITS;
          end
        end else tx_gnt[g] <= 0;
      end
    end
  end

  // ---------------- receive side ----------------
  int rx_cred [N_GRP], rx_sent [N_GRP], rx_f [N_GRP], win_flits [N_GRP];
  int ej_exp [CPT], ej_cur_src [CPT], ej_f [CPT], ej_pkts = 0, rx_popped = 0;
  int win_snap [N_GRP];
  bit snap_ok = 0;
  localparam int RX_PKTS = 10;
  always @(posedge clk) begin
    if (!rst_n) begin rx_valid <= '0; end
    else begin
      for (int g = 0; g < N_GRP; g++) begin
        logic v;
        hdr_t h;
        v = 0;
        if (rx_f[g] != 0 || (rx_sent[g] < RX_PKTS && rx_cred[g] >= PKT_FLITS && $urandom_range(0, 3) == 0)) begin
          v = 1;
          if (rx_f[g] == 0) rx_cred[g] -= PKT_FLITS;
          h = '0; h.dst_tile = tile_t'(MY); h.dst_core = 2'((g + rx_sent[g]) % CPT);
          rx_flit[g] <= flit_t'({32'(g), 32'(rx_sent[g]), 32'(rx_f[g]), 16'h0, 16'(h)});
          if (rx_f[g] == PKT_FLITS - 1) begin rx_f[g] = 0; rx_sent[g]++; end else rx_f[g]++;
        end
        rx_valid[g] <= v;
        if (rx_pop[g]) begin rx_cred[g]++; rx_popped++; end
        // the counter samples rx_valid as it was before this edge
        win_flits[g] += int'(rx_valid[g]);
        if (win_end) begin win_snap[g] = win_flits[g]; win_flits[g] = 0; snap_ok = 1; end
      end
    end
  end

  // link_util check: after each window end, the counter shows that window
  always @(negedge clk) if (rst_n && snap_ok) begin
    for (int g = 0; g < N_GRP; g++) begin
      checks++;
      if (int'(link_util[g]) != win_snap[g] * UTIL_ONE / 64) begin
        failures++; $display("link_util[%0d]=%0d expected %0d", g, link_util[g], win_snap[g] * UTIL_ONE / 64);
      end
    end
  end

  always @(posedge clk)
    for (int c = 0; c < CPT; c++) ej_ready[c] <= ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < CPT; c++)
      if (ej_valid[c] && ej_ready[c]) begin
        int s, p, f;
        hdr_t h;
        s = int'(ej_flit[c][127:96]); p = int'(ej_flit[c][95:64]); f = int'(ej_flit[c][63:32]);
        h = hdr_t'(ej_flit[c][15:0]);
        checks++;
        if (int'(h.dst_core) != c) begin failures++; $display("core %0d got flit for %0d", c, h.dst_core); end
        if (f != ej_f[c]) begin failures++; $display("core %0d flit order", c); end
        if (f == 0) ej_cur_src[c] = s * 100 + p;
        else if (ej_cur_src[c] != s * 100 + p) begin failures++; $display("core %0d packet broken", c); end
        if (f == PKT_FLITS - 1) begin ej_f[c] = 0; ej_pkts++; end else ej_f[c]++;
      end

  initial begin
    my_tile = tile_t'(MY);
    dyn_valid = '0; dyn_lender = '0;
    dyn_valid[DYN_DST] = 1'b1; dyn_lender[DYN_DST] = grp_t'(2);
    for (int c = 0; c < CPT; c++) begin
      inj_pkt[c] = 0; inj_f[c] = 0; ej_f[c] = 0;
      for (int p = 0; p < NPK; p++) dsts[c][p] = (p % 3 == 0) ? DYN_DST : $urandom_range(0, N_TILES - 1);
      for (int g = 0; g < N_GRP; g++) next_p[c][g] = next_for(c, g, 0);
    end
    for (int g = 0; g < N_GRP; g++) begin gwait[g] = 0; gleft[g] = 0; lane_pkts[g] = 0; end
    for (int g = 0; g < N_GRP; g++) begin rx_cred[g] = BUF_DEPTH; rx_sent[g] = 0; rx_f[g] = 0; win_flits[g] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while ((out_pkts < CPT * NPK || ej_pkts < N_GRP * RX_PKTS) && cyc < 20000) @(negedge clk);
    repeat (200) @(negedge clk);
    check(out_pkts == CPT * NPK, $sformatf("sent %0d packets", out_pkts));
    check(ej_pkts == N_GRP * RX_PKTS, $sformatf("ejected %0d packets", ej_pkts));
    check(rx_popped == N_GRP * RX_PKTS * PKT_FLITS, "credits not all returned");
    check(dyn_used > 0 && dyn_used < dyn_total, "borrowed crossbar never or always used");
    check(n_parallel > 0, "lanes never sent at the same time");
    $display("tx %0d rx %0d dyn %0d/%0d parallel %0d", out_pkts, ej_pkts, dyn_used, dyn_total, n_parallel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
