// tb_r3d_noc_synth: the synthetic permutation workloads of the 256-core
// evaluation, run on the whole network at its default parameters. Core
// numbers are 8 bits (tile * 4 + core). For each pattern every core sends
// PKTS packets back to back to its partner:
//   uniform       - a random core for every packet
//   bit-reversal  - the 8 address bits reversed
//   transpose     - the two 4-bit halves swapped
//   complement    - all address bits inverted
//   shuffle       - the address rotated left by one bit
// Every packet is scoreboarded (right core, exactly once, unchanged) and
// the accepted throughput of each pattern (flits per cycle for the whole
// network) is printed.
module tb_r3d_noc_synth;
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

  function automatic int outstanding();
    int n = 0;
    for (int t = 0; t < N_TILES; t++) for (int c = 0; c < CPT; c++) n += q_n[t][c] - q_sent[t][c];
    return n;
  endfunction

  task automatic drain(int limit);
    for (int i = 0; i < limit && rx_pkts < total_q; i++) @(negedge clk);
  endtask

  function automatic int partner(int pat, int src);
    int d;
    case (pat)
      0: d = $urandom_range(0, N_TILES * CPT - 1);
      1: begin d = 0; for (int i = 0; i < 8; i++) d |= ((src >> i) & 1) << (7 - i); end
      2: d = ((src & 15) << 4) | (src >> 4);
      3: d = 255 - src;
      default: d = ((src << 1) & 255) | (src >> 7);
    endcase
    return d;
  endfunction

  localparam int PKTS = 8;
  string names [5] = '{"uniform", "bit-reversal", "transpose", "complement", "shuffle"};

  initial begin
    int t0, d, base;
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
    for (int p = 0; p < 5; p++) begin
      t0 = cyc;
      base = rx_pkts;
      for (int k = 0; k < PKTS; k++)
        for (int t = 0; t < N_TILES; t++)
          for (int c = 0; c < CPT; c++) begin
            d = partner(p, t * CPT + c);
            enqueue(t, c, d / CPT, d % CPT);
          end
      drain(20000);
      check(rx_pkts == total_q, $sformatf("%s: %0d of %0d packets", names[p], rx_pkts, total_q));
      $display("%-12s %5d packets in %5d cycles: %0.2f flits/cycle", names[p], rx_pkts - base, cyc - t0,
               real'((rx_pkts - base) * PKT_FLITS) / real'(cyc - t0));
      checks++;
      if (rx_pkts - base != N_TILES * CPT * PKTS) begin failures++; $display("packet count"); end
    end
    for (int t = 0; t < N_TILES; t++)
      for (int c = 0; c < CPT; c++)
        for (int s = 0; s < q_n[t][c]; s++) begin
          checks++;
          if (got[t][c][s] != 1) begin failures++; $display("packet %0d/%0d/%0d delivered %0d times", t, c, s, got[t][c][s]); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
