// tb_photonic_xbar: crossbar from group 1 to group 2. Phase 1: the 16 tiles
// of group 1 send packets to random tiles of group 2 while tiles of group 0
// also ask for the crossbar; every packet must arrive whole on the home
// channel of its destination, none of group 0's. Phase 2: channel 5 is lent
// to group 0 and channel 7 is blocked; group 0's packet to tile 5 must then
// arrive, group 1's requests for channels 5 and 7 must wait and raise
// starved, and both must go through once the rings are switched back.
module tb_photonic_xbar;
  import noc_pkg::*;
  localparam int SRC = 1, DST = 2;
  logic clk = 0, rst_n = 0;
  logic  [N_TILES-1:0] tx_req, gnt;
  grp_t  [N_TILES-1:0] tx_xbar;
  tile_t [N_TILES-1:0] tx_dst;
  flit_t [N_TILES-1:0] tx_flit;
  logic  [TPG-1:0] lend_on, hold, blocked, credit_ret, rx_valid, idle, starved;
  grp_t  [TPG-1:0] lend_borr;
  flit_t [TPG-1:0] rx_flit;
  int checks = 0, failures = 0;

  photonic_xbar #(.SRC(SRC), .DST(DST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer models
  int want_dst [N_TILES];   // -1: nothing to send
  int fl [N_TILES];
  int pkt_id [N_TILES];
  int sent [N_TILES];
  always_comb begin
    for (int t = 0; t < N_TILES; t++) begin
      tx_req[t]  = want_dst[t] >= 0 && fl[t] == 0 && !gnt[t];
      tx_dst[t]  = tile_t'(want_dst[t] < 0 ? 0 : want_dst[t]);
      tx_xbar[t] = grp_t'(SRC);
      tx_flit[t] = flit_t'({32'(t), 32'(pkt_id[t]), 32'(fl[t]), 32'(want_dst[t])});
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < N_TILES; t++)
      if (gnt[t]) begin
        if (fl[t] == PKT_FLITS - 1) begin fl[t] <= 0; sent[t] <= sent[t] + 1; pkt_id[t] <= pkt_id[t] + 1; end
        else fl[t] <= fl[t] + 1;
      end
  end

  // receivers: check flits, return credits one cycle later
  int rcv [TPG];
  int cur_src [TPG];
  int from_grp0 = 0;
  always @(posedge clk) begin
    credit_ret <= rx_valid;
    if (rst_n)
      for (int c = 0; c < TPG; c++)
        if (rx_valid[c]) begin
          int s, f, d;
          s = int'(rx_flit[c][127:96]); f = int'(rx_flit[c][63:32]); d = int'(rx_flit[c][31:0]);
          checks++;
          if (d != DST * TPG + c) begin failures++; $display("flit for %0d on channel %0d", d, c); end
          if (f == 0) cur_src[c] = s;
          else if (s != cur_src[c]) begin failures++; $display("interleaved on %0d", c); end
          if (f == PKT_FLITS - 1) begin rcv[c]++; if (s / TPG == 0) from_grp0++; end
        end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    int total, got;
    lend_on = '0; lend_borr = '0; hold = '0; blocked = '0;
    for (int t = 0; t < N_TILES; t++) begin want_dst[t] = -1; fl[t] = 0; pkt_id[t] = 0; sent[t] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // phase 1
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < TPG; k++) want_dst[SRC*TPG + k] = DST*TPG + $urandom_range(0, TPG - 1);
      for (int k = 0; k < 4; k++) want_dst[k] = DST*TPG + k;     // group 0 asking
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        for (int k = 0; k < TPG; k++) if (sent[SRC*TPG + k] > r) want_dst[SRC*TPG + k] = -1;
      end
      for (int k = 0; k < TPG; k++) check(sent[SRC*TPG + k] == r + 1, $sformatf("round %0d tile %0d not sent", r, k));
    end
    for (int k = 0; k < 4; k++) want_dst[k] = -1;
    repeat (20) @(negedge clk);
    got = 0; foreach (rcv[c]) got += rcv[c];
    check(got == 8 * TPG, $sformatf("received %0d packets", got));
    check(from_grp0 == 0, "group 0 wrote without the rings switched");
    check(idle == '1, "channels not idle");
    // phase 2
    begin
      int s1, s2;
      lend_on[5] = 1; lend_borr[5] = grp_t'(0); blocked[7] = 1;
      @(negedge clk);
      s1 = sent[SRC*TPG + 1]; s2 = sent[SRC*TPG + 2];
      want_dst[3] = DST*TPG + 5;           // group 0 uses lent channel 5
      want_dst[SRC*TPG + 1] = DST*TPG + 5; // owner wants channel 5
      want_dst[SRC*TPG + 2] = DST*TPG + 7; // owner wants blocked channel 7
      for (int i = 0; i < 30 && sent[3] == 0; i++) @(negedge clk);
      want_dst[3] = -1;
      repeat (20) @(negedge clk);
      check(from_grp0 == 1, "borrower's packet not delivered on lent channel");
      check(starved[5] && starved[7], "starved not raised");
      check(sent[SRC*TPG + 1] == s1, "owner served on lent channel");
      check(sent[SRC*TPG + 2] == s2, "owner served on blocked channel");
      lend_on[5] = 0; blocked[7] = 0;
      for (int i = 0; i < 30 && !(sent[SRC*TPG + 1] > s1 && sent[SRC*TPG + 2] > s2); i++) @(negedge clk);
      want_dst[SRC*TPG + 1] = -1; want_dst[SRC*TPG + 2] = -1;
      @(negedge clk);
      check(starved == '0, "starved after release");
      check(sent[SRC*TPG + 1] > s1 && sent[SRC*TPG + 2] > s2, "released channels unused");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
