// tb_mwsr_channel: 16 writers send packets of 4 numbered flits to one
// receiver through the channel. Checks that every flit arrives once, intact,
// with the flits of a packet back to back and in order, that the first flit
// appears FLIGHT + 2 cycles after the grant starts, that the receiver buffer
// (drained slowly) never overflows, and that idle reports an empty channel.
module tb_mwsr_channel;
  localparam int N = 16, W = 128, PKT = 4, CRED = 16, FLIGHT = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] wr_req, wr_gnt;
  logic [N-1:0][W-1:0] wr_flit;
  logic hold, credit_ret, rx_valid, idle;
  logic [W-1:0] rx_flit;
  int checks = 0, failures = 0;
  int cyc = 0;

  mwsr_channel #(.N(N), .W(W), .PKT_FLITS(PKT), .CREDITS(CRED), .HOPS(6), .FLIGHT(FLIGHT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writers: each has a count of packets to send; flit = {writer, pkt, flit#}
  int todo [N];
  int pkt_no [N];
  int fl_no [N];
  int gnt_start [$];
  logic [W-1:0] rxq [$];
  int occupancy = 0, max_occ = 0;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      wr_req[k]  = (todo[k] > 0) && (fl_no[k] == 0) && !wr_gnt[k];
      wr_flit[k] = W'({32'(k), 32'(pkt_no[k]), 32'(fl_no[k]), 32'hC0FFEE});
    end
  end

  always @(posedge clk) begin
    for (int k = 0; k < N; k++)
      if (rst_n && wr_gnt[k]) begin
        if (fl_no[k] == 0) gnt_start.push_back(cyc);
        if (fl_no[k] == PKT - 1) begin fl_no[k] <= 0; pkt_no[k] <= pkt_no[k] + 1; todo[k] <= todo[k] - 1; end
        else fl_no[k] <= fl_no[k] + 1;
      end
  end

  // receiver buffer model, drained every third cycle
  int exp_pkt [N];
  int cur_w = -1, cur_f = 0, pkts_got = 0;
  always @(posedge clk) begin
    credit_ret <= 1'b0;
    if (rst_n) begin
      if (rx_valid) begin
        int w_, p_, f_;
        {w_, p_, f_} = {rx_flit[127:96], rx_flit[95:64], rx_flit[63:32]};
        checks++;
        if (rx_flit[31:0] != 32'hC0FFEE || w_ >= N) begin failures++; $display("corrupt flit"); end
        else begin
          if (f_ == 0) begin
            checks++;
            if (cur_f != 0) begin failures++; $display("packet interleaved"); end
            if (p_ != exp_pkt[w_]) begin failures++; $display("packet order w=%0d", w_); end
            checks++;
            if (gnt_start.size() == 0 || cyc - gnt_start[0] != FLIGHT + 2) begin
              failures++; $display("latency %0d", gnt_start.size() ? cyc - gnt_start[0] : -1);
            end
            if (gnt_start.size()) void'(gnt_start.pop_front());
            cur_w = w_;
          end else begin
            checks++;
            if (w_ != cur_w || f_ != cur_f) begin failures++; $display("flit out of order"); end
          end
          cur_f = (f_ + 1) % PKT;
          if (cur_f == 0) begin exp_pkt[w_]++; pkts_got++; end
        end
        occupancy++;
      end
      if (occupancy > max_occ) max_occ = occupancy;
      if (occupancy > 0 && cyc % 3 == 0) begin occupancy--; credit_ret <= 1'b1; end
    end
  end

  initial begin
    int total = 0;
    hold = 0;
    for (int k = 0; k < N; k++) begin
      todo[k] = 3 + k % 4; total += todo[k];
      pkt_no[k] = 0; fl_no[k] = 0; exp_pkt[k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pkts_got < total && cyc < 40000) @(posedge clk);
    checks++;
    if (pkts_got != total) begin failures++; $display("got %0d of %0d packets", pkts_got, total); end
    checks++;
    if (max_occ > CRED) begin failures++; $display("receiver overflow %0d", max_occ); end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!idle) begin failures++; $display("not idle at end"); end
    $display("packets %0d max occupancy %0d", pkts_got, max_occ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
