// tb_token_arbiter: checks token-slot arbitration of one 16-writer channel.
//  1. A lone requester captures the token within 1..3 cycles and is granted
//     for exactly PKT_FLITS cycles.
//  2. With every writer requesting, grants follow token order (each next
//     winner is the next writer) and never overlap.
//  3. Without returned credits at most CREDITS/PKT_FLITS packets are granted;
//     returning credits lets arbitration resume.
//  4. hold stops new grants.
module tb_token_arbiter;
  localparam int N = 16, HOPS = 6, PKT = 4, CRED = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic hold, credit_ret, busy;
  logic [3:0] gnt_idx;
  logic [$clog2(CRED+1)-1:0] credits;
  int checks = 0, failures = 0;

  token_arbiter #(.N(N), .HOPS(HOPS), .PKT_FLITS(PKT), .CREDITS(CRED)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // credits are returned one cycle after each granted flit when enabled
  logic auto_credit;
  always @(posedge clk) credit_ret <= auto_credit && |gnt;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    int wait_c, len, last, worst;
    req = '0; hold = 0; auto_credit = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // 1. lone requester, from every position of the token
    worst = 0;
    for (int t = 0; t < 60; t++) begin
      int k;
      k = $urandom_range(0, N - 1);
      repeat ($urandom_range(0, 7)) @(negedge clk);
      req[k] = 1'b1;
      wait_c = 0;
      while (!gnt[k]) begin @(negedge clk); wait_c++; check(wait_c < 10, "no grant"); if (wait_c >= 10) break; end
      req[k] = 1'b0;
      if (wait_c > worst) worst = wait_c;
      check(wait_c >= 1 && wait_c <= 3, $sformatf("capture took %0d cycles", wait_c));
      len = 0;
      while (gnt[k]) begin len++; check($onehot(gnt), "grant not one-hot"); @(negedge clk); end
      check(len == PKT, $sformatf("slot length %0d", len));
      repeat (2) @(negedge clk);
    end
    // 2. all writers request: round-robin token order
    req = '1;
    last = -1;
    for (int p = 0; p < 40; p++) begin
      while (!busy) @(negedge clk);
      if (last >= 0) check(int'(gnt_idx) == (last + 1) % N, $sformatf("order %0d after %0d", gnt_idx, last));
      last = gnt_idx;
      len = 0;
      while (busy && gnt_idx == 4'(last)) begin len++; @(negedge clk); if (len > PKT) break; end
      check(len == PKT, "back-to-back slot length");
    end
    req = '0;
    repeat (10) @(negedge clk);
    // 3. credits: stop returning them
    check(credits == CRED, "credits not all returned");
    auto_credit = 0;
    req = '1;
    begin
      int grants = 0;
      for (int c = 0; c < 100; c++) begin
        @(posedge clk);
        #1 if (busy && dut.left == 3'(PKT)) grants++;
      end
      check(grants == CRED / PKT, $sformatf("%0d grants without credit return", grants));
      check(!busy, "busy without credits");
    end
    auto_credit = 1;
    // return credits by hand
    @(negedge clk);
    repeat (PKT) begin force credit_ret = 1'b1; @(negedge clk); end
    release credit_ret;
    wait_c = 0;
    while (!busy && wait_c < 10) begin @(negedge clk); wait_c++; end
    check(busy, "no grant after credits returned");
    // 4. hold
    req = '0;
    repeat (10) @(negedge clk);
    hold = 1; req = '1;
    repeat (30) begin @(negedge clk); check(!busy, "grant while held"); end
    hold = 0;
    wait_c = 0;
    while (!busy && wait_c < 10) begin @(negedge clk); wait_c++; end
    check(busy, "no grant after hold released");
    $display("worst capture %0d cycles", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
