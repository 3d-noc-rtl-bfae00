// tb_optical_link: sends random flits with random gaps and checks that each
// arrives unchanged exactly FLIGHT + 2 cycles later (E/O, flight, O/E) and
// that empty reports an empty light path.
module tb_optical_link;
  localparam int W = 128, FLIGHT = 3, LAT = FLIGHT + 2;
  logic clk = 0, rst_n = 0;
  logic tx_valid, rx_valid, empty;
  logic [W-1:0] tx_flit, rx_flit;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [W-1:0] sent_flit [int];
  int sent_cyc [$];

  optical_link #(.W(W), .FLIGHT(FLIGHT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got = 0, sent = 0, inflight;
    tx_valid = 0; tx_flit = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      inflight = 0;
      foreach (sent_cyc[k]) if (cyc - sent_cyc[k] <= LAT) inflight++;
      if (rx_valid) begin
        checks++;
        if (!sent_flit.exists(cyc - LAT) || sent_flit[cyc - LAT] != rx_flit) begin
          failures++; $display("cyc %0d: unexpected flit", cyc);
        end
        got++;
      end else if (sent_flit.exists(cyc - LAT)) begin
        failures++; $display("cyc %0d: flit missing", cyc);
      end
      checks++;
      if (empty != (inflight == 0)) begin failures++; $display("cyc %0d: empty wrong", cyc); end
      tx_valid = (i < 2900) && ($urandom_range(0, 2) != 0);
      tx_flit  = {$urandom, $urandom, $urandom, $urandom};
      if (tx_valid) begin
        sent_flit[cyc] = tx_flit;
        sent_cyc.push_back(cyc);
        sent++;
      end
      while (sent_cyc.size() > 0 && cyc - sent_cyc[0] > LAT + 1) void'(sent_cyc.pop_front());
      @(negedge clk);
    end
    checks++;
    if (got != sent) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
