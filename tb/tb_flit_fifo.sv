// tb_flit_fifo: random pushes and pops against a queue model; checks the head
// flit, the occupancy count and the full/empty flags every cycle.
module tb_flit_fifo;
  localparam int W = 128, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++;
        $display("count mismatch %0d vs %0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("data mismatch"); end
      end
      // phases: fill-biased, drain-biased, balanced
      push = ($urandom_range(0, 99) < ((cyc / 500) % 3 == 0 ? 80 : (cyc / 500) % 3 == 1 ? 20 : 50)) && !full;
      pop  = ($urandom_range(0, 99) < 50) && !empty;
      din  = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
