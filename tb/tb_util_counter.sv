// tb_util_counter: drives random link activity and buffer occupancy through
// 60 windows of 16 cycles (levels sweep 0 % .. 100 %, including idle
// windows) and compares Link_util, the smoothed Buffer_util and the moment
// they update with values computed here from the equations.
module tb_util_counter;
  import noc_pkg::*;
  localparam int RW_LOG2 = 4, DEPTH = 16, WEIGHT = 3;
  localparam int RW = 1 << RW_LOG2;
  logic clk = 0, rst_n = 0;
  logic win_end, activity;
  logic [$clog2(DEPTH+1)-1:0] occupy;
  util_t link_util, buf_util;
  logic stat_valid;
  int checks = 0, failures = 0;

  util_counter #(.RW_LOG2(RW_LOG2), .DEPTH(DEPTH), .WEIGHT(WEIGHT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int act, occ, exp_link, exp_w, level;
    win_end = 0; activity = 0; occupy = '0;
    exp_link = 0; exp_w = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (stat_valid) begin failures++; $display("stat_valid before first window"); end
    for (int w = 0; w < 60; w++) begin
      act = 0; occ = 0;
      level = (w % 6) * 20;  // 0, 20 .. 100 % activity
      for (int c = 0; c < RW; c++) begin
        activity = ($urandom_range(1, 100) <= level);
        occupy   = (w % 6 == 5) ? DEPTH : (w % 6 == 0) ? 0 : $urandom_range(0, DEPTH);
        win_end  = (c == RW - 1);
        act += int'(activity);
        occ += int'(occupy);
        if (w > 0) begin
          checks++;
          if (link_util != util_t'(exp_link) || buf_util != util_t'(exp_w) || !stat_valid) begin
            failures++;
            $display("w=%0d c=%0d link %0d/%0d buf %0d/%0d", w, c, link_util, exp_link, buf_util, exp_w);
          end
        end
        @(negedge clk);
      end
      exp_link = (act * UTIL_ONE) / RW;
      exp_w    = (((occ * UTIL_ONE) / (DEPTH * RW)) * WEIGHT + exp_w) / (WEIGHT + 1);
    end
    win_end = 0;
    checks++;
    if (link_util != util_t'(exp_link) || buf_util != util_t'(exp_w)) begin
      failures++; $display("final link %0d/%0d buf %0d/%0d", link_util, exp_link, buf_util, exp_w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
