// tb_mrr_switch: random writer buses, ring state and borrower; checks that
// the channel takes the requests and flits of the home group when the rings
// are off and of the borrower when on, and that grants go back only there.
module tb_mrr_switch;
  localparam int N_GRP = 4, N = 16, W = 128, HOME = 2;
  logic on;
  logic [1:0] borrower;
  logic [N_GRP-1:0][N-1:0] grp_req, grp_gnt;
  logic [N_GRP-1:0][N-1:0][W-1:0] grp_flit;
  logic [N-1:0] ch_req, ch_gnt;
  logic [N-1:0][W-1:0] ch_flit;
  int checks = 0, failures = 0;

  mrr_switch #(.N_GRP(N_GRP), .N(N), .W(W), .HOME(HOME)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int drv;
    for (int i = 0; i < 2000; i++) begin
      on = $urandom_range(0, 1);
      borrower = 2'($urandom_range(0, 3));
      for (int g = 0; g < N_GRP; g++) begin
        grp_req[g] = N'($urandom);
        for (int k = 0; k < N; k++) grp_flit[g][k] = {$urandom, $urandom, $urandom, $urandom};
      end
      ch_gnt = N'(1 << $urandom_range(0, N - 1));
      #1;
      drv = on ? int'(borrower) : HOME;
      checks++;
      if (ch_req != grp_req[drv] || ch_flit != grp_flit[drv]) begin failures++; $display("mux wrong"); end
      for (int g = 0; g < N_GRP; g++) begin
        checks++;
        if (grp_gnt[g] != ((g == drv) ? ch_gnt : '0)) begin failures++; $display("grant wrong g=%0d", g); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
