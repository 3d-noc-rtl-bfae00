// tb_util_classifier: sweeps every pair of link and buffer utilisation values
// and compares the class with the Step 4 rules evaluated here.
module tb_util_classifier;
  import noc_pkg::*;
  localparam int L_MIN = 26, B_CON = 128;
  util_t link_util, buf_util;
  util_cls_e cls, exp_cls;
  int checks = 0, failures = 0;
  int seen [4];

  util_classifier #(.L_MIN(L_MIN), .B_CON(B_CON)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= UTIL_ONE; l++)
      for (int b = 0; b <= UTIL_ONE; b++) begin
        link_util = util_t'(l);
        buf_util  = util_t'(b);
        #1;
        // real-valued thresholds 0.10 and 0.5 on the 1/256 grid
        if (l == 0)                         exp_cls = CLS_NOT;
        else if (real'(l) / 256.0 <= 0.1016) exp_cls = CLS_UNDER;
        else if (real'(b) / 256.0 > 0.5)    exp_cls = CLS_OVER;
        else                                exp_cls = CLS_NORMAL;
        checks++;
        seen[int'(cls)]++;
        if (cls != exp_cls) begin
          failures++;
          if (failures < 10) $display("l=%0d b=%0d cls=%0d exp=%0d", l, b, cls, exp_cls);
        end
      end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("class %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
