// util_classifier: Step 4 of the reconfiguration algorithm. It sorts one
// link's statistics of the previous window into four classes, tested in the
// order the algorithm lists them:
//   Link_util == 0                              -> Not-utilised   (beta4)
//   Link_util <= L_MIN                          -> Under-utilised (beta3)
//   Buffer_util > B_CON                         -> Over-utilised  (beta1)
//   otherwise (Link_util >= L_MIN, buffer low)  -> Normal         (beta2)
// Defaults L_MIN = 0.10 and B_CON = 0.5 in the UTIL_ONE = 1.0 fixed-point
// format (26/256 and 128/256); the document also names 0.25 for both
// thresholds of the normal class, and this design uses a single pair.
// Purely combinational.
module util_classifier
  import noc_pkg::*;
#(
  parameter int L_MIN = 26,   // 0.10
  parameter int B_CON = 128   // 0.50
) (
  input  util_t     link_util,
  input  util_t     buf_util,
  output util_cls_e cls
);
  always_comb begin
    if (link_util == '0)                    cls = CLS_NOT;
    else if (link_util <= util_t'(L_MIN))   cls = CLS_UNDER;
    else if (buf_util > util_t'(B_CON))     cls = CLS_OVER;
    else                                    cls = CLS_NORMAL;
  end
endmodule
