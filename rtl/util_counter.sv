// util_counter: hardware utilisation counter at the optical receiver of one
// home channel.
//
// Over each reconfiguration window of R_W = 2**RW_LOG2 cycles it adds up
//   Activity(cycle) - 1 when a flit arrives on the link, and
//   Occupy(cycle)   - the number of receive-buffer slots in use.
// When the window ends (win_end) it stores the statistics of that window:
//   Link_util   = sum(Activity) / R_W
//   Buffer_util = sum(Occupy) / (DEPTH * R_W)
// and the smoothed buffer value
//   Buffer_w(t) = (Buffer_util * WEIGHT + Buffer_w(t-1)) / (WEIGHT + 1)
// with WEIGHT = 3, which damps short bursts. The equations and the weight are
// the document's; the fixed-point format (UTIL_ONE = 1.0), the window
// length and smoothing only the buffer value are this design's choices.
//
// Interface: win_end is a one-cycle pulse on the last cycle of a window; the
// cycle it is high still counts toward that window. link_util and buf_util
// hold the previous window's results from the cycle after win_end until the
// next win_end, and stat_valid rises after the first window.
module util_counter
  import noc_pkg::*;
#(
  parameter int RW_LOG2 = 10,  // R_W = 1024 cycles
  parameter int DEPTH   = 16,  // Total_buffers of the link
  parameter int WEIGHT  = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       win_end,
  input  logic                       activity,
  input  logic [$clog2(DEPTH+1)-1:0] occupy,
  output util_t                      link_util,
  output util_t                      buf_util,
  output logic                       stat_valid
);
  localparam int OW = $clog2(DEPTH+1);
  localparam int SW = RW_LOG2 + OW + 1;

  logic [RW_LOG2:0] act_sum;
  logic [SW-1:0]    occ_sum;
  logic [RW_LOG2:0] act_total;
  logic [SW-1:0]    occ_total;
  util_t            link_now, buf_now;
  logic [UTIL_W+3:0] w_num;

  always_comb begin
    act_total = act_sum + (RW_LOG2+1)'(activity);
    occ_total = occ_sum + SW'(occupy);
    link_now  = util_t'(({act_total, {UTIL_FRAC{1'b0}}}) >> RW_LOG2);
    buf_now   = util_t'(({occ_total, {UTIL_FRAC{1'b0}}}) / ((SW+UTIL_FRAC)'(DEPTH) << RW_LOG2));
    w_num     = (UTIL_W+4)'(buf_now) * (UTIL_W+4)'(WEIGHT) + (UTIL_W+4)'(buf_util);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_sum    <= '0;
      occ_sum    <= '0;
      link_util  <= '0;
      buf_util   <= '0;
      stat_valid <= 1'b0;
    end else if (win_end) begin
      act_sum    <= '0;
      occ_sum    <= '0;
      link_util  <= link_now;
      buf_util   <= util_t'(w_num / (UTIL_W+4)'(WEIGHT + 1));
      stat_valid <= 1'b1;
    end else begin
      act_sum <= act_total;
      occ_sum <= occ_total;
    end
  end
endmodule
