// token_arbiter: token-slot arbitration for one Multiple-Write-Single-Read
// channel. A single token circulates past the N writers of the channel; a
// writer that requests when the token passes captures it and owns the
// channel for one packet (PKT_FLITS consecutive cycles), after which the
// token moves on from the next writer. The token passes HOPS writers per
// cycle, so with 16 writers a waiting writer sees it within 1 to 3 cycles;
// among the requesters in the current stretch the one nearest the token
// wins. Token slot and the 1-3 cycle capture time are the document's; the
// stretch width is derived from them.
//
// Flow control (this design's choice): the arbiter holds one credit per
// receive-buffer slot. Capturing the token needs PKT_FLITS credits; each
// flit the receiver drains returns one (credit_ret). hold stops new grants
// (used while the reconfiguration micro-rings switch) without cutting off a
// packet in flight.
//
// Timing: if writer k requests in cycle t and wins, gnt[k] is high in cycles
// t+1 .. t+PKT_FLITS and the writer sends one flit in each of them.
module token_arbiter #(
  parameter int N         = 16,
  parameter int HOPS      = 6,
  parameter int PKT_FLITS = 4,
  parameter int CREDITS   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         hold,
  input  logic                         credit_ret,
  output logic [N-1:0]                 gnt,
  output logic [$clog2(N)-1:0]         gnt_idx,
  output logic                         busy,
  output logic [$clog2(CREDITS+1)-1:0] credits
);
  localparam int IW = $clog2(N);
  localparam int CW = $clog2(CREDITS+1);
  localparam int FW = $clog2(PKT_FLITS+1);

  logic [IW-1:0] tok;
  logic [FW-1:0] left;      // flits still to send in the current slot
  logic          win;
  logic [IW-1:0] win_idx;
  logic          can_go;

  function automatic logic [IW-1:0] wrap(int unsigned v);
    return IW'(v % N);
  endfunction

  // First requester in the stretch tok .. tok+HOPS-1.
  always_comb begin
    win     = 1'b0;
    win_idx = tok;
    for (int h = HOPS - 1; h >= 0; h--) begin
      if (req[wrap(int'(tok) + h)]) begin
        win     = 1'b1;
        win_idx = wrap(int'(tok) + h);
      end
    end
  end

  assign busy   = (left != '0);
  assign can_go = !busy && !hold && (credits >= CW'(PKT_FLITS)) && win;

  always_comb begin
    gnt = '0;
    if (busy) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok     <= '0;
      left    <= '0;
      gnt_idx <= '0;
      credits <= CW'(CREDITS);
    end else begin
      credits <= credits - (can_go ? CW'(PKT_FLITS) : '0) + (credit_ret ? CW'(1) : '0);
      if (can_go) begin
        gnt_idx <= win_idx;
        left    <= FW'(PKT_FLITS);
        tok     <= wrap(int'(win_idx) + 1);
      end else if (busy) begin
        left <= left - 1'b1;
      end else begin
        tok <= wrap(int'(tok) + HOPS);
      end
    end
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n) credits <= CW'(CREDITS));
  a_onehot_gnt:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
