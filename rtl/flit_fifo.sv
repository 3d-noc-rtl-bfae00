// flit_fifo: the flit input buffer of a router port (16 flits of 128 bits by
// default, as in the evaluated configuration). It is a circular buffer held
// in a register array with separate read and write pointers and a count.
//
// Interface: push/din write a flit when not full; pop removes the head flit,
// which is always visible on dout while empty is low (first-word fall
// through). count gives the occupancy every cycle; it feeds the buffer
// utilisation counter. A push to a full buffer or a pop from an empty one is
// an error that the assertions report; the buffer ignores it.
// Timing: a flit pushed in cycle t is visible on dout in cycle t+1.
// Depth and width follow the document; the storage organisation is this
// design's choice.
module flit_fifo #(
  parameter int W     = 128,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop,
  output logic [W-1:0]               dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= incr(wp);
      if (do_pop)  rp <= incr(rp);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
