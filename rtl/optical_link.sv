// optical_link: behavioural model of one nanophotonic home channel between
// the electrical back ends: the E/O modulator stage, the waveguide flight
// and the O/E receiver stage. The channel is a bundle of 64 wavelengths at
// 10 Gb/s, i.e. one 128-bit flit per 5 GHz clock, so the model is a pipeline
// that delivers each flit FLIGHT + 2 cycles after it is sent (one cycle for
// each conversion, FLIGHT = 1..5 cycles by the physical distance). The data
// rate and latencies are the document's; modelling the light path as a
// register pipeline is this design's abstraction of an analog part.
//
// Interface: tx_valid/tx_flit enter from the granted writer; rx_valid/
// rx_flit leave at the receiver. empty is high when no flit is in flight.
module optical_link #(
  parameter int W      = 128,
  parameter int FLIGHT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tx_valid,
  input  logic [W-1:0] tx_flit,
  output logic         rx_valid,
  output logic [W-1:0] rx_flit,
  output logic         empty
);
  localparam int LAT = FLIGHT + 2;

  logic [LAT-1:0] v;
  logic [W-1:0]   d [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LAT-2:0], tx_valid};
  end

  always_ff @(posedge clk) begin
    d[0] <= tx_flit;
    for (int i = 1; i < LAT; i++) d[i] <= d[i-1];
  end

  assign rx_valid = v[LAT-1];
  assign rx_flit  = d[LAT-1];
  assign empty    = (v == '0);
endmodule
