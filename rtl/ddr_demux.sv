// ddr_demux: 2:1 demultiplexer for links that carry two bits per pin per
// 25 ns clock (the CFEB triad links and the MPC accept line run at 80 MHz).
//
// Each pin is sampled on the rising edge (first bit of the pair) and on the
// falling edge (second bit); the pair is then presented together, aligned
// to the rising edge, as dout = {second[NPIN-1:0], first[NPIN-1:0]}.  Data
// appear at dout one clock after the rising edge that sampled the first
// bit.  Which bit of a pair comes first, and the order of the halves in
// dout, are this design's choices: the document gives only the pin counts
// and the 80 MHz rate.
module ddr_demux #(
  parameter int unsigned NPIN = 24
) (
  input  logic              clk,
  input  logic [NPIN-1:0]   din,
  output logic [2*NPIN-1:0] dout
);

  logic [NPIN-1:0] rise_q, fall_q;

  always_ff @(posedge clk) rise_q <= din;
  always_ff @(negedge clk) fall_q <= din;

  always_ff @(posedge clk) dout <= {fall_q, rise_q};

endmodule
