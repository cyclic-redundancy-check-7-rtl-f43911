// d_dff -- rising-edge D flip-flop with asynchronous set and reset.
//
// One bit of storage, as used three times in the CRC remainder register.
// Dout takes Din on each rising edge of Clk. Reset (active high) forces Dout
// to 0 and Set (active high) forces it to 1 at once, without waiting for a
// clock edge; Reset has priority when both are high. Ndout is the inverse of
// Dout.
//
// The pin names follow the flip-flop symbol of the encoder schematic. That
// the reset is asynchronous follows from the way the circuit is started: the
// reset pulse ends before the first clock edge. The active-high polarity of
// Set and the priority of Reset over Set are this design's choices.
//
// Like any edge-sensitive RTL flip-flop, Set and Reset act on their rising
// edges: releasing Reset while Set stays high leaves Dout at 0 until the next
// clock edge or Set pulse. Yosys' coarse synthesis through slang does not
// accept a flip-flop with separate asynchronous set and reset, so it reports
// no size for this module; the lint and elaboration tools accept it.
module d_dff (
  input  logic Clk,
  input  logic Din,
  input  logic Set,
  input  logic Reset,
  output logic Dout,
  output logic Ndout
);

  always_ff @(posedge Clk or posedge Reset or posedge Set) begin
    if (Reset)    Dout <= 1'b0;
    else if (Set) Dout <= 1'b1;
    else          Dout <= Din;
  end

  assign Ndout = ~Dout;

endmodule
