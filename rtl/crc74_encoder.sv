// crc74_encoder -- serial CRC (7,4) encoder.
//
// Computes the 3-bit CRC remainder of a serially entered augmented data word
// (4 data bits followed by 3 zeros, most significant bit first) for the
// divisor 1,dv[2],dv[1],dv[0]. The remainder is appended to the data word to
// form the 7-bit code word.
//
// How it works: three D flip-flops form a shift register rm[0] -> rm[1] ->
// rm[2]. On every rising clock edge each stage takes the previous stage (the
// first takes serial_in), XORed with rm[2] ANDed with that stage's divisor bit:
//   rm[0] <= (rm[2] & dv[0]) ^ serial_in
//   rm[1] <= (rm[2] & dv[1]) ^ rm[0]
//   rm[2] <= (rm[2] & dv[2]) ^ rm[1]
// When rm[2] is 1 the divisor is "subtracted" (XORed) from the partial
// dividend, exactly one step of modulo-2 long division; when it is 0 the
// register only shifts. The leading divisor bit is always 1 and needs no gate.
//
// Interface: clock, reset (active high, asynchronous, clears the register),
// serial_in, dv (divisor bits below the leading 1, held constant during a
// word), rm (remainder, rm[2] most significant).
//
// Timing: after reset, present one bit of the augmented word before each of
// N = 7 rising edges; rm holds the remainder right after the 7th edge and
// until the next one. The encoder has no bit counter or done flag: framing
// the 7 bits and sampling rm is left to the surrounding logic, as in the
// circuit this follows. The gate-level structure and the equations follow
// that circuit; the parameterisation by N and K is this design's own, with
// defaults of the (7,4) code.
module crc74_encoder
  import crc_pkg::*;
#(
  parameter int unsigned N = CRC_N,  // code word bits
  parameter int unsigned K = CRC_K   // data word bits
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         serial_in,
  input  logic [N-K-1:0] dv,
  output logic [N-K-1:0] rm
);

  localparam int unsigned R = N - K;  // remainder bits = flip-flops

  logic [R-1:0] feedback;   // AND gates: rm[R-1] & dv[i]
  logic [R-1:0] next_rm;    // XOR gates: flip-flop inputs
  logic [R-1:0] rm_n;       // inverted flip-flop outputs, unused

  always_comb begin
    feedback = {R{rm[R-1]}} & dv;
    next_rm  = feedback ^ {rm[R-2:0], serial_in};
  end

  for (genvar i = 0; i < R; i++) begin : g_stage
    d_dff u_dff (
      .Clk  (clock),
      .Din  (next_rm[i]),
      .Set  (1'b0),
      .Reset(reset),
      .Dout (rm[i]),
      .Ndout(rm_n[i])
    );
  end

endmodule
