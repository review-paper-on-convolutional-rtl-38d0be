// conv_enc_r23: rate 2/3 convolutional encoder.
//
// The state is an eight-stage register m7..m0. Each rising clock edge loads
// the input pair into m7 (ci[1]) and m6 (ci[0]) and moves every older pair
// two stages down: m7,m6 -> m5,m4 -> m3,m2 -> m1,m0, the oldest pair being
// dropped. Three modulo-2 adders form the code word from the register:
//   co1 = m2 ^ m3 ^ m5
//   co2 = m1 ^ m4
//   co3 = m0 ^ m6 ^ m7
// The register size, the taps and the port names follow the published
// encoder; starting from a cleared register the pair 10 gives the word 001
// ({co1, co2, co3} = 1) and 00 gives 000. The order in which the pairs move
// through the register is this design's reading of it.
//
// Interface: clock, reset (asynchronous, active high, clears m7..m0),
// ci[1:0], co1, co2, co3.
// Timing: two input bits per clock, three code bits per clock. The outputs
// are combinational from the register, so the word for an input pair
// appears right after the edge that samples it and holds for one clock.
module conv_enc_r23
  import conv_enc_pkg::*;
(
  input  logic       clock,
  input  logic       reset,
  input  logic [1:0] ci,
  output logic       co1,
  output logic       co2,
  output logic       co3
);

  logic [2:0] code;

  conv_encoder #(
    .K  (R23_K),
    .M  (R23_M),
    .N  (3),
    .DIR(SHIFT_DOWN),
    .G  ({R23_G1, R23_G2, R23_G3})
  ) u_enc (
    .clk  (clock),
    .rst  (reset),
    .din  (ci),
    .code (code)
  );

  assign {co1, co2, co3} = code;

endmodule
