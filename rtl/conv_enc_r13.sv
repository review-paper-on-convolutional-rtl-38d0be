// conv_enc_r13: rate 1/3 convolutional encoder, constraint length 3.
//
// Each rising clock edge shifts data_in into m0 while m0 moves to m1 and m1
// to m2. Three modulo-2 adders form the code word from the register:
//   code1 = m0 ^ m1 ^ m2      (generator 111)
//   code2 = m0 ^ m1           (generator 011)
//   code3 = m0 ^ m2           (generator 101)
// The register, the taps and the port names follow the published encoder;
// starting from a cleared register an input of 1 gives the word 111
// ({code1, code2, code3} = 7) and an input of 0 gives 000.
//
// Interface: clk, reset (asynchronous, active high, clears m2..m0),
// data_in, code1, code2, code3.
// Timing: one input bit per clock. The outputs are combinational from the
// register, so the word for an input bit appears right after the edge that
// samples it and holds for one clock.
module conv_enc_r13
  import conv_enc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic data_in,
  output logic code1,
  output logic code2,
  output logic code3
);

  logic [2:0] code;

  conv_encoder #(
    .K  (1),
    .M  (R13_M),
    .N  (3),
    .DIR(SHIFT_UP),
    .G  ({R13_G1, R13_G2, R13_G3})
  ) u_enc (
    .clk  (clk),
    .rst  (reset),
    .din  (data_in),
    .code (code)
  );

  assign {code1, code2, code3} = code;

endmodule
