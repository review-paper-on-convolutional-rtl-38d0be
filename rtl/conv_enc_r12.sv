// conv_enc_r12: rate 1/2 convolutional encoder, constraint length 3.
//
// Each rising clock edge shifts data_in into m0 while m0 moves to m1 and m1
// to m2. Two modulo-2 adders form the code word from the register:
//   code1 = m0 ^ m1 ^ m2      (generator 111)
//   code2 = m0 ^ m1           (generator 011)
// The register, the taps and the port names follow the published encoder;
// starting from a cleared register an input of 1 gives the word 11 ({code1,
// code2} = 3) and an input of 0 gives 00.
//
// Interface: clk, reset (asynchronous, active high, clears m2..m0),
// data_in, code1, code2.
// Timing: one input bit per clock. code1/code2 are combinational from the
// register, so the word for an input bit appears right after the edge that
// samples it and holds for one clock.
module conv_enc_r12
  import conv_enc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic data_in,
  output logic code1,
  output logic code2
);

  logic [1:0] code;

  conv_encoder #(
    .K  (1),
    .M  (R12_M),
    .N  (2),
    .DIR(SHIFT_UP),
    .G  ({R12_G1, R12_G2})
  ) u_enc (
    .clk  (clk),
    .rst  (reset),
    .din  (data_in),
    .code (code)
  );

  assign {code1, code2} = code;

endmodule
