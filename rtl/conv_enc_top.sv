// conv_enc_top: the three convolutional encoders of different code rate.
//
// The rate 1/2, rate 1/3 and rate 2/3 encoders run side by side on one
// clock and one asynchronous active-high reset. Each has its own input and
// its own code word output, so any of the three rates can be used, or all
// at once:
//   r12: 1 bit in, {code1, code2} out per clock
//   r13: 1 bit in, {code1, code2, code3} out per clock
//   r23: 2 bits in (ci[1:0]), {co1, co2, co3} out per clock
// Every code word is combinational from its encoder's register and appears
// right after the clock edge that samples its input.
// Sharing one clock and reset, and packing each word MSB-first as
// {code1, code2, ...}, are this design's choices; the encoders themselves
// follow the published ones.
module conv_enc_top (
  input  logic       clk,
  input  logic       reset,
  input  logic       r12_data_in,
  output logic [1:0] r12_code,
  input  logic       r13_data_in,
  output logic [2:0] r13_code,
  input  logic [1:0] r23_ci,
  output logic [2:0] r23_code
);

  conv_enc_r12 u_r12 (
    .clk    (clk),
    .reset  (reset),
    .data_in(r12_data_in),
    .code1  (r12_code[1]),
    .code2  (r12_code[0])
  );

  conv_enc_r13 u_r13 (
    .clk    (clk),
    .reset  (reset),
    .data_in(r13_data_in),
    .code1  (r13_code[2]),
    .code2  (r13_code[1]),
    .code3  (r13_code[0])
  );

  conv_enc_r23 u_r23 (
    .clock(clk),
    .reset(reset),
    .ci   (r23_ci),
    .co1  (r23_code[2]),
    .co2  (r23_code[1]),
    .co3  (r23_code[0])
  );

endmodule
