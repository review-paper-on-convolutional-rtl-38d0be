// conv_enc_pkg: shared types and constants of the convolutional encoders.
//
// The generator masks below are the modulo-2 adder connections of the three
// encoders: bit j of a mask set means register stage m<j> feeds that adder.
// The taps are the published ones for each code rate; the packing of the
// taps into masks, the direction type and the names are this design's own.
package conv_enc_pkg;

  // Which end of the state register the new input bits enter.
  //   SHIFT_UP   : new bits enter at m[K-1:0] and older bits move to higher
  //                indices (rate 1/2 and 1/3: m0 is the newest bit).
  //   SHIFT_DOWN : new bits enter at m[M-1:M-K] and older bits move to lower
  //                indices (rate 2/3: m7, m6 hold the newest pair).
  typedef enum logic {
    SHIFT_UP   = 1'b0,
    SHIFT_DOWN = 1'b1
  } shift_dir_e;

  // Rate 1/2, three register stages m2..m0, new bit into m0.
  localparam int unsigned R12_M = 3;
  localparam logic [R12_M-1:0] R12_G1 = 3'b111; // code1 = m0 ^ m1 ^ m2
  localparam logic [R12_M-1:0] R12_G2 = 3'b011; // code2 = m0 ^ m1

  // Rate 1/3, same register as rate 1/2 with a third adder.
  localparam int unsigned R13_M = 3;
  localparam logic [R13_M-1:0] R13_G1 = 3'b111; // code1 = m0 ^ m1 ^ m2
  localparam logic [R13_M-1:0] R13_G2 = 3'b011; // code2 = m0 ^ m1
  localparam logic [R13_M-1:0] R13_G3 = 3'b101; // code3 = m0 ^ m2

  // Rate 2/3, eight register stages m7..m0, input pair into m7, m6.
  localparam int unsigned R23_K = 2;
  localparam int unsigned R23_M = 8;
  localparam logic [R23_M-1:0] R23_G1 = 8'b0010_1100; // co1 = m2 ^ m3 ^ m5
  localparam logic [R23_M-1:0] R23_G2 = 8'b0001_0010; // co2 = m1 ^ m4
  localparam logic [R23_M-1:0] R23_G3 = 8'b1100_0001; // co3 = m0 ^ m6 ^ m7

endpackage
