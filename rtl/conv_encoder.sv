// conv_encoder: generalized (n, k, m) convolutional encoder.
//
// An M-bit shift register holds the last input bits. On every rising clock
// edge K new input bits are shifted in and the oldest K bits fall out. Each
// of the N outputs is a modulo-2 adder (XOR) over the register stages that
// its generator mask G[i] selects, so the code word depends on the present
// input and on the past ones held in the register. This is the structure of
// the basic encoder: a register of m stages feeding n modulo-2 adders, giving
// a code rate of K/N.
//
// Interface
//   clk, rst   rising-edge clock; asynchronous, active-high clear of the
//              register (the published schematics show a register with an
//              asynchronous clear).
//   din[K-1:0] input bits, sampled on every rising edge. With SHIFT_DOWN
//              din[K-1] enters m[M-1]; with SHIFT_UP din[0] enters m[0] and
//              din[K-1] enters m[K-1].
//   code[N-1:0] code word. code[j] is the parity of G[j] & m; the most
//              significant generator, G[N-1], gives the first code bit
//              ("code1"), so a word reads {code1, code2, ...}.
//
// Timing: the code word is combinational from the register, so the word
// that belongs to an input appears just after the edge that samples that
// input and holds for one clock period (one clock of latency, one word per
// clock). There is no enable or valid: a word is produced on every clock,
// as in the published design.
//
// Parameter defaults are the rate 1/2 encoder; the choice of defaults, the
// generic form and the mask encoding are this design's own.
module conv_encoder
  import conv_enc_pkg::*;
#(
  parameter int unsigned K = 1,            // input bits per clock
  parameter int unsigned M = R12_M,        // register stages
  parameter int unsigned N = 2,            // output bits per clock
  parameter shift_dir_e  DIR = SHIFT_UP,
  parameter logic [N-1:0][M-1:0] G = {R12_G1, R12_G2}
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [K-1:0] din,
  output logic [N-1:0] code
);

  initial begin
    assert (K >= 1 && K < M) else $error("conv_encoder: need 1 <= K < M");
    assert (N > K)           else $error("conv_encoder: need N > K");
  end

  logic [M-1:0] m;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      m <= '0;
    end else if (DIR == SHIFT_UP) begin
      m <= {m[M-K-1:0], din};
    end else begin
      m <= {din, m[M-1:K]};
    end
  end

  // One modulo-2 adder per output.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      code[j] = ^(G[j] & m);
    end
  end

endmodule
