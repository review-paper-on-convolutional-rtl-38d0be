// tb_conv_enc_r23: self-checking testbench of the rate 2/3 encoder.
//
// The reference keeps the last four input pairs p0 (newest) .. p3 and
// names the register stages from them: m7 = p0[1], m6 = p0[0],
// m5 = p1[1], m4 = p1[0], m3 = p2[1], m2 = p2[0], m1 = p3[1], m0 = p3[0].
// It then forms co1 = m2^m3^m5, co2 = m1^m4, co3 = m0^m6^m7. Checked: the
// worked example from a cleared register (00 -> 000, then 10 -> m7 = 1 and
// the word 001), a long random stream of pairs, one clock of latency and
// one word per clock, and the asynchronous reset between edges.
module tb_conv_enc_r23;

  logic clock;
  logic reset;
  logic [1:0] ci;
  logic co1, co2, co3;
  logic [1:0] p0, p1, p2, p3;

  int checks = 0;
  int failures = 0;

  initial clock = 1'b0;
  always #5 clock = ~clock;

  conv_enc_r23 dut (
    .clock(clock),
    .reset(reset),
    .ci   (ci),
    .co1  (co1),
    .co2  (co2),
    .co3  (co3)
  );

  task automatic expect_word(input logic [2:0] w, input string what);
    checks++;
    if ({co1, co2, co3} !== w) begin
      failures++;
      $display("FAIL %s: {co1,co2,co3}=%b expected %b", what, {co1, co2, co3}, w);
    end
  endtask

  function automatic logic [2:0] ref_word();
    logic m7, m6, m5, m4, m3, m2, m1, m0;
    {m7, m6} = p0;
    {m5, m4} = p1;
    {m3, m2} = p2;
    {m1, m0} = p3;
    return {m2 ^ m3 ^ m5, m1 ^ m4, m0 ^ m6 ^ m7};
  endfunction

  task automatic step(input logic [1:0] b);
    @(negedge clock);
    ci = b;
    #4;
    expect_word(ref_word(), "before edge");
    @(posedge clock);
    {p3, p2, p1, p0} = {p2, p1, p0, b};
    #1;
    expect_word(ref_word(), "after edge");
  endtask

  initial begin
    repeat (1000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ci = 2'b00;
    {p3, p2, p1, p0} = '0;
    reset = 1'b1;
    repeat (2) @(posedge clock);
    #1;
    expect_word(3'b000, "in reset");
    @(negedge clock);
    reset = 1'b0;

    // Worked example: 00 gives 000; then 10 sets m7 and gives 001 (1).
    step(2'b00);
    expect_word(3'd0, "example 00 -> 000");
    step(2'b10);
    expect_word(3'd1, "example 10 -> 001");
    checks++;
    if (dut.u_enc.m !== 8'b1000_0000) begin
      failures++;
      $display("FAIL example: m=%b expected 10000000", dut.u_enc.m);
    end

    for (int i = 0; i < 300; i++) step(2'($urandom));

    // Asynchronous reset between clock edges.
    step(2'b11);
    @(negedge clock);
    #2;
    reset = 1'b1;
    ci = 2'b00;
    #1;
    {p3, p2, p1, p0} = '0;
    expect_word(3'b000, "async reset");
    @(negedge clock);
    reset = 1'b0;
    for (int i = 0; i < 100; i++) step(2'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
