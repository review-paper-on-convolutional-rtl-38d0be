// tb_conv_enc_r12: self-checking testbench of the rate 1/2 encoder.
//
// The reference keeps the last three input bits d0 (newest), d1, d2 and
// forms code1 = d0^d1^d2, code2 = d0^d1 directly. Checked: the worked
// example from a cleared register (0 -> 00, then 1 -> 11), a long random
// bit stream, that each word appears only after the clock edge that samples
// its input and holds until the next (one word per clock, one clock of
// latency), and that the asynchronous reset clears the word between edges.
module tb_conv_enc_r12;

  logic clk;
  logic reset;
  logic data_in;
  logic code1, code2;
  logic d0, d1, d2;

  int checks = 0;
  int failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  conv_enc_r12 dut (
    .clk    (clk),
    .reset  (reset),
    .data_in(data_in),
    .code1  (code1),
    .code2  (code2)
  );

  task automatic expect_word(input logic [1:0] w, input string what);
    checks++;
    if ({code1, code2} !== w) begin
      failures++;
      $display("FAIL %s: {code1,code2}=%b expected %b", what, {code1, code2}, w);
    end
  endtask

  function automatic logic [1:0] ref_word();
    return {d0 ^ d1 ^ d2, d0 ^ d1};
  endfunction

  task automatic step(input logic b);
    @(negedge clk);
    data_in = b;
    #4;
    expect_word(ref_word(), "before edge");
    @(posedge clk);
    {d2, d1, d0} = {d1, d0, b};
    #1;
    expect_word(ref_word(), "after edge");
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_in = 1'b0;
    {d2, d1, d0} = 3'b000;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    expect_word(2'b00, "in reset");
    @(negedge clk);
    reset = 1'b0;

    // Worked example: input 0 gives 00, then input 1 gives 11 (3).
    step(1'b0);
    expect_word(2'd0, "example 0 -> 00");
    step(1'b1);
    expect_word(2'd3, "example 1 -> 11");

    for (int i = 0; i < 300; i++) step(1'($urandom));

    // Asynchronous reset between clock edges.
    step(1'b1);
    @(negedge clk);
    #2;
    reset = 1'b1;
    data_in = 1'b0;
    #1;
    {d2, d1, d0} = 3'b000;
    expect_word(2'b00, "async reset");
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 100; i++) step(1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
