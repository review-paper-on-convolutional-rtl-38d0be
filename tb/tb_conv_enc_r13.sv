// tb_conv_enc_r13: self-checking testbench of the rate 1/3 encoder.
//
// The reference keeps the last three input bits d0 (newest), d1, d2 and
// forms code1 = d0^d1^d2, code2 = d0^d1, code3 = d0^d2 directly. Checked:
// the worked example from a cleared register (0 -> 000, then 1 -> 111);
// the published input sequence 1, 0, 1, 1, for which the register m[2:0]
// reads 1, 2, 5, 3; a long random bit stream; one clock of latency and one
// word per clock; and the asynchronous reset between edges.
module tb_conv_enc_r13;

  logic clk;
  logic reset;
  logic data_in;
  logic code1, code2, code3;
  logic d0, d1, d2;

  int checks = 0;
  int failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  conv_enc_r13 dut (
    .clk    (clk),
    .reset  (reset),
    .data_in(data_in),
    .code1  (code1),
    .code2  (code2),
    .code3  (code3)
  );

  task automatic expect_word(input logic [2:0] w, input string what);
    checks++;
    if ({code1, code2, code3} !== w) begin
      failures++;
      $display("FAIL %s: {code1,code2,code3}=%b expected %b", what,
               {code1, code2, code3}, w);
    end
  endtask

  function automatic logic [2:0] ref_word();
    return {d0 ^ d1 ^ d2, d0 ^ d1, d0 ^ d2};
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

  task automatic expect_state(input logic [2:0] m, input string what);
    checks++;
    if (dut.u_enc.m !== m) begin
      failures++;
      $display("FAIL %s: m=%0d expected %0d", what, dut.u_enc.m, m);
    end
  endtask

  logic [3:0] seq_in;
  logic [3:0][2:0] seq_m;
  logic [3:0][2:0] seq_w;

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
    expect_word(3'b000, "in reset");
    @(negedge clk);
    reset = 1'b0;

    // Worked example: input 0 gives 000, then input 1 gives 111 (7).
    step(1'b0);
    expect_word(3'd0, "example 0 -> 000");
    step(1'b1);
    expect_word(3'd7, "example 1 -> 111");

    // Published sequence from a cleared register: inputs 1,0,1,1 leave
    // m = 1, 2, 5, 3; the words follow from the adder equations by hand.
    @(negedge clk);
    reset = 1'b1;
    data_in = 1'b0;
    {d2, d1, d0} = 3'b000;
    @(negedge clk);
    reset = 1'b0;
    seq_in = 4'b1101;                               // applied LSB first
    seq_m  = {3'd3, 3'd5, 3'd2, 3'd1};              // entry 0 first
    seq_w  = {3'b001, 3'b010, 3'b110, 3'b111};
    for (int i = 0; i < 4; i++) begin
      step(seq_in[i]);
      expect_state(seq_m[i], "published sequence state");
      expect_word(seq_w[i], "published sequence word");
    end

    for (int i = 0; i < 300; i++) step(1'($urandom));

    // Asynchronous reset between clock edges.
    step(1'b1);
    @(negedge clk);
    #2;
    reset = 1'b1;
    data_in = 1'b0;
    #1;
    {d2, d1, d0} = 3'b000;
    expect_word(3'b000, "async reset");
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 100; i++) step(1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
