// tb_conv_enc_top: end-to-end testbench of the three encoders together.
//
// The rate 1/2, 1/3 and 2/3 encoders are fed independent random streams at
// the same time, so a word leaking from one encoder into another shows up.
// Each reference is built from the adder equations over a history of the
// inputs. Checked after every clock edge: all three code words; before
// every edge: that no word has moved yet (one clock of latency, one word
// per clock per encoder). The stream is interrupted by asynchronous resets
// between edges, which must clear all three words at once. Each mechanism
// is counted: words from each encoder, words with every code bit set at
// least once, and resets; one that never happened counts as a failure.
// The top has no parameters, so this run is at full size.
module tb_conv_enc_top;

  logic       clk;
  logic       reset;
  logic       r12_data_in;
  logic [1:0] r12_code;
  logic       r13_data_in;
  logic [2:0] r13_code;
  logic [1:0] r23_ci;
  logic [2:0] r23_code;

  // Input histories, entry 0 the newest.
  logic [2:0]      h12, h13;
  logic [3:0][1:0] h23;

  int checks = 0;
  int failures = 0;
  int n_words12 = 0, n_words13 = 0, n_words23 = 0, n_resets = 0;
  logic [1:0] seen12;
  logic [2:0] seen13, seen23;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  conv_enc_top dut (
    .clk        (clk),
    .reset      (reset),
    .r12_data_in(r12_data_in),
    .r12_code   (r12_code),
    .r13_data_in(r13_data_in),
    .r13_code   (r13_code),
    .r23_ci     (r23_ci),
    .r23_code   (r23_code)
  );

  function automatic logic [1:0] ref12();
    return {h12[0] ^ h12[1] ^ h12[2], h12[0] ^ h12[1]};
  endfunction

  function automatic logic [2:0] ref13();
    return {h13[0] ^ h13[1] ^ h13[2], h13[0] ^ h13[1], h13[0] ^ h13[2]};
  endfunction

  function automatic logic [2:0] ref23();
    logic [7:0] m;
    m = {h23[0], h23[1], h23[2], h23[3]};   // m7..m0
    return {m[2] ^ m[3] ^ m[5], m[1] ^ m[4], m[0] ^ m[6] ^ m[7]};
  endfunction

  task automatic check(input string what);
    checks += 3;
    if (r12_code !== ref12()) begin
      failures++;
      $display("FAIL %s: r12 %b expected %b", what, r12_code, ref12());
    end
    if (r13_code !== ref13()) begin
      failures++;
      $display("FAIL %s: r13 %b expected %b", what, r13_code, ref13());
    end
    if (r23_code !== ref23()) begin
      failures++;
      $display("FAIL %s: r23 %b expected %b", what, r23_code, ref23());
    end
  endtask

  task automatic step(input logic a, input logic b, input logic [1:0] c);
    @(negedge clk);
    r12_data_in = a;
    r13_data_in = b;
    r23_ci = c;
    #4;
    check("before edge");
    @(posedge clk);
    h12 = {h12[1:0], a};
    h13 = {h13[1:0], b};
    h23 = {h23[2:0], c};
    #1;
    check("after edge");
    n_words12++;
    n_words13++;
    n_words23++;
    seen12 |= r12_code;
    seen13 |= r13_code;
    seen23 |= r23_code;
  endtask

  task automatic async_reset();
    @(negedge clk);
    #2;
    reset = 1'b1;
    r12_data_in = 1'b0;
    r13_data_in = 1'b0;
    r23_ci = 2'b00;
    #1;
    h12 = '0;
    h13 = '0;
    h23 = '0;
    check("async reset");
    checks++;
    if ({r12_code, r13_code, r23_code} !== '0) begin
      failures++;
      $display("FAIL reset did not clear the words");
    end
    n_resets++;
    @(negedge clk);
    reset = 1'b0;
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r12_data_in = 1'b0;
    r13_data_in = 1'b0;
    r23_ci = 2'b00;
    h12 = '0;
    h13 = '0;
    h23 = '0;
    seen12 = '0;
    seen13 = '0;
    seen23 = '0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;

    // Worked examples of all three rates at once: 1 -> 11, 1 -> 111,
    // 10 -> 001.
    step(1'b1, 1'b1, 2'b10);
    checks++;
    if ({r12_code, r13_code, r23_code} !== {2'd3, 3'd7, 3'd1}) begin
      failures++;
      $display("FAIL worked examples: %b %b %b", r12_code, r13_code, r23_code);
    end

    for (int blk = 0; blk < 8; blk++) begin
      for (int i = 0; i < 400; i++)
        step(1'($urandom), 1'($urandom), 2'($urandom));
      async_reset();
    end

    expect_count("rate 1/2 code word", n_words12);
    expect_count("rate 1/3 code word", n_words13);
    expect_count("rate 2/3 code word", n_words23);
    expect_count("asynchronous reset", n_resets);
    expect_count("every rate 1/2 code bit set", int'(&seen12));
    expect_count("every rate 1/3 code bit set", int'(&seen13));
    expect_count("every rate 2/3 code bit set", int'(&seen23));
    $display("words: r12=%0d r13=%0d r23=%0d, resets=%0d",
             n_words12, n_words13, n_words23, n_resets);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
