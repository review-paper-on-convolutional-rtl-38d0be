// tb_conv_encoder: self-checking testbench of the generalized encoder.
//
// Three instances are checked at once: the default (rate 1/2, K=1, M=3), a
// two-bit-per-clock shift-down register (K=2, M=8, N=3, as the rate 2/3
// encoder) and a wider shift-up configuration (K=3, M=9, N=4) with
// arbitrary generators. The reference keeps a history of the inputs
// applied since reset and rebuilds every register stage from it, so it
// shares no code with the shift register in the design. Checked: the code
// word after every clock edge, that the word does not change before the
// edge (one clock of latency, one word per clock) and that the
// asynchronous reset clears the words without a clock edge.
module tb_conv_encoder;
  import conv_enc_pkg::*;

  localparam logic [2:0][7:0] GB = {8'b0010_1100, 8'b0001_0010, 8'b1100_0001};
  localparam logic [3:0][8:0] GC = {9'b1_0110_0011, 9'b0_1001_1101,
                                    9'b1_1100_1010, 9'b0_0000_0111};

  logic clk;
  logic rst;
  logic [0:0] din_a;
  logic [1:0] din_b;
  logic [2:0] din_c;
  logic [1:0] code_a;
  logic [2:0] code_b;
  logic [3:0] code_c;

  int checks = 0;
  int failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  conv_encoder dut_a (.clk(clk), .rst(rst), .din(din_a), .code(code_a));

  conv_encoder #(.K(2), .M(8), .N(3), .DIR(SHIFT_DOWN), .G(GB))
    dut_b (.clk(clk), .rst(rst), .din(din_b), .code(code_b));

  conv_encoder #(.K(3), .M(9), .N(4), .DIR(SHIFT_UP), .G(GC))
    dut_c (.clk(clk), .rst(rst), .din(din_c), .code(code_c));

  // Input history, entry 0 the newest; cleared by reset.
  logic [15:0][7:0] hist_a, hist_b, hist_c;

  // Register stage j of a K-bit-per-clock encoder, from the input history.
  function automatic logic stage(input logic [15:0][7:0] h, input int k,
                                 input int m, input bit down, input int j);
    int idx, p;
    logic [2:0] b;
    if (!down) begin
      p = j / k;
      b = 3'(j % k);
    end else begin
      idx = m - 1 - j;
      p = idx / k;
      b = 3'(k - 1 - (idx % k));
    end
    return h[p][b];
  endfunction

  function automatic logic [7:0] expect_word(input logic [15:0][7:0] h,
      input int k, input int m, input int n, input bit down,
      input logic [7:0][15:0] g);
    logic [7:0] w = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < m; j++)
        if (g[i][j]) w[i] ^= stage(h, k, m, down, j);
    return w;
  endfunction

  function automatic logic [7:0][15:0] widen_a();
    logic [7:0][15:0] g = '0;
    g[1] = 16'(R12_G1);
    g[0] = 16'(R12_G2);
    return g;
  endfunction
  function automatic logic [7:0][15:0] widen_b();
    logic [7:0][15:0] g = '0;
    for (int i = 0; i < 3; i++) g[i] = 16'(GB[i]);
    return g;
  endfunction
  function automatic logic [7:0][15:0] widen_c();
    logic [7:0][15:0] g = '0;
    for (int i = 0; i < 4; i++) g[i] = 16'(GC[i]);
    return g;
  endfunction

  task automatic check_all(input string what);
    logic [7:0] ea, eb, ec;
    ea = expect_word(hist_a, 1, 3, 2, 1'b0, widen_a());
    eb = expect_word(hist_b, 2, 8, 3, 1'b1, widen_b());
    ec = expect_word(hist_c, 3, 9, 4, 1'b0, widen_c());
    checks += 3;
    if (code_a !== ea[1:0]) begin
      failures++;
      $display("FAIL %s: a code=%b expected %b", what, code_a, ea[1:0]);
    end
    if (code_b !== eb[2:0]) begin
      failures++;
      $display("FAIL %s: b code=%b expected %b", what, code_b, eb[2:0]);
    end
    if (code_c !== ec[3:0]) begin
      failures++;
      $display("FAIL %s: c code=%b expected %b", what, code_c, ec[3:0]);
    end
  endtask

  // One clock: new inputs at the falling edge, the old word must still
  // hold just before the rising edge, the new word just after it.
  task automatic step(input logic [0:0] a, input logic [1:0] b, input logic [2:0] c);
    @(negedge clk);
    din_a = a;
    din_b = b;
    din_c = c;
    #4;
    check_all("before edge");
    @(posedge clk);
    hist_a = {hist_a[14:0], 8'(a)};
    hist_b = {hist_b[14:0], 8'(b)};
    hist_c = {hist_c[14:0], 8'(c)};
    #1;
    check_all("after edge");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din_a = '0;
    din_b = '0;
    din_c = '0;
    hist_a = '0;
    hist_b = '0;
    hist_c = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check_all("in reset");
    @(negedge clk);
    rst = 1'b0;

    // A single 1 walks through every register stage.
    step(1'b1, 2'b10, 3'b001);
    for (int i = 0; i < 5; i++) step(1'b0, 2'b00, 3'b000);

    for (int i = 0; i < 300; i++)
      step(1'($urandom), 2'($urandom), 3'($urandom));

    // Asynchronous reset between clock edges.
    @(negedge clk);
    #2;
    rst = 1'b1;
    din_a = '0;
    din_b = '0;
    din_c = '0;
    #1;
    hist_a = '0;
    hist_b = '0;
    hist_c = '0;
    check_all("async reset");
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 100; i++)
      step(1'($urandom), 2'($urandom), 3'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
