// tb_hardmax: checks the arg-max used in place of softmax.
//
// Random signed 25-bit vectors (and vectors with forced ties and all-equal
// values) are applied; the index and value must match a search done here,
// with ties resolved to the lower index. Includes the four published
// output-neuron vectors (Q9.16) of one example input per class, which must
// give classes 0, 1, 2 and 3.
//
// The four published vectors are the original implementation's output values.
// The tie rule is this design's own choice.
module tb_hardmax;

  localparam int N = 4, W = 25;

  logic signed [W-1:0] x [N];
  logic [1:0]          idx;
  logic signed [W-1:0] max;

  int checks = 0, failures = 0;

  hardmax #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    int e = 0;
    #1;
    for (int i = 1; i < N; i++) if (x[i] > x[e]) e = i;
    checks++;
    if (int'(idx) != e || max != x[e]) begin
      failures++;
      $display("MISMATCH %0d %0d %0d %0d: got %0d expected %0d", x[0], x[1], x[2], x[3], idx, e);
    end
  endtask

  // output-neuron values (Q9.16) of four example inputs, one per class
  int ex [4][4] = '{
    '{   35205, -1210753,  -550732,    19881},
    '{ -920231,    48029,  -285733,  -120414},
    '{-1179888,   179545,   499996, -1162850},
    '{-1482366,    22734,  -883614,   360848}};

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < N; i++) x[i] = W'(ex[c][i]);
      apply_and_check();
      checks++;
      if (int'(idx) != c) begin failures++; $display("example %0d gave class %0d", c, idx); end
    end
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) x[i] = W'($urandom);
      if (t % 5 == 0) x[$urandom_range(3)] = x[$urandom_range(3)];   // ties
      if (t % 50 == 0) for (int i = 1; i < N; i++) x[i] = x[0];       // all equal
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
