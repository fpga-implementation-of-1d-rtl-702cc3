// tb_relu_pool: checks ReLU + max-pool (2,2).
//
// Random signed values (about half negative) are fed with random gaps in
// frames of odd and even length separated by clear. A clocked reference
// pairs the inputs of each frame and expects max(relu(a), relu(b)) exactly
// two clocks after the second value of each pair; an odd last value must
// give no output. Also counts that both orders (first or second larger) and
// all-negative pairs occurred.
//
// Pairing as (1,2), (3,4) follows the original design. The clear between
// frames and the gaps are this design's own handshake.
module tb_relu_pool;

  localparam int W = 16;

  logic                clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic                x_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic                y_valid;
  logic signed [W-1:0] y;

  int checks = 0, failures = 0;
  int n_first_big = 0, n_second_big = 0, n_zero = 0, n_out = 0;

  relu_pool #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pipeline: d1 is due at the next edge, d2 at the one after
  bit     have = 1'b0;
  longint held;
  bit     d1 = 1'b0, d2 = 1'b0;
  longint v1, v2;

  function automatic longint relu(longint v);
    return v < 0 ? 0 : v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (y_valid !== d2) begin
        failures++;
        $display("valid mismatch: got %0b expected %0b", y_valid, d2);
      end else if (d2 && longint'(y) != v2) begin
        failures++;
        $display("MISMATCH got %0d expected %0d", y, v2);
      end
      if (y_valid) n_out++;
    end
    d2 <= d1;
    v2 <= v1;
    d1 <= 1'b0;
    if (clear) begin
      have = 1'b0;
      d1 <= 1'b0;
      d2 <= 1'b0;
    end else if (x_valid) begin
      if (!have) begin
        held = longint'(x);
        have = 1'b1;
      end else begin
        d1 <= 1'b1;
        v1 <= relu(held) > relu(longint'(x)) ? relu(held) : relu(longint'(x));
        if (relu(held) > relu(longint'(x))) n_first_big++;
        else if (relu(longint'(x)) > relu(held)) n_second_big++;
        if (held < 0 && x < 0) n_zero++;
        have = 1'b0;
      end
    end
  end

  task automatic frame(int len, bit gaps);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int n = 0; n < len; n++) begin
      if (gaps) while ($urandom_range(2) == 0) begin
        x_valid <= 1'b0;
        @(posedge clk);
      end
      x_valid <= 1'b1;
      x       <= W'($urandom);
      @(posedge clk);
    end
    x_valid <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(10, 1'b0);
    frame(37, 1'b1);
    frame(247, 1'b0);
    frame(60, 1'b1);
    checks++;
    if (n_out != 5 + 18 + 123 + 30) begin failures++; $display("output count %0d", n_out); end
    checks++;
    if (n_first_big == 0 || n_second_big == 0 || n_zero == 0) begin
      failures++;
      $display("pair cases not all seen: %0d %0d %0d", n_first_big, n_second_big, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
