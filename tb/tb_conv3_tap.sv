// tb_conv3_tap: checks the ring-buffer 3-tap convolution.
//
// Random signed samples are streamed with random gaps in several frames
// separated by clear; every output is compared with w0*x[n] + w1*x[n+1] +
// w2*x[n+2] computed here. Also checked: a frame of N samples gives exactly
// N-2 outputs, each one clock after the sample that completes its window,
// and the 2-bit pointer wraps many times within a frame.
//
// The ring buffer with its wrapping 2-bit pointer follows the original design.
// The gaps and the clear between frames exercise this design's own handshake.
module tb_conv3_tap;

  localparam int XW = 16, WW = 10, YW = XW + WW + 2;

  logic                 clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic signed [WW-1:0] coef [3];
  logic                 x_valid = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic                 y_valid;
  logic signed [YW-1:0] y;

  int checks = 0, failures = 0;

  conv3_tap #(.X_W(XW), .W_W(WW), .Y_W(YW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: sees the same inputs at the same edges as the DUT
  longint h [$];          // samples of the current frame
  bit     due = 1'b0;     // an output is due at this edge
  longint due_val;
  int     nout;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (y_valid !== due) begin
        failures++;
        $display("valid mismatch: got %0b expected %0b", y_valid, due);
      end else if (due && longint'(y) != due_val) begin
        failures++;
        $display("MISMATCH got %0d expected %0d", y, due_val);
      end
      if (y_valid) nout++;
    end
    due <= 1'b0;
    if (clear) h.delete();
    else if (x_valid) begin
      h.push_back(longint'(x));
      if (h.size() >= 3) begin
        due     <= 1'b1;
        due_val <= longint'(coef[0]) * h[h.size()-3] + longint'(coef[1]) * h[h.size()-2]
                 + longint'(coef[2]) * h[h.size()-1];
      end
    end
  end

  task automatic frame(int len, bit gaps);
    for (int k = 0; k < 3; k++) coef[k] = WW'($urandom_range(1023));
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    nout = 0;
    for (int n = 0; n < len; n++) begin
      if (gaps) while ($urandom_range(1) == 0) begin
        x_valid <= 1'b0;
        @(posedge clk);
      end
      x_valid <= 1'b1;
      x       <= XW'($urandom);
      @(posedge clk);
    end
    x_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != len - 2) begin failures++; $display("frame of %0d gave %0d outputs", len, nout); end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) coef[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(20, 1'b0);
    frame(37, 1'b1);
    frame(3, 1'b0);
    frame(100, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
