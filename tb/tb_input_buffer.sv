// tb_input_buffer: checks the frame memory in front of the CNN.
//
// N is reduced to 16 samples. Frame 1 is written as whole words with random
// gaps, frame 2 as byte pairs (high byte first) as the UART would deliver
// them, frame 3 mixes both. After the N-th sample the buffer must pulse start
// (registered by the writing edge) and then present the N samples in order on N
// consecutive clocks from the second clock after start, with ready low
// meanwhile; words offered while ready is
// low must be dropped.
//
// A 500-sample buffer filled with byte pairs follows the original design. The
// byte order, the word port and the read-out timing are this design's own
// choices.
module tb_input_buffer;
  import cnn_pkg::*;

  localparam int N = 16;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       w_valid = 1'b0, b_valid = 1'b0;
  data_t      w_data = '0;
  logic [7:0] b_data = '0;
  logic       ready, start, x_valid;
  data_t      x;

  int checks = 0, failures = 0;

  input_buffer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] frame_q [$];

  task automatic put_word(logic [15:0] v);
    frame_q.push_back(v);
    b_valid <= 1'b0;
    w_valid <= 1'b1;
    w_data  <= v;
    @(posedge clk);
    idle($urandom_range(2));
  endtask

  // drop both valids for n clocks (none when n is 0, so that a following
  // write is back to back)
  task automatic idle(int n);
    if (n > 0) begin
      w_valid <= 1'b0;
      b_valid <= 1'b0;
      repeat (n) @(posedge clk);
    end
  endtask

  task automatic put_bytes(logic [15:0] v);
    frame_q.push_back(v);
    for (int i = 0; i < 2; i++) begin
      w_valid <= 1'b0;
      b_valid <= 1'b1;
      b_data  <= i == 0 ? v[15:8] : v[7:0];
      @(posedge clk);
      idle($urandom_range(3));
    end
  endtask

  // checks the read-out of one frame; called right after the last write
  task automatic expect_stream();
    checks++;        // start is registered by the edge that wrote the last sample
    if (!start || ready) begin failures++; $display("no start / ready still high"); end
    // offer a word while busy: must be dropped
    w_valid <= 1'b1;
    w_data  <= 16'hdead;
    @(posedge clk);
    #1;
    checks++;
    if (x_valid) begin failures++; $display("sample presented together with start"); end
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      #1;
      w_valid <= 1'b0;
      checks++;
      if (!x_valid || x != data_t'(frame_q[k])) begin
        failures++;
        $display("sample %0d: valid %0b got %04h expected %04h", k, x_valid, x, frame_q[k]);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (x_valid || !ready) begin failures++; $display("stream did not end"); end
    frame_q.delete();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < N - 1; k++) put_word(16'($urandom));
    frame_q.push_back(16'h1234);
    b_valid <= 1'b0; w_valid <= 1'b1; w_data <= 16'h1234;
    @(posedge clk);
    w_valid <= 1'b0;
    #1;
    expect_stream();
    for (int k = 0; k < N - 1; k++) put_bytes(16'($urandom));
    frame_q.push_back(16'h8001);
    w_valid <= 1'b0; b_valid <= 1'b1; b_data <= 8'h80;
    @(posedge clk);
    b_data <= 8'h01;
    @(posedge clk);
    b_valid <= 1'b0;
    #1;
    expect_stream();
    for (int k = 0; k < N - 1; k++) if (k % 2) put_word(16'($urandom)); else put_bytes(16'($urandom));
    frame_q.push_back(16'hbeef);
    b_valid <= 1'b0; w_valid <= 1'b1; w_data <= 16'hbeef;
    @(posedge clk);
    w_valid <= 1'b0;
    #1;
    expect_stream();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
