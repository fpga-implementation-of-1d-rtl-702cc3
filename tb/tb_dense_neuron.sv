// tb_dense_neuron: checks one dense-layer neuron.
//
// Weights and bias are written over the parameter bus (with writes for other
// neurons interleaved, which must be ignored). Frames of 123 beats of four
// Q8.8 values are applied with random gaps; the output must equal
// ReLU(wrap25(bias*2^8 + sum x*w)) and appear one clock after the last beat.
// Frames are chosen so that both a positive result and a ReLU-clipped
// negative one occur.
//
// The 4-lane, 123-beat structure, the bias preload and the final ReLU follow
// the original design. The Q8.8 bias and the wrap-around are this design's own
// choices.
module tb_dense_neuron;
  import cnn_pkg::*;

  localparam int ID = 3, LANES = 4, EV = 123;

  logic    clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  prm_wr_t prm;
  logic    x_valid = 1'b0;
  data_t   x [LANES];
  logic    y_valid;
  acc_t    y;

  int checks = 0, failures = 0, n_pos = 0, n_clip = 0;

  dense_neuron #(.ID(ID), .LANES(LANES), .EVENTS(EV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint w [LANES][EV];
  longint b;

  function automatic longint wrap(longint v, int bits);
    longint m = longint'(1) << bits;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  task automatic wr(prm_sel_e sel, int addr, longint data);
    prm.we   <= 1'b1;
    prm.sel  <= sel;
    prm.addr <= PRM_ADDR_W'(addr);
    prm.data <= PRM_DATA_W'(data);
    @(posedge clk);
  endtask

  task automatic frame(int sign_bias);
    longint xs [LANES][EV];
    longint acc;
    int     wait_cycles;
    b = longint'($urandom_range(4095)) - 2048;
    wr(PRM_FC_B, ID, b);
    wr(PRM_FC_B, ID + 1, 16'h7fff);               // another neuron
    for (int f = 0; f < LANES; f++) for (int j = 0; j < EV; j++) begin
      w[f][j] = longint'($urandom_range(1023)) - 512;
      wr(PRM_FC_W, ID*512 + f*128 + j, w[f][j]);
      if (j % 40 == 0) wr(PRM_FC_W, (ID+1)*512 + f*128 + j, 0);
    end
    prm.we <= 1'b0;
    acc = b * 256;
    for (int f = 0; f < LANES; f++) for (int j = 0; j < EV; j++) begin
      xs[f][j] = longint'($urandom_range(1023)) - 512 + sign_bias * w[f][j];
      if (xs[f][j] > 32767) xs[f][j] = 32767;
      if (xs[f][j] < -32768) xs[f][j] = -32768;
      acc += xs[f][j] * w[f][j];
    end
    acc = wrap(acc, 25);
    if (acc < 0) begin acc = 0; n_clip++; end else n_pos++;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int j = 0; j < EV; j++) begin
      while ($urandom_range(3) == 0) begin
        x_valid <= 1'b0;
        @(posedge clk);
        checks++;
        if (y_valid) begin failures++; $display("early output at beat %0d", j); end
      end
      x_valid <= 1'b1;
      for (int f = 0; f < LANES; f++) x[f] <= DATA_W'(xs[f][j]);
      @(posedge clk);
      if (j != 0) begin
        checks++;
        if (y_valid) begin failures++; $display("early output at beat %0d", j); end
      end
    end
    x_valid <= 1'b0;
    @(posedge clk);
    checks++;
    if (!y_valid) begin
      failures++;
      $display("no output one clock after the last beat");
      wait_cycles = 0;
      while (!y_valid && wait_cycles < 10) begin @(posedge clk); wait_cycles++; end
    end
    checks++;
    if (longint'(y) != acc) begin failures++; $display("MISMATCH got %0d expected %0d", y, acc); end
    @(posedge clk);
  endtask

  initial begin
    prm = '0;
    for (int f = 0; f < LANES; f++) x[f] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame(0);
    frame(-1);    // inputs anti-correlated with the weights: negative sum
    frame(1);     // correlated: large positive sum
    frame(0);
    checks++;
    if (n_pos == 0 || n_clip == 0) begin failures++; $display("ReLU cases: %0d positive, %0d clipped", n_pos, n_clip); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
