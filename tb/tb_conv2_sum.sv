// tb_conv2_sum: checks the adder, truncation, ReLU and pooling of the second
// convolution layer.
//
// Random partial sums for the 8 channels x 4 filters are presented in
// lockstep, one set every second clock (the rate of the first layer's pooled
// stream), 247 sets per frame, for two frames separated by clear. A clocked
// reference adds the channels, keeps bits [23:8] of the sum (Q.16 to Q8.8,
// wrapping), applies ReLU and pairs the values; the outputs must match it in
// value and in timing (3 clocks after the second set of a pair). The 247th
// set has no partner and must produce nothing.
//
// The channel sum followed by ReLU and pooling follows the original design.
// The single truncation after the sum is this design's own choice.
module tb_conv2_sum;
  import cnn_pkg::*;

  localparam int NCH = 8, NF = 4, PW = DATA_W + C2W_W + 2;

  logic                 clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic                 part_valid = 1'b0;
  logic signed [PW-1:0] part [NCH][NF];
  logic                 y_valid;
  data_t                y [NF];

  int checks = 0, failures = 0, nout = 0;

  conv2_sum #(.NCH(NCH), .NF(NF), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint q88(longint s);
    longint fl = (s >= 0) ? s / 256 : -((-s + 255) / 256);
    longint r = fl % 65536;
    if (r < 0) r += 65536;
    if (r >= 32768) r -= 65536;
    return r < 0 ? 0 : r;          // with ReLU
  endfunction

  // reference: due[0] is checked at the next edge
  bit     due [3];
  longint val [3][NF];
  bit     have = 1'b0;
  longint held [NF];

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (y_valid !== due[0]) begin
        failures++;
        $display("valid mismatch at output %0d", nout);
      end else if (due[0]) begin
        for (int f = 0; f < NF; f++) begin
          checks++;
          if (longint'(y[f]) != val[0][f]) begin
            failures++;
            $display("MISMATCH y[%0d] #%0d got %0d expected %0d", f, nout, y[f], val[0][f]);
          end
        end
      end
      if (y_valid) nout++;
    end
    due[0] = due[1]; val[0] = val[1];
    due[1] = due[2]; val[1] = val[2];
    due[2] = 1'b0;
    if (clear) begin
      have = 1'b0;
      due[0] = 1'b0; due[1] = 1'b0;
    end else if (part_valid) begin
      longint v [NF];
      for (int f = 0; f < NF; f++) begin
        longint s;
        s = 0;
        for (int c = 0; c < NCH; c++) s += longint'(part[c][f]);
        v[f] = q88(s);
      end
      if (!have) begin
        held = v;
        have = 1'b1;
      end else begin
        due[2] = 1'b1;
        for (int f = 0; f < NF; f++) val[2][f] = v[f] > held[f] ? v[f] : held[f];
        have = 1'b0;
      end
    end
  end

  task automatic frame();
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int n = 0; n < 247; n++) begin
      part_valid <= 1'b1;
      for (int c = 0; c < NCH; c++) for (int f = 0; f < NF; f++)
        part[c][f] <= PW'(longint'($urandom_range(400000)) - 200000);
      @(posedge clk);
      part_valid <= 1'b0;
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) for (int f = 0; f < NF; f++) part[c][f] = '0;
    for (int i = 0; i < 3; i++) due[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame();
    frame();
    checks++;
    if (nout != 2 * 123) begin failures++; $display("%0d outputs, expected 246", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
