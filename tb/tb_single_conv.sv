// tb_single_conv: checks one first-layer neuron and its second-layer partials.
//
// A random frame and random coefficients come from cnn_ref_pkg. The
// coefficients of channel CH (and, interleaved, of other channels, which must
// be ignored) are written over the parameter bus; the 500 samples are
// streamed one per clock. The pooled output must reproduce the reference
// first-layer output of channel CH (249 values) and each of the four partial
// streams must equal sum_k w2[f][CH][k] * p1[CH][n+k] (247 values), in order.
// The first pooled value needs samples 0..3; it is registered two clocks
// after sample 3 (ReLU and pool stages), so it is first seen 6 edges after
// the edge that takes sample 0.
//
// The structure of conv, ReLU, pool and four inner convolutions follows the
// original design. The truncation and the partial-sum widths are this design's
// own.
module tb_single_conv;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int CH = 5;
  localparam int PW = DATA_W + C2W_W + 2;

  logic    clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  prm_wr_t prm;
  logic    x_valid = 1'b0;
  data_t   xin = '0;
  logic    pool_valid, part_valid;
  data_t   pool;
  logic signed [PW-1:0] part [C2];

  int checks = 0, failures = 0;

  single_conv #(.CH(CH), .NF2(C2)) dut (
    .clk, .rst_n, .prm, .clear, .x_valid, .x(xin),
    .pool_valid, .pool, .part_valid, .part
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(prm_sel_e sel, int addr, longint data);
    prm.we   <= 1'b1;
    prm.sel  <= sel;
    prm.addr <= PRM_ADDR_W'(addr);
    prm.data <= PRM_DATA_W'(data);
    @(posedge clk);
  endtask

  int kp = 0, kq = 0, cyc = 0, t_first = -1, t_pool = -1;

  always @(posedge clk) begin
    cyc++;
    if (x_valid && t_first < 0) t_first = cyc;
    if (pool_valid) begin
      if (t_pool < 0) t_pool = cyc;
      checks++;
      if (kp >= 249 || longint'(pool) != p1[CH][kp]) begin
        failures++;
        $display("MISMATCH pool[%0d] got %0d expected %0d", kp, pool, kp < 249 ? p1[CH][kp] : 0);
      end
      kp++;
    end
    if (part_valid) begin
      for (int f = 0; f < C2; f++) begin
        longint e;
        e = 0;
        for (int k = 0; k < 3; k++) e += w2[f][CH][k] * p1[CH][kq + k];
        checks++;
        if (kq >= 247 || longint'(part[f]) != e) begin
          failures++;
          $display("MISMATCH part[%0d][%0d] got %0d expected %0d", f, kq, part[f], e);
        end
      end
      kq++;
    end
  end

  initial begin
    prm = '0;
    fill_random();
    compute();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 8; c++) for (int k = 0; k < 3; k++) wr(PRM_CONV1, c*4 + k, w1[c][k]);
    for (int f = 0; f < 4; f++) for (int c = 0; c < 8; c++) for (int k = 0; k < 3; k++)
      wr(PRM_CONV2, f*32 + c*4 + k, w2[f][c][k]);
    prm.we <= 1'b0;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    for (int n = 0; n < 500; n++) begin
      x_valid <= 1'b1;
      xin     <= DATA_W'(cnn_ref_pkg::x[n]);
      @(posedge clk);
    end
    x_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks += 3;
    if (kp != 249) begin failures++; $display("%0d pooled values, expected 249", kp); end
    if (kq != 247) begin failures++; $display("%0d partial sums, expected 247", kq); end
    if (t_pool - t_first != 6) begin failures++; $display("first pooled value after %0d clocks", t_pool - t_first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
