// tb_output_layer: checks the output neurons and the class decision.
//
// Weights and biases are loaded over the parameter bus. Random non-negative
// dense outputs (Q9.16) are presented with fc_valid; each output neuron must
// equal wrap25(bias*2^8 + sum floor(fc[i]*w[o][i] / 2^8)), the class must be
// the index of the largest, and y_valid must follow fc_valid by exactly
// N_X + 2 = 12 clocks. Random vectors are run until every class has won.
//
// The sequential multiply-accumulate and the hardmax follow the original
// design. The product truncation and the 12-clock latency are this design's
// own.
module tb_output_layer;
  import cnn_pkg::*;

  localparam int NI = 10, NO = 4, LAT = NI + 2;

  logic    clk = 1'b0, rst_n = 1'b0;
  prm_wr_t prm;
  logic    fc_valid = 1'b0;
  acc_t    fc [NI];
  logic    y_valid;
  acc_t    y [NO];
  logic [1:0] cls;

  int checks = 0, failures = 0;
  int seen [NO];

  output_layer #(.N_X(NI), .N_OUT(NO)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap(longint v, int bits);
    longint m = longint'(1) << bits;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  function automatic longint fdiv256(longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  task automatic wr(prm_sel_e sel, int addr, longint data);
    prm.we   <= 1'b1;
    prm.sel  <= sel;
    prm.addr <= PRM_ADDR_W'(addr);
    prm.data <= PRM_DATA_W'(data);
    @(posedge clk);
  endtask

  longint w [NO][NI];
  longint b [NO];

  task automatic vector();
    longint f [NI];
    longint e [NO];
    int     ec = 0, lat = 0;
    for (int o = 0; o < NO; o++) begin
      b[o] = longint'($urandom_range(8191)) - 4096;
      wr(PRM_OUT_B, o, b[o]);
      for (int i = 0; i < NI; i++) begin
        w[o][i] = longint'($urandom_range(1023)) - 512;
        wr(PRM_OUT_W, o*16 + i, w[o][i]);
      end
    end
    prm.we <= 1'b0;
    for (int i = 0; i < NI; i++) f[i] = longint'($urandom_range(24'hffffff));
    for (int o = 0; o < NO; o++) begin
      e[o] = b[o] * 256;
      for (int i = 0; i < NI; i++) e[o] += fdiv256(f[i] * w[o][i]);
      e[o] = wrap(e[o], 25);
      if (e[o] > e[ec]) ec = o;
    end
    fc_valid <= 1'b1;
    for (int i = 0; i < NI; i++) fc[i] <= ACC_W'(f[i]);
    @(posedge clk);
    fc_valid <= 1'b0;
    for (int i = 0; i < NI; i++) fc[i] <= '0;     // inputs are latched
    do begin @(posedge clk); lat++; end while (!y_valid && lat < 50);
    checks++;
    if (lat != LAT) begin failures++; $display("latency %0d, expected %0d", lat, LAT); end
    for (int o = 0; o < NO; o++) begin
      checks++;
      if (longint'(y[o]) != e[o]) begin failures++; $display("MISMATCH y[%0d] got %0d expected %0d", o, y[o], e[o]); end
    end
    checks++;
    if (int'(cls) != ec) begin failures++; $display("MISMATCH class got %0d expected %0d", cls, ec); end
    seen[ec]++;
  endtask

  initial begin
    prm = '0;
    for (int i = 0; i < NI; i++) fc[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) vector();
    for (int o = 0; o < NO; o++) begin
      checks++;
      if (seen[o] == 0) begin failures++; $display("class %0d never won", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
