// tb_cnn_core: end-to-end check of the CNN pipeline against cnn_ref_pkg.
//
// For each of several random frames the testbench loads every coefficient,
// weight and bias over the parameter bus, streams the 500 samples (one per
// clock, or with random gaps), and compares the ten dense outputs, the four
// output-neuron values and the class with the reference model. With gap-free
// input it also checks the latency: counting the edge that takes the first
// sample as edge 0, fc_valid must first be seen at edge 505 and cls_valid at
// edge 517.
//
// The latency checked is this pipeline's own: the original reports 514 cycles
// to the dense output and 529 to the class, with more register stages.
module tb_cnn_core;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int LATENCY = 517, DENSE_LATENCY = 505;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  prm_wr_t prm;
  logic    start, x_valid;
  data_t   x;
  logic    fc_valid, cls_valid;
  acc_t    fc_o [N_FC];
  class_t  cls_o;
  acc_t    out_o [N_CLS];

  int checks = 0, failures = 0;

  cnn_core dut (
    .clk, .rst_n, .prm, .start, .x_valid, .x,
    .fc_valid, .fc(fc_o), .cls_valid, .cls(cls_o), .out(out_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic load_params();
    for (int c = 0; c < 8; c++) for (int k = 0; k < 3; k++) wr(PRM_CONV1, c*4 + k, w1[c][k]);
    for (int f = 0; f < 4; f++) for (int c = 0; c < 8; c++) for (int k = 0; k < 3; k++)
      wr(PRM_CONV2, f*32 + c*4 + k, w2[f][c][k]);
    for (int n = 0; n < 10; n++) begin
      wr(PRM_FC_B, n, bfc[n]);
      for (int f = 0; f < 4; f++) for (int j = 0; j < 123; j++) wr(PRM_FC_W, n*512 + f*128 + j, wfc[n][f][j]);
    end
    for (int o = 0; o < 4; o++) begin
      wr(PRM_OUT_B, o, bo[o]);
      for (int i = 0; i < 10; i++) wr(PRM_OUT_W, o*16 + i, wo[o][i]);
    end
    prm.we <= 1'b0;
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Cycle bookkeeping, all at the same edges: t_first is the edge that
  // accepts sample 0 of a frame, t_fc / t_cls the first edges that see
  // fc_valid / cls_valid high.
  int     t_first, t_cls, t_fc;
  int     cyc = 0;
  bit     waiting_first = 1'b0;
  longint fc_seen [N_FC];

  always @(posedge clk) begin
    cyc++;
    if (start) waiting_first = 1'b1;
    else if (x_valid && waiting_first) begin
      t_first       = cyc;
      waiting_first = 1'b0;
    end
    if (fc_valid) begin
      t_fc = cyc;
      for (int n = 0; n < N_FC; n++) fc_seen[n] = longint'(fc_o[n]);
    end
    if (cls_valid) t_cls = cyc;
  end

  task automatic run_frame(int frame, bit gaps);
    fill_random();
    compute();
    load_params();
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    for (int n = 0; n < 500; n++) begin
      if (gaps) while ($urandom_range(2) == 0) begin
        x_valid <= 1'b0;
        @(posedge clk);
      end
      x_valid <= 1'b1;
      x       <= DATA_W'(cnn_ref_pkg::x[n]);
      @(posedge clk);
    end
    x_valid <= 1'b0;
    while (!cls_valid) @(posedge clk);
    @(posedge clk);
    for (int n = 0; n < N_FC; n++) check($sformatf("frame %0d fc[%0d]", frame, n), fc_seen[n], fc[n]);
    for (int o = 0; o < N_CLS; o++) check($sformatf("frame %0d out[%0d]", frame, o), longint'(out_o[o]), out[o]);
    check($sformatf("frame %0d class", frame), longint'(cls_o), cls);
    if (!gaps) begin
      check("latency first sample -> class", t_cls - t_first, LATENCY);
      check("latency first sample -> dense", t_fc - t_first, DENSE_LATENCY);
    end
    $display("frame %0d: class %0d (ref %0d), out %0d %0d %0d %0d, latency %0d", frame, cls_o, cls,
             out_o[0], out_o[1], out_o[2], out_o[3], t_cls - t_first);
    @(posedge clk);
  endtask

  initial begin
    prm     = '0;
    start   = 1'b0;
    x_valid = 1'b0;
    x       = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run_frame(0, 1'b0);
    run_frame(1, 1'b1);
    run_frame(2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
