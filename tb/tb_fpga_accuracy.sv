// tb_fpga_accuracy: the "FPGA accuracy" experiment, 50 inputs.
//
// Fifty random frames, each with its own random parameter set, are
// classified by cnn_core. Every frame is checked bit for bit against the
// fixed-point reference (four output neurons and the class). The class is
// also compared with the same network evaluated in real arithmetic
// (compute_real): the fraction that agree is this design's counterpart of the
// FPGA accuracy metric (hardware prediction versus software prediction). It
// is reported, together with the largest output-neuron error, and is counted
// as a failure only below 90%, since random parameters give closer races
// between classes than a trained model.
//
// The experiment itself (50 inputs, hardware prediction against software
// prediction) follows the original design. The trained model is not available,
// so random parameters stand in for it.
module tb_fpga_accuracy;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int FRAMES = 50;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  prm_wr_t prm;
  logic    start = 1'b0, x_valid = 1'b0;
  data_t   xin = '0;
  logic    fc_valid, cls_valid;
  acc_t    fc_o [N_FC];
  class_t  cls_o;
  acc_t    out_o [N_CLS];

  int checks = 0, failures = 0, agree = 0, n_results = 0;
  real max_err = 0.0;

  cnn_core dut (
    .clk, .rst_n, .prm, .start, .x_valid, .x(xin),
    .fc_valid, .fc(fc_o), .cls_valid, .cls(cls_o), .out(out_o)
  );

  always #4 clk = ~clk;

  initial begin
    repeat (FRAMES * 7000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cls_valid) n_results++;

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

  initial begin
    int n_before;
    prm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      fill_random();
      compute();
      compute_real();
      load_params();
      n_before = n_results;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      for (int n = 0; n < 500; n++) begin
        x_valid <= 1'b1;
        xin     <= DATA_W'(cnn_ref_pkg::x[n]);
        @(posedge clk);
      end
      x_valid <= 1'b0;
      while (n_results == n_before) @(posedge clk);
      #1;
      for (int o = 0; o < N_CLS; o++) begin
        real e;
        e = out_o[o] / 65536.0 - out_real[o];
        if (e < 0.0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (longint'(out_o[o]) != out[o]) begin
          failures++;
          $display("MISMATCH frame %0d out[%0d]: got %0d expected %0d", fr, o, out_o[o], out[o]);
        end
      end
      checks++;
      if (int'(cls_o) != cnn_ref_pkg::cls) begin
        failures++;
        $display("MISMATCH frame %0d class: got %0d expected %0d", fr, cls_o, cnn_ref_pkg::cls);
      end
      if (int'(cls_o) == cls_real) agree++;
    end
    $display("class agreement with real arithmetic: %0d of %0d; largest output-neuron error %0.4f",
             agree, FRAMES, max_err);
    checks++;
    if (agree * 10 < FRAMES * 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
