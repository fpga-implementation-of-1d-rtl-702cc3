// tb_cnn_top: end-to-end test of the classifier, from samples to LEDs.
//
// The UART bit period is shortened to 16 clocks (CLK_HZ = 16 * BAUD) so that
// whole frames can be sent serially; everything else is at full size. Frames
// with random parameters (cnn_ref_pkg) go in over the parallel port or as
// 1000 UART bytes, high byte first; the four output-neuron values, the class
// and the LED pattern are compared with the reference model. A final group of
// frames uses biases that favour each class in turn, so that every LED is
// exercised. Latency is checked: cls_valid must be seen 520 edges after the
// edge that writes the last sample.
//
// Each mechanism of the design is counted and must occur at least once:
// ring-buffer pointer wrap, negative convolution sums clipped by ReLU,
// max-pool pairs, the unpaired 247th conv2 value dropped, a dense output
// clipped by ReLU, each of the four classes, a UART byte, a byte pair merged
// into a sample, and a sample refused while a frame is being processed.
//
// The ring buffer, ReLU, pooling, UART and LED mechanisms are those of the
// original design. Refusing samples during read-out and the shortened bit
// period are this design's own choices.
module tb_cnn_top;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int BAUD = 9600, CLK_HZ = 16 * BAUD, BIT = 16;
  localparam int LATENCY = 520;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              uart_rxd = 1'b1;
  logic              smp_valid = 1'b0;
  logic [15:0]       smp_data = '0;
  logic              smp_ready;
  logic              prm_we = 1'b0;
  logic [2:0]        prm_sel = '0;
  logic [12:0]       prm_addr = '0;
  logic [15:0]       prm_data = '0;
  logic              cls_valid;
  logic [1:0]        cls;
  logic [3:0]        led;
  acc_t              out_o [4];

  int checks = 0, failures = 0;

  cnn_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (
    .clk, .rst_n, .uart_rxd, .smp_valid, .smp_data, .smp_ready,
    .prm_we, .prm_sel, .prm_addr, .prm_data,
    .cls_valid, .cls, .led, .out(out_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_wrap = 0, n_relu1 = 0, n_pairs = 0, n_drop = 0, n_fc_clip = 0;
  int n_bytes = 0, n_merge = 0, n_refused = 0;
  int n_cls [4];
  int cyc = 0, t_last = 0, t_cls = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.u_core.g_conv1[0].u_neuron.u_conv1.ptr == 2'd3 && dut.x_valid) n_wrap++;
      if (dut.u_core.g_conv1[0].u_neuron.c1_valid && dut.u_core.g_conv1[0].u_neuron.c1_q < 0) n_relu1++;
      if (dut.u_core.g_conv1[0].u_neuron.pool_valid) n_pairs++;
      if (dut.b_valid) n_bytes++;
      if (dut.u_buf.wr && dut.b_valid && !dut.smp_valid) n_merge++;
      if (smp_valid && !smp_ready) n_refused++;
      if (dut.u_buf.wr && 32'(dut.u_buf.wptr) == 499) t_last = cyc;
      if (cls_valid) begin
        t_cls = cyc;
        if (dut.u_core.u_conv2.g_pool[0].u_pool2.second) n_drop++;
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic wr(prm_sel_e sel, int addr, longint data);
    prm_we   <= 1'b1;
    prm_sel  <= 3'(sel);
    prm_addr <= 13'(addr);
    prm_data <= 16'(data);
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
    prm_we <= 1'b0;
  endtask

  task automatic uart_byte(logic [7:0] b);
    uart_rxd <= 1'b0;
    repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd <= b[i];
      repeat (BIT) @(posedge clk);
    end
    uart_rxd <= 1'b1;
    repeat (BIT + $urandom_range(5)) @(posedge clk);
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int frame_no = 0;

  task automatic run_frame(bit serial);
    int fc_clip = 0;
    compute();
    for (int n = 0; n < 10; n++) if (fc[n] == 0) fc_clip++;
    load_params();
    for (int n = 0; n < 500; n++) begin
      if (serial) begin
        uart_byte(8'(cnn_ref_pkg::x[n] >> 8));
        uart_byte(8'(cnn_ref_pkg::x[n]));
      end else begin
        smp_valid <= 1'b1;
        smp_data  <= 16'(cnn_ref_pkg::x[n]);
        @(posedge clk);
      end
    end
    // keep offering one more sample: it must be refused while busy
    smp_valid <= !serial;
    smp_data  <= 16'h7fff;
    @(posedge clk);
    smp_valid <= 1'b0;
    while (!cls_valid) @(posedge clk);
    @(posedge clk);
    #1;
    n_fc_clip += fc_clip;
    for (int o = 0; o < 4; o++) check($sformatf("frame %0d out[%0d]", frame_no, o), longint'(out_o[o]), out[o]);
    check($sformatf("frame %0d class", frame_no), longint'(cls), cls_ref());
    check($sformatf("frame %0d led", frame_no), longint'(led), longint'(4'b0001 << cls_ref()));
    check($sformatf("frame %0d latency", frame_no), t_cls - t_last, LATENCY);
    n_cls[cls]++;
    $display("frame %0d (%s): class %0d, latency %0d", frame_no, serial ? "uart" : "parallel", cls, t_cls - t_last);
    frame_no++;
  endtask

  function automatic int cls_ref();
    return cnn_ref_pkg::cls;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    fill_random();
    run_frame(1'b0);
    fill_random();
    run_frame(1'b1);
    for (int c = 0; c < 4; c++) begin
      fill_random();
      for (int o = 0; o < 4; o++) bo[o] = (o == c) ? 32767 : -32768;
      run_frame(1'b0);
    end
    checks += 12;
    if (n_wrap == 0)    begin failures++; $display("ring pointer never wrapped"); end
    if (n_relu1 == 0)   begin failures++; $display("conv1 ReLU never clipped"); end
    if (n_pairs == 0)   begin failures++; $display("no max-pool pair"); end
    if (n_drop == 0)    begin failures++; $display("unpaired conv2 value never dropped"); end
    if (n_fc_clip == 0) begin failures++; $display("dense ReLU never clipped"); end
    for (int c = 0; c < 4; c++) if (n_cls[c] == 0) begin failures++; $display("class %0d never seen", c); end
    if (n_bytes == 0)   begin failures++; $display("no UART byte"); end
    if (n_merge == 0)   begin failures++; $display("no byte pair merged"); end
    if (n_refused == 0) begin failures++; $display("no sample refused while busy"); end
    $display("mechanisms: wraps %0d, conv1 relu clips %0d, pool pairs %0d, conv2 drops %0d, dense clips %0d, classes %0d/%0d/%0d/%0d, uart bytes %0d, merged %0d, refused %0d",
             n_wrap, n_relu1, n_pairs, n_drop, n_fc_clip, n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_bytes, n_merge, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
