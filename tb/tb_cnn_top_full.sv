// tb_cnn_top_full: one complete classification with cnn_top at its default
// parameters (125 MHz clock, 9600 baud).
//
// Random parameters and a random frame come from cnn_ref_pkg. The first 492
// samples are written over the parallel port; the last 8 are sent as 16
// back-to-back bytes over the UART at the real bit period of 13021 clocks, so
// the serial path at its true rate completes the frame. The output-neuron values,
// class and LEDs are compared with the reference model, the classification
// latency (520 edges from the last sample write to cls_valid) is checked, and
// a second frame, entirely over the parallel port, follows.
//
// The clock and UART rate follow the original design. Splitting the frame
// between the two ports is this testbench's own choice: it keeps the run short
// while still using the serial path at its true rate.
module tb_cnn_top_full;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int BIT = 13021, LATENCY = 520, N_UART = 8;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        uart_rxd = 1'b1;
  logic        smp_valid = 1'b0;
  logic [15:0] smp_data = '0;
  logic        smp_ready;
  logic        prm_we = 1'b0;
  logic [2:0]  prm_sel = '0;
  logic [12:0] prm_addr = '0;
  logic [15:0] prm_data = '0;
  logic        cls_valid;
  logic [1:0]  cls;
  logic [3:0]  led;
  acc_t        out_o [4];

  int checks = 0, failures = 0;

  cnn_top dut (
    .clk, .rst_n, .uart_rxd, .smp_valid, .smp_data, .smp_ready,
    .prm_we, .prm_sel, .prm_addr, .prm_data,
    .cls_valid, .cls, .led, .out(out_o)
  );

  always #4 clk = ~clk;    // 125 MHz

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, t_last = 0, t_cls = 0, n_results = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.u_buf.wr && 32'(dut.u_buf.wptr) == 499) t_last = cyc;
    if (rst_n && cls_valid) begin
      t_cls = cyc;
      n_results++;
    end
  end

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
    repeat (BIT) @(posedge clk);
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic frame(int no, bit uart_last);
    int results_before = n_results;
    fill_random();
    compute();
    load_params();
    for (int n = 0; n < (uart_last ? 500 - N_UART : 500); n++) begin
      smp_valid <= 1'b1;
      smp_data  <= 16'(cnn_ref_pkg::x[n]);
      @(posedge clk);
    end
    smp_valid <= 1'b0;
    if (uart_last) begin
      for (int n = 500 - N_UART; n < 500; n++) begin
        uart_byte(8'(cnn_ref_pkg::x[n] >> 8));
        uart_byte(8'(cnn_ref_pkg::x[n]));
      end
    end
    while (n_results == results_before) @(posedge clk);
    @(posedge clk);
    #1;
    for (int o = 0; o < 4; o++) check($sformatf("frame %0d out[%0d]", no, o), longint'(out_o[o]), out[o]);
    check($sformatf("frame %0d class", no), longint'(cls), longint'(cnn_ref_pkg::cls));
    check($sformatf("frame %0d led", no), longint'(led), longint'(4'b0001 << cnn_ref_pkg::cls));
    check($sformatf("frame %0d latency", no), t_cls - t_last, LATENCY);
    $display("frame %0d: class %0d (%0.1f us after the last sample)", no, cls, (t_cls - t_last) * 0.008);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    frame(0, 1'b1);
    frame(1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
