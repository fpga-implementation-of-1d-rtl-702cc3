// cnn_top: bearing-fault classifier, from serial or parallel samples to LEDs.
//
// A vibration frame of 500 Q8.8 samples is collected in input_buffer, either
// from the UART line (uart_rxd, 9600 baud 8N1, two bytes per sample, high
// byte first) or from the parallel sample port (smp_valid/smp_data, for an
// ADC or a test harness). Once the frame is complete it is streamed, one
// sample per clock, through cnn_core. The predicted class (0 healthy, 1 ball,
// 2 inner race, 3 outer race) lights one of four LEDs and stays there until
// the next frame is classified; cls_valid pulses when it changes.
//
// The trained coefficients, weights and biases are loaded before use through
// the parameter write port (prm_*; address layout in cnn_pkg).
//
// Timing: cls_valid and cls are registered 519 clocks after the edge that
// writes the last sample (start, one idle clock, 500 samples, then the
// pipeline); at 125 MHz that is 4.15 us. The LEDs follow one clock later.
//
// From the original design: UART input at 9600 baud, the 500-sample RAM, the
// 125 MHz clock and one LED per class. This design's own choices: the parallel
// sample port, the parameter port, and one-hot LEDs held until the next
// result.
module cnn_top
  import cnn_pkg::*;
#(
  parameter int unsigned CLK_HZ = 125_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // sample input
  input  logic                  uart_rxd,
  input  logic                  smp_valid,
  input  logic [DATA_W-1:0]     smp_data,
  output logic                  smp_ready,
  // parameter load
  input  logic                  prm_we,
  input  logic [2:0]            prm_sel,
  input  logic [PRM_ADDR_W-1:0] prm_addr,
  input  logic [PRM_DATA_W-1:0] prm_data,
  // result
  output logic                  cls_valid,
  output logic [1:0]            cls,
  output logic [N_CLS-1:0]      led,
  output acc_t                  out [N_CLS]
);

  prm_wr_t prm;
  assign prm = '{we: prm_we, sel: prm_sel_e'(prm_sel), addr: prm_addr, data: prm_data};

  logic       b_valid;
  logic [7:0] b_data;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .valid(b_valid), .data(b_data)
  );

  logic  start, x_valid;
  data_t x;

  input_buffer #(.N(N_IN)) u_buf (
    .clk, .rst_n,
    .w_valid(smp_valid), .w_data(smp_data),
    .b_valid, .b_data,
    .ready(smp_ready),
    .start, .x_valid, .x
  );

  class_t core_cls;

  cnn_core u_core (
    .clk, .rst_n, .prm,
    .start, .x_valid, .x,
    .fc_valid(), .fc(),
    .cls_valid, .cls(core_cls), .out
  );

  assign cls = core_cls;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         led <= '0;
    else if (cls_valid) led <= N_CLS'(1) << core_cls;
  end

endmodule
