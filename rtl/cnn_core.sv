// cnn_core: the pipelined 1D CNN classifier for one 500-sample frame.
//
// Dataflow (every stage runs concurrently on the moving stream):
//   x (Q8.8, one sample per clock)
//   -> 8 x single_conv   conv1 3 taps, Q8.8 truncation, ReLU, max-pool
//                        plus 4 inner conv2 partial convolutions each
//   -> conv2_sum         add the 8 partials per filter, Q8.8, ReLU, max-pool
//   -> 10 x dense_neuron 4 MACs per beat over 123 beats, bias, ReLU
//   -> output_layer      4 neurons, one MAC per clock over 10 inputs, hardmax
//
// start clears every stage and must precede the first sample of a frame; the
// next start may come once cls_valid has pulsed. Samples may arrive with
// gaps. At one sample per clock, fc_valid is registered 504 clocks and
// cls_valid 516 clocks after the edge that accepts the first sample, so a
// frame takes 517 clock cycles from its first sample to its class.
// Parameters (coefficients, weights, biases) are written over prm while no
// frame is in flight.
//
// From the original design: the dataflow above, its split into modules and the
// fully pipelined operation. The original reports 514 cycles to the dense
// output and 529 to the class; this pipeline has fewer register stages, and no
// value changes.
module cnn_core
  import cnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  prm_wr_t prm,
  input  logic    start,
  input  logic    x_valid,
  input  data_t   x,
  output logic    fc_valid,          // dense outputs ready
  output acc_t    fc [N_FC],
  output logic    cls_valid,
  output class_t  cls,
  output acc_t    out [N_CLS]        // output-neuron values, Q9.16
);

  localparam int unsigned PW = DATA_W + C2W_W + 2;

  logic                 pool_valid [C1];
  data_t                pool [C1];
  logic [C1-1:0]        part_valid;
  logic signed [PW-1:0] part [C1][C2];

  for (genvar c = 0; c < C1; c++) begin : g_conv1
    single_conv #(.CH(c), .NF2(C2)) u_neuron (
      .clk, .rst_n, .prm, .clear(start),
      .x_valid, .x,
      .pool_valid(pool_valid[c]), .pool(pool[c]),
      .part_valid(part_valid[c]), .part(part[c])
    );
  end

  logic  c2_valid;
  data_t c2 [C2];

  conv2_sum #(.NCH(C1), .NF(C2), .PW(PW)) u_conv2 (
    .clk, .rst_n, .clear(start),
    .part_valid(part_valid[0]), .part,
    .y_valid(c2_valid), .y(c2)
  );

  logic [N_FC-1:0] fcv;

  for (genvar n = 0; n < N_FC; n++) begin : g_dense
    dense_neuron #(.ID(n), .LANES(C2), .EVENTS(P2)) u_neuron (
      .clk, .rst_n, .prm, .clear(start),
      .x_valid(c2_valid), .x(c2),
      .y_valid(fcv[n]), .y(fc[n])
    );
  end

  assign fc_valid = fcv[0];

  output_layer #(.N_X(N_FC), .N_OUT(N_CLS)) u_out (
    .clk, .rst_n, .prm,
    .fc_valid, .fc,
    .y_valid(cls_valid), .y(out), .cls
  );

  // all channels and neurons run in lockstep
  assert property (@(posedge clk) disable iff (!rst_n) part_valid == '0 || part_valid == '1);
  assert property (@(posedge clk) disable iff (!rst_n) fcv == '0 || fcv == '1);

endmodule
