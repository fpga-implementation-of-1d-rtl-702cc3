// single_conv: one neuron (filter) of the first convolution layer, together
// with this channel's share of the second convolution.
//
// The first stage is a 3-tap convolution (conv3_tap, ring buffer of four
// samples) of the input stream with this filter's Q2.8 coefficients, no bias.
// Its Q.16 sum is truncated to Q8.8 (the low eight fraction bits are dropped,
// the result wraps to 16 bits), then relu_pool applies ReLU and pairwise
// max-pooling. The pooled stream (249 values per 500-sample frame, one every
// second clock) feeds C2 inner conv3_tap units, one per second-layer filter,
// each holding that filter's three Q1.8 coefficients for this channel. Their
// untruncated Q.16 outputs are partial sums; conv2_sum adds the partials of
// all channels.
//
// Coefficients are registers written over the prm bus (PRM_CONV1 entries with
// filter == CH, PRM_CONV2 entries with channel == CH).
//
// Timing: the edge t that accepts a sample also registers its conv1 output;
// ReLU is registered at t+1 and the pooled value at t+2 (on the second
// output of a pair). The partial sums are registered at t+3.
//
// From the original design: one such module per first-layer filter, conv, ReLU
// and pool as three stages, and four inner convolution modules for the second
// layer. This design's own choices: truncating by dropping bits, keeping the
// partials at full precision, and the coefficient decoding from the parameter
// bus.
module single_conv
  import cnn_pkg::*;
#(
  parameter int unsigned CH  = 0,     // index of this first-layer filter
  parameter int unsigned NF2 = C2     // number of second-layer filters
) (
  input  logic       clk,
  input  logic       rst_n,
  input  prm_wr_t    prm,
  input  logic       clear,
  input  logic       x_valid,
  input  data_t      x,
  output logic       pool_valid,      // first-layer output (after pooling)
  output data_t      pool,
  output logic       part_valid,
  output logic signed [DATA_W+C2W_W+1:0] part [NF2]
);

  localparam int unsigned C1Y_W = DATA_W + C1W_W + 2;
  localparam int unsigned C2Y_W = DATA_W + C2W_W + 2;

  logic signed [C1W_W-1:0] w1 [3];
  logic signed [C2W_W-1:0] w2 [NF2][3];

  // coefficient registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin
        w1[k] <= '0;
        for (int f = 0; f < NF2; f++) w2[f][k] <= '0;
      end
    end else if (prm.we) begin
      if (prm.sel == PRM_CONV1 && prm.addr[4:2] == 3'(CH) && prm.addr[1:0] != 2'd3)
        w1[prm.addr[1:0]] <= prm.data[C1W_W-1:0];
      if (prm.sel == PRM_CONV2 && prm.addr[4:2] == 3'(CH) && prm.addr[1:0] != 2'd3
          && 32'(prm.addr[6:5]) < NF2)
        w2[prm.addr[6:5]][prm.addr[1:0]] <= prm.data[C2W_W-1:0];
    end
  end

  logic                     c1_valid;
  logic signed [C1Y_W-1:0]  c1_full;
  data_t                    c1_q;

  conv3_tap #(.X_W(DATA_W), .W_W(C1W_W), .Y_W(C1Y_W)) u_conv1 (
    .clk, .rst_n, .clear, .coef(w1),
    .x_valid, .x,
    .y_valid(c1_valid), .y(c1_full)
  );

  // Q.16 -> Q8.8: drop FRAC fraction bits, keep DATA_W bits
  assign c1_q = c1_full[FRAC +: DATA_W];

  relu_pool #(.W(DATA_W)) u_pool1 (
    .clk, .rst_n, .clear,
    .x_valid(c1_valid), .x(c1_q),
    .y_valid(pool_valid), .y(pool)
  );

  logic [NF2-1:0] pv;

  for (genvar f = 0; f < NF2; f++) begin : g_inner
    conv3_tap #(.X_W(DATA_W), .W_W(C2W_W), .Y_W(C2Y_W)) u_conv2 (
      .clk, .rst_n, .clear, .coef(w2[f]),
      .x_valid(pool_valid), .x(pool),
      .y_valid(pv[f]), .y(part[f])
    );
  end

  assign part_valid = pv[0];

endmodule
