// conv2_sum: output stage of the second convolution layer.
//
// Each of the C2 second-layer filters has C1 partial convolutions, one from
// every first-layer channel (computed inside single_conv). This block adds
// the C1 partials of each filter in one registered adder tree, truncates the
// Q.16 sum to Q8.8 (dropping eight fraction bits, wrapping to 16 bits), and
// passes each filter's stream through its own relu_pool. Per 500-sample frame
// each filter yields 247 sums and 123 pooled values; the 247th sum has no
// partner and is dropped by the pooling.
//
// All partials of a frame arrive in lockstep, so one valid serves them all.
// Timing: sum register (1 clock), then relu_pool (2 clocks).
//
// From the original design: the partials of filter f from all eight first-
// layer neurons are added, then ReLU and pooling follow. This design's own
// choices: a single truncation after the full-precision sum, and a block of
// its own for this adder.
module conv2_sum
  import cnn_pkg::*;
#(
  parameter int unsigned NCH = C1,    // channels to add
  parameter int unsigned NF  = C2,    // filters
  parameter int unsigned PW  = DATA_W + C2W_W + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 part_valid,
  input  logic signed [PW-1:0] part [NCH][NF],
  output logic                 y_valid,
  output data_t                y [NF]
);

  localparam int unsigned SW = PW + $clog2(NCH);

  logic                 s_valid;
  logic signed [SW-1:0] s [NF];
  logic signed [SW-1:0] s_next [NF];

  always_comb begin
    for (int f = 0; f < NF; f++) begin
      s_next[f] = '0;
      for (int c = 0; c < NCH; c++) s_next[f] = s_next[f] + SW'(part[c][f]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      for (int f = 0; f < NF; f++) s[f] <= '0;
    end else if (clear) begin
      s_valid <= 1'b0;
    end else begin
      s_valid <= part_valid;
      if (part_valid) s <= s_next;
    end
  end

  logic [NF-1:0] yv;

  for (genvar f = 0; f < NF; f++) begin : g_pool
    relu_pool #(.W(DATA_W)) u_pool2 (
      .clk, .rst_n, .clear,
      .x_valid(s_valid), .x(s[f][FRAC +: DATA_W]),
      .y_valid(yv[f]), .y(y[f])
    );
  end

  assign y_valid = yv[0];

endmodule
