// dense_neuron: one neuron of the fully-connected (dense) layer.
//
// The second convolution layer delivers its output as EVENTS beats of LANES
// values, one value per conv2 filter (beat j carries flat inputs f*EVENTS+j,
// f = 0..LANES-1, i.e. the channel-major flattening of the (4,123) map). On
// each beat the neuron multiplies the LANES Q8.8 inputs by their Q2.8
// weights, adds the LANES products (Q.16) and accumulates into a 25-bit Q9.16
// register that clear preloads with the bias (Q8.8 shifted to Q9.16). After
// beat EVENTS-1 it registers ReLU(accumulator) on y and pulses y_valid.
// The accumulator wraps on overflow.
//
// Weights are stored per neuron as LANES x EVENTS registers read
// asynchronously by the beat counter (distributed-RAM style); they and the
// bias are written over the prm bus (PRM_FC_W / PRM_FC_B with neuron == ID).
//
// Timing: one clock per beat; y_valid one clock after the last beat.
// After ReLU, y is never negative, so its sign bit is a constant 0. It stays
// so that y keeps the signed Q9.16 type of the accumulator.
//
// From the original design: 10 such neurons over 492 inputs, 4 products and
// 3 additions per beat, 123 beats, bias preload, ReLU at the end, weights in
// distributed RAM, the 25-bit neuron register and the Q2.8 weight format.
// This design's own choices: the Q8.8 bias format, wrap-around instead of
// saturation, and loading over the parameter bus.
module dense_neuron
  import cnn_pkg::*;
#(
  parameter int unsigned ID     = 0,
  parameter int unsigned LANES  = C2,
  parameter int unsigned EVENTS = P2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  prm_wr_t prm,
  input  logic    clear,
  input  logic    x_valid,
  input  data_t   x [LANES],
  output logic    y_valid,
  output acc_t    y
);

  localparam int unsigned JW = $clog2(EVENTS);
  localparam int unsigned PW = DATA_W + FCW_W + $clog2(LANES) + 1;

  logic signed [FCW_W-1:0]  w [LANES][EVENTS];
  logic signed [BIAS_W-1:0] bias;
  logic [JW-1:0]            j;
  acc_t                     acc;
  logic signed [PW-1:0]     beat_sum;
  acc_t                     acc_next;

  always_ff @(posedge clk) begin
    if (prm.we && prm.sel == PRM_FC_W && prm.addr[12:9] == 4'(ID)
        && 32'(prm.addr[8:7]) < LANES && 32'(prm.addr[6:0]) < EVENTS)
      w[prm.addr[8:7]][prm.addr[6:0]] <= prm.data[FCW_W-1:0];
  end

  always_comb begin
    beat_sum = '0;
    for (int f = 0; f < LANES; f++) beat_sum = beat_sum + PW'(x[f] * w[f][j]);
    acc_next = acc + ACC_W'(beat_sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias    <= '0;
      j       <= '0;
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      if (prm.we && prm.sel == PRM_FC_B && prm.addr[3:0] == 4'(ID))
        bias <= prm.data[BIAS_W-1:0];
      y_valid <= 1'b0;
      if (clear) begin
        j   <= '0;
        acc <= ACC_W'(bias) <<< FRAC;
      end else if (x_valid) begin
        acc <= acc_next;
        if (32'(j) == EVENTS - 1) begin
          j       <= '0;
          y       <= acc_next[ACC_W-1] ? '0 : acc_next;
          y_valid <= 1'b1;
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

endmodule
