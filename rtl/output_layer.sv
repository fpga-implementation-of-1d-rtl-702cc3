// output_layer: the four output neurons and the class decision.
//
// When the dense layer presents its N_X ReLU outputs (fc_valid), they are
// latched and each output neuron's 25-bit Q9.16 accumulator is preloaded with
// its bias (Q8.8 shifted to Q9.16). Then, one input per clock, every neuron
// multiplies dense output i (Q9.16) by its Q2.8 weight, giving a 35-bit Q.24
// product that is truncated to Q.16 and added (wrapping). After N_X clocks
// hardmax picks the neuron with the largest value; its index is the class.
// Softmax is not evaluated: it does not change which neuron is largest.
//
// Weights and biases are registers written over the prm bus (PRM_OUT_W,
// PRM_OUT_B).
//
// Timing: fc_valid at edge t; products for inputs 0..N_X-1 are added at
// edges t+1..t+N_X; y_valid (class and neuron values) at edge t+N_X+1.
//
// From the original design: one multiplication per clock over the 10 dense
// outputs, the bias, the 25-bit neuron register, and hardmax instead of
// softmax. This design's own choices: the Q2.8 weight and Q8.8 bias formats,
// the truncation of the 35-bit product, and running the four neurons side by
// side.
module output_layer
  import cnn_pkg::*;
#(
  parameter int unsigned N_X   = N_FC,
  parameter int unsigned N_OUT = N_CLS
) (
  input  logic    clk,
  input  logic    rst_n,
  input  prm_wr_t prm,
  input  logic    fc_valid,
  input  acc_t    fc [N_X],
  output logic    y_valid,
  output acc_t    y [N_OUT],
  output logic [$clog2(N_OUT)-1:0] cls
);

  localparam int unsigned IW = $clog2(N_X);
  localparam int unsigned MW = ACC_W + OW_W;    // 35-bit product

  typedef enum logic [1:0] {IDLE, MAC, DECIDE} state_e;

  logic signed [OW_W-1:0]   w [N_OUT][N_X];
  logic signed [BIAS_W-1:0] bias [N_OUT];
  acc_t                     fc_q [N_X];
  acc_t                     acc [N_OUT];
  state_e                   state;
  logic [IW-1:0]            i;
  logic [$clog2(N_OUT)-1:0] idx;
  acc_t                     maxv;

  logic signed [MW-1:0]     prod [N_OUT];   // 35-bit Q.24 products

  always_comb begin
    for (int o = 0; o < N_OUT; o++) prod[o] = MW'(fc_q[i] * w[o][i]);
  end

  hardmax #(.N(N_OUT), .W(ACC_W)) u_hardmax (.x(acc), .idx(idx), .max(maxv));

  always_ff @(posedge clk) begin
    if (prm.we && prm.sel == PRM_OUT_W && 32'(prm.addr[5:4]) < N_OUT
        && 32'(prm.addr[3:0]) < N_X)
      w[prm.addr[5:4]][prm.addr[3:0]] <= prm.data[OW_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      i       <= '0;
      y_valid <= 1'b0;
      cls     <= '0;
      for (int o = 0; o < N_OUT; o++) begin
        bias[o] <= '0;
        acc[o]  <= '0;
        y[o]    <= '0;
      end
      for (int k = 0; k < N_X; k++) fc_q[k] <= '0;
    end else begin
      if (prm.we && prm.sel == PRM_OUT_B && 32'(prm.addr[1:0]) < N_OUT)
        bias[prm.addr[1:0]] <= prm.data[BIAS_W-1:0];
      y_valid <= 1'b0;
      unique case (state)
        IDLE: if (fc_valid) begin
          fc_q <= fc;
          for (int o = 0; o < N_OUT; o++) acc[o] <= ACC_W'(bias[o]) <<< FRAC;
          i     <= '0;
          state <= MAC;
        end
        MAC: begin
          for (int o = 0; o < N_OUT; o++) acc[o] <= acc[o] + ACC_W'(prod[o] >>> FRAC);
          if (32'(i) == N_X - 1) state <= DECIDE;
          else                    i <= i + 1'b1;
        end
        DECIDE: begin
          y       <= acc;
          cls     <= idx;
          y_valid <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
