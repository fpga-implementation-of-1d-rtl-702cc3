// cnn_pkg: sizes, number formats and the parameter-write bus shared by the
// bearing-fault 1D CNN.
//
// Network (all sizes from the model definition): 500 input samples, first
// convolution with 8 filters of 3 taps, second with 4 filters of 8x3 taps,
// no bias and no padding in either, ReLU and max-pool (2,2) after each,
// flatten to 4*123 = 492 values, dense layer of 10 neurons with bias and
// ReLU, output layer of 4 neurons with bias, class = index of the largest.
//
// Number formats: activations are Q8.8 (16 bit, two's complement). Stored
// coefficients keep the 8-bit fraction with a narrow integer part: Q2.8
// (10 bit) for the first convolution and the dense weights, Q1.8 (9 bit) for
// the second convolution. Biases are held as Q8.8 (a design choice: their
// format is not given). Dense and output accumulators are 25 bit with a
// 16-bit fraction (Q9.16), the width of the original implementation's neuron
// registers. Every truncation drops low fraction bits and every
// narrowing wraps (two's complement) rather than saturating.
//
// Parameter bus: the trained coefficients live in registers inside the layer
// that uses them. They are written through one shared bus, prm_wr_t; the
// field layout of addr depends on sel and is given next to prm_sel_e.
//
// From the original design: all layer sizes, the Q8.8, Q2.8 and Q1.8 formats,
// truncation back to Q8.8 and the 25-bit neuron registers. This design's own
// choices: the bias format, wrap-around on overflow, and the parameter bus
// with its address map (the original fixes the parameters in registers when
// the design is built).
package cnn_pkg;

  // ---- network shape ----
  localparam int unsigned N_IN    = 500;               // samples per frame
  localparam int unsigned KSIZE   = 3;                 // taps per kernel
  localparam int unsigned C1      = 8;                 // conv1 filters
  localparam int unsigned C2      = 4;                 // conv2 filters
  localparam int unsigned L1      = N_IN - KSIZE + 1;  // 498 conv1 outputs
  localparam int unsigned P1      = L1 / 2;            // 249 after pooling
  localparam int unsigned L2      = P1 - KSIZE + 1;    // 247 conv2 outputs
  localparam int unsigned P2      = L2 / 2;            // 123 after pooling
  localparam int unsigned N_FC    = 10;                // dense neurons
  localparam int unsigned N_CLS   = 4;                 // classes

  // ---- number formats ----
  localparam int unsigned FRAC    = 8;    // fraction bits of data and parameters
  localparam int unsigned DATA_W  = 16;   // Q8.8 activations
  localparam int unsigned C1W_W   = 10;   // Q2.8 conv1 coefficients
  localparam int unsigned C2W_W   = 9;    // Q1.8 conv2 coefficients
  localparam int unsigned FCW_W   = 10;   // Q2.8 dense weights
  localparam int unsigned OW_W    = 10;   // Q2.8 output-layer weights
  localparam int unsigned BIAS_W  = 16;   // Q8.8 biases
  localparam int unsigned ACC_W   = 25;   // Q9.16 dense/output accumulators

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [1:0]               class_t;

  // ---- parameter write bus ----
  // sel          addr layout (LSB first)                     data used
  // PRM_CONV1    [1:0] tap k, [4:2] filter                    [9:0]
  // PRM_CONV2    [1:0] tap k, [4:2] input channel, [6:5] filter [8:0]
  // PRM_FC_W     [6:0] position j (0..122), [8:7] conv2 filter f,
  //              [12:9] neuron n; weight of flat input f*123+j [9:0]
  // PRM_FC_B     [3:0] neuron                                 [15:0]
  // PRM_OUT_W    [3:0] dense input i, [5:4] output neuron     [9:0]
  // PRM_OUT_B    [1:0] output neuron                          [15:0]
  typedef enum logic [2:0] {
    PRM_CONV1 = 3'd0,
    PRM_CONV2 = 3'd1,
    PRM_FC_W  = 3'd2,
    PRM_FC_B  = 3'd3,
    PRM_OUT_W = 3'd4,
    PRM_OUT_B = 3'd5
  } prm_sel_e;

  localparam int unsigned PRM_ADDR_W = 13;
  localparam int unsigned PRM_DATA_W = 16;

  typedef struct packed {
    logic                  we;
    prm_sel_e              sel;
    logic [PRM_ADDR_W-1:0] addr;
    logic [PRM_DATA_W-1:0] data;
  } prm_wr_t;

endpackage
