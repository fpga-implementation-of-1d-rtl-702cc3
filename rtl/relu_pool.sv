// relu_pool: ReLU followed by max-pooling with kernel 2 and stride 2.
//
// Stage 1 registers max(x, 0). Stage 2 pairs consecutive ReLU outputs of a
// frame, (1,2), (3,4), ...: a phase bit marks the first of a pair, whose
// value is held; on the second the larger of the two is registered and
// y_valid pulses. An odd last value (no partner) is dropped, so L inputs give
// floor(L/2) outputs. clear restarts the pairing for a new frame.
//
// Timing: two register stages. The ReLU is registered by the edge that
// accepts a value, and the pooled value by the next edge after the second
// value of a pair. Input values may arrive on any clock.
//
// From the original design: ReLU and pooling as successive register stages,
// and the pairing check that keeps pairs (1,2), (3,4). This design's own
// choices: the phase-bit implementation and the clear input.
module relu_pool #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                x_valid,
  input  logic signed [W-1:0] x,
  output logic                y_valid,
  output logic signed [W-1:0] y
);

  logic                r_valid;
  logic signed [W-1:0] r;        // ReLU output
  logic                second;   // next ReLU output completes a pair
  logic signed [W-1:0] held;     // first value of the pair

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r       <= '0;
      second  <= 1'b0;
      held    <= '0;
      y_valid <= 1'b0;
      y       <= '0;
    end else if (clear) begin
      r_valid <= 1'b0;
      second  <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      // ReLU stage
      r_valid <= x_valid;
      if (x_valid) r <= x[W-1] ? '0 : x;
      // pooling stage
      y_valid <= 1'b0;
      if (r_valid) begin
        if (!second) begin
          held   <= r;
          second <= 1'b1;
        end else begin
          y       <= (r > held) ? r : held;
          y_valid <= 1'b1;
          second  <= 1'b0;
        end
      end
    end
  end

endmodule
