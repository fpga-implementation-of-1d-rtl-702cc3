// conv3_tap: three-tap cross-correlation over a sample stream.
//
// Each accepted sample is written into a four-entry circular buffer addressed
// by a 2-bit pointer that simply wraps from 3 to 0, so only the last samples
// are kept instead of the whole frame. On the same clock edge the new sample
// and the two before it (read from the buffer) are multiplied by the three
// coefficients and summed: y[n] = w0*x[n] + w1*x[n+1] + w2*x[n+2] in stream
// order, i.e. the kernel is not flipped. The first output appears with the
// third sample of a frame, so a frame of N samples gives N-2 outputs.
//
// The result is the full-precision sum (fraction bits = data + coefficient
// fraction bits); the caller truncates it. clear restarts a frame (empties the
// buffer count and rewinds the pointer).
//
// Timing: y and y_valid are registered by the same edge that accepts the
// third and later samples (one register stage).
//
// From the original design: the four-entry ring buffer with a wrapping 2-bit
// pointer, and three multiplications and two additions done on the clock edge
// that stores the sample. This design's own choices: the clear input, the fill
// count and the parameterised widths.
module conv3_tap #(
  parameter int unsigned X_W = 16,   // input sample width
  parameter int unsigned W_W = 10,   // coefficient width
  parameter int unsigned Y_W = X_W + W_W + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic signed [W_W-1:0] coef [3],   // coef[0] meets the oldest sample
  input  logic                  x_valid,
  input  logic signed [X_W-1:0] x,
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y
);

  logic signed [X_W-1:0] ring [4];
  logic [1:0]            ptr;       // slot for the next sample
  logic [1:0]            fill;      // samples held, saturates at 2
  logic signed [Y_W-1:0] sum;

  always_comb begin
    sum = Y_W'(coef[0] * ring[ptr - 2'd2])
        + Y_W'(coef[1] * ring[ptr - 2'd1])
        + Y_W'(coef[2] * x);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr     <= '0;
      fill    <= '0;
      y_valid <= 1'b0;
      y       <= '0;
      for (int i = 0; i < 4; i++) ring[i] <= '0;
    end else if (clear) begin
      ptr     <= '0;
      fill    <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (x_valid) begin
        ring[ptr] <= x;
        ptr       <= ptr + 2'd1;
        if (fill != 2'd2) fill <= fill + 2'd1;
        if (fill == 2'd2) begin
          y       <= sum;
          y_valid <= 1'b1;
        end
      end
    end
  end

endmodule
