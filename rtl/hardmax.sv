// hardmax: index of the largest of N signed values (replaces softmax).
//
// Softmax is monotonic, so the class with the highest probability is the
// output neuron with the largest value; only that index is computed. Ties go
// to the lower index. Purely combinational.
//
// From the original design: hardmax in place of softmax. This design's own
// choice: ties go to the lower index.
module hardmax #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 25
) (
  input  logic signed [W-1:0]         x [N],
  output logic [$clog2(N)-1:0]        idx,
  output logic signed [W-1:0]         max
);

  always_comb begin
    idx = '0;
    max = x[0];
    for (int i = 1; i < N; i++) begin
      if (x[i] > max) begin
        max = x[i];
        idx = ($clog2(N))'(i);
      end
    end
  end

endmodule
