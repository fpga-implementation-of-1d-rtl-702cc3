// input_buffer: the frame memory in front of the CNN.
//
// LOAD: samples are written in arrival order into a N-word RAM of Q8.8
// words. They come either as whole words (w_valid/w_data, e.g. from an ADC
// or a test harness) or as bytes from the UART (b_valid/b_data), two bytes
// per sample, high byte first. When the N-th sample is written the buffer
// switches to RUN: it pulses start for one clock and then reads the RAM out,
// one sample per clock, on x_valid/x (synchronous read). After the last
// sample it returns to LOAD for the next frame. Inputs that arrive during RUN
// are dropped (ready is low then); a pending high byte is kept.
//
// Timing: start is registered by the same edge that writes the N-th sample;
// sample k is registered k+2 edges later (x_valid high for N consecutive
// clocks), so the CNN is cleared one clock before the first sample.
//
// From the original design: a 500-sample RAM filled from the UART, two bytes
// per sample. This design's own choices: high byte first, the word port,
// starting on the 500th write and dropping inputs during read-out.
module input_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned N = N_IN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       w_valid,
  input  data_t      w_data,
  input  logic       b_valid,
  input  logic [7:0] b_data,
  output logic       ready,
  output logic       start,
  output logic       x_valid,
  output data_t      x
);

  localparam int unsigned AW = $clog2(N);

  typedef enum logic {LOAD, RUN} state_e;

  data_t         mem [N];
  state_e        state;
  logic [AW-1:0] wptr;
  logic [AW-1:0] rptr;
  logic          have_hi;
  logic [7:0]    hi;
  logic          wr;
  data_t         wd;

  assign ready = (state == LOAD);

  always_comb begin
    wr = 1'b0;
    wd = w_data;
    if (state == LOAD) begin
      if (w_valid) begin
        wr = 1'b1;
      end else if (b_valid && have_hi) begin
        wr = 1'b1;
        wd = {hi, b_data};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= wd;
    x <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= LOAD;
      wptr    <= '0;
      rptr    <= '0;
      have_hi <= 1'b0;
      hi      <= '0;
      start   <= 1'b0;
      x_valid <= 1'b0;
    end else begin
      start   <= 1'b0;
      x_valid <= 1'b0;
      if (state == LOAD && !w_valid && b_valid) begin
        if (!have_hi) begin
          hi      <= b_data;
          have_hi <= 1'b1;
        end else begin
          have_hi <= 1'b0;
        end
      end
      unique case (state)
        LOAD: if (wr) begin
          if (32'(wptr) == N - 1) begin
            wptr  <= '0;
            rptr  <= '0;
            start <= 1'b1;
            state <= RUN;
          end else wptr <= wptr + 1'b1;
        end
        RUN: begin
          if (!start) begin
            x_valid <= 1'b1;
            if (32'(rptr) == N - 1) state <= LOAD;
            else                    rptr  <= rptr + 1'b1;
          end
        end
        default: state <= LOAD;
      endcase
    end
  end

endmodule
