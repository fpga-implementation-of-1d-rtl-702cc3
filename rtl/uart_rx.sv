// uart_rx: 8N1 UART receiver (default 9600 baud from a 125 MHz clock).
//
// The receiver idles while the line is high. A 1-to-0 transition (start bit)
// begins reception, in which a counter measures bit periods of CLK_HZ/BAUD
// clocks (13021, about 104 us). Reception is split into three states: START
// re-checks the start bit at its middle (a glitch returns to IDLE), DATA
// samples each of the 8 data bits at the middle of its period, LSB first, and
// STOP waits for the line to go high again. After the eighth data bit the byte
// is presented on `data` with a one-clock `valid` pulse and the counters
// return to zero. The input `rxd` is synchronised with two flip-flops, so a
// byte is reported about 8.5 bit periods plus 3 clocks after its start edge.
//
// From the original design: 9600 baud, 125 MHz, an idle/receive behaviour
// with a bit-period counter, and 8-bit transfers. This design's own choices:
// the 8N1 frame, LSB-first order, mid-bit sampling, the start-bit re-check,
// the synchroniser and the split of "receive" into START/DATA/STOP.
module uart_rx #(
  parameter int unsigned CLK_HZ = 125_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);

  localparam int unsigned BIT_CLKS = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW       = $clog2(BIT_CLKS + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    nbit;
  logic [1:0]    sync;
  logic          rx;
  logic [7:0]    shreg;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= IDLE;
      cnt   <= '0;
      nbit  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        IDLE: begin
          cnt  <= '0;
          nbit <= '0;
          if (!rx) state <= START;
        end
        START: begin                       // wait half a bit, re-check low
          if (32'(cnt) == BIT_CLKS / 2 - 1) begin
            cnt   <= '0;
            state <= rx ? IDLE : DATA;
          end else cnt <= cnt + 1'b1;
        end
        DATA: begin                        // sample in the middle of each bit
          if (32'(cnt) == BIT_CLKS - 1) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            nbit  <= nbit + 1'b1;
            if (nbit == 3'd7) begin
              data  <= {rx, shreg[7:1]};
              valid <= 1'b1;
              state <= STOP;
            end
          end else cnt <= cnt + 1'b1;
        end
        STOP: if (rx) state <= IDLE;      // line back high: stop bit
        default: state <= IDLE;
      endcase
    end
  end

endmodule
