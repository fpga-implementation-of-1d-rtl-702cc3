// tb_uart_rx: checks the UART receiver.
//
// The bit period is shortened (CLK_HZ/BAUD = 16 clocks) to keep the run
// short. Random bytes are sent as 8N1 frames, LSB first, with random idle
// gaps and back-to-back frames; each must be received once, with the right
// value, between the middle and the end of data bit 7 (8.5 to 9 bit periods
// after the start edge, plus the two-flip-flop synchroniser). Short low
// glitches (under half a bit) on the idle line must produce nothing.
//
// The 9600-baud idle/receive behaviour follows the original design. The 8N1
// frame, LSB-first order and glitch rejection are this design's own choices.
module tb_uart_rx;

  localparam int CLK_HZ = 1_000_000, BAUD = 62_500, BIT = CLK_HZ / BAUD;

  logic       clk = 1'b0, rst_n = 1'b0, rxd = 1'b1;
  logic       valid;
  logic [7:0] data;

  int checks = 0, failures = 0, nrx = 0, nglitch = 0;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int     cyc = 0;
  int     t_start;
  logic [7:0] sent [$];

  always @(posedge clk) begin
    cyc++;
    if (valid && rst_n) begin
      nrx++;
      checks += 2;
      if (sent.size() == 0) begin
        failures += 2;
        $display("unexpected byte %02h at %0d", data, cyc);
      end else begin
        if (data != sent[0]) begin failures++; $display("MISMATCH got %02h expected %02h", data, sent[0]); end
        if (cyc - t_start < BIT * 17 / 2 || cyc - t_start > BIT * 9 + 3) begin
          failures++;
          $display("byte after %0d clocks", cyc - t_start);
        end
        void'(sent.pop_front());
      end
    end
  end

  task automatic send(logic [7:0] b);
    sent.push_back(b);
    rxd <= 1'b0;
    @(posedge clk);
    t_start = cyc;
    repeat (BIT - 1) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd <= b[i];
      repeat (BIT) @(posedge clk);
    end
    rxd <= 1'b1;
    repeat (BIT) @(posedge clk);
  endtask

  task automatic glitch();
    nglitch++;
    rxd <= 1'b0;
    repeat ($urandom_range(BIT / 2 - 4, 1)) @(posedge clk);
    rxd <= 1'b1;
    repeat (2 * BIT) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    send(8'h00);
    send(8'hff);
    send(8'ha5);
    for (int t = 0; t < 60; t++) begin
      if (t % 10 == 3) glitch();
      send(8'($urandom));
      if ($urandom_range(1)) repeat ($urandom_range(40)) @(posedge clk);
    end
    repeat (3 * BIT) @(posedge clk);
    checks += 2;
    if (nrx != 63) begin failures++; $display("%0d bytes received, expected 63", nrx); end
    if (nglitch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
