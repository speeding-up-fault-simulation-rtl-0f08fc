// tb_uart_tx: sends random bytes through the transmitter with 8 clocks per
// bit, decodes the line with a receiver model and checks the bytes, the
// ready handshake, the idle level and the frame length (10 bit times).
module tb_uart_tx;
  localparam int CPB = 8;
  localparam int N   = 40;
  logic clk = 0, rst_n = 0, valid = 0, ready, tx;
  logic [7:0] data = '0;
  logic [7:0] sent [$];
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);
  tb_uart_rx_model #(.CLKS_PER_BIT(CPB)) rxm (.clk, .rx(tx));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2 * CPB) @(posedge clk);
    #1;
    checks++;
    if (tx !== 1'b1 || ready !== 1'b1) begin
      failures++;
      $display("not idle after reset");
    end
    for (int i = 0; i < N; i++) begin
      @(posedge clk iff ready);
      data  <= 8'($urandom);
      valid <= 1;
      @(posedge clk);
      valid <= 0;
      sent.push_back(data);
      t0 = $time / 10;
      #1;
      checks++;
      if (ready !== 1'b0) begin
        failures++;
        $display("ready stayed high after a byte was taken");
      end
      do begin
        @(posedge clk);
        #1;
      end while (!ready);
      t1 = ($time - 1) / 10;
      checks++;
      if (t1 - t0 != 10 * CPB) begin
        failures++;
        $display("frame took %0d clocks, expected %0d", t1 - t0, 10 * CPB);
      end
    end
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (rxm.bytes.size() != N || rxm.frame_errors != 0) begin
      failures++;
      $display("received %0d bytes, %0d frame errors", rxm.bytes.size(), rxm.frame_errors);
    end
    for (int i = 0; i < N && i < rxm.bytes.size(); i++) begin
      checks++;
      if (rxm.bytes[i] !== sent[i]) begin
        failures++;
        $display("byte %0d: got %h sent %h", i, rxm.bytes[i], sent[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
