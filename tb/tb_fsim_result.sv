// tb_fsim_result: feeds fault-location records (with repeats and with both
// parts recording in the same cycle), then sim_done, decodes the UART
// report and checks it byte by byte: FIFO 0 ids, FIFO 1 ids, FF, 32-bit
// cycle count MSB first. Also checks num_detected, busy, report_done and
// that clear empties the detected set (second run: no records).
module tb_fsim_result;
  import fsim_pkg::*;
  localparam int CPB = 4;
  logic clk = 0, rst_n = 0, clear = 0, sim_done = 0;
  logic [1:0] rec_valid = '0;
  logic [POS_W-1:0] rec_pos = '0;
  logic [31:0] sim_cycles = '0;
  logic uart_tx, busy, report_done;
  logic [7:0] num_detected;
  logic [7:0] exp_bytes [$];
  int checks = 0, failures = 0, done_pulses = 0;

  fsim_result #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .clear, .rec_valid, .rec_pos, .sim_done, .sim_cycles,
    .uart_tx, .busy, .report_done, .num_detected);
  tb_uart_rx_model #(.CLKS_PER_BIT(CPB)) rxm (.clk, .rx(uart_tx));

  always #5 clk = ~clk;
  always @(posedge clk) if (report_done) done_pulses++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rec(logic [1:0] v, int pos);
    rec_valid <= v;
    rec_pos   <= POS_W'(pos);
    @(posedge clk);
    rec_valid <= '0;
  endtask

  task automatic report(logic [31:0] t);
    sim_cycles <= t;
    sim_done   <= 1;
    @(posedge clk);
    sim_done   <= 0;
    sim_cycles <= '0;
    #1;
    checks++;
    if (!busy) begin
      failures++;
      $display("busy low after sim_done");
    end
    @(posedge clk iff report_done);
    repeat (2) @(posedge clk);
  endtask

  task automatic check_bytes();
    checks++;
    if (rxm.bytes.size() != exp_bytes.size() || rxm.frame_errors != 0) begin
      failures++;
      $display("got %0d bytes, expected %0d; frame errors %0d",
               rxm.bytes.size(), exp_bytes.size(), rxm.frame_errors);
    end
    for (int i = 0; i < exp_bytes.size() && i < rxm.bytes.size(); i++) begin
      checks++;
      if (rxm.bytes[i] !== exp_bytes[i]) begin
        failures++;
        $display("byte %0d: got %h expected %h", i, rxm.bytes[i], exp_bytes[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    // run 1
    rec(2'b01, 3);
    rec(2'b11, 5);      // both parts at once: ids 5 and 21
    rec(2'b01, 3);      // repeat, must be dropped
    rec(2'b10, 17);     // id 33
    rec(2'b10, 0);      // id 16
    rec(2'b11, 15);     // ids 15 and 31
    rec(2'b10, 17);     // repeat
    @(posedge clk);
    #1;
    checks++;
    if (num_detected !== 8'd7) begin
      failures++;
      $display("num_detected=%0d expected 7", num_detected);
    end
    report(32'h1234_5678);
    exp_bytes = '{8'd3, 8'd5, 8'd15, 8'd21, 8'd33, 8'd16, 8'd31,
                  8'hFF, 8'h12, 8'h34, 8'h56, 8'h78};
    check_bytes();
    // run 2: cleared, no detections
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    rec(2'b01, 3);      // detected again after clear
    rxm.bytes.delete();
    report(32'd77);
    exp_bytes = '{8'd3, 8'hFF, 8'h00, 8'h00, 8'h00, 8'd77};
    check_bytes();
    checks++;
    if (num_detected !== 8'd1 || done_pulses != 2 || busy) begin
      failures++;
      $display("num_detected=%0d done_pulses=%0d busy=%b", num_detected, done_pulses, busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
