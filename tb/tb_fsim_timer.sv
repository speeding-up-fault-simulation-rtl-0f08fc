// tb_fsim_timer: counts while run is high, holds while it is low, clears,
// and (with a 4-bit counter) saturates at its maximum.
module tb_fsim_timer;
  logic clk = 0, rst_n = 0, clear = 0, run = 0;
  logic [31:0] count;
  logic [3:0] count4;
  int checks = 0, failures = 0;

  fsim_timer dut (.clk, .rst_n, .clear, .run, .count);
  fsim_timer #(.WIDTH(4)) dut4 (.clk, .rst_n, .clear, .run, .count(count4));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int exp32, int exp4);
    checks++;
    if (count !== 32'(exp32) || count4 !== 4'(exp4)) begin
      failures++;
      $display("count=%0d exp %0d count4=%0d exp %0d", count, exp32, count4, exp4);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 chk(0, 0);
    run <= 1;
    repeat (10) @(posedge clk);
    #1 chk(10, 10);
    run <= 0;
    repeat (3) @(posedge clk);
    #1 chk(10, 10);
    run <= 1;
    repeat (20) @(posedge clk);
    #1 chk(30, 15);
    clear <= 1;
    @(posedge clk);
    #1 chk(0, 0);
    clear <= 0;
    repeat (77) @(posedge clk);
    #1 chk(77, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
