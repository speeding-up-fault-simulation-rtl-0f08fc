// tb_fault_scan_chain: shifts a single token through the default 16-bit
// segment and checks that exactly the expected bit is set every cycle, that
// the token leaves through scan_out, that the chain holds when shift is low
// and that reset clears it.
module tb_fault_scan_chain;
  localparam int LEN = 16;
  logic clk = 0, rst_n = 0, scan_in = 0, shift = 0;
  logic [LEN-1:0] act;
  logic scan_out;
  int checks = 0, failures = 0;

  fault_scan_chain dut (.clk, .rst_n, .scan_in, .shift, .act, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [LEN-1:0] exp_act, logic exp_out);
    checks++;
    if (act !== exp_act || scan_out !== exp_out) begin
      failures++;
      $display("t=%0t act=%h exp %h scan_out=%b exp %b", $time, act, exp_act, scan_out, exp_out);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check('0, 0);
    // insert token
    scan_in <= 1; shift <= 1;
    @(posedge clk);
    scan_in <= 0;
    for (int i = 0; i < LEN; i++) begin
      #1 check(LEN'(1) << i, i == LEN - 1);
      // hold for one cycle half way
      if (i == 7) begin
        shift <= 0;
        @(posedge clk);
        #1 check(LEN'(1) << i, 0);
        shift <= 1;
      end
      @(posedge clk);
    end
    #1 check('0, 0);
    // two tokens, then reset
    scan_in <= 1;
    @(posedge clk);
    scan_in <= 0;
    @(posedge clk);
    scan_in <= 1;
    @(posedge clk);
    scan_in <= 0; shift <= 0;
    #1 check(LEN'(5), 0);
    rst_n <= 0;
    @(posedge clk);
    #1 check('0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
