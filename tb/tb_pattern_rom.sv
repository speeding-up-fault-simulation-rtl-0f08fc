// tb_pattern_rom: reads the four default test vectors, checks the one-cycle
// read latency and that the output holds while en is low.
module tb_pattern_rom;
  logic clk = 0, en = 0;
  logic [1:0] addr = '0;
  logic [4:0] data;
  int checks = 0, failures = 0;
  localparam logic [4:0] EXP [4] = '{5'h1E, 5'h0A, 5'h15, 5'h01};

  pattern_rom dut (.clk, .en, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [4:0] exp);
    checks++;
    if (data !== exp) begin
      failures++;
      $display("addr=%0d data=%h exp %h", addr, data, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 3; a >= 0; a--) begin
      addr <= 2'(a); en <= 1;
      @(posedge clk);
      #1 chk(EXP[a]);
    end
    // hold while en is low
    en <= 0; addr <= 2'd2;
    repeat (3) @(posedge clk);
    #1 chk(EXP[0]);
    en <= 1;
    @(posedge clk);
    #1 chk(EXP[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
