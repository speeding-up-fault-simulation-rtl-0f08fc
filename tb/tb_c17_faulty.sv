// tb_c17_faulty: for both partitions and all 32 input vectors, walks the
// activation token through the faulty circuit's chain segment and compares
// its outputs, for every active fault and with no fault active, with the
// reference model. Also checks scan_out.
module tb_c17_faulty;
  import tb_c17_ref_pkg::*;
  logic clk = 0, rst_n = 0, scan_in = 0, shift = 0;
  logic [4:0] pi = '0;
  logic [1:0] po0, po1;
  logic so0, so1;
  int checks = 0, failures = 0;

  c17_faulty #(.PART(0)) dut0 (.clk, .rst_n, .scan_in, .shift, .pi, .po(po0), .scan_out(so0));
  c17_faulty #(.PART(1)) dut1 (.clk, .rst_n, .scan_in, .shift, .pi, .po(po1), .scan_out(so1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s pi=%h got %b exp %b", what, pi, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < 32; v++) begin
      pi <= 5'(v);
      scan_in <= 1; shift <= 1;
      @(posedge clk);
      scan_in <= 0;
      for (int pos = 0; pos < 19; pos++) begin
        #1;
        cmp("part0", po0, ref_c17(pi, pos < PLEN[0] ? PBASE[0] + pos : -1));
        cmp("part1", po1, ref_c17(pi, pos < PLEN[1] ? PBASE[1] + pos : -1));
        checks++;
        if (so0 !== (pos == PLEN[0] - 1) || so1 !== (pos == PLEN[1] - 1)) begin
          failures++;
          $display("scan_out wrong at pos %0d", pos);
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
