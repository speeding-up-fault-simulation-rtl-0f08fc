// tb_fsim_circuits: drives the Circuit module (CUT plus two faulty copies)
// with every input vector while the shared token walks through both chain
// segments, and checks the CUT and both faulty responses against the
// reference model in every cycle.
module tb_fsim_circuits;
  import tb_c17_ref_pkg::*;
  import fsim_pkg::NUM_PARTS;
  logic clk = 0, rst_n = 0, scan_in = 0, shift = 0;
  logic [4:0] pi = '0;
  logic [1:0] good_po;
  logic [NUM_PARTS-1:0][1:0] faulty_po;
  logic [NUM_PARTS-1:0] scan_out;
  int checks = 0, failures = 0;

  fsim_circuits dut (.clk, .rst_n, .chain_scan_in(scan_in), .chain_shift(shift),
                     .pi, .good_po, .faulty_po, .scan_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < 32; v++) begin
      pi <= 5'(v);
      scan_in <= 1; shift <= 1;
      @(posedge clk);
      scan_in <= 0;
      for (int pos = 0; pos < 18; pos++) begin
        #1;
        checks++;
        if (good_po !== ref_c17(pi, -1)) begin
          failures++;
          $display("CUT pi=%h got %b", pi, good_po);
        end
        for (int p = 0; p < 2; p++) begin
          checks++;
          if (faulty_po[p] !== ref_c17(pi, pos < PLEN[p] ? PBASE[p] + pos : -1)) begin
            failures++;
            $display("faulty %0d pi=%h pos=%0d got %b", p, pi, pos, faulty_po[p]);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
