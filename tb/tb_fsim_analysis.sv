// tb_fsim_analysis: random CUT and faulty responses; each detect flag must
// be set exactly when that faulty circuit's outputs differ from the CUT's.
module tb_fsim_analysis;
  logic [1:0] good_po;
  logic [1:0][1:0] faulty_po;
  logic [1:0] detect;
  int checks = 0, failures = 0;

  fsim_analysis dut (.good_po, .faulty_po, .detect);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over 6 input bits
    for (int v = 0; v < 64; v++) begin
      {faulty_po[1], faulty_po[0], good_po} = 6'(v);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (detect[p] !== (faulty_po[p] != good_po)) begin
          failures++;
          $display("good=%b faulty[%0d]=%b detect=%b", good_po, p, faulty_po[p], detect[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
