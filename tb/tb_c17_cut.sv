// tb_c17_cut: applies all 32 input vectors to the fault-free C17 and compares
// both outputs with the reference model.
module tb_c17_cut;
  import tb_c17_ref_pkg::*;
  logic [4:0] pi;
  logic [1:0] po;
  int checks = 0, failures = 0;

  c17_cut dut (.pi, .po);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      pi = 5'(v);
      #1;
      checks++;
      if (po !== ref_c17(pi, -1)) begin
        failures++;
        $display("pi=%h po=%b expected %b", pi, po, ref_c17(pi, -1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
