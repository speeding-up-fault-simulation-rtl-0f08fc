// fsim_analysis: the Analysis module. Compares the response of every faulty
// circuit with the response of the fault-free CUT and reports, per faulty
// circuit, whether the currently active fault is detected (any output
// differs). The flags go to the controller, which turns them into fault
// location records.
// Interface: good_po (CUT outputs), faulty_po[p] (faulty copy p), detect[p].
// Timing: purely combinational, no latency. That a comparison happens here
// follows the scheme; the XOR/OR form and zero latency are this design's
// choice.
module fsim_analysis
  import fsim_pkg::*;
#(
  parameter int NUM_OUT = C17_NUM_OUT
) (
  input  logic [NUM_OUT-1:0]                good_po,
  input  logic [NUM_PARTS-1:0][NUM_OUT-1:0] faulty_po,
  output logic [NUM_PARTS-1:0]              detect
);
  always_comb begin
    for (int p = 0; p < NUM_PARTS; p++)
      detect[p] = |(good_po ^ faulty_po[p]);
  end
endmodule
