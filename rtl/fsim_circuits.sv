// fsim_circuits: the Circuit module of the fault simulation system.
//
// Holds the fault-free CUT and one faulty copy of it per partition, all fed
// by the same test pattern. Every faulty copy carries its own scan chain
// segment; the segments share scan_in and shift, so the activation token
// walks through all of them in lockstep and NUM_PARTS faults (one per part)
// are simulated in every clock.
// Interface: pi is the pattern; good_po is the CUT response; faulty_po[p]
// is the response of faulty copy p; scan_out[p] is the end of segment p.
// Timing: combinational from pi and the chain registers to the outputs.
// One CUT plus one faulty circuit per part follows the scheme.
module fsim_circuits
  import fsim_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  chain_scan_in,
  input  logic                                  chain_shift,
  input  logic [C17_NUM_IN-1:0]                 pi,
  output logic [C17_NUM_OUT-1:0]                good_po,
  output logic [NUM_PARTS-1:0][C17_NUM_OUT-1:0] faulty_po,
  output logic [NUM_PARTS-1:0]                  scan_out
);
  c17_cut u_cut (.pi, .po(good_po));

  for (genvar p = 0; p < NUM_PARTS; p++) begin : g_faulty
    c17_faulty #(.PART(p)) u_faulty (
      .clk, .rst_n,
      .scan_in (chain_scan_in),
      .shift   (chain_shift),
      .pi,
      .po      (faulty_po[p]),
      .scan_out(scan_out[p])
    );
  end
endmodule
