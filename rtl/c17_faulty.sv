// c17_faulty: one faulty copy of C17 with its own scan chain segment.
//
// The circuit is a full copy of C17 so a fault effect can reach the outputs,
// but only the faults of partition PART get an injection point. Those
// part_len(PART) faults are driven by a private fault_scan_chain segment
// whose bit i activates fault part_base(PART)+i. A line with an active
// stuck-at-v fault is forced to v: line = (value & ~sa0) | sa1. Faults of the
// other parts have a constant-zero enable and vanish in synthesis.
// Interface: pi/po as in c17_cut; scan_in/shift drive the chain segment.
// Timing: combinational from pi and the chain register to po.
// Keeping only the part's own chain bits in each faulty circuit follows the
// scheme; the injection gate form is this design's choice.
module c17_faulty
  import fsim_pkg::*;
#(
  parameter int PART = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   scan_in,
  input  logic                   shift,
  input  logic [C17_NUM_IN-1:0]  pi,
  output logic [C17_NUM_OUT-1:0] po,
  output logic                   scan_out
);
  localparam int BASE = part_base(PART);
  localparam int LEN  = part_len(PART);

  logic [LEN-1:0]            act;
  logic [C17_NUM_FAULTS-1:0] fault_en;   // one enable per fault id
  // line values after injection, one signal per line
  logic i1, i2, i3, i6, i7, i3a, i3b, n10, n11, n11a, n11b;
  logic n16, n16a, n16b, n19, n22, n23;

  fault_scan_chain #(.LEN(LEN)) u_chain (
    .clk, .rst_n, .scan_in, .shift, .act, .scan_out
  );

  always_comb begin
    fault_en = '0;
    fault_en[BASE +: LEN] = act;
  end

  // force a line to its stuck value when its fault is active
  function automatic logic inj(logic v, int line, logic [C17_NUM_FAULTS-1:0] en);
    return (v & ~en[2*line]) | en[2*line+1];
  endfunction

  always_comb begin
    i1   = inj(pi[0], L_I1, fault_en);
    i2   = inj(pi[1], L_I2, fault_en);
    i3   = inj(pi[2], L_I3, fault_en);
    i6   = inj(pi[3], L_I6, fault_en);
    i7   = inj(pi[4], L_I7, fault_en);
    i3a  = inj(i3, L_I3A, fault_en);
    i3b  = inj(i3, L_I3B, fault_en);
    n10  = inj(~(i1 & i3a), L_N10, fault_en);
    n11  = inj(~(i3b & i6), L_N11, fault_en);
    n11a = inj(n11, L_N11A, fault_en);
    n11b = inj(n11, L_N11B, fault_en);
    n16  = inj(~(i2 & n11a), L_N16, fault_en);
    n16a = inj(n16, L_N16A, fault_en);
    n16b = inj(n16, L_N16B, fault_en);
    n19  = inj(~(n11b & i7), L_N19, fault_en);
    n22  = inj(~(n10 & n16a), L_N22, fault_en);
    n23  = inj(~(n16b & n19), L_N23, fault_en);
  end

  assign po = {n23, n22};
endmodule
