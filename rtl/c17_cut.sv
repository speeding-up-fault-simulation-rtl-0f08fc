// c17_cut: fault-free copy of the ISCAS-85 C17 benchmark circuit, the circuit
// under test (CUT) that serves as the reference for every faulty copy.
//
// Purely combinational: six 2-input NAND gates
//   10 = NAND(1,3)   11 = NAND(3,6)   16 = NAND(2,11)
//   19 = NAND(11,7)  22 = NAND(10,16) 23 = NAND(16,19)
// Interface: pi[0..4] = inputs 1,2,3,6,7; po[0] = output 22, po[1] = output 23.
// The netlist is the standard benchmark; the bit order is this design's choice.
module c17_cut
  import fsim_pkg::*;
(
  input  logic [C17_NUM_IN-1:0]  pi,
  output logic [C17_NUM_OUT-1:0] po
);
  logic n10, n11, n16, n19;

  always_comb begin
    n10   = ~(pi[0] & pi[2]);
    n11   = ~(pi[2] & pi[3]);
    n16   = ~(pi[1] & n11);
    n19   = ~(n11 & pi[4]);
    po[0] = ~(n10 & n16);
    po[1] = ~(n16 & n19);
  end
endmodule
