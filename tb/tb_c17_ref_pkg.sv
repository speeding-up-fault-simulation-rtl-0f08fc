// tb_c17_ref_pkg: reference model for the testbenches. Evaluates ISCAS-85
// C17 with at most one stuck-at fault, from a line table (a line is a
// primary input, a fanout branch of another line, or a NAND of two lines),
// independently of the RTL. Fault id = 2*line + stuck value; -1 = no fault.
// Also lists the default test patterns and the partition of the fault list.
package tb_c17_ref_pkg;

  localparam int NLINES = 17;
  localparam int NFAULTS = 34;

  // kind: 0 = primary input (a = input bit), 1 = branch of line a,
  //       2 = NAND(a, b)
  localparam int KIND [NLINES] = '{0,0,0,0,0, 1,1, 2,2, 1,1, 2, 1,1, 2, 2,2};
  localparam int SRCA [NLINES] = '{0,1,2,3,4, 2,2, 0,6, 8,8, 1, 11,11, 10, 7,13};
  localparam int SRCB [NLINES] = '{0,0,0,0,0, 0,0, 5,3, 0,0, 9, 0,0,  4, 12,14};

  localparam logic [4:0] PATTERNS [4] = '{5'h1E, 5'h0A, 5'h15, 5'h01};

  // part 0 = faults 0..15, part 1 = faults 16..33
  localparam int PBASE [2] = '{0, 16};
  localparam int PLEN  [2] = '{16, 18};

  function automatic logic [1:0] ref_c17(logic [4:0] pi, int fault);
    logic l [NLINES];
    for (int i = 0; i < NLINES; i++) begin
      case (KIND[i])
        0:       l[i] = pi[SRCA[i]];
        1:       l[i] = l[SRCA[i]];
        default: l[i] = !(l[SRCA[i]] && l[SRCB[i]]);
      endcase
      if (fault >= 0 && fault / 2 == i) l[i] = logic'(fault % 2);
    end
    return {l[16], l[15]};
  endfunction

  function automatic bit detects(logic [4:0] pi, int fault);
    return ref_c17(pi, fault) != ref_c17(pi, -1);
  endfunction

endpackage
