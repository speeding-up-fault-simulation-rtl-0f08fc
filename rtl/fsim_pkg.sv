// fsim_pkg: constants and helpers shared by the parallel fault simulation system.
//
// The circuit under test is the ISCAS-85 C17 benchmark (six 2-input NANDs,
// inputs 1,2,3,6,7, outputs 22,23). Its netlist is the published benchmark,
// not something the parallel-simulation scheme defines. Every one of its 17
// lines (5 inputs, 6 gate outputs and 6 fanout branches) carries a stuck-at-0
// and a stuck-at-1 fault, numbered fault = 2*line + stuck_value, giving 34
// faults. The line numbering is this design's own and is listed below.
//
// The fault list is cut into NUM_PARTS parts "vertically" to the
// sensitization paths: part 0 is the input side of the circuit and part 1 the
// output side, so a test vector that sensitizes a path activates faults in
// both parts and the two faulty copies can each be tested in the same clock.
// A fanout stem is always placed in the same part as all of its branches.
// Part p covers lines PART_FIRST_LINE[p] .. PART_FIRST_LINE[p+1]-1. Both the
// two-way split and that stem rule follow the scheme; the exact cut
// point for C17 is this design's choice.
package fsim_pkg;

  // ---- C17 circuit ----------------------------------------------------
  localparam int C17_NUM_IN     = 5;
  localparam int C17_NUM_OUT    = 2;
  localparam int C17_NUM_LINES  = 17;
  localparam int C17_NUM_FAULTS = 2 * C17_NUM_LINES;

  // Line numbering (fault id = 2*line + stuck value)
  typedef enum int {
    L_I1   = 0,  L_I2   = 1,  L_I3   = 2,  L_I6   = 3,  L_I7  = 4,
    L_I3A  = 5,  L_I3B  = 6,  L_N10  = 7,  L_N11  = 8,  L_N11A = 9,
    L_N11B = 10, L_N16  = 11, L_N16A = 12, L_N16B = 13, L_N19 = 14,
    L_N22  = 15, L_N23  = 16
  } c17_line_e;

  // ---- partitioning ---------------------------------------------------
  localparam int NUM_PARTS = 2;
  localparam int PART_FIRST_LINE [NUM_PARTS+1] = '{0, 8, C17_NUM_LINES};

  function automatic int part_base(int p);   // first fault id of part p
    return 2 * PART_FIRST_LINE[p];
  endfunction

  function automatic int part_len(int p);    // faults (= chain bits) of part p
    return 2 * (PART_FIRST_LINE[p+1] - PART_FIRST_LINE[p]);
  endfunction

  function automatic int max_chain();
    int m = 0;
    for (int p = 0; p < NUM_PARTS; p++)
      if (part_len(p) > m) m = part_len(p);
    return m;
  endfunction

  localparam int MAX_CHAIN  = max_chain();               // 18
  localparam int POS_W      = $clog2(MAX_CHAIN);         // chain position
  localparam int FAULT_ID_W = $clog2(C17_NUM_FAULTS);    // 6

  // ---- report over the UART -------------------------------------------
  localparam logic [7:0] REPORT_SEPARATOR = 8'hFF;
  localparam int         TIME_W           = 32;

endpackage
