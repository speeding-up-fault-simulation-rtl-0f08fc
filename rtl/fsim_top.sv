// fsim_top: parallel fault simulation system for the ISCAS-85 C17 circuit.
//
// A fault-free copy of the circuit under test (CUT) runs beside NUM_PARTS
// faulty copies. The fault list is split into parts cut across the
// sensitization paths, and each faulty copy owns the scan chain segment of
// one part, so each clock tests NUM_PARTS faults instead of one.
//   Pattern ROM -> Circuits (CUT + faulty copies) -> Analysis -> CTRL
//   CTRL -> Result (one FIFO per faulty copy, UART) -> uart_tx (host PC)
//   Timer -> Result
// A start pulse (ignored while busy) runs every stored pattern; sim_done
// pulses at the end of the simulation, sim_cycles holds its length in
// clocks (NUM_PATTERNS * (1 + MAX_CHAIN) = 76 for the default 4
// patterns), and the Result module then sends the ids of all detected
// faults and the cycle count over uart_tx and pulses report_done.
// clk is the 50 MHz clock that a clock manager would supply; reset is
// synchronous and active low. The block structure follows the scheme; the
// C17 netlist is the standard benchmark, and patterns, UART format and
// handshakes are this design's choices.
module fsim_top
  import fsim_pkg::*;
#(
  parameter int CLK_HZ = 50_000_000,
  parameter int BAUD   = 115_200
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              sim_done,
  output logic              report_done,
  output logic [TIME_W-1:0] sim_cycles,
  output logic [7:0]        num_detected,
  output logic              uart_tx
);
  localparam int NUM_PATTERNS = 4;
  localparam int PAW          = $clog2(NUM_PATTERNS);

  logic                                  ctrl_busy, res_busy, start_ok;
  logic                                  rom_en;
  logic [PAW-1:0]                        rom_addr;
  logic [C17_NUM_IN-1:0]                 pattern;
  logic                                  chain_scan_in, chain_shift;
  logic [C17_NUM_OUT-1:0]                good_po;
  logic [NUM_PARTS-1:0][C17_NUM_OUT-1:0] faulty_po;
  logic [NUM_PARTS-1:0]                  scan_out_unused;
  logic [NUM_PARTS-1:0]                  detect, rec_valid;
  logic [POS_W-1:0]                      rec_pos;
  logic                                  timer_clear, timer_run;

  assign busy     = ctrl_busy || res_busy;
  assign start_ok = start && !busy;

  pattern_rom #(.WIDTH(C17_NUM_IN), .DEPTH(NUM_PATTERNS)) u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .data(pattern)
  );

  fsim_circuits u_circuits (
    .clk, .rst_n, .chain_scan_in, .chain_shift,
    .pi(pattern), .good_po, .faulty_po, .scan_out(scan_out_unused)
  );

  fsim_analysis u_analysis (.good_po, .faulty_po, .detect);

  fsim_ctrl #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst_n, .start(start_ok), .detect,
    .rom_en, .rom_addr, .chain_scan_in, .chain_shift,
    .rec_valid, .rec_pos, .timer_clear, .timer_run,
    .busy(ctrl_busy), .sim_done
  );

  fsim_timer #(.WIDTH(TIME_W)) u_timer (
    .clk, .rst_n, .clear(timer_clear), .run(timer_run), .count(sim_cycles)
  );

  fsim_result #(.CLKS_PER_BIT(CLK_HZ / BAUD)) u_result (
    .clk, .rst_n, .clear(timer_clear), .rec_valid, .rec_pos,
    .sim_done, .sim_cycles, .uart_tx, .busy(res_busy),
    .report_done, .num_detected
  );
endmodule
