// fsim_ctrl: the CTRL module, which sequences a fault simulation run.
//
// For every test pattern it spends one FETCH cycle, in which it reads the
// pattern from the Pattern ROM and shifts a single 1 into every scan chain
// segment, and then MAX_CHAIN RUN cycles in which it keeps shifting, so the
// token sits at chain position 0, 1, ... MAX_CHAIN-1. In every RUN cycle
// each faulty circuit has one fault active (the one at position rec_pos of
// its segment) and the Analysis flags tell whether the pattern detects it.
// CTRL passes a detection on to the Result module as rec_valid[p] together
// with the fault location rec_pos, but only while rec_pos lies inside part
// p's segment. After the last pattern a DONE cycle flushes the chains and
// pulses sim_done.
// Timing: a run of NUM_PATTERNS patterns takes
//   NUM_PATTERNS * (1 + MAX_CHAIN) cycles of FETCH and RUN, in which
// timer_run is high, plus the DONE cycle; timer_clear pulses with the
// accepted start, so the Timer holds the run length when sim_done pulses.
// Activating the faults one by one with a scan chain, in all faulty circuits
// in parallel, follows the scheme; the exact cycle schedule is this
// design's choice.
module fsim_ctrl
  import fsim_pkg::*;
#(
  parameter int  NUM_PATTERNS = 4,
  localparam int PAW          = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NUM_PARTS-1:0] detect,
  output logic                 rom_en,
  output logic [PAW-1:0]       rom_addr,
  output logic                 chain_scan_in,
  output logic                 chain_shift,
  output logic [NUM_PARTS-1:0] rec_valid,
  output logic [POS_W-1:0]     rec_pos,
  output logic                 timer_clear,
  output logic                 timer_run,
  output logic                 busy,
  output logic                 sim_done
);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_RUN, S_DONE} state_e;

  state_e           state;
  logic [PAW-1:0]   pat_q;
  logic [POS_W-1:0] pos_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pat_q <= '0;
      pos_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pat_q <= '0;
          state <= S_FETCH;
        end
        S_FETCH: begin
          pos_q <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          pos_q <= pos_q + 1'b1;
          if (pos_q == POS_W'(MAX_CHAIN - 1)) begin
            if (pat_q == PAW'(NUM_PATTERNS - 1)) begin
              state <= S_DONE;
            end else begin
              pat_q <= pat_q + 1'b1;
              state <= S_FETCH;
            end
          end
        end
        S_DONE: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rom_en        = (state == S_FETCH);
    rom_addr      = pat_q;
    chain_scan_in = (state == S_FETCH);
    chain_shift   = (state != S_IDLE);
    rec_pos       = pos_q;
    for (int p = 0; p < NUM_PARTS; p++)
      rec_valid[p] = (state == S_RUN) && detect[p] && (int'(pos_q) < part_len(p));
    timer_clear   = (state == S_IDLE) && start;
    timer_run     = (state == S_FETCH) || (state == S_RUN);
    busy          = (state != S_IDLE);
    sim_done      = (state == S_DONE);
  end

  // a record always names a position inside the longest chain segment
  a_pos_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (|rec_valid) |-> (int'(rec_pos) < MAX_CHAIN));
endmodule
