// tb_fsim_ctrl: runs the controller with a detect model (a fixed,
// position-dependent pattern of detect flags) and checks the cycle schedule:
// FETCH cycles with ROM read and token insertion, 18 RUN positions per
// pattern, rec_valid only for positions inside each part's segment,
// timer_clear with start, timer_run for the 4 * 19 = 76 FETCH and RUN
// cycles, sim_done in the cycle after them, and that start is ignored while busy.
module tb_fsim_ctrl;
  import fsim_pkg::*;
  localparam int NPAT = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] detect;
  logic rom_en, chain_scan_in, chain_shift, timer_clear, timer_run, busy, sim_done;
  logic [1:0] rom_addr;
  logic [1:0] rec_valid;
  logic [POS_W-1:0] rec_pos;
  int checks = 0, failures = 0;
  int cyc, exp_pat, exp_pos, fetches, recs;

  fsim_ctrl #(.NUM_PATTERNS(NPAT)) dut (
    .clk, .rst_n, .start, .detect, .rom_en, .rom_addr, .chain_scan_in, .chain_shift,
    .rec_valid, .rec_pos, .timer_clear, .timer_run, .busy, .sim_done);

  // detect model: part 0 flags odd positions, part 1 flags every position
  always_comb detect = {1'b1, rec_pos[0]};

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic err(string msg);
    failures++;
    $display("cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (busy || timer_run || sim_done || chain_shift) err("not idle after reset");
    for (int run = 0; run < 2; run++) begin
      start <= 1;
      #1;
      checks++;
      if (!timer_clear) err("timer_clear missing with start");
      @(posedge clk);
      start <= 0;
      fetches = 0; recs = 0;
      // cycle by cycle through the run
      for (cyc = 0; cyc < 1 + NPAT * (1 + MAX_CHAIN); cyc++) begin
        #1;
        exp_pat = cyc / (1 + MAX_CHAIN);
        exp_pos = cyc % (1 + MAX_CHAIN) - 1;  // -1 = FETCH
        checks++;
        if (!busy || !chain_shift) err("busy/shift low");
        checks++;
        if (timer_run !== (cyc < NPAT * (1 + MAX_CHAIN))) err("timer_run wrong");
        if (cyc == NPAT * (1 + MAX_CHAIN)) begin
          checks++;
          if (!sim_done || chain_scan_in || rom_en || rec_valid != 0) err("DONE cycle wrong");
        end else if (exp_pos < 0) begin
          fetches++;
          checks++;
          if (!rom_en || !chain_scan_in || rom_addr != 2'(exp_pat) || rec_valid != 0 || sim_done)
            err("FETCH cycle wrong");
        end else begin
          checks++;
          if (rom_en || chain_scan_in || sim_done || int'(rec_pos) != exp_pos || rom_addr != 2'(exp_pat))
            err($sformatf("RUN cycle wrong pos=%0d exp %0d", rec_pos, exp_pos));
          checks++;
          if (rec_valid[0] !== (exp_pos % 2 == 1 && exp_pos < part_len(0)) ||
              rec_valid[1] !== (exp_pos < part_len(1)))
            err($sformatf("rec_valid=%b at pos %0d", rec_valid, exp_pos));
          if (rec_valid[0] && exp_pos >= 16) err("record outside part 0 segment");
          recs += $countones(rec_valid);
        end
        // a start while busy must be ignored
        if (cyc == 30) start <= 1;
        if (cyc == 31) start <= 0;
        @(posedge clk);
      end
      #1;
      checks++;
      if (busy || timer_run || sim_done) err("not idle after run");
      checks++;
      if (fetches != NPAT || recs != NPAT * (8 + 18)) err($sformatf("fetches=%0d recs=%0d", fetches, recs));
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (busy) err("restarted by a start pulse given while busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
