// tb_fsim_top: end-to-end test of the fault simulation system at its
// default parameters (50 MHz clock, 115200 baud, two partitions, four
// patterns). Runs a complete simulation twice and checks:
//   - sim_done comes 77 clocks after start and the Timer reads 76;
//   - the UART report holds exactly the ids a reference fault simulation
//     (tb_c17_ref_pkg) predicts, FIFO by FIFO in detection order, then FF
//     and the cycle count;
//   - all 34 faults are detected and num_detected says so.
// It also counts how often each mechanism happened and fails if one never
// did: token insertion, detections in both faulty circuits in the same
// clock, repeat detections that are not stored again, chain positions
// beyond the shorter segment, FIFO writes, UART bytes, and a start pulse
// ignored while busy.
module tb_fsim_top;
  import tb_c17_ref_pkg::*;
  localparam int CPB = 50_000_000 / 115_200;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, sim_done, report_done, uart_tx;
  logic [31:0] sim_cycles;
  logic [7:0] num_detected;
  logic [7:0] exp_bytes [$];
  int checks = 0, failures = 0;
  int n_token = 0, n_parallel = 0, n_repeat = 0, n_beyond = 0, n_push = 0;
  int n_ignored = 0;

  fsim_top dut (.clk, .rst_n, .start, .busy, .sim_done, .report_done,
                .sim_cycles, .num_detected, .uart_tx);
  tb_uart_rx_model #(.CLKS_PER_BIT(CPB)) rxm (.clk, .rx(uart_tx));

  always #10 clk = ~clk;   // 50 MHz

  // mechanism counters, from the design's internal control signals
  always @(posedge clk) if (rst_n) begin
    if (dut.chain_scan_in && dut.chain_shift) n_token++;
    if (&dut.rec_valid) n_parallel++;
    if (dut.rec_valid[0] && !dut.u_result.push[0]) n_repeat++;
    if (dut.rec_valid[1] && !dut.u_result.push[1]) n_repeat++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_RUN && int'(dut.rec_pos) >= PLEN[0]) n_beyond++;
    n_push += $countones(dut.u_result.push);
  end

  initial begin
    repeat (600_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // expected report from the reference model
  function automatic void build_expected();
    bit seen [NFAULTS];
    logic [7:0] lists [2][$];
    foreach (seen[i]) seen[i] = 0;
    for (int k = 0; k < 4; k++)
      for (int pos = 0; pos < 18; pos++)
        for (int p = 0; p < 2; p++)
          if (pos < PLEN[p]) begin
            automatic int f = PBASE[p] + pos;
            if (detects(PATTERNS[k], f) && !seen[f]) begin
              seen[f] = 1;
              lists[p].push_back(8'(f));
            end
          end
    exp_bytes.delete();
    for (int p = 0; p < 2; p++)
      foreach (lists[p][i]) exp_bytes.push_back(lists[p][i]);
    exp_bytes.push_back(8'hFF);
    exp_bytes.push_back(8'h00);
    exp_bytes.push_back(8'h00);
    exp_bytes.push_back(8'h00);
    exp_bytes.push_back(8'd76);
  endfunction

  initial begin
    int t_start, t_done;
    build_expected();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // let the receiver model see an idle line first
    repeat (2 * CPB) @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      rxm.bytes.delete();
      n_push = 0;
      start <= 1;
      @(posedge clk);
      start <= 0;
      t_start = $time / 20;
      @(posedge clk iff sim_done);
      t_done = $time / 20;
      chk(t_done - t_start == 77, $sformatf("sim_done after %0d clocks, expected 77", t_done - t_start));
      @(posedge clk);
      #1;
      chk(sim_cycles == 32'd76, $sformatf("timer %0d, expected 76", sim_cycles));
      chk(num_detected == 8'd34, $sformatf("num_detected %0d, expected 34", num_detected));
      chk(n_push == 34, $sformatf("%0d FIFO writes, expected 34", n_push));
      // a start during the report must be ignored
      repeat (100) @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      #1;
      if (dut.u_ctrl.state == dut.u_ctrl.S_IDLE) n_ignored++;
      @(posedge clk iff report_done);
      repeat (2) @(posedge clk);
      #1;
      chk(!busy, "busy after report_done");
      chk(rxm.bytes.size() == exp_bytes.size() && rxm.frame_errors == 0,
          $sformatf("received %0d bytes, expected %0d, frame errors %0d",
                    rxm.bytes.size(), exp_bytes.size(), rxm.frame_errors));
      for (int i = 0; i < exp_bytes.size() && i < rxm.bytes.size(); i++)
        chk(rxm.bytes[i] === exp_bytes[i],
            $sformatf("run %0d byte %0d: got %h expected %h", run, i, rxm.bytes[i], exp_bytes[i]));
      repeat (10) @(posedge clk);
    end
    $display("mechanisms: token=%0d parallel=%0d repeat=%0d beyond=%0d bytes/run=%0d ignored_start=%0d",
             n_token, n_parallel, n_repeat, n_beyond, exp_bytes.size(), n_ignored);
    chk(n_token == 8, "token insertions");
    chk(n_parallel > 0, "no clock with detections in both faulty circuits");
    chk(n_repeat > 0, "no repeat detection");
    chk(n_beyond > 0, "no position beyond the shorter segment");
    chk(n_ignored == 2, "start during report not ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
