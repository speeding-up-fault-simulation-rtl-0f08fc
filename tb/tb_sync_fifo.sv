// tb_sync_fifo: random pushes and pops on the default 18-entry FIFO,
// compared with a queue model: head data, empty, full, count, and that
// writes to a full FIFO are dropped.
module tb_sync_fifo;
  localparam int DEPTH = 18;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [5:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [4:0] count;
  logic [5:0] model [$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo dut (.clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      // bias: fill phase then drain phase
      automatic int bias = ((i / 200) % 2 == 0) ? 70 : 30;
      wr_en   <= ($urandom_range(99) < bias);
      rd_en   <= ($urandom_range(99) < 100 - bias);
      wr_data <= 6'($urandom);
      #1;
      // check state before this edge
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH) ||
          count !== 5'(model.size()) || (model.size() > 0 && rd_data !== model[0])) begin
        failures++;
        $display("cycle %0d: empty=%b full=%b count=%0d head=%h model size %0d head %h",
                 i, empty, full, count, rd_data, model.size(), model.size() ? model[0] : 6'h0);
      end
      if (full) fulls++;
      @(posedge clk);
      begin
        automatic bit did_rd = rd_en && model.size() > 0;
        automatic bit did_wr = wr_en && model.size() < DEPTH;
        if (did_rd) void'(model.pop_front());
        if (did_wr) model.push_back(wr_data);
      end
    end
    checks++;
    if (fulls == 0) begin
      failures++;
      $display("FIFO never became full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
