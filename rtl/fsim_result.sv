// fsim_result: the Result module, with the FIFO group and the UART.
//
// During a run, a record (rec_valid[p], rec_pos) says that faulty circuit p
// detected the fault at chain position rec_pos, i.e. global fault id
// part_base(p) + rec_pos (= 2*line + stuck value). Each part keeps one
// "already detected" bit per fault of its segment, and the first detection
// of a fault pushes its id into that part's FIFO, so every FIFO holds each
// fault at most once and its depth equals the size of its segment.
// After sim_done the module latches the Timer value and sends the report
// over the UART: the ids in FIFO 0, then FIFO 1, ... (one byte each), then
// the separator byte FF, then the 32-bit cycle count, most significant byte
// first. report_done pulses when the last byte has been handed to the UART
// and the line has gone idle.
// clear (the start of a new run) resets the detected bits and num_detected.
// One FIFO per faulty circuit and reporting fault locations plus time over
// a UART follow the scheme; recording each fault once and the byte format
// are this design's choices.
module fsim_result
  import fsim_pkg::*;
#(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [NUM_PARTS-1:0] rec_valid,
  input  logic [POS_W-1:0]     rec_pos,
  input  logic                 sim_done,
  input  logic [TIME_W-1:0]    sim_cycles,
  output logic                 uart_tx,
  output logic                 busy,
  output logic                 report_done,
  output logic [7:0]           num_detected
);
  typedef enum logic [2:0] {R_IDLE, R_FIFO, R_SEP, R_TIME, R_WAIT, R_DONE} rstate_e;

  localparam int PW = (NUM_PARTS > 1) ? $clog2(NUM_PARTS) : 1;

  rstate_e                             rstate;
  logic [PW-1:0]                       rpart;
  logic [1:0]                          bidx;
  logic [TIME_W-1:0]                   time_q;
  logic [NUM_PARTS-1:0][MAX_CHAIN-1:0] det_q;
  logic [NUM_PARTS-1:0]                push, pop, empty;
  logic [NUM_PARTS-1:0][FAULT_ID_W-1:0] head;
  logic [7:0]                          tx_data;
  logic                                tx_valid, tx_ready, tx_take;

  // ---- capture: first detection of each fault -----------------------------
  always_comb begin
    for (int p = 0; p < NUM_PARTS; p++)
      push[p] = rec_valid[p] && !det_q[p][rec_pos];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      det_q        <= '0;
      num_detected <= '0;
    end else begin
      for (int p = 0; p < NUM_PARTS; p++)
        if (push[p]) det_q[p][rec_pos] <= 1'b1;
      num_detected <= num_detected + 8'($countones(push));
    end
  end

  // ---- FIFO group: one FIFO per faulty circuit ------------------------------
  for (genvar p = 0; p < NUM_PARTS; p++) begin : g_fifo
    localparam int DEPTH = part_len(p);
    logic [FAULT_ID_W-1:0]         wr_id;
    logic                          fifo_full;
    logic [$clog2(DEPTH+1)-1:0]    count_unused;

    assign wr_id = FAULT_ID_W'(part_base(p)) + FAULT_ID_W'(rec_pos);

    sync_fifo #(.WIDTH(FAULT_ID_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (push[p]),
      .wr_data(wr_id),
      .rd_en  (pop[p]),
      .rd_data(head[p]),
      .empty  (empty[p]),
      .full   (fifo_full),
      .count  (count_unused)
    );

    // each fault is stored once and the FIFO has one entry per fault,
    // so a write never meets a full FIFO
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      push[p] |-> !fifo_full);
  end

  // ---- report sequencer ---------------------------------------------------
  always_comb begin
    tx_valid = 1'b0;
    tx_data  = '0;
    unique case (rstate)
      R_FIFO: begin
        tx_valid = !empty[rpart];
        tx_data  = 8'(head[rpart]);
      end
      R_SEP: begin
        tx_valid = 1'b1;
        tx_data  = REPORT_SEPARATOR;
      end
      R_TIME: begin
        tx_valid = 1'b1;
        tx_data  = time_q[8*(3 - int'(bidx)) +: 8];
      end
      default: ;
    endcase
    tx_take = tx_valid && tx_ready;
    pop     = '0;
    if (rstate == R_FIFO && tx_take) pop[rpart] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate <= R_IDLE;
      rpart  <= '0;
      bidx   <= '0;
      time_q <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (sim_done) begin
          time_q <= sim_cycles;
          rpart  <= '0;
          rstate <= R_FIFO;
        end
        R_FIFO: if (empty[rpart]) begin
          if (rpart == PW'(NUM_PARTS - 1)) rstate <= R_SEP;
          else                             rpart  <= rpart + 1'b1;
        end
        R_SEP: if (tx_take) begin
          bidx   <= '0;
          rstate <= R_TIME;
        end
        R_TIME: if (tx_take) begin
          bidx <= bidx + 1'b1;
          if (bidx == 2'd3) rstate <= R_WAIT;
        end
        R_WAIT: if (tx_ready) rstate <= R_DONE;
        R_DONE: rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  assign busy        = (rstate != R_IDLE);
  assign report_done = (rstate == R_DONE);

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n,
    .data (tx_data),
    .valid(tx_valid),
    .ready(tx_ready),
    .tx   (uart_tx)
  );
endmodule
