// uart_tx: serial transmitter that carries the report to the host PC.
//
// Sends 8N1 frames: a low start bit, 8 data bits LSB first and a high stop
// bit, each CLKS_PER_BIT clocks long (434 = 50 MHz / 115200 baud). A byte is
// taken when valid and ready are both high; ready is high only while the
// line is idle. tx idles high. The frame format and baud rate are this
// design's choices; a UART link to the host follows the scheme.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  state_e      state;
  logic [CW-1:0] clk_cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  shreg;
  logic        bit_end;

  assign ready   = (state == S_IDLE);
  assign bit_end = (clk_cnt == CW'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      tx      <= 1'b1;
    end else begin
      clk_cnt <= (state == S_IDLE || bit_end) ? '0 : clk_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          tx <= 1'b1;
          if (valid) begin
            shreg <= data;
            tx    <= 1'b0;
            state <= S_START;
          end
        end
        S_START: if (bit_end) begin
          tx      <= shreg[0];
          bit_idx <= '0;
          state   <= S_DATA;
        end
        S_DATA: if (bit_end) begin
          if (bit_idx == 3'd7) begin
            tx    <= 1'b1;
            state <= S_STOP;
          end else begin
            tx      <= shreg[bit_idx + 1'b1];
            bit_idx <= bit_idx + 1'b1;
          end
        end
        S_STOP: if (bit_end) begin
          state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
