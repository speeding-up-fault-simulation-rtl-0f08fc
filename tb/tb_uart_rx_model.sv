// tb_uart_rx_model: testbench receiver for 8N1 serial data, written as a
// clocked state machine. It arms itself once the line has been idle (high)
// for a full bit time, detects each start bit, samples every bit in its
// middle and pushes each received byte into the bytes queue. Frames with a
// bad start or stop bit are counted in frame_errors.
module tb_uart_rx_model #(
  parameter int CLKS_PER_BIT = 434
) (
  input logic clk,
  input logic rx
);
  logic [7:0] bytes [$];
  int         frame_errors = 0;

  typedef enum {W_IDLE, W_WAIT_START, W_BITS} rx_state_e;
  rx_state_e  st = W_IDLE;
  int         cnt = 0;
  int         nbit = 0;
  logic [7:0] b;

  always @(posedge clk) begin
    case (st)
      W_IDLE: begin
        cnt = rx ? cnt + 1 : 0;
        if (cnt >= CLKS_PER_BIT) st = W_WAIT_START;
      end
      W_WAIT_START:
        if (rx == 1'b0) begin
          st   = W_BITS;
          cnt  = 0;
          nbit = 0;
        end
      W_BITS: begin
        cnt++;
        // the sample for bit n (0 = start, 1..8 = data, 9 = stop) falls
        // half a bit time plus n bit times after the falling edge
        if (cnt == CLKS_PER_BIT / 2 + nbit * CLKS_PER_BIT) begin
          if (nbit == 0 && rx != 1'b0) frame_errors++;
          if (nbit >= 1 && nbit <= 8) b[nbit-1] = rx;
          if (nbit == 9) begin
            if (rx != 1'b1) frame_errors++;
            bytes.push_back(b);
            st = W_WAIT_START;
          end
          nbit++;
        end
      end
    endcase
  end
endmodule
