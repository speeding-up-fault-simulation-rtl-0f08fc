// fsim_timer: the Timer module. Measures how long a fault simulation run
// takes as a count of system clock cycles (20 ns each at 50 MHz).
// clear zeroes the count; while run is high the count increments once per
// clock and saturates at its maximum instead of wrapping. clear wins over
// run. count is a register output. Measuring the simulation time follows
// the scheme; keeping it as a cycle count and the saturation are this
// design's choices.
module fsim_timer #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             run,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear)
      count <= '0;
    else if (run && count != '1)
      count <= count + 1'b1;
  end
endmodule
