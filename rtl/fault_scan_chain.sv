// fault_scan_chain: one segment of the fault activation scan chain.
//
// A LEN-bit shift register. The controller shifts a single 1 in at scan_in
// and then keeps shifting, so the 1 walks from act[0] to act[LEN-1] and then
// leaves through scan_out. Each bit drives the injection point of one fault,
// so exactly one fault of this segment is active per clock. Splitting the
// chain into one segment per faulty circuit, instead of giving every faulty
// circuit the whole chain, follows the scheme; the plain one-hot shift
// register is this design's choice.
// Timing: act changes on the clock edge after shift is high. Reset clears
// the chain (synchronous, active low).
module fault_scan_chain #(
  parameter int LEN = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           scan_in,
  input  logic           shift,
  output logic [LEN-1:0] act,
  output logic           scan_out
);
  logic [LEN-1:0] chain_q;

  always_ff @(posedge clk) begin
    if (!rst_n)
      chain_q <= '0;
    else if (shift)
      chain_q <= {chain_q[LEN-2:0], scan_in};
  end

  assign act      = chain_q;
  assign scan_out = chain_q[LEN-1];
endmodule
