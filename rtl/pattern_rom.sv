// pattern_rom: the Pattern ROM holding the test vectors that are applied to
// the CUT and to every faulty circuit.
//
// A DEPTH x WIDTH read-only array loaded from INIT_FILE at start-up, with a
// registered (block-RAM style) read port: data shows mem[addr] one clock
// after a cycle in which en is high, and holds its value otherwise.
// The default contents are a four-vector test set for C17 that detects all
// 34 stuck-at faults (bit 0..4 = inputs 1,2,3,6,7): 1E, 0A, 15, 01. The test
// set, its size and the read latency are this design's choices; storing the
// vectors in a ROM follows the scheme.
module pattern_rom #(
  parameter int    WIDTH     = 5,
  parameter int    DEPTH     = 4,
  parameter string INIT_FILE = "rtl/c17_patterns.hex",
  localparam int   AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) begin
    if (en)
      data <= mem[addr];
  end
endmodule
