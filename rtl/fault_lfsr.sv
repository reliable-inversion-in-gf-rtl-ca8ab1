// fault_lfsr -- pseudo-random fault-mask generator for fault-injection runs.
// A 32-bit external-feedback (Fibonacci) LFSR, polynomial
// x^32 + x^22 + x^2 + x + 1, advances every enabled cycle. In a cycle where
// its low four bits are below `rate`, the mask holds a burst of `burst`
// adjacent ones (0 is taken as 1) starting at a pseudo-random bit position
// (upper LFSR bits modulo WIDTH); bits past WIDTH are dropped. Otherwise the
// mask is zero. rate = 0 never injects, rate >= 15 injects in 15 of 16
// cycles on average.
// Timing: `mask` is combinational from the LFSR state; the state updates on
// the rising clock edge, synchronous active-low reset to SEED.
// The LFSR-driven fault vectors at random intervals follow the construction's
// fault model; polynomial, seed, rate and burst rules are this design's.
module fault_lfsr #(
  parameter int unsigned WIDTH = 78,
  parameter logic [31:0] SEED  = 32'hACE1_2468
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [2:0]       burst,
  input  logic [3:0]       rate,
  output logic [WIDTH-1:0] mask
);
  logic [31:0] q;
  logic        fb;
  logic [WIDTH+7:0] wide;
  int unsigned pos;
  logic [2:0]  blen;

  assign fb = q[31] ^ q[21] ^ q[1] ^ q[0];

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= SEED;
    else if (en) q <= {q[30:0], fb};
  end

  always_comb begin
    pos  = 32'(q[31:8]) % WIDTH;
    blen = (burst == 3'd0) ? 3'd1 : burst;
    wide = '0;
    if (en && (q[3:0] < rate)) wide = ((WIDTH+8)'(1) << blen) - 1'b1;
    wide = wide << pos;
    mask = wide[WIDTH-1:0];
  end
endmodule
