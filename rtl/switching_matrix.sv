// switching_matrix: routes each data sample to the MAC unit that gets its
// coefficient, when the coefficients are stored in a changed order.
//
// Modulo addition is commutative and associative, so the coefficients may
// be stored in any order (chosen offline to cut toggling on the
// coefficient bus); the data must then be read in the same order. This
// block keeps, for every coefficient slot (row, lane), the tap index i of
// the coefficient stored there, and turns it into the address of X[n-i]
// in the circular data memory: (head - i) mod N. The table is addressed by
// the same row address as the coefficient memory, so it follows it step
// for step.
//
// With GRAY set the data addresses leave in Gray code, matching the
// Gray-coded physical layout of the data memory (see data_addr_gen).
//
// Like the coefficient memory, the table spans the 2**RAW row addresses the
// Gray counter can produce.
//
// Interface: write port (we, waddr row, wlane, wtap) loaded together with
// the coefficients; raddr (row address), head (newest sample) in;
// rd_addr[P] data-memory read addresses out, combinational.
//
// The source design only names a simple switching matrix for this job; the
// tap-index table and the subtraction are this design's choice.
module switching_matrix #(
  parameter int N    = 16,
  parameter int P    = 2,
  parameter int ROWS = N / P,
  parameter int AW   = $clog2(N),                     // data address width
  parameter int RAW  = (ROWS > 1) ? $clog2(ROWS) : 1, // row address width
  parameter int LW   = (P > 1) ? $clog2(P) : 1,
  parameter bit GRAY = 1'b1                            // Gray-coded data addresses
) (
  input  logic           clk,
  input  logic           we,
  input  logic [RAW-1:0] waddr,
  input  logic [LW-1:0]  wlane,
  input  logic [AW-1:0]  wtap,
  input  logic [RAW-1:0] raddr,
  input  logic [AW-1:0]  head,
  output logic [AW-1:0]  rd_addr [P]
);

  localparam int DEPTH = 2 ** RAW;

  logic [AW-1:0] tap [DEPTH][P];

  always_ff @(posedge clk) begin
    if (we) tap[waddr][wlane] <= wtap;
  end

  for (genvar p = 0; p < P; p++) begin : g_lane
    logic [AW-1:0] t, logical;
    assign t = tap[raddr][p];
    assign logical = (head >= t) ? head - t : AW'(head + AW'(N) - t);
    assign rd_addr[p] = GRAY ? AW'(rns_pkg::bin2gray(32'(logical))) : logical;
  end

endmodule
