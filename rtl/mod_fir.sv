// mod_fir: FIR filter channel for one modulus M.
//
// Computes |sum_i A[i] * X[n-i]|_M on residues. It holds the coefficient
// memory (coefficient residues as code words) and the data memory (sample
// residues, circular) of the modulus, and P modulo MAC units. In each step
// the coefficient memory gives one row of P code words and the data memory
// gives the P matching samples, at the addresses supplied from outside; MAC
// unit p accumulates the products of lane p. With P = 2 the N products are
// summed in N/2 steps. A modulo adder merges the P partial sums into the
// channel output.
//
// Coefficients are written as binary residues (coef_wres) and encoded into
// code words on the way into the memory with the table CODE, so the memory
// bus and the multipliers see the encoded form.
//
// Interface: coefficient write port (coef_we, coef_waddr row, coef_wlane,
// coef_wres), sample write port (data_we, data_waddr, data_wres), read
// addresses coef_raddr and data_raddr[P], MAC controls mac_en / mac_first
// (see mod_mac), and y, the merged residue, combinational from the MAC
// accumulators: valid the cycle after the last MAC step.
//
// The channel structure (memories, P MACs per modulus and a merging modulo
// adder) follows the source design; the encoder on the write path is this
// design's choice.
module mod_fir #(
  parameter int M    = 5,
  parameter int W    = 3,
  parameter int N    = 16,
  parameter int P    = 2,
  parameter rns_pkg::code_row_t CODE = rns_pkg::IDENTITY_ROW,
  parameter int ROWS = N / P,
  parameter int RAW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int AW   = $clog2(N),
  parameter int LW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           coef_we,
  input  logic [RAW-1:0] coef_waddr,
  input  logic [LW-1:0]  coef_wlane,
  input  logic [W-1:0]   coef_wres,
  input  logic           data_we,
  input  logic [AW-1:0]  data_waddr,
  input  logic [W-1:0]   data_wres,
  input  logic [RAW-1:0] coef_raddr,
  input  logic [AW-1:0]  data_raddr [P],
  input  logic           mac_en,
  input  logic           mac_first,
  output logic [W-1:0]   y
);

  logic [W-1:0] coef_code;          // encoded coefficient being written
  logic [W-1:0] coef_bus [P];       // coefficient memory output bus
  logic [W-1:0] data_bus [P];       // data memory output bus
  logic [W-1:0] acc [P];
  logic [W-1:0] merged [P];

  assign coef_code = W'(CODE[coef_wres]);

  coef_mem #(.N(N), .P(P), .W(W), .ROWS(ROWS), .AW(RAW), .LW(LW)) u_coef_mem (
    .clk(clk), .we(coef_we), .waddr(coef_waddr), .wlane(coef_wlane),
    .wdata(coef_code), .raddr(coef_raddr), .rdata(coef_bus)
  );

  data_mem #(.N(N), .P(P), .W(W), .AW(AW)) u_data_mem (
    .clk(clk), .we(data_we), .waddr(data_waddr), .wdata(data_wres),
    .raddr(data_raddr), .rdata(data_bus)
  );

  for (genvar p = 0; p < P; p++) begin : g_mac
    mod_mac #(.M(M), .W(W), .CODE(CODE)) u_mac (
      .clk(clk), .rst_n(rst_n), .en(mac_en), .first(mac_first),
      .a_code(coef_bus[p]), .x(data_bus[p]), .acc(acc[p])
    );
  end

  assign merged[0] = acc[0];
  for (genvar p = 1; p < P; p++) begin : g_merge
    mod_add #(.M(M), .W(W)) u_add (
      .a(merged[p-1]), .b(acc[p]), .s(merged[p])
    );
  end

  assign y = merged[P-1];

endmodule
