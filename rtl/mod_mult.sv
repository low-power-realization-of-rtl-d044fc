// mod_mult: modulo-M multiplier realised as a look-up table, with an
// encoded coefficient operand.
//
// z = (A * X) mod M, where X is a binary-coded data residue and the
// coefficient residue A arrives as a code word from the coefficient memory.
// CODE gives the code word of every residue (see rns_pkg); the identity
// table is plain binary coding. Because coefficient residues only ever feed
// this multiplier, any one-to-one code works: the table is simply built for
// it, indexed by {coefficient code, data residue}. Code words that stand for
// no residue, and data values of M and above, address entries holding 0.
//
// Interface: W-bit coefficient code and W-bit data residue in, W-bit binary
// product residue out. Purely combinational.
//
// The table structure and the freedom of the coefficient code follow the
// source design (its modulo-3 table is reproduced for M = 3 with binary
// codes). Rejecting a code table with repeated or too-wide code words at
// elaboration is this design's choice.
module mod_mult #(
  parameter int M = 5,                                         // modulus
  parameter int W = 3,                                         // residue width
  parameter rns_pkg::code_row_t CODE = rns_pkg::IDENTITY_ROW   // coefficient codes
) (
  input  logic [W-1:0] a_code,  // encoded coefficient residue
  input  logic [W-1:0] x,       // binary data residue
  output logic [W-1:0] z        // binary product residue
);

  localparam int ENTRIES = 2 ** (2 * W);
  typedef logic [W-1:0] table_t [ENTRIES];

  // 1 when the first M code words are distinct and fit in W bits.
  function automatic bit codes_ok();
    for (int r = 0; r < M; r++) begin
      if (int'(CODE[r]) >= 2 ** W) return 1'b0;
      for (int q = 0; q < r; q++)
        if (CODE[q] == CODE[r]) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < ENTRIES; i++) t[i] = '0;
    for (int r = 0; r < M; r++)
      for (int xv = 0; xv < M; xv++)
        t[(int'(CODE[r]) << W) + xv] = W'((r * xv) % M);
    return t;
  endfunction

  localparam table_t PROD_TABLE = build_table();

  if (2 ** W < M || M > rns_pkg::MAX_M || W > rns_pkg::CODE_W) begin : g_bad_width
    $error("mod_mult: W or M out of range");
  end
  if (!codes_ok()) begin : g_bad_code
    $error("mod_mult: coefficient code table is not one-to-one in W bits");
  end

  assign z = PROD_TABLE[{a_code, x}];

endmodule
