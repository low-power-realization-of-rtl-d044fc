// rns2bin: residue number system to binary converter (Chinese remainder
// theorem).
//
// For residues r[i] modulo pairwise prime MODULI[i], with M the product of
// the moduli and Mi = M / MODULI[i], the value is
//     y = | sum_i  r[i] * C[i] |_M,   C[i] = Mi * |Mi^-1|_MODULI[i].
// Every term |r[i] * C[i]|_M is a remainder by a constant; the terms are
// then added one at a time with a compare-and-subtract modulo M, so no wide
// sum is formed. The result is the unsigned representative in [0, M).
// A user wanting signed output reads values of M/2 and above as y - M.
//
// Interface: r[K] (RW bits each) in, y (OW bits) out. Purely
// combinational.
//
// The converter's place follows the source design, which only names it;
// the CRT form and unsigned output are this design's choice.
module rns2bin #(
  parameter int K = 2,
  parameter int MODULI [K] = '{5, 7},
  parameter int RW = 3,
  parameter int OW = 6    // output width, 2**OW >= product of the moduli
) (
  input  logic [RW-1:0] r [K],
  output logic [OW-1:0] y
);

  function automatic longint range_m();
    longint p = 1;
    for (int i = 0; i < K; i++) p *= longint'(MODULI[i]);
    return p;
  endfunction

  localparam longint MR = range_m();   // dynamic range

  typedef longint weights_t [K];

  // C[i] = Mi * |Mi^-1|_MODULI[i], reduced modulo MR.
  function automatic weights_t crt_weights();
    weights_t c;
    for (int i = 0; i < K; i++) begin
      longint mi;
      mi = MR / longint'(MODULI[i]);
      c[i] = (mi * longint'(rns_pkg::mod_inverse(mi, MODULI[i]))) % MR;
    end
    return c;
  endfunction

  localparam weights_t CRT_W = crt_weights();

  if ((longint'(1) << OW) < MR) begin : g_bad_width
    $error("rns2bin: OW too small for the dynamic range");
  end

  logic [OW-1:0] term [K];
  logic [OW:0]   part [K+1];   // running sum modulo MR, one spare bit

  for (genvar i = 0; i < K; i++) begin : g_term
    localparam longint CI = CRT_W[i];
    logic [OW+RW-1:0] prod;
    assign prod    = (OW+RW)'(r[i]) * (OW+RW)'(CI);
    assign term[i] = OW'(prod % (OW+RW)'(MR));
  end

  assign part[0] = '0;
  for (genvar i = 0; i < K; i++) begin : g_acc
    logic [OW:0] s;
    assign s = part[i] + (OW+1)'(term[i]);
    assign part[i+1] = (s >= (OW+1)'(MR)) ? s - (OW+1)'(MR) : s;
  end

  assign y = OW'(part[K]);

endmodule
