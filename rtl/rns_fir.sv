// rns_fir: N-tap FIR filter computed in a residue number system (RNS),
// with the low-power address, data-flow and coefficient transforms.
//
// y[n] = | sum_{i=0}^{N-1} A[i] * x[n-i] |_MR,  MR = product of MODULI.
//
// Structure: a binary-to-RNS converter splits each input sample into K
// residues, one per modulus; K independent channels (mod_fir) each run the
// filter modulo their own modulus with P modulo MAC units; a CRT converter
// (rns2bin) joins the K channel results into the binary output. Shared by
// all channels are:
//   - data_addr_gen: circular pointer, so samples are never shifted;
//   - coef_addr_gen: Gray-code coefficient address counter;
//   - with DATA_GRAY (default) the data memory is also addressed in Gray
//     code: logical location j is kept at physical address gray(j);
//   - switching_matrix: per coefficient slot, the tap it holds, turned
//     into the data address of the matching sample;
//   - fir_ctrl: accept / MAC steps / output sequencing.
//
// Coefficient loading: write coefficient A[coef_tap] (signed binary
// coef_val) into slot (coef_step, coef_lane), one slot per clock with
// coef_we, while the filter is idle. Every slot must be written once per
// filter. Step s of the N/P MAC steps reads the P slots of step s; the
// order of taps over the slots is free (coefficient ordering). The slot's
// row address is gray(coef_step), the address the Gray counter gives for
// step s. Each channel stores the residue as a code word from CODES[k]
// (coefficient encoding); the default is plain binary.
//
// Timing: sample handshake x_valid / x_ready. y_valid is a one-cycle pulse
// N/P + 1 cycles after the sample is accepted; y holds the unsigned value
// in [0, MR) (read values of MR/2 and above as y - MR for a signed result).
// A new sample is accepted in the y_valid cycle, so at most one sample
// every N/P + 1 cycles; x_ready is low in between (the source stalls).
// Synchronous active-low reset; the memories are not reset.
//
// Following the source design: the RNS split, one channel per modulus with
// table-based modulo MACs, two MACs per modulus and a merging adder for
// the parallel version, the circular data pointer, the Gray coefficient
// address counter, Gray-coded data memory addresses, encoded coefficient residues and reordered coefficients
// with a switching matrix. This design's own choices: the sizes of x, the
// coefficients and y, the handshake and controller, the load port and the
// form of the switching matrix.
module rns_fir #(
  parameter int N  = 16,               // filter taps
  parameter int P  = 2,                // MAC units per modulus
  parameter int K  = 2,                // number of moduli
  parameter int MODULI [K] = '{5, 7},  // pairwise prime moduli
  parameter int RW = 3,                // residue width, 2**RW >= each modulus
  parameter int OW = 6,                // output width, 2**OW >= MR
  parameter int XW = 8,                // input sample width (signed)
  parameter int CW = 8,                // coefficient width (signed)
  parameter rns_pkg::code_row_t CODES [K] = '{default: rns_pkg::IDENTITY_ROW},
  parameter bit DATA_GRAY = 1'b1,      // Gray-coded data memory addresses
  localparam int ROWS = N / P,
  localparam int RAW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int AW   = $clog2(N),
  localparam int LW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input samples
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic signed [XW-1:0] x,
  // output samples
  output logic                 y_valid,
  output logic        [OW-1:0] y,
  // coefficient load port
  input  logic                 coef_we,
  input  logic       [RAW-1:0] coef_step,
  input  logic        [LW-1:0] coef_lane,
  input  logic        [AW-1:0] coef_tap,
  input  logic signed [CW-1:0] coef_val
);

  if (ROWS * P != N) begin : g_bad_p
    $error("rns_fir: P must divide N");
  end

  // ---- control and addresses ------------------------------------------
  logic           sample_we, addr_clear, addr_advance, addr_last;
  logic           mac_en, mac_first;
  logic [RAW-1:0] coef_raddr;
  logic [RAW-1:0] coef_waddr;
  logic [AW-1:0]  head, data_waddr;
  logic [AW-1:0]  data_raddr [P];

  fir_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready),
    .addr_last(addr_last), .sample_we(sample_we), .addr_clear(addr_clear),
    .addr_advance(addr_advance), .mac_en(mac_en), .mac_first(mac_first),
    .y_valid(y_valid)
  );

  coef_addr_gen #(.ROWS(ROWS), .AW(RAW)) u_coef_addr (
    .clk(clk), .rst_n(rst_n), .clear(addr_clear), .advance(addr_advance),
    .addr(coef_raddr), .last(addr_last)
  );

  data_addr_gen #(.N(N), .AW(AW), .GRAY(DATA_GRAY)) u_data_addr (
    .clk(clk), .rst_n(rst_n), .advance(sample_we),
    .head(head), .head_next(), .wr_addr(data_waddr)
  );

  // A coefficient for step s is stored at the address the Gray counter
  // produces for step s.
  assign coef_waddr = RAW'(rns_pkg::bin2gray(32'(coef_step)));

  switching_matrix #(.N(N), .P(P), .ROWS(ROWS), .AW(AW), .RAW(RAW), .LW(LW), .GRAY(DATA_GRAY)) u_switch (
    .clk(clk), .we(coef_we), .waddr(coef_waddr), .wlane(coef_lane),
    .wtap(coef_tap), .raddr(coef_raddr), .head(head), .rd_addr(data_raddr)
  );

  // ---- binary to RNS ----------------------------------------------------
  logic [RW-1:0] x_res [K];
  logic [RW-1:0] c_res [K];
  logic [RW-1:0] y_res [K];

  bin2rns #(.K(K), .MODULI(MODULI), .XW(XW), .RW(RW)) u_x_to_rns (
    .x(x), .r(x_res)
  );

  bin2rns #(.K(K), .MODULI(MODULI), .XW(CW), .RW(RW)) u_coef_to_rns (
    .x(coef_val), .r(c_res)
  );

  // ---- one channel per modulus --------------------------------------------
  for (genvar k = 0; k < K; k++) begin : g_chan
    mod_fir #(
      .M(MODULI[k]), .W(RW), .N(N), .P(P), .CODE(CODES[k]),
      .ROWS(ROWS), .RAW(RAW), .AW(AW), .LW(LW)
    ) u_chan (
      .clk(clk), .rst_n(rst_n),
      .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wlane(coef_lane),
      .coef_wres(c_res[k]),
      .data_we(sample_we), .data_waddr(data_waddr), .data_wres(x_res[k]),
      .coef_raddr(coef_raddr), .data_raddr(data_raddr),
      .mac_en(mac_en), .mac_first(mac_first), .y(y_res[k])
    );
  end

  // ---- RNS to binary ------------------------------------------------------
  rns2bin #(.K(K), .MODULI(MODULI), .RW(RW), .OW(OW)) u_to_bin (
    .r(y_res), .y(y)
  );

  // Coefficients are loaded only while no output is being computed.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    coef_we |-> !mac_en);

endmodule
