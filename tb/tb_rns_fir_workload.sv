// tb_rns_fir_workload: coefficient-bus activity of a 16-tap low-pass
// filter on modulo-5 and modulo-7 MAC channels, with and without the
// low-power coefficient and address transforms.
//
// Four filters with one MAC unit per modulus, moduli {5, 7} and 16 taps run
// the same input stream in lockstep:
//   conv - binary coefficient codes, natural tap order, binary data addresses
//   enc  - coefficient codes chosen for this filter, natural tap order
//   ord  - binary codes, taps reordered to cut coefficient-bus toggles
//   gray - like conv but with Gray-coded data memory addresses
// The filter is a windowed sinc (cutoff a quarter of the sample rate,
// Hamming window, scaled by 254 and rounded):
//   A = -1 -1 2 5 -10 -18 35 113 113 35 -18 -10 5 2 -1 -1.
//
// The enc code tables are found at elaboration by a pairwise-exchange
// search: starting from binary codes, swap the codes of two residues or
// move a residue to an unused 3-bit code while the number of bit changes
// between successive stored coefficients (the coefficient sequence read
// once per output, wrapping around) goes down. The ord tap order is a
// greedy nearest-neighbour chain over the code words of both moduli.
//
// Every output of every filter is checked against the convolution modulo
// 35. Toggles are counted on the hardware buses while the MACs run and
// printed per output. Checks: the enc and ord coefficient buses toggle no
// more than conv for each modulus, the Gray data address bus toggles less
// than the binary one, and the Gray coefficient address changes in exactly
// one bit per step.
module tb_rns_fir_workload;
  import rns_pkg::*;

  localparam int N = 16, P = 1, K = 2, RW = 3, OW = 6, XW = 8, CW = 8;
  localparam int MODS [K] = '{5, 7};
  localparam int MR = 35;
  localparam int AW = 4, RAW = 4;
  localparam int LPF [N] = '{-1, -1, 2, 5, -10, -18, 35, 113, 113, 35, -18, -10, 5, 2, -1, -1};

  // ---- code search (elaboration time) ---------------------------------------
  function automatic int cres(int v, int m);
    int r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic int seq_cost(code_row_t c, int m);
    int cost = 0;
    for (int s = 0; s < N; s++)
      cost += $countones(c[cres(LPF[s], m)][RW-1:0] ^ c[cres(LPF[(s + 1) % N], m)][RW-1:0]);
    return cost;
  endfunction

  function automatic code_row_t search_codes(int m);
    code_row_t best = IDENTITY_ROW, cand;
    int best_cost = seq_cost(IDENTITY_ROW, m);
    bit improved = 1'b1;
    while (improved) begin
      improved = 1'b0;
      // swap the codes of residues a and b
      for (int a = 0; a < m; a++)
        for (int b = a + 1; b < m; b++) begin
          cand = best;
          cand[a] = best[b];
          cand[b] = best[a];
          if (seq_cost(cand, m) < best_cost) begin
            best = cand; best_cost = seq_cost(cand, m); improved = 1'b1;
          end
        end
      // move residue a to an unused code word w
      for (int a = 0; a < m; a++)
        for (int w = 0; w < (1 << RW); w++) begin
          bit used = 1'b0;
          for (int r = 0; r < m; r++) if (int'(best[r]) == w) used = 1'b1;
          if (!used) begin
            cand = best;
            cand[a] = code_t'(w);
            if (seq_cost(cand, m) < best_cost) begin
              best = cand; best_cost = seq_cost(cand, m); improved = 1'b1;
            end
          end
        end
    end
    return best;
  endfunction

  localparam code_row_t ENC_CODES [K] = '{search_codes(5), search_codes(7)};
  localparam code_row_t BIN_CODES [K] = '{default: IDENTITY_ROW};

  // ---- four filters ----------------------------------------------------------
  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0, x_valid = 0;
  logic signed [XW-1:0] x = '0;
  logic                 coef_we = 0;
  logic       [RAW-1:0] coef_step = '0;
  logic                 coef_lane = 1'b0;
  logic        [AW-1:0] tap_nat = '0, tap_ord = '0;
  logic signed [CW-1:0] val_nat = '0, val_ord = '0;
  logic                 rdy [4];
  logic                 yv [4];
  logic        [OW-1:0] y [4];

  rns_fir #(.N(N), .P(P), .K(K), .MODULI(MODS), .RW(RW), .OW(OW), .XW(XW), .CW(CW),
            .CODES(BIN_CODES), .DATA_GRAY(1'b0)) u_conv (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(rdy[0]), .x(x), .y_valid(yv[0]), .y(y[0]),
    .coef_we(coef_we), .coef_step(coef_step), .coef_lane(coef_lane), .coef_tap(tap_nat), .coef_val(val_nat));

  rns_fir #(.N(N), .P(P), .K(K), .MODULI(MODS), .RW(RW), .OW(OW), .XW(XW), .CW(CW),
            .CODES(ENC_CODES), .DATA_GRAY(1'b0)) u_enc (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(rdy[1]), .x(x), .y_valid(yv[1]), .y(y[1]),
    .coef_we(coef_we), .coef_step(coef_step), .coef_lane(coef_lane), .coef_tap(tap_nat), .coef_val(val_nat));

  rns_fir #(.N(N), .P(P), .K(K), .MODULI(MODS), .RW(RW), .OW(OW), .XW(XW), .CW(CW),
            .CODES(BIN_CODES), .DATA_GRAY(1'b0)) u_ord (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(rdy[2]), .x(x), .y_valid(yv[2]), .y(y[2]),
    .coef_we(coef_we), .coef_step(coef_step), .coef_lane(coef_lane), .coef_tap(tap_ord), .coef_val(val_ord));

  rns_fir #(.N(N), .P(P), .K(K), .MODULI(MODS), .RW(RW), .OW(OW), .XW(XW), .CW(CW),
            .CODES(BIN_CODES), .DATA_GRAY(1'b1)) u_gray (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(rdy[3]), .x(x), .y_valid(yv[3]), .y(y[3]),
    .coef_we(coef_we), .coef_step(coef_step), .coef_lane(coef_lane), .coef_tap(tap_nat), .coef_val(val_nat));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- toggle counters (active while the MACs run) -----------------------------
  // coefficient data bus of each modulus channel: [filter][modulus]
  int ctog [3][K];
  int dtog_conv = 0, dtog_gray = 0, atog = 0, steps = 0, outputs = 0;

  for (genvar k = 0; k < K; k++) begin : g_bus
    logic [RW-1:0] pc = '0, pe = '0, po = '0;
    always @(posedge clk)
      if (u_conv.mac_en) begin
        ctog[0][k] += $countones(u_conv.g_chan[k].u_chan.coef_bus[0] ^ pc);
        ctog[1][k] += $countones(u_enc.g_chan[k].u_chan.coef_bus[0] ^ pe);
        ctog[2][k] += $countones(u_ord.g_chan[k].u_chan.coef_bus[0] ^ po);
        pc = u_conv.g_chan[k].u_chan.coef_bus[0];
        pe = u_enc.g_chan[k].u_chan.coef_bus[0];
        po = u_ord.g_chan[k].u_chan.coef_bus[0];
      end
  end

  logic [AW-1:0]  pdc = '0, pdg = '0;
  logic [RAW-1:0] pa = '0;
  always @(posedge clk)
    if (u_conv.mac_en) begin
      dtog_conv += $countones(u_conv.data_raddr[0] ^ pdc);
      dtog_gray += $countones(u_gray.data_raddr[0] ^ pdg);
      if (steps > 0)
        check($countones(u_conv.coef_raddr ^ pa) == 1, "coefficient address changed in more than one bit");
      atog += $countones(u_conv.coef_raddr ^ pa);
      pdc = u_conv.data_raddr[0];
      pdg = u_gray.data_raddr[0];
      pa  = u_conv.coef_raddr;
      steps++;
    end

  // ---- reference -----------------------------------------------------------------
  int hist [N];
  int n_in = 0;
  int exp_q [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && rdy[0]) begin
        int acc;
        acc = 0;
        for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = int'(x);
        for (int i = 0; i < N; i++) acc += LPF[i] * hist[i];
        n_in++;
        exp_q.push_back((n_in >= N) ? cres(acc, MR) : -1);
      end
      if (yv[0]) begin
        int want;
        outputs++;
        want = exp_q.pop_front();
        for (int f = 0; f < 4; f++) begin
          check(yv[f] && rdy[f] == rdy[0], $sformatf("filter %0d out of step", f));
          if (want >= 0)
            check(int'(y[f]) == want, $sformatf("filter %0d output %0d: y=%0d want %0d", f, outputs, y[f], want));
        end
      end
    end
  end

  // ---- greedy tap order over the binary code words of both moduli ---------------
  function automatic void greedy_order(output int order [N]);
    bit used [N];
    int cur = 0;
    foreach (used[i]) used[i] = 1'b0;
    used[0] = 1'b1;
    order[0] = 0;
    for (int c = 1; c < N; c++) begin
      int best = -1, best_d = 1 << 30;
      for (int i = 0; i < N; i++) if (!used[i]) begin
        int d = 0;
        for (int k = 0; k < K; k++) d += $countones(cres(LPF[cur], MODS[k]) ^ cres(LPF[i], MODS[k]));
        if (d < best_d) begin best_d = d; best = i; end
      end
      used[best] = 1'b1;
      order[c] = best;
      cur = best;
    end
  endfunction

  initial begin
    int order [N];
    real per;
    foreach (hist[i]) hist[i] = 0;
    for (int f = 0; f < 3; f++) for (int k = 0; k < K; k++) ctog[f][k] = 0;
    greedy_order(order);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      coef_we = 1; coef_step = RAW'(j);
      tap_nat = AW'(j);        val_nat = CW'(LPF[j]);
      tap_ord = AW'(order[j]); val_ord = CW'(LPF[order[j]]);
    end
    @(negedge clk);
    coef_we = 0;
    // continuous stream of random samples
    x_valid = 1;
    for (int s = 0; s < 100; s++) begin
      x = XW'($urandom);
      do @(posedge clk); while (!rdy[0]);
      #1;
    end
    @(negedge clk);
    x_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);

    per = real'(outputs);
    $display("coefficient data bus toggles per output (16-tap low-pass):");
    $display("  modulus  conventional  coeff-encoded  coeff-ordered");
    for (int k = 0; k < K; k++)
      $display("  %7d  %12.2f  %13.2f  %13.2f", MODS[k],
               real'(ctog[0][k]) / per, real'(ctog[1][k]) / per, real'(ctog[2][k]) / per);
    for (int k = 0; k < K; k++) begin
      $write("  codes mod %0d:", MODS[k]);
      for (int r = 0; r < MODS[k]; r++) $write(" %0d->%b", r, ENC_CODES[k][r][RW-1:0]);
      $write("\n");
    end
    $display("data address bus toggles per output: binary %0.2f, Gray %0.2f",
             real'(dtog_conv) / per, real'(dtog_gray) / per);
    $display("coefficient address bus toggles per output (Gray): %0.2f", real'(atog) / per);
    for (int k = 0; k < K; k++) begin
      check(ctog[1][k] <= ctog[0][k], $sformatf("encoding raised toggles for modulus %0d", MODS[k]));
      check(ctog[2][k] <= ctog[0][k], $sformatf("ordering raised toggles for modulus %0d", MODS[k]));
    end
    check(dtog_gray < dtog_conv, "Gray data addresses did not reduce toggles");
    check(outputs == 100, $sformatf("%0d outputs for 100 samples", outputs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
