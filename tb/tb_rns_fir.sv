// tb_rns_fir: end-to-end self-checking test of the RNS FIR filter (rns_fir)
// in a second configuration: 12 taps (not a power of two), moduli
// {3, 5, 7}, one MAC unit per modulus and permuted coefficient codes
// (coefficient encoding) in every channel, binary data memory addresses.
//
// Reference: for every accepted sample the expected output
// |sum_i A[i] * x[n-i]|_MR is computed here from a copy of the sample
// history and the loaded coefficients, with 64-bit integer arithmetic, and
// queued with the accept cycle. Each y_valid pulse must match the head of
// the queue and come exactly N/P + 1 cycles after its accept. Outputs are
// only compared once N samples have entered (the sample memory is not
// reset).
//
// Phases:
//   1. random coefficients in a random tap order, random samples with gaps
//      and with a continuous stream (x_valid held high while busy);
//   2. a low-pass filter (windowed sinc, cutoff a quarter of the sample
//      rate, 8-bit) in natural tap order (step s holds taps s*P to
//      s*P+P-1), then the same filter
//      reordered (greedy nearest neighbour on the coefficient code words);
//      the coefficient-bus toggles per output of the two orders are counted
//      on the hardware bus and reported.
// Mechanism counters (each must be non-zero): circular pointer wraps,
// Gray address wraps, stall cycles, samples accepted in the y_valid cycle,
// reordered slots, negative samples,
// encoded coefficient code words seen on the bus.
module tb_rns_fir;
  import rns_pkg::*;

  localparam int N  = 12;
  localparam int P  = 1;
  localparam int K  = 3;
  localparam int MODS [K] = '{3, 5, 7};
  localparam int RW = 3;
  localparam int OW = 7;
  localparam int XW = 8;
  localparam int CW = 8;
  localparam int ROWS = N / P;
  localparam int RAW  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int AW   = $clog2(N);
  localparam int LW   = (P > 1) ? $clog2(P) : 1;
  function automatic code_row_t perm_codes(int m, int rot);
    code_row_t c = IDENTITY_ROW;
    for (int r = 0; r < m; r++) c[r] = code_t'((r + rot) % (1 << RW));
    return c;
  endfunction
  localparam code_row_t CODES [K] = '{perm_codes(3, 1), perm_codes(5, 2), perm_codes(7, 4)};

  function automatic longint range_m();
    longint p = 1;
    for (int k = 0; k < K; k++) p *= longint'(MODS[k]);
    return p;
  endfunction
  localparam longint MR = range_m();

  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0;
  logic                 x_valid = 0, x_ready;
  logic signed [XW-1:0] x = '0;
  logic                 y_valid;
  logic        [OW-1:0] y;
  logic                 coef_we = 0;
  logic       [RAW-1:0] coef_step = '0;
  logic        [LW-1:0] coef_lane = '0;
  logic        [AW-1:0] coef_tap = '0;
  logic signed [CW-1:0] coef_val = '0;

  rns_fir #(.N(N), .P(P), .K(K), .MODULI(MODS), .RW(RW), .OW(OW), .XW(XW), .CW(CW), .CODES(CODES), .DATA_GRAY(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready), .x(x),
    .y_valid(y_valid), .y(y), .coef_we(coef_we), .coef_step(coef_step),
    .coef_lane(coef_lane), .coef_tap(coef_tap), .coef_val(coef_val)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------
  longint coef [N];          // A[i]
  longint hist [N];          // hist[i] = x[n-i]
  int     tap_of [N];        // tap held by slot j = step * P + lane
  int     n_in = 0;          // samples accepted so far
  longint exp_q [$];
  longint exact_q [$];      // the convolution itself, before the modulo
  int     cyc_q [$];
  int     cyc = 0;

  function automatic longint modr(longint v);
    longint r = v % MR;
    return (r < 0) ? r + MR : r;
  endfunction

  function automatic int res(longint v, int m);
    longint r = v % longint'(m);
    return int'((r < 0) ? r + longint'(m) : r);
  endfunction

  function automatic int code_of(int k, longint a);
    return int'(CODES[k][res(a, MODS[k])]);
  endfunction

  // ---- mechanism counters ---------------------------------------------------
  int ptr_wraps = 0, gray_wraps = 0, stall_cycles = 0, overlap_accepts = 0;
  int reordered_slots = 0, negative_samples = 0, outputs = 0;
  logic [AW-1:0]  head_d;
  logic [RAW-1:0] addr_d;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (x_valid && !x_ready) stall_cycles++;
      if (dut.head == AW'(0) && head_d == AW'(N - 1)) ptr_wraps++;
      if (dut.coef_raddr == '0 && addr_d == RAW'(bin2gray(32'(ROWS - 1))) && ROWS > 1) gray_wraps++;
      head_d = dut.head;
      addr_d = dut.coef_raddr;
      if (x_valid && x_ready) begin
        longint acc;
        acc = 0;
        if (y_valid) overlap_accepts++;
        if (x < 0) negative_samples++;
        for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(x);
        for (int i = 0; i < N; i++) acc += coef[i] * hist[i];
        n_in++;
        exp_q.push_back((n_in >= N) ? modr(acc) : -1);
        exact_q.push_back(acc);
        cyc_q.push_back(cyc);
      end
      if (y_valid) begin
        longint want, exact;
        int c0;
        outputs++;
        if (exp_q.size() == 0) check(0, "y_valid with no sample outstanding");
        else begin
          want = exp_q.pop_front();
          exact = exact_q.pop_front();
          c0 = cyc_q.pop_front();
          check(cyc - c0 == ROWS + 1,
                $sformatf("latency %0d cycles, want %0d", cyc - c0, ROWS + 1));
          if (want >= 0)
            check(longint'(y) == want, $sformatf("output %0d: y=%0d want %0d", outputs, y, want));

        end
      end
    end
  end

  // ---- coefficient bus toggle counter (per channel, per lane) ---------------
  int bus_toggles = 0;
  for (genvar k = 0; k < K; k++) begin : g_tog
    for (genvar l = 0; l < P; l++) begin : g_lane
      logic [RW-1:0] prev = '0;
      always @(posedge clk)
        if (dut.mac_en) begin
          bus_toggles += $countones(dut.g_chan[k].u_chan.coef_bus[l] ^ prev);
          prev = dut.g_chan[k].u_chan.coef_bus[l];
        end
    end
  end

  // ---- data address bus toggle counter (lane 0) ------------------------------
  int addr_toggles = 0;
  logic [AW-1:0] addr_prev = '0;
  always @(posedge clk)
    if (dut.mac_en) begin
      addr_toggles += $countones(dut.data_raddr[0] ^ addr_prev);
      addr_prev = dut.data_raddr[0];
    end


  // A read of a coefficient whose code word differs from its binary residue.
  int encoded_reads = 0;
  always @(posedge clk)
    if (dut.mac_en && dut.g_chan[2].u_chan.coef_bus[0] != RW'(res(coef[tap_of[int'(gray2bin(32'(dut.coef_raddr)))]], MODS[2])))
      encoded_reads++;

  // ---- stimulus -------------------------------------------------------------
  task automatic load(longint a [N], int order [N]);
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      coef_we = 1; coef_step = RAW'(j / P); coef_lane = LW'(j % P);
      coef_tap = AW'(order[j]); coef_val = CW'(a[order[j]]);
      if (order[j] != j) reordered_slots++;
    end
    @(negedge clk);
    coef_we = 0;
    for (int i = 0; i < N; i++) coef[i] = a[i];
    tap_of = order;
  endtask

  task automatic send(longint v);
    @(negedge clk);
    x_valid = 1; x = XW'(v);
    do @(posedge clk); while (!x_ready);
    @(negedge clk);
    x_valid = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic random_samples(int count);
    for (int s = 0; s < count; s++) begin
      send(longint'($signed(XW'($urandom))));
      if ($urandom_range(3) == 0) repeat ($urandom_range(ROWS + 4)) @(negedge clk);
    end
  endtask

  task automatic stream_samples(int count);
    @(negedge clk);
    for (int s = 0; s < count; s++) begin
      x_valid = 1; x = XW'($urandom);
      do @(posedge clk); while (!x_ready);
      #1;
    end
    @(negedge clk);
    x_valid = 0;
  endtask

  // Greedy nearest-neighbour order over the coefficient code words of all
  // moduli, chained lane after lane.
  function automatic void greedy_order(longint a [N], output int order [N]);
    bit used [N];
    int chain [N];
    int cur = 0;
    foreach (used[i]) used[i] = 0;
    used[0] = 1; chain[0] = 0;
    for (int c = 1; c < N; c++) begin
      int best = -1, best_d = 1 << 30;
      for (int i = 0; i < N; i++) if (!used[i]) begin
        int d = 0;
        for (int k = 0; k < K; k++) d += $countones(code_of(k, a[cur]) ^ code_of(k, a[i]));
        if (d < best_d) begin best_d = d; best = i; end
      end
      used[best] = 1; chain[c] = best; cur = best;
    end
    // chain position c goes to lane c / ROWS, step c % ROWS
    for (int c = 0; c < N; c++) order[(c % ROWS) * P + c / ROWS] = chain[c];
  endfunction

  localparam real PI = 3.14159265358979;

  initial begin
    longint a [N];
    int     order [N];
    int     t0, t_nat, t_ord;

    foreach (hist[i]) hist[i] = 0;
    head_d = '0; addr_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // phase 1: random coefficients, random order
    foreach (a[i]) a[i] = longint'($signed(CW'($urandom)));
    foreach (order[j]) order[j] = j;
    order.shuffle();
    load(a, order);
    random_samples(60);
    stream_samples(60);
    drain();

    // phase 2: low-pass filter, natural order, then reordered
    for (int i = 0; i < N; i++) begin
      real t, h, w;
      t = real'(i) - real'(N - 1) / 2.0;
      h = (t == 0.0) ? 0.5 : $sin(0.5 * PI * t) / (PI * t);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(N - 1));
      a[i] = longint'($rtoi(h * w * 2.0 * 127.0 + ((h * w) >= 0 ? 0.5 : -0.5)));
    end
    foreach (order[j]) order[j] = j;   // row s holds taps s*P .. s*P+P-1
    load(a, order);
    t0 = bus_toggles;
    stream_samples(30);
    drain();
    t_nat = bus_toggles - t0;
    greedy_order(a, order);
    load(a, order);
    t0 = bus_toggles;
    stream_samples(30);
    drain();
    t_ord = bus_toggles - t0;
    $display("low-pass filter: coefficient bus toggles per output natural=%0.2f ordered=%0.2f",
             real'(t_nat) / 30.0, real'(t_ord) / 30.0);
    $display("data address bus (lane 0) toggles per output over the whole run: %0.2f",
             real'(addr_toggles) / real'(outputs));
    check(t_ord <= t_nat, "reordering increased coefficient bus toggles");

    $display("mechanisms: ptr_wraps=%0d gray_wraps=%0d stall_cycles=%0d overlap_accepts=%0d reordered_slots=%0d negative_samples=%0d outputs=%0d",
             ptr_wraps, gray_wraps, stall_cycles, overlap_accepts, reordered_slots, negative_samples, outputs);
    check(ptr_wraps > 0, "circular pointer never wrapped");
    check(gray_wraps > 0, "Gray address never wrapped");
    check(stall_cycles > 0, "no stall happened");
    check(overlap_accepts > 0, "no sample accepted in a y_valid cycle");
    check(reordered_slots > 0, "no coefficient was reordered");
    check(negative_samples > 0, "no negative sample");
    check(outputs == n_in, $sformatf("%0d outputs for %0d samples", outputs, n_in));
    check(encoded_reads > 0, "no encoded coefficient code word was read");
    $display("encoded_reads=%0d", encoded_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
