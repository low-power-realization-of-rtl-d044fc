// tb_mod_fir: self-checking test of one modulus channel (modulo 7, 16
// taps, 2 MAC units, permuted coefficient codes). The testbench plays the
// address generators: it loads random coefficient residues into the slots
// in a random tap order, writes each new sample residue at a circular
// pointer, then runs 8 MAC steps with the matching data addresses. The
// channel output must equal sum A[i] * x[n-i] mod 7 computed here.
module tb_mod_fir;
  import rns_pkg::*;

  localparam int M = 7, N = 16, P = 2, ROWS = 8;

  function automatic code_row_t codes7();
    code_row_t c = IDENTITY_ROW;
    c[0] = 5'b100; c[1] = 5'b000; c[2] = 5'b001; c[3] = 5'b010;
    c[4] = 5'b011; c[5] = 5'b101; c[6] = 5'b110;
    return c;
  endfunction
  localparam code_row_t C7 = codes7();

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic coef_we = 0, data_we = 0, mac_en = 0, mac_first = 0;
  logic [2:0] coef_waddr = '0, coef_raddr = '0;
  logic [0:0] coef_wlane = '0;
  logic [2:0] coef_wres = '0, data_wres = '0, y;
  logic [3:0] data_waddr = '0;
  logic [3:0] data_raddr [P];

  mod_fir #(.M(M), .W(3), .N(N), .P(P), .CODE(C7)) dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wlane(coef_wlane), .coef_wres(coef_wres),
    .data_we(data_we), .data_waddr(data_waddr), .data_wres(data_wres),
    .coef_raddr(coef_raddr), .data_raddr(data_raddr),
    .mac_en(mac_en), .mac_first(mac_first), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int coef [N];      // coefficient residue of tap i
  int tap_of [N];    // tap held by slot j = row * P + lane
  int hist [N];      // hist[i] = residue of x[n-i]
  int head = N - 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (tap_of[j]) tap_of[j] = j;
    tap_of.shuffle();
    foreach (coef[i]) coef[i] = $urandom_range(M - 1);
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = 3'(j / P); coef_wlane = 1'(j % P);
      coef_wres = 3'(coef[tap_of[j]]);
    end
    @(negedge clk); coef_we = 0;
    foreach (hist[i]) hist[i] = 0;
    for (int n = 0; n < 60; n++) begin
      int xr, want;
      // write the new sample
      xr = $urandom_range(M - 1);
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = xr;
      head = (head + 1) % N;
      data_we = 1; data_waddr = 4'(head); data_wres = 3'(xr);
      @(negedge clk); data_we = 0;
      // MAC steps
      for (int s = 0; s < ROWS; s++) begin
        coef_raddr = 3'(s);
        for (int l = 0; l < P; l++) data_raddr[l] = 4'((head - tap_of[s*P+l] + N) % N);
        mac_en = 1; mac_first = (s == 0);
        @(negedge clk);
      end
      mac_en = 0; mac_first = 0;
      want = 0;
      for (int i = 0; i < N; i++) want = (want + coef[i] * hist[i]) % M;
      if (n >= N - 1) begin
        checks++;
        if (int'(y) != want) begin
          failures++;
          $display("output %0d: got %0d want %0d", n, y, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
