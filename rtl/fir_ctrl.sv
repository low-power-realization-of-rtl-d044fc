// fir_ctrl: sequencer of the RNS FIR filter.
//
// One output takes one accept cycle and ROWS = N/P MAC steps:
//   IDLE - x_ready is high; when x_valid is seen the sample is accepted:
//          sample_we writes its residues at the next circular location and
//          addr_clear sets the coefficient address to step 0.
//   RUN  - ROWS cycles with mac_en high (mac_first on the first of them)
//          while the coefficient address advances; x_ready is low, so an
//          offered sample waits (stalls) until the output is done.
//   DONE - y_valid is high for one cycle. x_ready is high again and a
//          waiting sample is accepted in this cycle, so with x_valid held
//          high one output leaves every ROWS + 1 cycles.
// y_valid comes ROWS + 1 cycles after the accept cycle.
//
// Interface: x_valid / x_ready handshake for samples, addr_last from the
// coefficient address generator, control strobes out. Synchronous
// active-low reset to IDLE.
//
// The source design describes the N/P-cycle series of MAC operations per
// output but no controller; this state machine and handshake are this
// design's own.
module fir_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic x_valid,
  output logic x_ready,
  input  logic addr_last,
  output logic sample_we,
  output logic addr_clear,
  output logic addr_advance,
  output logic mac_en,
  output logic mac_first,
  output logic y_valid
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;

  state_t state, state_next;
  logic   first_q;

  assign x_ready      = (state != RUN);
  assign sample_we    = x_valid && x_ready;
  assign addr_clear   = sample_we;
  assign addr_advance = (state == RUN);
  assign mac_en       = (state == RUN);
  assign mac_first    = (state == RUN) && first_q;
  assign y_valid      = (state == DONE);

  always_comb begin
    state_next = state;
    unique case (state)
      IDLE:    if (sample_we) state_next = RUN;
      RUN:     if (addr_last) state_next = DONE;
      DONE:    state_next = sample_we ? RUN : IDLE;
      default: state_next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      first_q <= 1'b0;
    end else begin
      state   <= state_next;
      first_q <= sample_we;
    end
  end

  // A MAC sequence is never started while one is running.
  a_no_accept_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    (state == RUN) |-> !sample_we);

endmodule
