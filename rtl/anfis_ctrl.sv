// anfis_ctrl -- control unit of the ANFIS linearizer.
//
// A state machine that tells the shared datapath what to do in each clock.
// After reset it walks the parameter ROM once (S_LOAD), copying each word
// into the datapath's parameter registers; the ROM read takes one clock, so
// the register write for address k happens one clock after k is presented.
// It then waits in S_IDLE for a sample and steps through
//   S_SCALE  (code to volts)  -> S_FUZZ (Tri1, Tri2, f1, f2)
//   S_WEIGHT (w1*f1, w2*f2, S) -> S_SUM (N = w1*f1 + w2*f2, start 1/S)
//   S_DIV    (wait for 1/S)    -> S_OUT (F = N * 1/S)
// and pulses 'done' in the clock after S_OUT, when F is registered.
//
// Interface: 'start' is taken only while 'ready' is high.  'div_start' is
// high during S_SUM; 'div_done' from the divider moves S_DIV on.  The
// document names the control unit and its job; these states are this
// design's own ordering of equations (9) and (10).
module anfis_ctrl
  import fp_pkg::*;
#(
  parameter int unsigned N_WORDS = ROM_WORDS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         div_done,
  output anfis_state_t state,
  output logic [4:0]   rom_addr,
  output logic         ld_en,
  output logic [4:0]   ld_addr,
  output logic         div_start,
  output logic         ready,
  output logic         done
);

  anfis_state_t nxt;
  logic [4:0]   addr_q;

  always_comb begin
    nxt = state;
    unique case (state)
      S_RESET:  nxt = S_LOAD;
      S_LOAD:   if (addr_q == 5'(N_WORDS - 1)) nxt = S_IDLE;
      S_IDLE:   if (start && !ld_en) nxt = S_SCALE;
      S_SCALE:  nxt = S_FUZZ;
      S_FUZZ:   nxt = S_WEIGHT;
      S_WEIGHT: nxt = S_SUM;
      S_SUM:    nxt = S_DIV;
      S_DIV:    if (div_done) nxt = S_OUT;
      S_OUT:    nxt = S_IDLE;
      default:  nxt = S_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_RESET;
      addr_q  <= '0;
      ld_en   <= 1'b0;
      ld_addr <= '0;
      done    <= 1'b0;
    end else begin
      state   <= nxt;
      ld_en   <= state == S_LOAD;
      ld_addr <= addr_q;
      done    <= state == S_OUT;
      if (state == S_LOAD) addr_q <= addr_q + 5'd1;
      else                 addr_q <= '0;
    end
  end

  assign rom_addr  = addr_q;
  assign div_start = state == S_SUM;
  // Ready once the last parameter word has been written.
  assign ready     = (state == S_IDLE) && !ld_en;

  // The divider must answer while the control unit waits for it, and
  // never outside that wait.
  a_div_done_in_wait: assert property (@(posedge clk) disable iff (!rst_n)
    div_done |-> state == S_DIV);

endmodule
