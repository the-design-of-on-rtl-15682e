// CHCK: on-line FSM checker of the counter CNT.
//
// The checker is the deterministic automaton A = (Q, T, P, S0, Serr) of the
// counter's formal description. Its input symbols are conditions over the
// counter's inputs and output, sampled at each rising CLK edge:
//   Ck   (k = 0..2^WIDTH-1): OUT == k and RST == 0 and STR == 0
//   CSTR (C8 for 3 bits):    RST == 0 and STR == 1
//   CRST (C9 for 3 bits):    RST == 1 and STR == 0 and OUT == 0
// Transitions: (Sk, Ck) -> S(k+1 mod 2^WIDTH), (Sk, CRST) -> S0. Every pair
// that the table does not name leads to Serr, which is kept until the next
// CRST. ERR is high while the automaton is in Serr, so a fault shows one
// clock after the offending sample. RST and STR high together match no symbol
// and are therefore flagged.
//
// One state per counter value would not scale to the 32-bit counters of the
// experiments, so the states S0..S(2^WIDTH-1) are held binary-coded in a
// WIDTH-bit register (the expected output value) and the transition
// (Sk, Ck) -> Sk+1 becomes "OUT equals the register, so increment it". Two
// more states complete Q:
//   * SIDLE: entered on CRST. The counter rests at zero until STR, so
//     (SIDLE, C0) -> SIDLE. The document's table sends CRST to S0 and has no
//     resting state; with it a stopped counter would be flagged after reset.
//   * CSTR from any non-error state leads to S1, from the property
//     "STR |=> OUT = 0001"; the document defines C8 but its table leaves it
//     out.
// The state register is loaded only by transitions (RST is one of the
// checked inputs, not a reset of the checker), so a CRST sample puts the
// checker into a known state.
module cnt_fsm_checker #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,   // counter RST, observed
  input  logic             str,   // counter STR, observed
  input  logic [WIDTH-1:0] out,   // counter OUT, observed
  output logic             err
);

  typedef enum logic [1:0] {
    M_RUN  = 2'd0,  // in one of S0..S(2^WIDTH-1), index in 'expect_q'
    M_IDLE = 2'd1,  // SIDLE
    M_ERR  = 2'd2   // Serr
  } mode_e;

  mode_e            mode_q, mode_d;
  logic [WIDTH-1:0] expect_q, expect_d;

  // Condition symbols.
  logic c_cnt;   // C_k with k equal to the current state index
  logic c_zero;  // C0 (OUT == 0, no RST, no STR)
  logic c_str;   // CSTR
  logic c_rst;   // CRST

  always_comb begin
    c_cnt  = !rst && !str && (out == expect_q);
    c_zero = !rst && !str && (out == '0);
    c_str  = !rst &&  str;
    c_rst  =  rst && !str && (out == '0);
  end

  // Transition function P.
  always_comb begin
    mode_d   = M_ERR;
    expect_d = expect_q;
    if (c_rst) begin
      mode_d   = M_IDLE;
      expect_d = '0;
    end else if ((mode_q == M_RUN || mode_q == M_IDLE) && c_str) begin
      mode_d   = M_RUN;
      expect_d = WIDTH'(1);
    end else begin
      unique case (mode_q)
        M_RUN: if (c_cnt) begin
          mode_d   = M_RUN;
          expect_d = expect_q + WIDTH'(1);
        end
        M_IDLE: if (c_zero) mode_d = M_IDLE;
        default: mode_d = M_ERR;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    mode_q   <= mode_d;
    expect_q <= expect_d;
  end

  assign err = (mode_q != M_RUN) && (mode_q != M_IDLE);

endmodule
