// CHCK: on-line FSM checker of a LocalLink (LL) link.
//
// The checker watches the six active-low LL control signals and the data bus
// of a link between two units and raises ERROR when the traffic breaks the
// protocol. It is the automaton of the LL formal model, with states
//   S0 idle (between frames)      S1 header   S2 payload   S3 footer
// and Serr. The input symbols C0..C5 come from online_chk_pkg::ll_classify;
// at checking level 3 two data rules are added to the delimiter beats:
//   C1 (SOP beat) also needs DATA[7:0] == SFD (0xAB, start-of-frame delimiter)
//   C2 (EOP beat) also needs DATA[7:0] <  DATA_LIMIT (124)
// Transitions (all others lead to Serr):
//   (S0,C5):S0 (S0,C0):S1
//   (S1,C5):S1 (S1,C4):S1 (S1,C1):S2
//   (S2,C5):S2 (S2,C4):S2 (S2,C2):S3
//   (S3,C5):S3 (S3,C4):S3 (S3,C3):S0
// CHECK_LEVEL selects how much is checked, as in the three levels the
// document compares:
//   1  only the control combination of each transfer beat (at most one
//      delimiter low); no state is kept
//   2  combinations and their sequence (the automaton, no data rules)
//   3  as 2 plus the data rules (default)
// Serr is left only through RST (synchronous, active high), which returns the
// checker to S0. ERROR is registered: it rises one clock after the offending
// beat.
//
// The automaton, its conditions and the constants are the document's. Which
// byte lane the data rules read (DATA[7:0] of the SOP and EOP beats), the
// reading of C5 as "a side is not ready" (see online_chk_pkg) and the exit
// from Serr are this design's choices. Bits above DATA[7:0] are not
// inspected by any rule (lint reports them as unused); the port keeps the
// link's full width.
module ll_fsm_checker
  import online_chk_pkg::*;
#(
  parameter int unsigned DATA_WIDTH  = 32,
  parameter int unsigned CHECK_LEVEL = 3,
  parameter logic [7:0]  SFD         = LL_SFD,
  parameter int unsigned DATA_LIMIT  = LL_DATA_LIMIT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sof_n,
  input  logic                  sop_n,
  input  logic                  eop_n,
  input  logic                  eof_n,
  input  logic                  src_rdy_n,
  input  logic                  dst_rdy_n,
  input  logic [DATA_WIDTH-1:0] data,
  output logic                  error
);

  typedef enum logic [2:0] {
    S0   = 3'd0,
    S1   = 3'd1,
    S2   = 3'd2,
    S3   = 3'd3,
    SERR = 3'd4
  } state_e;

  state_e   state_q, state_d;
  ll_ctrl_t ctrl;
  ll_sym_e  sym;
  logic     data_ok_sop, data_ok_eop;

  assign ctrl = '{src_rdy_n: src_rdy_n, dst_rdy_n: dst_rdy_n,
                  sof_n: sof_n, sop_n: sop_n, eop_n: eop_n, eof_n: eof_n};

  always_comb begin
    sym         = ll_classify(ctrl);
    data_ok_sop = (CHECK_LEVEL < 3) || (data[7:0] == SFD);
    data_ok_eop = (CHECK_LEVEL < 3) || (32'(data[7:0]) < DATA_LIMIT);
  end

  // Transition function P.
  always_comb begin
    state_d = SERR;
    if (CHECK_LEVEL < 2) begin
      // Combinations only: any legal symbol keeps the checker in S0.
      if (state_q == S0 && sym != SYM_ILLEGAL) state_d = S0;
    end else begin
      unique case (state_q)
        S0: if (sym == SYM_C5)                   state_d = S0;
            else if (sym == SYM_C0)              state_d = S1;
        S1: if (sym == SYM_C5 || sym == SYM_C4)  state_d = S1;
            else if (sym == SYM_C1 && data_ok_sop) state_d = S2;
        S2: if (sym == SYM_C5 || sym == SYM_C4)  state_d = S2;
            else if (sym == SYM_C2 && data_ok_eop) state_d = S3;
        S3: if (sym == SYM_C5 || sym == SYM_C4)  state_d = S3;
            else if (sym == SYM_C3)              state_d = S0;
        default:                                 state_d = SERR;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= S0;
    else     state_q <= state_d;
  end

  assign error = (state_q == SERR);

endmodule
