// Shared types and helpers of the on-line checkers.
//
// The LocalLink (LL) port carries six active-low control signals. ll_ctrl_t
// bundles them; ll_classify() maps one clock's control combination onto the
// condition symbols of the LL checker's formal model:
//   C0 start of frame, C1 start of payload, C2 end of payload, C3 end of
//   frame, C4 a data beat with no delimiter, C5 no transfer (a side is not
//   ready). Any other combination of a transfer cycle is SYM_ILLEGAL.
// The data rules that C1 and C2 add are evaluated by the checkers themselves,
// because they depend on the data bus width and the checking level.
// The idle combination (all six high) falls under C5. A stall (C5) is
// written in the model as "SRC_RDY_N==0 or DST_RDY_N==0"; read literally that
// would overlap C0..C4, so this package takes it as "a side is not ready"
// (SRC_RDY_N==1 or DST_RDY_N==1), which is what its self-loops on every state
// need.
package online_chk_pkg;

  typedef struct packed {
    logic src_rdy_n;
    logic dst_rdy_n;
    logic sof_n;
    logic sop_n;
    logic eop_n;
    logic eof_n;
  } ll_ctrl_t;

  typedef enum logic [2:0] {
    SYM_C0      = 3'd0,  // SOF beat
    SYM_C1      = 3'd1,  // SOP beat (control part)
    SYM_C2      = 3'd2,  // EOP beat (control part)
    SYM_C3      = 3'd3,  // EOF beat
    SYM_C4      = 3'd4,  // data beat, no delimiter
    SYM_C5      = 3'd5,  // no transfer
    SYM_ILLEGAL = 3'd7   // transfer with more than one delimiter low
  } ll_sym_e;

  // Phases of a frame, one per segment checker module of the segmented checker.
  typedef enum logic [1:0] {
    PH1_HEADER  = 2'd0,  // after SOF, up to and including SOP
    PH2_PAYLOAD = 2'd1,  // after SOP, up to and including EOP
    PH3_FOOTER  = 2'd2,  // after EOP, up to and including EOF
    PH4_IDLE    = 2'd3   // after EOF, up to and including the next SOF
  } ll_phase_e;

  localparam int unsigned NUM_PHASES = 4;

  // Start-of-frame delimiter and payload byte limit of the data rules.
  localparam logic [7:0] LL_SFD        = 8'hAB;
  localparam int unsigned LL_DATA_LIMIT = 124;

  function automatic ll_sym_e ll_classify(input ll_ctrl_t c);
    ll_sym_e s;
    if (c.src_rdy_n || c.dst_rdy_n) begin
      s = SYM_C5;
    end else begin
      unique case ({c.sof_n, c.sop_n, c.eop_n, c.eof_n})
        4'b0111: s = SYM_C0;
        4'b1011: s = SYM_C1;
        4'b1101: s = SYM_C2;
        4'b1110: s = SYM_C3;
        4'b1111: s = SYM_C4;
        default: s = SYM_ILLEGAL;
      endcase
    end
    return s;
  endfunction

endpackage
