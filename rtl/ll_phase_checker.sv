// CHCK_PHn: checker of one phase of a LocalLink frame.
//
// The segmented LL checker splits the protocol into four time segments and
// gives each its own small checker. The four are chained in a ring by their
// CNTR signals, which pass a single activity token along:
//   PH1_HEADER   active after SOF;  accepts stalls (C5) and data beats (C4);
//                SOP (C1) ends the phase
//   PH2_PAYLOAD  active after SOP;  accepts C5, C4; EOP (C2) ends it
//   PH3_FOOTER   active after EOP;  accepts C5, C4; EOF (C3) ends it
//   PH4_IDLE     active after EOF and after reset; accepts C5; SOF (C0) ends it
// While it holds the token the module checks each clock's control
// combination; any combination its phase does not accept sets its ERROR,
// which stays set (and the token stays put) until RST. A module without the
// token ignores the link.
//
// Timing: cntr_out is high, combinationally, in the clock whose beat ends
// the phase; the next module takes the token at that clock's edge and checks
// from the following beat on. RST is synchronous and active high; it gives
// the token to PH4_IDLE and clears ERROR.
//
// Phase boundaries, the ring and the reset owner are this design's reading
// of the document's four-module segment checker; the accepted symbols of each
// phase are the transitions of the document's LL automaton that belong to it.
module ll_phase_checker
  import online_chk_pkg::*;
#(
  parameter ll_phase_e PHASE = PH1_HEADER
) (
  input  logic     clk,
  input  logic     rst,
  input  ll_ctrl_t ctrl,      // in_1..in_n: the six LL control signals
  input  logic     cntr_in,   // token from the previous phase
  output logic     cntr_out,  // token to the next phase
  output logic     active,    // this phase holds the token
  output logic     error
);

  ll_sym_e sym;
  logic    stay, close;

  always_comb begin
    sym = ll_classify(ctrl);
    unique case (PHASE)
      PH1_HEADER: begin
        stay  = (sym == SYM_C5) || (sym == SYM_C4);
        close = (sym == SYM_C1);
      end
      PH2_PAYLOAD: begin
        stay  = (sym == SYM_C5) || (sym == SYM_C4);
        close = (sym == SYM_C2);
      end
      PH3_FOOTER: begin
        stay  = (sym == SYM_C5) || (sym == SYM_C4);
        close = (sym == SYM_C3);
      end
      default: begin  // PH4_IDLE
        stay  = (sym == SYM_C5);
        close = (sym == SYM_C0);
      end
    endcase
  end

  assign cntr_out = active && !error && close;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= (PHASE == PH4_IDLE);
      error  <= 1'b0;
    end else if (active) begin
      if (error) begin
        // Halted until reset.
      end else if (!stay && !close) begin
        error <= 1'b1;
      end else if (close) begin
        active <= 1'b0;
      end
    end else if (cntr_in) begin
      active <= 1'b1;
    end
  end

endmodule
