// Segmented on-line checker of a LocalLink link.
//
// Four phase checkers (CHCK_PH1 header, CHCK_PH2 payload, CHCK_PH3 footer,
// CHCK_PH4 end of frame and idle) share the link's control signals and pass
// an activity token in a ring PH4 -> PH1 -> PH2 -> PH3 -> PH4. The phase that
// holds the token checks the control combinations it accepts; the MAIN
// CHECKER merges their ERROR outputs into the system ERROR and names the
// module that found the fault in err_id (1..4, 0 for none). It checks the
// combinations of the control signals and their sequence, not the data.
//
// An assertion states the ring's invariant: outside reset exactly one phase
// module holds the token.
//
// Timing: a faulty beat at clock t sets the phase checker's ERROR at the edge
// ending t and the system ERROR and err_id one clock later. RST is
// synchronous and active high.
//
// The split into four modules and the main checker follow the document; the
// direction of the ring and the token protocol are this design's choice.
module ll_segment_checker
  import online_chk_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sof_n,
  input  logic       sop_n,
  input  logic       eop_n,
  input  logic       eof_n,
  input  logic       src_rdy_n,
  input  logic       dst_rdy_n,
  output logic       error,
  output logic [2:0] err_id,
  output logic [3:0] phase_active  // bit i: CHCK_PH(i+1) holds the token
);

  ll_ctrl_t   ctrl;
  logic [NUM_PHASES-1:0] cntr;  // bit i: token out of CHCK_PH(i+1)
  logic [NUM_PHASES-1:0] ph_error;

  assign ctrl = '{src_rdy_n: src_rdy_n, dst_rdy_n: dst_rdy_n,
                  sof_n: sof_n, sop_n: sop_n, eop_n: eop_n, eof_n: eof_n};

  ll_phase_checker #(.PHASE(PH1_HEADER)) u_chck_ph1 (
    .clk, .rst, .ctrl,
    .cntr_in (cntr[3]), .cntr_out (cntr[0]),
    .active  (phase_active[0]), .error (ph_error[0])
  );

  ll_phase_checker #(.PHASE(PH2_PAYLOAD)) u_chck_ph2 (
    .clk, .rst, .ctrl,
    .cntr_in (cntr[0]), .cntr_out (cntr[1]),
    .active  (phase_active[1]), .error (ph_error[1])
  );

  ll_phase_checker #(.PHASE(PH3_FOOTER)) u_chck_ph3 (
    .clk, .rst, .ctrl,
    .cntr_in (cntr[1]), .cntr_out (cntr[2]),
    .active  (phase_active[2]), .error (ph_error[2])
  );

  ll_phase_checker #(.PHASE(PH4_IDLE)) u_chck_ph4 (
    .clk, .rst, .ctrl,
    .cntr_in (cntr[2]), .cntr_out (cntr[3]),
    .active  (phase_active[3]), .error (ph_error[3])
  );

  // The token never splits or disappears: exactly one phase module holds it.
  a_token_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(phase_active))
    else $error("segment checker token is not one-hot: %b", phase_active);

  ll_main_checker #(.N_PHASES(NUM_PHASES)) u_main (
    .clk, .rst,
    .phase_error (ph_error),
    .error       (error),
    .err_id      (err_id)
  );

endmodule
