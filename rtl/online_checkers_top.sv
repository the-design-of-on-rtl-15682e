// On-line checkers: top level.
//
// Two checked circuits stand side by side, sharing only the clock:
//  * a self-checking counter: the CNT_WIDTH-bit counter with its FSM checker,
//    inputs rst/str, outputs cnt_out and cnt_err;
//  * a LocalLink link monitor: the link between two functional units (not
//    part of this design) enters as ll_* ports and is watched by both the FSM
//    checker (control combinations, sequence and data rules; ll_fsm_error)
//    and the segmented checker (control combinations and sequence, four phase
//    modules and a main checker; ll_seg_error, ll_seg_err_id).
// The link checkers have their own synchronous reset ll_chk_rst; the counter
// and its checker use the counter's asynchronous rst as the document shows.
// Defaults follow the document: a 4-bit counter and 4-byte link words.
module online_checkers_top #(
  parameter int unsigned CNT_WIDTH     = 4,
  parameter int unsigned LL_DATA_WIDTH = 32
) (
  input  logic                     clk,
  // self-checking counter
  input  logic                     rst,
  input  logic                     str,
  output logic [CNT_WIDTH-1:0]     cnt_out,
  output logic                     cnt_err,
  // LocalLink link under check
  input  logic                     ll_chk_rst,
  input  logic                     ll_sof_n,
  input  logic                     ll_sop_n,
  input  logic                     ll_eop_n,
  input  logic                     ll_eof_n,
  input  logic                     ll_src_rdy_n,
  input  logic                     ll_dst_rdy_n,
  input  logic [LL_DATA_WIDTH-1:0] ll_data,
  output logic                     ll_fsm_error,
  output logic                     ll_seg_error,
  output logic [2:0]               ll_seg_err_id,
  output logic [3:0]               ll_seg_phase
);

  self_checking_counter #(.WIDTH(CNT_WIDTH)) u_counter (
    .clk (clk),
    .rst (rst),
    .str (str),
    .out (cnt_out),
    .err (cnt_err)
  );

  ll_fsm_checker #(.DATA_WIDTH(LL_DATA_WIDTH)) u_ll_fsm (
    .clk       (clk),
    .rst       (ll_chk_rst),
    .sof_n     (ll_sof_n),
    .sop_n     (ll_sop_n),
    .eop_n     (ll_eop_n),
    .eof_n     (ll_eof_n),
    .src_rdy_n (ll_src_rdy_n),
    .dst_rdy_n (ll_dst_rdy_n),
    .data      (ll_data),
    .error     (ll_fsm_error)
  );

  ll_segment_checker u_ll_seg (
    .clk          (clk),
    .rst          (ll_chk_rst),
    .sof_n        (ll_sof_n),
    .sop_n        (ll_sop_n),
    .eop_n        (ll_eop_n),
    .eof_n        (ll_eof_n),
    .src_rdy_n    (ll_src_rdy_n),
    .dst_rdy_n    (ll_dst_rdy_n),
    .error        (ll_seg_error),
    .err_id       (ll_seg_err_id),
    .phase_active (ll_seg_phase)
  );

endmodule
