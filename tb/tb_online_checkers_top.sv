// End-to-end testbench of the on-line checkers top level, at its default
// parameters (4-bit counter, 32-bit link words).
//
// Two threads run side by side:
//  * the counter is used at random (resets, starts, restarts, long runs) and
//    compared with a reference count; its checker must stay quiet, except
//    after the forbidden RST-with-STR input, which it must flag;
//  * frames run over the link, legal ones and ones with each kind of injected
//    fault; the FSM checker (level 3) and the segmented checker must give
//    the verdicts expected for the fault kind, the latter with the number of
//    the phase module in whose segment the fault lies.
// Each mechanism is counted (counter start, wrap, reset, forbidden input;
// link stalls, data beats, each phase module holding the token, each fault
// kind) and one that never happened counts as a failure.
module tb_online_checkers_top;
  import ll_tb_pkg::*;

  logic clk = 1'b0;
  logic rst, str;
  logic [3:0] cnt_out;
  logic cnt_err;
  logic ll_chk_rst;
  logic sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n;
  logic [31:0] data;
  logic ll_fsm_error, ll_seg_error;
  logic [2:0] ll_seg_err_id;
  logic [3:0] ll_seg_phase;

  int checks = 0, failures = 0;
  int n_start = 0, n_wrap = 0, n_reset = 0, n_forbidden = 0;
  int n_fault [NUM_FAULTS];
  int visits [4];
  bit cnt_done = 0, ll_done = 0;

  always #5 clk = ~clk;

  online_checkers_top u_top (
    .clk,
    .rst, .str, .cnt_out, .cnt_err,
    .ll_chk_rst,
    .ll_sof_n (sof_n), .ll_sop_n (sop_n), .ll_eop_n (eop_n), .ll_eof_n (eof_n),
    .ll_src_rdy_n (src_rdy_n), .ll_dst_rdy_n (dst_rdy_n), .ll_data (data),
    .ll_fsm_error, .ll_seg_error, .ll_seg_err_id, .ll_seg_phase
  );

  ll_frame_source #(.DATA_WIDTH(32)) u_src (
    .clk, .sof_n, .sop_n, .eop_n, .eof_n, .src_rdy_n, .dst_rdy_n, .data
  );

  always @(posedge clk)
    for (int p = 0; p < 4; p++) if (ll_seg_phase[p] && !ll_chk_rst) visits[p]++;

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  // Counter thread.
  initial begin
    logic [3:0] model = '0;
    logic run = 1'b0;
    rst = 1'b0; str = 1'b0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rst = ($urandom_range(99) < 2);
      str = !rst && ($urandom_range(99) < 4);
      if (i % 1000 == 999) begin rst = 1'b1; str = 1'b1; end
      @(posedge clk);
      if (rst) begin model = '0; run = 1'b0; n_reset++; end
      else if (str) begin model = 4'd1; run = 1'b1; n_start++; end
      else if (run) begin if (model == 4'hF) n_wrap++; model = model + 4'd1; end
      #1;
      checks++;
      if (cnt_out !== model) fail($sformatf("counter out=%0d expected %0d", cnt_out, model));
      checks++;
      if (cnt_err !== (rst && str)) fail($sformatf("counter checker err=%b", cnt_err));
      if (rst && str) begin
        n_forbidden++;
        @(negedge clk); rst = 1'b1; str = 1'b0;
        @(negedge clk); rst = 1'b0;
        @(posedge clk); #1;
        checks++;
        if (cnt_err !== 1'b0) fail("counter checker not cleared by reset");
        run = 1'b0; model = '0;
      end
    end
    cnt_done = 1;
  end

  // Link thread.
  initial begin
    ll_chk_rst = 1'b1;
    repeat (2) @(negedge clk);
    for (int trial = 0; trial < 200; trial++) begin
      automatic fault_e f = fault_e'(trial % NUM_FAULTS);
      automatic logic [2:0] exp_lvl;
      @(negedge clk); ll_chk_rst = 1'b1;
      @(negedge clk); ll_chk_rst = 1'b0;
      u_src.send_frame($urandom_range(3), $urandom_range(8), $urandom_range(3), F_NONE);
      u_src.idle($urandom_range(2));
      @(posedge clk); #1;
      checks++;
      if (ll_fsm_error || ll_seg_error) fail("link checker flagged a legal frame");
      u_src.send_frame($urandom_range(3), $urandom_range(8), $urandom_range(3), f);
      u_src.idle(3);
      @(posedge clk); #1;
      checks++;
      exp_lvl = fsm_expected(f);
      if (ll_fsm_error !== exp_lvl[2])
        fail($sformatf("FSM checker error=%b on %s", ll_fsm_error, f.name()));
      checks++;
      if (ll_seg_error !== (seg_expected(f) != 0) || ll_seg_err_id !== seg_expected(f))
        fail($sformatf("segment checker error=%b id=%0d on %s", ll_seg_error, ll_seg_err_id, f.name()));
      n_fault[f]++;
    end
    ll_done = 1;
  end

  initial begin
    wait (cnt_done && ll_done);
    checks++;
    if (n_start == 0 || n_wrap == 0 || n_reset == 0 || n_forbidden == 0)
      fail($sformatf("counter coverage start=%0d wrap=%0d reset=%0d forbidden=%0d",
                     n_start, n_wrap, n_reset, n_forbidden));
    checks++;
    if (u_src.stalls == 0 || u_src.beats == 0) fail("no link stalls or beats");
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (visits[p] == 0) fail($sformatf("phase module %0d never held the token", p + 1));
    end
    for (int k = 0; k < NUM_FAULTS; k++) begin
      checks++;
      if (n_fault[k] == 0) fail($sformatf("fault kind %0d never injected", k));
    end
    $display("counter: starts=%0d wraps=%0d resets=%0d forbidden=%0d", n_start, n_wrap, n_reset, n_forbidden);
    $display("link: beats=%0d stalls=%0d phase visits=%0d/%0d/%0d/%0d",
             u_src.beats, u_src.stalls, visits[0], visits[1], visits[2], visits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
