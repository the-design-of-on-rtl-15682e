// Testbench of the segmented LocalLink checker.
//
// A behavioural frame source sends legal frames with random lengths and
// stalls, then a frame with one kind of fault. Legal frames must leave ERROR
// low and the token must visit all four phase modules; a control fault must
// raise ERROR with err_id naming the phase module in whose segment it lies
// (header 1, payload 2, footer 3, idle 4). Data faults are outside this
// checker's scope and must pass unflagged.
module tb_ll_segment_checker;
  import ll_tb_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n;
  logic [31:0] data;
  logic error;
  logic [2:0] err_id;
  logic [3:0] phase_active;
  int checks = 0, failures = 0;
  int visits [4];

  always #5 clk = ~clk;

  ll_frame_source #(.DATA_WIDTH(32)) u_src (
    .clk, .sof_n, .sop_n, .eop_n, .eof_n, .src_rdy_n, .dst_rdy_n, .data
  );

  ll_segment_checker u_dut (
    .clk, .rst, .sof_n, .sop_n, .eop_n, .eof_n, .src_rdy_n, .dst_rdy_n,
    .error, .err_id, .phase_active
  );

  always @(posedge clk) begin
    for (int p = 0; p < 4; p++) if (phase_active[p] && !rst) visits[p]++;
    if (!rst && !$onehot(phase_active)) begin
      failures++;
      $display("FAIL token not one-hot: %b", phase_active);
    end
  end

  task automatic check(input logic [2:0] exp_id, input string what);
    checks++;
    if (error !== (exp_id != 0) || err_id !== exp_id) begin
      failures++;
      $display("FAIL %s: error=%b err_id=%0d, expected id %0d", what, error, err_id, exp_id);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (2) @(negedge clk);
    for (int trial = 0; trial < 160; trial++) begin
      automatic fault_e f = fault_e'(trial % NUM_FAULTS);
      @(negedge clk); rst = 1'b1;
      @(negedge clk); rst = 1'b0;
      repeat (2) begin
        u_src.send_frame($urandom_range(3), $urandom_range(6), $urandom_range(3), F_NONE);
        u_src.idle($urandom_range(2));
      end
      @(posedge clk); #1;
      check(3'd0, "legal frames");
      u_src.send_frame($urandom_range(3), $urandom_range(6), $urandom_range(3), f);
      u_src.idle(2);
      @(posedge clk); #1;
      check(seg_expected(f), f.name());
      u_src.idle(3);
      @(posedge clk); #1;
      check(seg_expected(f), {f.name(), " (held)"});
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (visits[p] == 0) begin failures++; $display("FAIL phase %0d never active", p + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
