// Testbench of the LocalLink FSM checker at its three checking levels.
//
// A behavioural frame source drives one link watched by three checkers
// (levels 1, 2 and 3). Each trial resets the checkers, sends legal frames
// with random lengths and stalls (no checker may flag them), then a frame
// with one kind of fault. The expected verdict of each level comes from the
// fault's kind: level 1 sees only illegal combinations, level 2 also
// sequence faults, level 3 also the data rules. The error must stay set
// through the following idle cycles (Serr is kept until reset).
module tb_ll_fsm_checker;
  import ll_tb_pkg::*;

  localparam int unsigned DW = 32;

  logic clk = 1'b0;
  logic rst;
  logic sof_n, sop_n, eop_n, eof_n, src_rdy_n, dst_rdy_n;
  logic [DW-1:0] data;
  logic [2:0] err;   // bit i: error of the level i+1 checker

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ll_frame_source #(.DATA_WIDTH(DW)) u_src (
    .clk, .sof_n, .sop_n, .eop_n, .eof_n, .src_rdy_n, .dst_rdy_n, .data
  );

  for (genvar l = 1; l <= 3; l++) begin : g_lvl
    ll_fsm_checker #(.DATA_WIDTH(DW), .CHECK_LEVEL(l)) u_dut (
      .clk, .rst, .sof_n, .sop_n, .eop_n, .eof_n, .src_rdy_n, .dst_rdy_n,
      .data, .error (err[l-1])
    );
  end

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (err !== exp) begin
      failures++;
      $display("FAIL %s: error levels {3,2,1} = %b, expected %b", what, err, exp);
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
      check(3'b000, "legal frames");
      u_src.send_frame($urandom_range(3), $urandom_range(6), $urandom_range(3), f);
      u_src.idle(2);
      @(posedge clk); #1;
      check(fsm_expected(f), f.name());
      u_src.idle(3);
      @(posedge clk); #1;
      check(fsm_expected(f), {f.name(), " (held)"});
    end
    // Reset leaves Serr.
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    @(posedge clk); #1;
    check(3'b000, "after reset");
    // Stalls must have occurred.
    checks++;
    if (u_src.stalls == 0) begin failures++; $display("FAIL no stall cycles"); end
    $display("beats=%0d stalls=%0d", u_src.beats, u_src.stalls);
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
