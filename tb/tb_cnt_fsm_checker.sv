// Testbench of the counter's FSM checker.
//
// The checker watches a behavioural counter written in this testbench, which
// can misbehave on command. Legal traffic (reset, rest at zero, start,
// counting with wrap-around, restart) must never raise ERR. Each injected
// fault must raise ERR exactly one clock after the faulty sample and keep it
// until the next reset:
//   skip      the count jumps by two
//   stuck     the count holds while running
//   early     the count moves before STR
//   rststr    RST and STR high together
//   rstnz     RST high while OUT is not zero
//   badstart  the first value after STR is not 1
module tb_cnt_fsm_checker;

  localparam int unsigned W = 4;

  logic clk = 1'b0;
  logic rst, str;
  logic [W-1:0] out;
  logic err;
  logic run;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cnt_fsm_checker #(.WIDTH(W)) u_dut (.clk, .rst, .str, .out, .err);

  task automatic check(input logic exp, input string what);
    checks++;
    if (err !== exp) begin
      failures++;
      $display("FAIL %s: err=%b expected %b (out=%0d)", what, err, exp, out);
    end
  endtask

  // One clock of the model counter; inputs set at the falling edge.
  task automatic cycle(input logic r, input logic s, input logic [W-1:0] o);
    @(negedge clk);
    rst = r; str = s; out = o;
  endtask

  task automatic do_reset();
    cycle(1'b1, 1'b0, '0);
    cycle(1'b0, 1'b0, '0);
    @(posedge clk); #1;
    check(1'b0, "reset");
  endtask

  // Legal run: when n0 > 0, reset and rest n0 cycles; then start and count
  // n cycles.
  task automatic legal_run(input int n0, input int n);
    logic [W-1:0] v;
    if (n0 > 0) do_reset();
    repeat (n0) begin cycle(1'b0, 1'b0, '0); @(posedge clk); #1; check(1'b0, "rest"); end
    cycle(1'b0, 1'b1, '0);
    v = W'(1);
    repeat (n) begin
      cycle(1'b0, 1'b0, v); @(posedge clk); #1; check(1'b0, "count");
      v = v + W'(1);
    end
  endtask

  task automatic expect_fault(input string what);
    @(posedge clk); #1; check(1'b1, what);
    // Serr holds on legal-looking inputs too, until reset.
    repeat (3) begin cycle(1'b0, 1'b0, '0); @(posedge clk); #1; check(1'b1, {what, " held"}); end
    do_reset();
  endtask

  initial begin
    rst = 1'b0; str = 1'b0; out = '0;
    do_reset();
    for (int t = 0; t < 60; t++) begin
      legal_run($urandom_range(3), $urandom_range(40, 1));
      // Restart in the middle of counting.
      if (t % 3 == 0) legal_run(0, $urandom_range(20, 1));
      unique case (t % 7)
        0: begin  // skip: jump by two
          legal_run(0, 5);
          cycle(1'b0, 1'b0, W'(7)); expect_fault("skip");
        end
        1: begin  // stuck
          legal_run(0, 5);
          cycle(1'b0, 1'b0, W'(5)); expect_fault("stuck");
        end
        2: begin  // counts before STR
          do_reset();
          cycle(1'b0, 1'b0, W'(1)); expect_fault("early");
        end
        3: begin  // RST and STR together
          legal_run(0, 3);
          cycle(1'b1, 1'b1, '0); expect_fault("rststr");
        end
        4: begin  // RST while OUT is not zero
          legal_run(0, 3);
          cycle(1'b1, 1'b0, W'(3)); expect_fault("rstnz");
        end
        5: begin  // first value after STR is not 1
          legal_run(1, 0);
          cycle(1'b0, 1'b0, W'(2)); expect_fault("badstart");
        end
        default: legal_run(0, 20);  // includes a wrap from 15 to 0
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
