// Testbench of the self-checking counter (counter plus its FSM checker).
//
// Random legal use (resets, starts and restarts, long counting runs with
// wrap-around) must give the reference count and never raise ERR. RST and STR
// high together, which the checker must reject, must raise ERR one clock
// later, and a following reset must clear it.
module tb_self_checking_counter;

  localparam int unsigned W = 4;

  logic clk = 1'b0;
  logic rst, str;
  logic [W-1:0] out, model;
  logic err, run;
  int checks = 0, failures = 0;
  int n_start = 0, n_reset = 0, n_wrap = 0, n_illegal = 0;

  always #5 clk = ~clk;

  self_checking_counter #(.WIDTH(W)) u_dut (.clk, .rst, .str, .out, .err);

  task automatic check(input logic exp_err, input string what);
    checks++;
    if (out !== model || err !== exp_err) begin
      failures++;
      $display("FAIL %s: out=%0d err=%b, expected out=%0d err=%b", what, out, err, model, exp_err);
    end
  endtask

  initial begin
    rst = 1'b0; str = 1'b0; model = '0; run = 1'b0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      rst = ($urandom_range(99) < 3);
      str = !rst && ($urandom_range(99) < 5);
      if (i % 500 == 499) begin rst = 1'b1; str = 1'b1; end
      @(posedge clk);
      if (rst) begin model = '0; run = 1'b0; n_reset++; end
      else if (str) begin model = W'(1); run = 1'b1; n_start++; end
      else if (run) begin if (model == '1) n_wrap++; model = model + W'(1); end
      #1;
      if (rst && str) begin
        n_illegal++;
        check(1'b1, "RST and STR together");
        @(negedge clk); rst = 1'b0; str = 1'b0;
        @(posedge clk); #1; check(1'b1, "error held");
        @(negedge clk); rst = 1'b1;
        @(negedge clk); rst = 1'b0;
        @(posedge clk); #1; check(1'b0, "error cleared by reset");
      end else begin
        check(1'b0, "legal operation");
      end
    end
    checks++;
    if (n_start == 0 || n_reset == 0 || n_wrap == 0 || n_illegal == 0) begin
      failures++;
      $display("FAIL coverage start=%0d reset=%0d wrap=%0d illegal=%0d", n_start, n_reset, n_wrap, n_illegal);
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
