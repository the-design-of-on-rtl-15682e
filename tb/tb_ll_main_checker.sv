// Testbench of the segmented checker's main checker.
//
// Drives every combination of phase-checker errors and checks, one clock
// later, the system error (any phase error) and the identity of the module
// (number of the lowest-numbered module in error, 0 for none); then checks
// that reset clears both.
module tb_ll_main_checker;

  logic clk = 1'b0;
  logic rst;
  logic [3:0] phase_error;
  logic       error;
  logic [2:0] err_id;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ll_main_checker #(.N_PHASES(4)) u_dut (.clk, .rst, .phase_error, .error, .err_id);

  function automatic logic [2:0] ref_id(input logic [3:0] e);
    if (e[0]) return 3'd1;
    if (e[1]) return 3'd2;
    if (e[2]) return 3'd3;
    if (e[3]) return 3'd4;
    return 3'd0;
  endfunction

  initial begin
    rst = 1'b1; phase_error = '0;
    @(negedge clk); rst = 1'b0;
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 16; v++) begin
        @(negedge clk); phase_error = 4'(v);
        @(posedge clk); #1;
        checks++;
        if (error !== (v != 0) || err_id !== ref_id(4'(v))) begin
          failures++;
          $display("FAIL errors=%b: error=%b id=%0d", 4'(v), error, err_id);
        end
      end
    end
    @(negedge clk); phase_error = 4'b0100; rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (error !== 1'b0 || err_id !== 3'd0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
