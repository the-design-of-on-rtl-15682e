// Testbench of the self-checking counter at the wider sizes measured for the
// checker method: 8, 16 and 32 bits.
//
// Each width runs the same random legal traffic (resets, starts, long
// counting runs) and must match a reference count with no error. The 8- and
// 16-bit counters are driven long enough to wrap; the 32-bit one cannot wrap
// in a simulation and is checked over its first values only. A separate
// 32-bit checker, fed a model counter that skips one value high up in its
// range, must flag the skip one clock later.
module tb_counter_widths;

  logic clk = 1'b0;
  logic rst, str;
  logic [7:0]  out8;
  logic [15:0] out16;
  logic [31:0] out32;
  logic [2:0]  err;
  logic [31:0] model;
  logic        run;
  int checks = 0, failures = 0, wraps8 = 0, wraps16 = 0;

  // Separate 32-bit checker with a faulty model counter.
  logic        f_rst, f_str, f_err;
  logic [31:0] f_out;

  always #5 clk = ~clk;

  self_checking_counter #(.WIDTH(8))  u_c8  (.clk, .rst, .str, .out (out8),  .err (err[0]));
  self_checking_counter #(.WIDTH(16)) u_c16 (.clk, .rst, .str, .out (out16), .err (err[1]));
  self_checking_counter #(.WIDTH(32)) u_c32 (.clk, .rst, .str, .out (out32), .err (err[2]));

  cnt_fsm_checker #(.WIDTH(32)) u_chk32 (.clk, .rst (f_rst), .str (f_str), .out (f_out), .err (f_err));

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  initial begin
    rst = 1'b0; str = 1'b0; model = '0; run = 1'b0;
    f_rst = 1'b1; f_str = 1'b0; f_out = '0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    // One start, then a run long enough for the 16-bit counter to wrap.
    for (int i = 0; i < 140000; i++) begin
      @(negedge clk);
      str = (i == 3) || (i > 70000 && $urandom_range(9999) == 0);
      rst = !str && (i > 70000 && $urandom_range(9999) == 1);
      @(posedge clk);
      if (rst) begin model = '0; run = 1'b0; end
      else if (str) begin model = 32'd1; run = 1'b1; end
      else if (run) begin
        if (model[7:0] == 8'hFF) wraps8++;
        if (model[15:0] == 16'hFFFF) wraps16++;
        model = model + 32'd1;
      end
      #1;
      if (i % 16 == 0 || rst || str) begin
        checks++;
        if (out8 !== model[7:0] || out16 !== model[15:0] || out32 !== model)
          fail($sformatf("count: %0d %0d %0d expected %0d", out8, out16, out32, model));
        checks++;
        if (err !== 3'b000) fail($sformatf("checker error %b on legal traffic", err));
      end
    end
    checks++;
    if (wraps8 == 0 || wraps16 == 0) fail("8- or 16-bit counter never wrapped");

    // Faulty 32-bit model: start, count to 5, then jump to a high value.
    @(negedge clk); f_rst = 1'b1;
    @(negedge clk); f_rst = 1'b0; f_str = 1'b1;
    for (int v = 1; v <= 5; v++) begin
      @(negedge clk); f_str = 1'b0; f_out = 32'(v);
      @(posedge clk); #1;
      checks++;
      if (f_err !== 1'b0) fail("32-bit checker flagged a legal count");
    end
    @(negedge clk); f_out = 32'hDEAD_0000;
    @(posedge clk); #1;
    checks++;
    if (f_err !== 1'b1) fail("32-bit checker missed a skipped count");
    $display("wraps: 8-bit %0d, 16-bit %0d", wraps8, wraps16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
