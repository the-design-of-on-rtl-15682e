// Testbench of the counter CNT.
//
// Compares the counter with a reference model over random sequences of start
// pulses and asynchronous resets (asserted between clock edges): after reset
// the output is 0 and stays 0 until STR; one clock after STR it is 1; it then
// steps by one per clock and wraps from 15 to 0.
module tb_cnt_counter;

  localparam int unsigned W = 4;

  logic clk = 1'b0;
  logic rst, str;
  logic [W-1:0] out;
  logic [W-1:0] model;
  logic         run;
  int checks = 0, failures = 0, wraps = 0;

  always #5 clk = ~clk;

  cnt_counter #(.WIDTH(W)) u_dut (.clk, .rst, .str, .out);

  task automatic check(input string what);
    checks++;
    if (out !== model) begin
      failures++;
      $display("FAIL %s: out=%0d expected %0d", what, out, model);
    end
  endtask

  initial begin
    str = 1'b0; rst = 1'b0; model = '0; run = 1'b0;
    #1 rst = 1'b1;
    #1 check("reset");
    @(negedge clk); rst = 1'b0;
    repeat (3) begin @(posedge clk); #1; check("idle after reset"); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      str = ($urandom_range(99) < 4);
      if ($urandom_range(99) < 2) begin
        // Asynchronous reset pulse between edges.
        #1 rst = 1'b1; #1;
        model = '0; run = 1'b0;
        check("asynchronous reset");
        #1 rst = 1'b0;
        str = 1'b0;
      end
      @(posedge clk);
      if (str) begin model = W'(1); run = 1'b1; end
      else if (run) begin
        if (model == '1) wraps++;
        model = model + W'(1);
      end
      #1; check(str ? "start" : "count");
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
