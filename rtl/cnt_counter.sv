// CNT: the counter that the on-line checker watches.
//
// A WIDTH-bit up counter (4 bits, outputs 0..15, by default). RST is
// asynchronous and active high: it clears the output to zero and stops the
// counter. STR is synchronous and active high: a start pulse releases
// counting, and the output shows 1 in the cycle after the pulse (the
// property "STR |=> OUT = 0001"). While released, the counter steps by one per
// rising CLK edge and wraps from 2^WIDTH-1 to 0. RST and STR must not be high
// together; the checker flags it.
//
// The ports and the behaviour of RST and STR follow the document. That STR
// (re)loads the count to 1 from any value, and that the counter keeps running
// until the next RST, are this design's reading of "the counter starts counting
// after STR is activated".
module cnt_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,   // asynchronous, active high
  input  logic             str,   // synchronous start, active high
  output logic [WIDTH-1:0] out
);

  logic run;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out <= '0;
      run <= 1'b0;
    end else if (str) begin
      out <= WIDTH'(1);
      run <= 1'b1;
    end else if (run) begin
      out <= out + WIDTH'(1);
    end
  end

endmodule
