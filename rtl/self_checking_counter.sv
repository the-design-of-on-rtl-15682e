// Self-checking counter: the counter CNT with its on-line checker CHCK.
//
// The checker shares the counter's CLK, RST and STR and watches its output
// OUT, so ERR rises one clock after the counter shows a value, or receives an
// input combination, that its formal description does not allow. Both halves
// follow the document's counter example; WIDTH defaults to its 4 bits.
module self_checking_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             str,
  output logic [WIDTH-1:0] out,
  output logic             err
);

  cnt_counter #(.WIDTH(WIDTH)) u_cnt (
    .clk (clk),
    .rst (rst),
    .str (str),
    .out (out)
  );

  cnt_fsm_checker #(.WIDTH(WIDTH)) u_chck (
    .clk (clk),
    .rst (rst),
    .str (str),
    .out (out),
    .err (err)
  );

endmodule
