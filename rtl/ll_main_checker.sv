// MAIN CHECKER of the segmented LocalLink checker.
//
// Collects the ERROR outputs of the phase checkers CHCK_PH1..CHCK_PHn and
// gives the system error together with the identity of the module that found
// it: err_id is the number (1..N) of the lowest-numbered phase checker whose
// ERROR is set, 0 while none is. Since only the module holding the token can
// set its ERROR, at most one is set in normal operation. Both outputs are
// registered, one clock after the phase checker's ERROR. RST is synchronous
// and active high.
//
// The merge of the errors and the identification of the module are the
// document's; the number coding and the priority are this design's choice.
module ll_main_checker #(
  parameter int unsigned N_PHASES = 4,
  localparam int unsigned ID_W    = $clog2(N_PHASES + 1)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N_PHASES-1:0] phase_error,  // bit i: ERROR of CHCK_PH(i+1)
  output logic                error,
  output logic [ID_W-1:0]     err_id
);

  logic [ID_W-1:0] id_d;

  always_comb begin
    id_d = '0;
    for (int i = N_PHASES - 1; i >= 0; i--) begin
      if (phase_error[i]) id_d = ID_W'(i + 1);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      error  <= 1'b0;
      err_id <= '0;
    end else begin
      error  <= |phase_error;
      err_id <= id_d;
    end
  end

endmodule
