// Testbench-side definitions for LocalLink stimulus: the kinds of protocol
// fault the frame source can inject, and which checker must flag each.
package ll_tb_pkg;

  typedef enum int {
    F_NONE,          // legal frame
    F_BAD_SFD,       // SOP beat byte 0 is not 0xAB         (data rule)
    F_BAD_LIMIT,     // EOP beat byte 0 is 124 or more      (data rule)
    F_DOUBLE_DELIM,  // SOP and EOP low on the SOP beat     (combination, header)
    F_SKIP_SOP,      // no SOP beat: header runs into EOP   (sequence, header)
    F_SKIP_EOP,      // no EOP beat: payload runs into EOF  (sequence, payload)
    F_SOF_IN_FOOTER, // SOF instead of EOF                  (sequence, footer)
    F_DATA_IN_IDLE   // a data beat before the frame        (sequence, idle)
  } fault_e;

  localparam int unsigned NUM_FAULTS = 8;

  // Expected error of the FSM checker at levels {3, 2, 1}.
  function automatic logic [2:0] fsm_expected(input fault_e f);
    case (f)
      F_NONE:              return 3'b000;
      F_BAD_SFD,
      F_BAD_LIMIT:         return 3'b100;
      F_DOUBLE_DELIM:      return 3'b111;
      default:             return 3'b110;
    endcase
  endfunction

  // Expected err_id of the segmented checker (number of the phase module).
  function automatic logic [2:0] seg_expected(input fault_e f);
    case (f)
      F_DOUBLE_DELIM,
      F_SKIP_SOP:          return 3'd1;
      F_SKIP_EOP:          return 3'd2;
      F_SOF_IN_FOOTER:     return 3'd3;
      F_DATA_IN_IDLE:      return 3'd4;
      default:             return 3'd0;
    endcase
  endfunction

endpackage
