// Testbench of the phase checker CHCK_PHn.
//
// One instance per phase is driven with random control combinations and
// random token inputs. A reference model in the testbench, written from the
// list of symbols each phase accepts, predicts the token, the cntr output
// and the error; the module must match it on every clock.
module tb_ll_phase_checker;
  import online_chk_pkg::*;

  logic clk = 1'b0;
  logic rst;
  ll_ctrl_t   ctrl;
  logic [3:0] cntr_in, cntr_out, active, error;
  logic [3:0] m_active, m_error;
  int checks = 0, failures = 0;
  int n_close [4];
  int n_err   [4];

  always #5 clk = ~clk;

  for (genvar p = 0; p < 4; p++) begin : g_ph
    ll_phase_checker #(.PHASE(ll_phase_e'(p))) u_dut (
      .clk, .rst, .ctrl,
      .cntr_in (cntr_in[p]), .cntr_out (cntr_out[p]),
      .active (active[p]), .error (error[p])
    );
  end

  // Reference: control nibble {sof,sop,eop,eof} that ends each phase.
  function automatic logic [3:0] closing(input int p);
    case (p)
      0: return 4'b1011;  // SOP
      1: return 4'b1101;  // EOP
      2: return 4'b1110;  // EOF
      default: return 4'b0111;  // SOF
    endcase
  endfunction

  initial begin
    rst = 1'b1; ctrl = '1; cntr_in = '0;
    m_active = 4'b1000; m_error = '0;
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      logic xfer, is_close, is_stay;
      logic [3:0] m_cntr;
      @(negedge clk);
      if ($urandom_range(99) < 3) begin
        rst = 1'b1;
      end else begin
        rst = 1'b0;
      end
      ctrl.src_rdy_n = ($urandom_range(99) < 30);
      ctrl.dst_rdy_n = ($urandom_range(99) < 20);
      case ($urandom_range(9))
        0: {ctrl.sof_n, ctrl.sop_n, ctrl.eop_n, ctrl.eof_n} = 4'($urandom);
        1, 2, 3, 4: {ctrl.sof_n, ctrl.sop_n, ctrl.eop_n, ctrl.eof_n} = 4'b1111;
        default: {ctrl.sof_n, ctrl.sop_n, ctrl.eop_n, ctrl.eof_n} = closing($urandom_range(3));
      endcase
      cntr_in = 4'($urandom) & 4'($urandom);
      xfer = !ctrl.src_rdy_n && !ctrl.dst_rdy_n;
      // Expected cntr_out in this cycle.
      for (int p = 0; p < 4; p++) begin
        is_close = xfer && ({ctrl.sof_n, ctrl.sop_n, ctrl.eop_n, ctrl.eof_n} == closing(p));
        m_cntr[p] = m_active[p] && !m_error[p] && is_close;
      end
      #1;
      checks++;
      if (cntr_out !== m_cntr) begin
        failures++; $display("FAIL cntr_out=%b expected %b", cntr_out, m_cntr);
      end
      @(posedge clk);
      for (int p = 0; p < 4; p++) begin
        is_close = xfer && ({ctrl.sof_n, ctrl.sop_n, ctrl.eop_n, ctrl.eof_n} == closing(p));
        is_stay  = !xfer || (p != 3 && {ctrl.sof_n, ctrl.sop_n, ctrl.eop_n, ctrl.eof_n} == 4'b1111);
        if (rst) begin
          m_active[p] = (p == 3); m_error[p] = 1'b0;
        end else if (m_active[p]) begin
          if (m_error[p]) ;
          else if (is_close) begin m_active[p] = 1'b0; n_close[p]++; end
          else if (!is_stay) begin m_error[p] = 1'b1; n_err[p]++; end
        end else if (cntr_in[p]) begin
          m_active[p] = 1'b1;
        end
      end
      #1;
      checks++;
      if (active !== m_active || error !== m_error) begin
        failures++;
        $display("FAIL active=%b error=%b expected %b %b", active, error, m_active, m_error);
      end
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (n_close[p] == 0 || n_err[p] == 0) begin
        failures++; $display("FAIL phase %0d: closes=%0d errors=%0d", p + 1, n_close[p], n_err[p]);
      end
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
