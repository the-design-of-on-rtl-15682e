// Behavioural LocalLink frame source for the testbenches (stands in for the
// functional unit that sends on the checked link).
//
// send_frame() drives one frame: an SOF beat, nh header data beats, the SOP
// beat (byte 0 = 0xAB), np payload beats, the EOP beat (byte 0 below 124),
// nf footer beats and the EOF beat. Before each beat it may insert stall
// cycles, either source-not-ready (random delimiter levels) or
// destination-not-ready (the beat's own signals held). 'fault' bends one
// rule of the protocol in a known place. Signals change on the falling edge.
module ll_frame_source
  import ll_tb_pkg::*;
#(
  parameter int unsigned DATA_WIDTH = 32
) (
  input  logic                  clk,
  output logic                  sof_n,
  output logic                  sop_n,
  output logic                  eop_n,
  output logic                  eof_n,
  output logic                  src_rdy_n,
  output logic                  dst_rdy_n,
  output logic [DATA_WIDTH-1:0] data
);


  int unsigned stall_pct = 30;
  int unsigned stalls    = 0;   // stall cycles inserted so far
  int unsigned beats     = 0;   // transfer beats driven so far

  initial begin
    sof_n = 1'b1; sop_n = 1'b1; eop_n = 1'b1; eof_n = 1'b1;
    src_rdy_n = 1'b1; dst_rdy_n = 1'b1; data = '0;
  end

  function automatic logic [DATA_WIDTH-1:0] rnd_data();
    logic [DATA_WIDTH-1:0] d = '0;
    for (int i = 0; i < DATA_WIDTH; i += 32) d = (d << 32) | DATA_WIDTH'($urandom);
    return d;
  endfunction

  task automatic idle(input int unsigned n);
    repeat (n) begin
      @(negedge clk);
      src_rdy_n = 1'b1; dst_rdy_n = $urandom_range(1);
      sof_n = 1'b1; sop_n = 1'b1; eop_n = 1'b1; eof_n = 1'b1;
      data = rnd_data();
    end
  endtask

  // One transfer beat with control nibble {sof,sop,eop,eof} (active low).
  task automatic beat(input logic [3:0] flags_n, input logic [DATA_WIDTH-1:0] d);
    while ($urandom_range(99) < stall_pct) begin
      @(negedge clk);
      stalls++;
      if ($urandom_range(1) == 1) begin
        src_rdy_n = 1'b1; dst_rdy_n = $urandom_range(1);
        {sof_n, sop_n, eop_n, eof_n} = 4'($urandom);
        data = rnd_data();
      end else begin
        src_rdy_n = 1'b0; dst_rdy_n = 1'b1;
        {sof_n, sop_n, eop_n, eof_n} = flags_n;
        data = d;
      end
    end
    @(negedge clk);
    beats++;
    src_rdy_n = 1'b0; dst_rdy_n = 1'b0;
    {sof_n, sop_n, eop_n, eof_n} = flags_n;
    data = d;
  endtask

  task automatic send_frame(input int unsigned nh, input int unsigned np,
                            input int unsigned nf, input fault_e fault);
    logic [DATA_WIDTH-1:0] d;
    if (fault == F_DATA_IN_IDLE) beat(4'b1111, rnd_data());
    beat(4'b0111, rnd_data());                       // SOF
    repeat (nh) beat(4'b1111, rnd_data());
    if (fault != F_SKIP_SOP) begin                   // SOP
      d = rnd_data();
      d[7:0] = (fault == F_BAD_SFD) ? 8'hAA : 8'hAB;
      beat((fault == F_DOUBLE_DELIM) ? 4'b1001 : 4'b1011, d);
    end
    repeat (np) beat(4'b1111, rnd_data());
    if (fault != F_SKIP_EOP) begin                   // EOP
      d = rnd_data();
      d[7:0] = (fault == F_BAD_LIMIT) ? 8'($urandom_range(255, 124))
                                      : 8'($urandom_range(123, 0));
      beat(4'b1101, d);
    end
    repeat (nf) beat(4'b1111, rnd_data());
    beat((fault == F_SOF_IN_FOOTER) ? 4'b0111 : 4'b1110, rnd_data());  // EOF
  endtask

endmodule
