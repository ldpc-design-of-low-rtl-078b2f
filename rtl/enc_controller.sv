// enc_controller: start/finish sequencing of the two pipeline stages.
//
// The first stage (CMMU) raises cmmu_finish when H1*I^T of a codeword is
// complete and keeps it high until restarted.  The controller tracks whether
// the second stage (MPSU) is idle or running.  When the first stage has
// finished and the second is idle, or is in its finishing clock, it issues
// one start pulse that at once hands the result over (buf_load), restarts the
// first stage (cmmu_start) and starts the second (mpsu_start).  Handing over
// in the MPSU's finishing clock lets consecutive codewords follow each other
// with no idle clock in the second stage.  The start/finish protocol follows
// the document; the single shared start pulse is this design's choice.
// It also counts handed-over and completed codewords.
module enc_controller (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmmu_finish,
  input  logic        mpsu_finish,
  output logic        cmmu_start,
  output logic        buf_load,
  output logic        mpsu_start,
  output logic [15:0] n_started,
  output logic [15:0] n_done
);

  typedef enum logic {S2_IDLE, S2_RUN} s2_e;
  s2_e  s2;
  logic go;

  assign go         = cmmu_finish && (s2 == S2_IDLE || mpsu_finish);
  assign cmmu_start = go;
  assign buf_load   = go;
  assign mpsu_start = go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2        <= S2_IDLE;
      n_started <= '0;
      n_done    <= '0;
    end else begin
      if (go)               s2 <= S2_RUN;
      else if (mpsu_finish) s2 <= S2_IDLE;
      if (go)          n_started <= n_started + 16'd1;
      if (mpsu_finish) n_done    <= n_done + 16'd1;
    end
  end

  a_finish_while_run: assert property (@(posedge clk) disable iff (!rst_n) mpsu_finish |-> s2 == S2_RUN);

endmodule
