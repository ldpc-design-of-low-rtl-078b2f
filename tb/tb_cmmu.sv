// tb_cmmu: column-wise multiplier with N_DCS = 4, so one block column takes
// three clocks and the unit must hold off the last word of a sub-block while
// it is still busy.  Codewords of all sizes are streamed with random gaps;
// after each, q must equal H1 * I^T from the reference model, the information
// sub-blocks must be stored, finish must rise G + 1 clocks after the last
// word is taken (G = clocks per column), in_ready must stay low until
// start, and the accumulators must be cleared by start.
module tb_cmmu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int IN_W  = 20;
  localparam int N_DCS = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  zsel_e            zsel_in = Z27;
  logic             in_valid = 1'b0;
  logic [IN_W-1:0]  in_data = '0;
  logic             in_ready;
  logic             start = 1'b0;
  logic             finish;
  logic [Z_MAX-1:0] q    [M_BLK];
  logic [Z_MAX-1:0] info [K_BLK];
  zsel_e            zsel_q;
  int checks = 0, failures = 0, stalls = 0, cycle = 0;

  cmmu #(.IN_W(IN_W), .N_DCS(N_DCS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic run(zsel_e zs, int gap_pct);
    blk_t inf [K_BLK];
    blk_t qe  [M_BLK];
    int   z = z_of(zs);
    int   nw = (z + IN_W - 1) / IN_W;
    int   last_cycle = 0;
    for (int j = 0; j < K_BLK; j++) inf[j] = rand_blk(z);
    for (int j = 0; j < K_BLK; j++)
      for (int w = 0; w < nw; w++) begin
        logic done = 1'b0;
        while (!done) begin
          @(negedge clk);
          in_valid = !(gap_pct > 0 && ($urandom % 100) < gap_pct);
          zsel_in  = zs;
          for (int b = 0; b < IN_W; b++)
            in_data[b] = (w * IN_W + b < z) ? inf[j][w * IN_W + b] : 1'($urandom);
          #1;
          if (in_valid && in_ready) begin done = 1'b1; last_cycle = cycle; end
          else if (in_valid) stalls++;
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
    while (!finish) @(negedge clk);
    // finish rises one clock after the G = 3 clocks of the last column
    checks++;
    if (cycle - last_cycle != (M_BLK + N_DCS - 1) / N_DCS + 1) begin
      failures++; $display("Z=%0d: finish %0d clocks after last word", z, cycle - last_cycle);
    end
    ref_q(zs, inf, qe);
    checks++; if (zsel_q != zs) begin failures++; $display("zsel_q wrong"); end
    for (int i = 0; i < M_BLK; i++) begin
      checks++;
      if (q[i] != qe[i]) begin failures++; $display("Z=%0d q[%0d] mismatch", z, i); end
    end
    for (int j = 0; j < K_BLK; j++) begin
      checks++;
      if (info[j] != inf[j]) begin failures++; $display("Z=%0d info[%0d] mismatch", z, j); end
    end
    // hold: no input accepted while finished
    repeat (3) begin
      @(negedge clk); in_valid = 1'b1; #1;
      checks++; if (in_ready || !finish) begin failures++; $display("not holding"); end
    end
    in_valid = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (finish || q[0] != '0 || q[M_BLK-1] != '0) begin failures++; $display("start did not clear"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(Z27, 0);
    run(Z81, 0);
    run(Z54, 30);
    run(Z27, 30);
    run(Z81, 30);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall happened"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
