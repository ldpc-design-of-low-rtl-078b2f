// tb_mpsu: parity substitution unit with one lane (the default) and with four
// lanes, side by side on the same q.  The writes of each are collected into
// parity sub-blocks and compared with the reference solution of H2 * P = q
// (row-by-row substitution).  The number of busy clocks must be
// ceil(Z / M_PAR), finish must coincide with the last write, and a new start
// in the finishing clock must begin the next codeword at once.
module tb_mpsu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             start = 1'b0;
  zsel_e            zsel = Z27;
  logic [Z_MAX-1:0] q [M_BLK];
  logic             busy1, fin1, wen1, busy4, fin4, wen4;
  logic [6:0]       idx1, idx4;
  logic [0:0]       bits1 [M_BLK];
  logic [3:0]       bits4 [M_BLK];
  blk_t             got1 [M_BLK];
  blk_t             got4 [M_BLK];
  int               cyc1 = 0, cyc4 = 0;
  int checks = 0, failures = 0;

  mpsu #(.M_PAR(1)) dut1 (.clk, .rst_n, .start, .zsel, .q, .busy(busy1), .finish(fin1),
                          .wr_en(wen1), .wr_idx(idx1), .wr_bits(bits1));
  mpsu #(.M_PAR(4)) dut4 (.clk, .rst_n, .start, .zsel, .q, .busy(busy4), .finish(fin4),
                          .wr_en(wen4), .wr_idx(idx4), .wr_bits(bits4));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (wen1) begin
      cyc1++;
      for (int i = 0; i < M_BLK; i++) got1[i][int'(idx1)] <= bits1[i][0];
    end
    if (wen4) begin
      cyc4++;
      for (int i = 0; i < M_BLK; i++)
        for (int l = 0; l < 4; l++)
          if (int'(idx4) + l < Z_MAX) got4[i][int'(idx4) + l] <= bits4[i][l];
    end
  end

  task automatic check(zsel_e zs, blk_t qv [M_BLK]);
    blk_t pe [M_BLK];
    int   z = z_of(zs);
    blk_t mask = '0;
    for (int k = 0; k < z; k++) mask[k] = 1'b1;
    ref_parity(zs, qv, pe);
    for (int i = 0; i < M_BLK; i++) begin
      checks += 2;
      if ((got1[i] & mask) != pe[i]) begin failures++; $display("Z=%0d M=1 p[%0d] mismatch", z, i); end
      if ((got4[i] & mask) != pe[i]) begin failures++; $display("Z=%0d M=4 p[%0d] mismatch", z, i); end
    end
  endtask

  initial begin
    blk_t qv [M_BLK];
    for (int i = 0; i < M_BLK; i++) q[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N_Z; s++)
      for (int rep = 0; rep < 3; rep++) begin
        int z;
        zsel = zsel_e'(s);
        z = z_of(zsel);
        for (int i = 0; i < M_BLK; i++) begin qv[i] = rand_blk(z); q[i] = qv[i]; end
        cyc1 = 0; cyc4 = 0;
        @(negedge clk); start = 1'b1;
        @(negedge clk); start = 1'b0;
        while (busy1 || busy4) @(negedge clk);
        @(negedge clk);
        checks += 2;
        if (cyc1 != z)           begin failures++; $display("M=1 took %0d clocks", cyc1); end
        if (cyc4 != (z + 3) / 4) begin failures++; $display("M=4 took %0d clocks", cyc4); end
        check(zsel, qv);
      end
    // back to back: restart in the finishing clock of the one-lane unit
    zsel = Z27;
    for (int i = 0; i < M_BLK; i++) begin qv[i] = rand_blk(27); q[i] = qv[i]; end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!fin1) @(negedge clk);
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!busy1 || idx1 != 7'd0) begin failures++; $display("restart in finishing clock failed"); end
    while (busy1) @(negedge clk);
    @(negedge clk);
    checks++;
    for (int i = 0; i < M_BLK; i++) begin
      blk_t pe [M_BLK];
      ref_parity(Z27, qv, pe);
      if ((got1[i] & blk_t'({27{1'b1}})) != pe[i]) begin failures++; $display("back-to-back p[%0d]", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
