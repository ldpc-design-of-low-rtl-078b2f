// tb_ldpc_encoder: end-to-end test of the two-stage LDPC encoder at its
// default parameters (IN_W = 20, N_DCS = 12, M_PAR = 1).
//
// Codewords of all three sizes are encoded in three phases: one at a time
// (latency check), back to back with equal sizes in a row (throughput check:
// one codeword every Z clocks), and with random sizes and random gaps in the
// input stream.  Every output codeword is compared with a bit-level reference
// encoder that solves the parity rows one after another (not the
// forward/backward substitution of the design), and the full parity check
// H * c^T = 0 is evaluated on the output.  The test also counts how often the
// mechanisms of the design occur: input stalls, size switches between
// codewords, stage overlap (stage 1 receiving while stage 2 computes), DCS
// coarse rotations, and each sub-block size; one that never occurs fails.
module tb_ldpc_encoder;
  import ldpc_pkg::*;

  localparam int IN_W = 20;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  zsel_e            zsel_in = Z81;
  logic             in_valid = 1'b0;
  logic [IN_W-1:0]  in_data = '0;
  logic             in_ready;
  logic             cw_valid;
  zsel_e            cw_zsel;
  logic [Z_MAX-1:0] cw [N_BLK];
  logic [15:0]      n_started, n_done;

  ldpc_encoder dut (.*);

  always #5 clk = ~clk;

  typedef logic [Z_MAX-1:0] blk_t;
  typedef struct {
    zsel_e zs;
    blk_t  info [K_BLK];
    int    phase;
  } job_t;

  job_t jobs [$];
  job_t expq [$];
  int   checks = 0, failures = 0;
  int   cycle = 0;
  int   n_out = 0;
  int   stalls = 0, switches = 0, overlaps = 0, coarse = 0, thr_checks = 0;
  int   size_seen [N_Z];
  int   last_word_cycle = -1;
  int   prev_out_cycle = -1;
  zsel_e prev_out_zs = Z81;
  int   prev_out_phase = -1;

  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model ----------------
  function automatic blk_t rot(blk_t x, int s, int z);
    blk_t y = '0;
    for (int k = 0; k < z; k++) y[k] = x[(k + s) % z];
    return y;
  endfunction

  function automatic void ref_encode(zsel_e zs, blk_t info [K_BLK], output blk_t par [M_BLK]);
    int   z = z_of(zs);
    blk_t s [M_BLK];
    for (int i = 0; i < M_BLK; i++) begin
      s[i] = '0;
      for (int j = 0; j < K_BLK; j++)
        if (H1_SHIFT[int'(zs)][i][j] >= 0) s[i] ^= rot(info[j], H1_SHIFT[int'(zs)][i][j], z);
    end
    par[0] = '0;
    for (int i = 0; i < M_BLK; i++) par[0] ^= s[i];
    // row 0: P^1 p0 + p1 + s0 = 0; row i: h(i) p0 + p_i + p_(i+1) + s_i = 0
    par[1] = rot(par[0], 1, z) ^ s[0];
    for (int i = 1; i < M_BLK - 1; i++)
      par[i+1] = par[i] ^ s[i] ^ ((i == M_BLK / 2) ? par[0] : '0);
  endfunction

  // full parity check H * c^T, returns number of non-zero syndrome blocks
  function automatic int syndrome_fail(zsel_e zs, blk_t c [N_BLK]);
    int   z = z_of(zs);
    int   bad = 0;
    blk_t acc;
    for (int i = 0; i < M_BLK; i++) begin
      acc = '0;
      for (int j = 0; j < K_BLK; j++)
        if (H1_SHIFT[int'(zs)][i][j] >= 0) acc ^= rot(c[j], H1_SHIFT[int'(zs)][i][j], z);
      if (i == 0 || i == M_BLK - 1) acc ^= rot(c[K_BLK], 1, z);
      if (i == M_BLK / 2)           acc ^= c[K_BLK];
      if (i >= 1)                   acc ^= c[K_BLK + i];
      if (i + 1 <= M_BLK - 1)       acc ^= c[K_BLK + i + 1];
      if (acc != '0) bad++;
    end
    return bad;
  endfunction

  function automatic job_t new_job(zsel_e zs, int phase);
    job_t jb;
    int   z = z_of(zs);
    jb.zs = zs;
    jb.phase = phase;
    for (int j = 0; j < K_BLK; j++) begin
      jb.info[j] = '0;
      for (int k = 0; k < z; k++) jb.info[j][k] = 1'($urandom);
    end
    return jb;
  endfunction

  // ---------------- driver ----------------
  task automatic send(job_t jb, int gap_pct);
    int z = z_of(jb.zs);
    int nw = (z + IN_W - 1) / IN_W;
    if (jobs.size() > 0 && jobs[$].zs != jb.zs) switches++;
    jobs.push_back(jb);
    expq.push_back(jb);
    for (int j = 0; j < K_BLK; j++)
      for (int w = 0; w < nw; w++) begin
        logic done = 1'b0;
        while (!done) begin
          @(negedge clk);
          if (gap_pct > 0 && ($urandom % 100) < gap_pct) begin
            in_valid = 1'b0;
            in_data  = IN_W'($urandom);
            zsel_in  = zsel_e'($urandom % 3);
          end else begin
            in_valid = 1'b1;
            zsel_in  = jb.zs;
            for (int b = 0; b < IN_W; b++)
              in_data[b] = (w * IN_W + b < z) ? jb.info[j][w * IN_W + b] : 1'($urandom);
            #1;
            if (in_ready) begin
              done = 1'b1;
              if (j == K_BLK - 1 && w == nw - 1) last_word_cycle = cycle;
            end else stalls++;
          end
        end
      end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // ---------------- monitor ----------------
  always @(negedge clk) if (rst_n) begin
    if (in_valid && in_ready && dut.u_mpsu.busy) overlaps++;
    if (dut.u_cmmu.busy)
      for (int i = 0; i < M_BLK; i++)
        if (dut.u_cmmu.ent[i].nz && int'(dut.u_cmmu.ent[i].shift) >= 27) coarse++;
    if (cw_valid) begin
      job_t jb;
      blk_t par [M_BLK];
      blk_t c   [N_BLK];
      int   z;
      if (expq.size() == 0) begin
        failures++; checks++;
        $display("unexpected codeword at cycle %0d", cycle);
      end else begin
        jb = expq.pop_front();
        z  = z_of(jb.zs);
        size_seen[int'(jb.zs)]++;
        ref_encode(jb.zs, jb.info, par);
        checks++;
        if (cw_zsel != jb.zs) begin failures++; $display("cw %0d: size mismatch", n_out); end
        for (int j = 0; j < K_BLK; j++) begin
          checks++;
          if (cw[j] != jb.info[j]) begin failures++; $display("cw %0d: info block %0d mismatch", n_out, j); end
          c[j] = cw[j];
        end
        for (int i = 0; i < M_BLK; i++) begin
          checks++;
          if (cw[K_BLK + i] != par[i]) begin
            failures++;
            $display("cw %0d (Z=%0d): parity block %0d mismatch", n_out, z, i);
          end
          c[K_BLK + i] = cw[K_BLK + i];
        end
        checks++;
        if (syndrome_fail(jb.zs, c) != 0) begin failures++; $display("cw %0d: H*c != 0", n_out); end
        // latency, measured in phase 1 where the encoder starts idle
        if (jb.phase == 1) begin
          checks++;
          if (cycle - last_word_cycle != z + 3) begin
            failures++;
            $display("cw %0d: latency %0d, expected %0d", n_out, cycle - last_word_cycle, z + 3);
          end
        end
        // throughput: equal sizes back to back, one codeword per Z clocks
        if (jb.phase == 2 && prev_out_phase == 2 && prev_out_zs == jb.zs) begin
          checks++; thr_checks++;
          if (cycle - prev_out_cycle != z) begin
            failures++;
            $display("cw %0d: interval %0d, expected %0d", n_out, cycle - prev_out_cycle, z);
          end
        end
        prev_out_cycle = cycle;
        prev_out_zs    = jb.zs;
        prev_out_phase = jb.phase;
      end
      n_out++;
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: one codeword at a time
    for (int s = 0; s < N_Z; s++) begin
      send(new_job(zsel_e'(s), 1), 0);
      wait (expq.size() == 0);
      repeat (4) @(negedge clk);
    end
    // phase 2: back to back, three of each size
    for (int s = N_Z - 1; s >= 0; s--)
      for (int r = 0; r < 3; r++) send(new_job(zsel_e'(s), 2), 0);
    // phase 3: random sizes, random input gaps
    for (int r = 0; r < 6; r++) send(new_job(zsel_e'($urandom % 3), 3), 25);
    wait (expq.size() == 0);
    repeat (10) @(negedge clk);

    checks++;
    if (n_done != 16'(jobs.size()) || n_started != 16'(jobs.size())) begin
      failures++; $display("codeword counters %0d/%0d, expected %0d", n_started, n_done, jobs.size());
    end
    $display("mechanisms: stalls=%0d size_switches=%0d stage_overlap=%0d coarse_rotations=%0d throughput_checks=%0d Z27=%0d Z54=%0d Z81=%0d",
             stalls, switches, overlaps, coarse, thr_checks, size_seen[0], size_seen[1], size_seen[2]);
    checks++; if (stalls == 0)     begin failures++; $display("no input stall occurred"); end
    checks++; if (switches == 0)   begin failures++; $display("no size switch occurred"); end
    checks++; if (overlaps == 0)   begin failures++; $display("no stage overlap occurred"); end
    checks++; if (coarse == 0)     begin failures++; $display("no coarse rotation occurred"); end
    checks++; if (thr_checks == 0) begin failures++; $display("no throughput check made"); end
    for (int s = 0; s < N_Z; s++) begin
      checks++; if (size_seen[s] == 0) begin failures++; $display("size %0d never encoded", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
