// tb_ldpc_throughput: sustained-throughput run of the encoder at its default
// parameters, for each sub-block size in turn.  Ten codewords per size are
// streamed with the input never idle; the clocks between the first and the
// last cw_valid of a size give the sustained rate, which must be one codeword
// of 12*Z information bits every Z clocks, i.e. 12 information bits per
// clock (480 Mbit/s at a 40 MHz clock).  Parity is checked with a full
// parity check of every codeword.
module tb_ldpc_throughput;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int IN_W = 20;
  localparam int NCW  = 10;

  logic             clk = 1'b0, rst_n = 1'b0;
  zsel_e            zsel_in = Z27;
  logic             in_valid = 1'b0;
  logic [IN_W-1:0]  in_data = '0;
  logic             in_ready;
  logic             cw_valid;
  zsel_e            cw_zsel;
  logic [Z_MAX-1:0] cw [N_BLK];
  logic [15:0]      n_started, n_done;
  int checks = 0, failures = 0, cycle = 0;
  int first_out [N_Z];
  int last_out  [N_Z];
  int outs      [N_Z];

  ldpc_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (cw_valid) begin
    int   s;
    blk_t q [M_BLK];
    blk_t inf [K_BLK];
    blk_t par [M_BLK];
    s = int'(cw_zsel);
    if (outs[s] == 0) first_out[s] = cycle;
    last_out[s] = cycle;
    outs[s]++;
    for (int j = 0; j < K_BLK; j++) inf[j] = cw[j];
    ref_q(cw_zsel, inf, q);
    ref_parity(cw_zsel, q, par);
    for (int i = 0; i < M_BLK; i++) begin
      checks++;
      if (cw[K_BLK + i] != par[i]) begin failures++; $display("Z=%0d parity %0d wrong", z_of(cw_zsel), i); end
    end
  end

  initial begin
    for (int s = 0; s < N_Z; s++) begin outs[s] = 0; first_out[s] = 0; last_out[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N_Z; s++) begin
      int z;
      z = z_of(zsel_e'(s));
      for (int c = 0; c < NCW; c++)
        for (int j = 0; j < K_BLK; j++) begin
          blk_t b;
          b = rand_blk(z);
          for (int w = 0; w < (z + IN_W - 1) / IN_W; w++) begin
            @(negedge clk);
            in_valid = 1'b1;
            zsel_in  = zsel_e'(s);
            for (int k = 0; k < IN_W; k++) in_data[k] = (w * IN_W + k < z) ? b[w * IN_W + k] : 1'b0;
            #1;
            while (!in_ready) begin @(negedge clk); #1; end
          end
        end
    end
    @(negedge clk);
    in_valid = 1'b0;
    wait (int'(n_done) == N_Z * NCW);
    repeat (3) @(negedge clk);
    for (int s = 0; s < N_Z; s++) begin
      int  z, span;
      real bpc;
      z = z_of(zsel_e'(s));
      span = last_out[s] - first_out[s];
      bpc = real'((NCW - 1) * K_BLK * z) / real'(span);
      $display("Z=%0d: %0d codewords, %0d clocks per codeword, %0.2f info bits/clock = %0.1f Mbit/s at 40 MHz",
               z, outs[s], span / (NCW - 1), bpc, bpc * 40.0);
      checks++;
      if (outs[s] != NCW || span != (NCW - 1) * z) begin
        failures++; $display("Z=%0d: sustained interval wrong", z);
      end
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
