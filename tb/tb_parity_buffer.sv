// tb_parity_buffer: writes random parity bits two positions per clock for a
// 54-bit and then a 27-bit codeword, commits with the last write, and checks
// the one-clock cw_valid pulse, the parity contents (bits at and above Z must
// read zero, even after a longer codeword), and the copied information
// sub-blocks and size, which must hold until the next commit.
module tb_parity_buffer;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int M_PAR = 2;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             wr_en = 1'b0, commit = 1'b0;
  logic [6:0]       wr_idx = '0;
  logic [M_PAR-1:0] wr_bits [M_BLK];
  zsel_e            wr_zsel = Z54;
  logic [Z_MAX-1:0] info_in [K_BLK];
  logic             cw_valid;
  zsel_e            cw_zsel;
  logic [Z_MAX-1:0] cw_info [K_BLK];
  logic [Z_MAX-1:0] cw_par  [M_BLK];
  int checks = 0, failures = 0, pulses = 0;

  parity_buffer #(.M_PAR(M_PAR)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (cw_valid) pulses++;

  task automatic fill(zsel_e zs);
    blk_t par [M_BLK];
    blk_t inf [K_BLK];
    int   z = z_of(zs);
    for (int i = 0; i < M_BLK; i++) par[i] = rand_blk(z);
    for (int j = 0; j < K_BLK; j++) begin inf[j] = rand_blk(z); info_in[j] = inf[j]; end
    wr_zsel = zs;
    for (int k = 0; k < z; k += M_PAR) begin
      @(negedge clk);
      wr_en  = 1'b1;
      wr_idx = 7'(k);
      commit = (k + M_PAR >= z);
      for (int i = 0; i < M_BLK; i++)
        for (int l = 0; l < M_PAR; l++) wr_bits[i][l] = (k + l < Z_MAX) ? par[i][(k + l) % Z_MAX] : 1'b1;
      checks++;
      if (cw_valid) begin failures++; $display("cw_valid during writes"); end
    end
    @(negedge clk);
    wr_en = 1'b0; commit = 1'b0;
    // scramble the inputs: the buffer must have taken its copy already
    for (int j = 0; j < K_BLK; j++) info_in[j] = ~info_in[j];
    wr_zsel = Z81;
    checks++;
    if (!cw_valid) begin failures++; $display("no cw_valid after commit"); end
    checks++; if (cw_zsel != zs) begin failures++; $display("cw_zsel wrong"); end
    for (int i = 0; i < M_BLK; i++) begin
      checks++;
      if (cw_par[i] != par[i]) begin failures++; $display("Z=%0d par[%0d] wrong", z, i); end
    end
    @(negedge clk);
    checks++; if (cw_valid) begin failures++; $display("cw_valid longer than one clock"); end
    for (int j = 0; j < K_BLK; j++) begin
      checks++;
      if (cw_info[j] != inf[j]) begin failures++; $display("Z=%0d info[%0d] wrong", z, j); end
    end
  endtask

  initial begin
    for (int i = 0; i < M_BLK; i++) wr_bits[i] = '0;
    for (int j = 0; j < K_BLK; j++) info_in[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fill(Z81);
    fill(Z54);
    fill(Z27);
    checks++; if (pulses != 3) begin failures++; $display("%0d pulses", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
