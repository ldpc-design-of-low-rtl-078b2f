// tb_h1i_buffer: loads random q, information and size values, then changes
// the inputs without load and checks that the outputs keep the loaded values.
module tb_h1i_buffer;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [Z_MAX-1:0] q_in    [M_BLK];
  logic [Z_MAX-1:0] info_in [K_BLK];
  zsel_e            zsel_in = Z27;
  logic [Z_MAX-1:0] q       [M_BLK];
  logic [Z_MAX-1:0] info    [K_BLK];
  zsel_e            zsel;
  blk_t             qe [M_BLK];
  blk_t             ie [K_BLK];
  int checks = 0, failures = 0;

  h1i_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic compare(zsel_e ze);
    checks++; if (zsel != ze) begin failures++; $display("zsel wrong"); end
    for (int i = 0; i < M_BLK; i++) begin checks++; if (q[i] != qe[i]) begin failures++; $display("q[%0d] wrong", i); end end
    for (int j = 0; j < K_BLK; j++) begin checks++; if (info[j] != ie[j]) begin failures++; $display("info[%0d] wrong", j); end end
  endtask

  initial begin
    for (int i = 0; i < M_BLK; i++) q_in[i] = '0;
    for (int j = 0; j < K_BLK; j++) info_in[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 5; r++) begin
      zsel_e ze;
      ze = zsel_e'(r % 3);
      for (int i = 0; i < M_BLK; i++) begin qe[i] = rand_blk(81); q_in[i] = qe[i]; end
      for (int j = 0; j < K_BLK; j++) begin ie[j] = rand_blk(81); info_in[j] = ie[j]; end
      zsel_in = ze;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      compare(ze);
      for (int i = 0; i < M_BLK; i++) q_in[i] = rand_blk(81);
      for (int j = 0; j < K_BLK; j++) info_in[j] = rand_blk(81);
      zsel_in = zsel_e'((r + 1) % 3);
      repeat (3) @(negedge clk);
      compare(ze);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
