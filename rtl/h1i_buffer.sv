// h1i_buffer: pipeline register between the CMMU stage and the MPSU stage.
//
// On load it takes over the finished H1*I^T result q, the information
// sub-blocks and the sub-block size of the codeword the first stage has just
// completed, and holds them while the parity substitution unit works on them.
// Meanwhile the first stage already accumulates the next codeword in its own
// registers; together they form the two copies of q that pipelined operation
// needs.  Loading is a single-clock parallel copy (this design's choice).
//
// Ports: load (one clock), q_in/info_in/zsel_in from the CMMU,
// q/info/zsel registered outputs, stable between loads.
module h1i_buffer
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [Z_MAX-1:0] q_in    [M_BLK],
  input  logic [Z_MAX-1:0] info_in [K_BLK],
  input  zsel_e            zsel_in,
  output logic [Z_MAX-1:0] q       [M_BLK],
  output logic [Z_MAX-1:0] info    [K_BLK],
  output zsel_e            zsel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < M_BLK; i++) q[i] <= '0;
      for (int j = 0; j < K_BLK; j++) info[j] <= '0;
      zsel <= Z81;
    end else if (load) begin
      q    <= q_in;
      info <= info_in;
      zsel <= zsel_in;
    end
  end

endmodule
