// tb_dcs: exhaustive test of the decomposed cyclic shifter.  For each of the
// three sub-block sizes and every shift 0..Z-1 it applies random vectors and
// compares y with a bit-loop rotation; bits at and above Z must be zero.
module tb_dcs;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic [Z_MAX-1:0] x, y;
  zsel_e            zsel;
  logic [SHW-1:0]   shift;
  int checks = 0, failures = 0;

  dcs dut (.x, .zsel, .shift, .y);

  initial begin
    for (int s = 0; s < N_Z; s++) begin
      int z;
      zsel = zsel_e'(s);
      z = z_of(zsel);
      for (int sh = 0; sh < z; sh++)
        for (int r = 0; r < 4; r++) begin
          blk_t exp;
          x = rand_blk(z);
          // garbage above Z must not leak into the result
          for (int k = z; k < Z_MAX; k++) x[k] = 1'($urandom);
          shift = SHW'(sh);
          #1;
          exp = rot(x, sh, z);
          checks++;
          if (y != exp) begin
            failures++;
            if (failures < 10) $display("Z=%0d shift=%0d: got %h expected %h", z, sh, y, exp);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
