// tb_h1_rom: reads every block column of every size and checks the flags and
// shifts against the matrix definition, the number of non-zero blocks in the
// information part of each table (63, 61 and 61 for Z = 27, 54, 81), and a
// few individual entries typed in directly.
module tb_h1_rom;
  import ldpc_pkg::*;

  zsel_e                    zsel;
  logic [$clog2(K_BLK)-1:0] col;
  h_entry_t                 ent [M_BLK];
  int checks = 0, failures = 0;

  h1_rom dut (.zsel, .col, .ent);

  task automatic spot(zsel_e zs, int i, int j, int v);
    zsel = zs; col = 4'(j); #1;
    checks++;
    if (!ent[i].nz || int'(ent[i].shift) != v) begin
      failures++; $display("spot Z%0d (%0d,%0d): %0d/%0d expected %0d", zs, i, j, ent[i].nz, ent[i].shift, v);
    end
  endtask

  initial begin
    for (int s = 0; s < N_Z; s++) begin
      int nnz;
      nnz = 0;
      zsel = zsel_e'(s);
      for (int j = 0; j < K_BLK; j++) begin
        col = 4'(j);
        #1;
        for (int i = 0; i < M_BLK; i++) begin
          checks++;
          if (ent[i].nz != (H1_SHIFT[s][i][j] >= 0) ||
              (ent[i].nz && int'(ent[i].shift) != H1_SHIFT[s][i][j])) begin
            failures++; $display("Z%0d (%0d,%0d) wrong", s, i, j);
          end
          if (ent[i].nz) nnz++;
        end
      end
      checks++;
      if (nnz != ((s == 0) ? 63 : 61)) begin
        failures++; $display("size %0d: %0d non-zero blocks", s, nnz);
      end
    end
    spot(Z27, 1, 0, 22);
    spot(Z27, 10, 7, 14);
    spot(Z54, 0, 6, 49);
    spot(Z54, 11, 11, 19);
    spot(Z81, 6, 2, 79);
    spot(Z81, 9, 3, 70);
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
