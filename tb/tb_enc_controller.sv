// tb_enc_controller: drives the stage finish signals through the cases that
// matter: first stage finishes while the second is idle (start at once),
// first stage finishes while the second runs (wait), second stage's finishing
// clock with the first stage done (start in the same clock), and the second
// stage finishing with nothing waiting (go idle).  Checks the start pulses
// and the codeword counters.
module tb_enc_controller;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cmmu_finish = 1'b0, mpsu_finish = 1'b0;
  logic        cmmu_start, buf_load, mpsu_start;
  logic [15:0] n_started, n_done;
  int checks = 0, failures = 0;

  enc_controller dut (.*);

  always #5 clk = ~clk;

  task automatic expect_go(logic e, string what);
    #1;
    checks++;
    if (cmmu_start != e || buf_load != e || mpsu_start != e) begin
      failures++; $display("%s: start=%0b expected %0b", what, cmmu_start, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); expect_go(1'b0, "idle, nothing finished");
    cmmu_finish = 1'b1;                 expect_go(1'b1, "stage 2 idle");
    @(negedge clk); cmmu_finish = 1'b0; expect_go(1'b0, "after start");
    repeat (3) @(negedge clk);
    cmmu_finish = 1'b1;                 expect_go(1'b0, "stage 2 running");
    @(negedge clk);                     expect_go(1'b0, "stage 2 still running");
    mpsu_finish = 1'b1;                 expect_go(1'b1, "finishing clock");
    @(negedge clk); cmmu_finish = 1'b0; mpsu_finish = 1'b0; expect_go(1'b0, "after second start");
    repeat (2) @(negedge clk);
    mpsu_finish = 1'b1;                 expect_go(1'b0, "finish, nothing waiting");
    @(negedge clk); mpsu_finish = 1'b0;
    cmmu_finish = 1'b1;                 expect_go(1'b1, "stage 2 idle again");
    @(negedge clk); cmmu_finish = 1'b0;
    checks++;
    if (n_started != 16'd3 || n_done != 16'd2) begin
      failures++; $display("counters %0d/%0d", n_started, n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
