// tb_ppim_cluster_ctrl: self-checking test of the cluster step sequencer.
//
// Runs the built-in exact program (address 0) and scaled program (address 8)
// and checks the step counts (8 and 4 cycles from start to done), that busy is
// high exactly for those steps, and the first and last micro-ops: the exact
// program starts with four multiplications in cores 0-3 and ends by capturing
// result nibble 3; the scaled one starts with one multiplication in core 0;
// the ReLU program at address 12 takes 2 steps.
// Then writes a two-step program at address 12 and checks it is replayed word
// for word, and that a start while busy is ignored.
module tb_ppim_cluster_ctrl;
  import ppim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  pc_t  start_pc = '0;
  logic ucode_we = 1'b0;
  pc_t  ucode_addr = '0;
  uop_t ucode_data = '0;
  uop_t uop;
  logic busy, done;

  int checks = 0, failures = 0;

  ppim_cluster_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Starts a program and returns the micro-ops seen until done.
  task automatic run(pc_t pc0, output uop_t seen [$], output int cyc);
    seen = {};
    start <= 1'b1; start_pc <= pc0;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    #1;
    while (busy && cyc < 40) begin
      seen.push_back(uop);
      @(posedge clk);
      #1;
      cyc++;
      // a second start during the program must be ignored
      if (cyc == 1) start <= 1'b1; else start <= 1'b0;
    end
    start <= 1'b0;
    expect_true(done, "done pulse after last step");
    @(posedge clk);
    #1 expect_true(!done, "done is one cycle");
  endtask

  initial begin
    uop_t seen [$];
    int   cyc;
    uop_t w0, w1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 expect_true(uop == '0, "idle micro-op is zero");

    run(4'd0, seen, cyc);
    expect_true(cyc == 8, $sformatf("exact program 8 steps (got %0d)", cyc));
    for (int k = 0; k < 4; k++)
      expect_true(seen[0].core[k].ld && seen[0].core[k].fsel == 2'd0,
                  $sformatf("exact step 1 multiplies in core %0d", k));
    expect_true(!seen[0].core[4].ld, "exact step 1 leaves core 4 idle");
    expect_true(seen[7].last && seen[7].cap[3], "exact step 8 captures nibble 3");
    @(posedge clk);

    run(4'd8, seen, cyc);
    expect_true(cyc == 4, $sformatf("scaled program 4 steps (got %0d)", cyc));
    expect_true(seen[0].core[0].ld && seen[0].core[0].fsel == 2'd0 && !seen[0].core[1].ld,
                "scaled step 1 one multiplication");
    expect_true(seen[3].last && seen[3].cap == 4'b1011, "scaled step 4 captures nibbles 0, 1, 3");

    run(4'd12, seen, cyc);
    expect_true(cyc == 2, $sformatf("ReLU program 2 steps (got %0d)", cyc));
    expect_true(seen[0].core[4].ld && seen[0].core[4].fsel == 2'd2 && !seen[0].core[0].ld,
                "ReLU step 1 applies word 2 in core 4");
    expect_true(seen[1].last && seen[1].cap == 4'b1111, "ReLU step 2 captures all");

    // custom two-step program
    w0 = uop_t'({$urandom, $urandom, $urandom, $urandom});
    w1 = uop_t'({$urandom, $urandom, $urandom, $urandom});
    w0.last = 1'b0;
    w1.last = 1'b1;
    @(posedge clk);
    ucode_we <= 1'b1; ucode_addr <= 4'd12; ucode_data <= w0;
    @(posedge clk);
    ucode_addr <= 4'd13; ucode_data <= w1;
    @(posedge clk);
    ucode_we <= 1'b0;
    @(posedge clk);
    run(4'd12, seen, cyc);
    expect_true(cyc == 2, "custom program 2 steps");
    expect_true(seen.size() == 2 && seen[0] == w0 && seen[1] == w1, "custom words replayed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
