// tb_dram_subarray: self-checking test of the subarray model.
//
// Fills rows through the row buffer (rb_load then a one-row clone), reads them
// back with act, checks a multicast clone that writes one row buffer into three
// rows at once, the bitwise row-buffer write used for cluster results, and that
// act has priority over the other row-buffer writes. The expected contents are
// kept in a separate array here.
module tb_dram_subarray;
  localparam int ROWS = 32, COLS = 64, MCAST = 3;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    act = 1'b0, clone = 1'b0, rb_load = 1'b0;
  logic [$clog2(ROWS)-1:0] act_row = '0;
  logic [$clog2(ROWS)-1:0] dst_row [MCAST];
  logic [MCAST-1:0]        dst_valid = '0;
  logic [COLS-1:0]         rb_load_data = '0, rb_wmask = '0, rb_wdata = '0;
  logic [COLS-1:0]         row_buf;

  logic [COLS-1:0] ref_mem [ROWS];
  int checks = 0, failures = 0;

  dram_subarray #(.ROWS(ROWS), .COLS(COLS), .MCAST(MCAST)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [COLS-1:0] exp_v, string what);
    checks++;
    if (row_buf !== exp_v) begin
      failures++;
      $display("FAIL %s: %h exp %h", what, row_buf, exp_v);
    end
  endtask

  task automatic write_row(int r, logic [COLS-1:0] v);
    rb_load <= 1'b1; rb_load_data <= v;
    @(posedge clk);
    rb_load <= 1'b0;
    clone <= 1'b1; dst_row[0] <= 5'(r); dst_valid <= 3'b001;
    @(posedge clk);
    clone <= 1'b0; dst_valid <= '0;
    ref_mem[r] = v;
  endtask

  task automatic read_row(int r);
    act <= 1'b1; act_row <= 5'(r);
    @(posedge clk);
    act <= 1'b0;
    #1 chk(ref_mem[r], $sformatf("row %0d", r));
  endtask

  initial begin
    logic [COLS-1:0] v, m;
    for (int i = 0; i < MCAST; i++) dst_row[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    #1 chk('0, "reset row buffer");
    for (int r = 0; r < ROWS; r++) write_row(r, {$urandom, $urandom});
    for (int r = ROWS - 1; r >= 0; r--) read_row(r);
    // RowClone with multicast: row 5 into rows 9, 20 and 31
    read_row(5);
    clone <= 1'b1; dst_valid <= 3'b111;
    dst_row[0] <= 5'd9; dst_row[1] <= 5'd20; dst_row[2] <= 5'd31;
    @(posedge clk);
    clone <= 1'b0; dst_valid <= '0;
    ref_mem[9] = ref_mem[5]; ref_mem[20] = ref_mem[5]; ref_mem[31] = ref_mem[5];
    read_row(0);
    read_row(9); read_row(20); read_row(31);
    // bitwise write of the row buffer
    for (int i = 0; i < 20; i++) begin
      v = {$urandom, $urandom}; m = {$urandom, $urandom};
      rb_wmask <= m; rb_wdata <= v;
      @(posedge clk);
      rb_wmask <= '0;
      #1 chk((ref_mem[31] & ~m) | (v & m), "masked write");
      ref_mem[31] = (ref_mem[31] & ~m) | (v & m);
    end
    // act wins over a simultaneous load
    act <= 1'b1; act_row <= 5'd3; rb_load <= 1'b1; rb_load_data <= '1;
    @(posedge clk);
    act <= 1'b0; rb_load <= 1'b0;
    #1 chk(ref_mem[3], "act priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
