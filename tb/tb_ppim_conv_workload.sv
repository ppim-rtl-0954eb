// tb_ppim_conv_workload: a convolution-layer tile on the pPIM bank.
//
// The CNNs the architecture targets (AlexNet, ResNet 18/34/50, VGG 16) reduce
// to convolution layers, i.e. many independent dot products of a filter with
// an input window. This test maps one 3x3 filter onto a bank of 2 subarrays x
// 8 clusters: each of the 16 clusters computes one output pixel of an 8-bit
// 6x10 image (16 positions), nine chained MACs long. Row k of a subarray holds,
// for every cluster, the k-th input pixel of its window (a) and the k-th filter
// weight (b); the weights are the same in all clusters, so the filter stays in
// place while input rows are streamed through the row buffers.
// The tile runs once at full precision, where every output must equal the
// exact convolution sum (mod 2^16), and once precision-scaled, where every
// output must equal the sum of the truncated products (aH*bH) << 8. The mean
// relative error of the scaled outputs is printed for information. After the
// exact tile a ReLU is applied to the outputs in all clusters and checked.
module tb_ppim_conv_workload;
  import ppim_pkg::*;

  localparam int NSUB = 2, NCL = 8, ROWS = 32, MCAST = 3;
  localparam int COLS = NCL * 32;
  localparam int W = 10, H = 6;   // input image; output 8 x 4 = 32, 16 computed

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cmd_valid = 1'b0, cmd_ready;
  bank_op_e          cmd_op = BK_NOP;
  logic              cmd_sub = '0, cmd_src_sub = '0, rd_sub = '0;
  logic [4:0]        cmd_row = '0;
  logic [4:0]        cmd_dst_row [MCAST];
  logic [MCAST-1:0]  cmd_dst_valid = '0;
  logic [NSUB-1:0]   cmd_sub_mask = '0;
  logic              cmd_approx = 1'b0, cmd_chain = 1'b0;
  logic [COLS-1:0]   cmd_data = '0, rd_data;
  logic [NCORE-1:0]  cmd_fw_core_mask = '1;
  fsel_t             cmd_fw_idx = '0;
  logic [7:0]        cmd_fw_addr = '0;
  logic [LUT_W-1:0]  cmd_fw_data = '0;
  logic [31:0]       n_act, n_clone, n_lisa, n_mac;

  logic [7:0] img [H][W];
  logic [7:0] filt [9];
  int checks = 0, failures = 0;

  ppim_bank #(.NSUB(NSUB), .NCL(NCL), .ROWS(ROWS), .MCAST(MCAST)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(bank_op_e op);
    cmd_op    <= op;
    cmd_valid <= 1'b1;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 1'b0;
    #1;
    while (!cmd_ready) begin
      @(posedge clk);
      #1;
    end
  endtask

  // output position of cluster c of subarray s: 16 positions of the 8 x 4 map
  function automatic int oy(int s, int c); return (s * NCL + c) / 8;     endfunction
  function automatic int ox(int s, int c); return (s * NCL + c) % 8;     endfunction

  task automatic run_tile(bit ap);
    logic [COLS-1:0] v;
    logic [15:0]     exp_v, got;
    real             err = 0.0, ex;
    int              n = 0;
    // rows k = 0..8: window pixel k and weight k for every cluster
    for (int s = 0; s < NSUB; s++)
      for (int k = 0; k < 9; k++) begin
        for (int c = 0; c < NCL; c++)
          v[c*32 +: 32] = {16'd0, filt[k], img[oy(s, c) + k / 3][ox(s, c) + k % 3]};
        cmd_sub <= 1'(s); cmd_data <= v;
        issue(BK_HOSTWR);
        cmd_dst_row[0] <= 5'(k); cmd_dst_valid <= 3'b001;
        issue(BK_CLONE);
      end
    for (int k = 0; k < 9; k++) begin
      for (int s = 0; s < NSUB; s++) begin
        cmd_sub <= 1'(s); cmd_row <= 5'(k);
        issue(BK_ACT);
      end
      cmd_sub_mask <= '1; cmd_approx <= ap; cmd_chain <= (k > 0);
      issue(BK_MAC);
    end
    for (int s = 0; s < NSUB; s++) begin
      rd_sub <= 1'(s);
      #1;
      for (int c = 0; c < NCL; c++) begin
        int sum_e, sum_a;
        sum_e = 0; sum_a = 0;
        for (int k = 0; k < 9; k++) begin
          logic [7:0] a;
          a = img[oy(s, c) + k / 3][ox(s, c) + k % 3];
          sum_e += a * filt[k];
          sum_a += (a[7:4] * filt[k][7:4]) << 8;
        end
        exp_v = ap ? 16'(sum_a) : 16'(sum_e);
        got = rd_data[c*32 + 16 +: 16];
        checks++;
        if (got !== exp_v) begin
          failures++;
          $display("FAIL %s output (%0d,%0d): %0d exp %0d", ap ? "scaled" : "exact",
                   oy(s, c), ox(s, c), got, exp_v);
        end
        ex = real'(16'(sum_e));
        if (ex > 0) begin
          err += (ex - real'(got)) / ex;
          n++;
        end
      end
    end
    if (ap && n > 0)
      $display("precision-scaled tile: mean relative error %0.3f over %0d outputs", err / n, n);
  endtask

  // ReLU on the layer outputs (Y read as a signed 16-bit value).
  task automatic apply_relu();
    logic [COLS-1:0] prev_rb [NSUB];
    logic [15:0] y;
    for (int s = 0; s < NSUB; s++) begin
      rd_sub <= 1'(s);
      #1 prev_rb[s] = rd_data;
    end
    cmd_sub_mask <= '1; cmd_chain <= 1'b0;
    issue(BK_RELU);
    for (int s = 0; s < NSUB; s++) begin
      rd_sub <= 1'(s);
      #1;
      for (int c = 0; c < NCL; c++) begin
        y = prev_rb[s][c*32 + 16 +: 16];
        checks++;
        if (rd_data[c*32 + 16 +: 16] !== (y[15] ? 16'd0 : y)) begin
          failures++;
          $display("FAIL ReLU output %0d/%0d", s, c);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < MCAST; i++) cmd_dst_row[i] = '0;
    // small pixels and weights so that the exact sums stay below 2^16
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom_range(255));
    for (int k = 0; k < 9; k++) filt[k] = 8'($urandom_range(28));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 3; w++)
      for (int e = 0; e < 256; e++) begin
        cmd_fw_idx  <= fsel_t'(w);
        cmd_fw_addr <= 8'(e);
        case (w)
          0:       cmd_fw_data <= 8'((e >> 4) * (e & 15));
          1:       cmd_fw_data <= 8'((e >> 4) + (e & 15));
          default: cmd_fw_data <= (e & 8) ? 8'd0 : 8'(((e & 15) << 4) | (e >> 4));
        endcase
        issue(BK_FWLOAD);
      end
    run_tile(1'b0);
    apply_relu();
    run_tile(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
