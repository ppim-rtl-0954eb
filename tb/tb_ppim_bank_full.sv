// tb_ppim_bank_full: one complete operation of the bank at its default size.
//
// The bank is used exactly as built (16 subarrays x 16 clusters = 256 clusters,
// 512-row subarrays). The multiply and add function-words are written into all
// 2304 cores, every subarray's row buffer is loaded with random {Y, b, a}
// data-words, and one exact MAC runs in all 256 clusters at once, followed by
// one precision-scaled MAC. Every cluster's 16-bit Y field is compared with
// Y + a*b and then with Y + (aH*bH << 8); the MAC latencies (10 and 6 cycles
// command to command) are checked as well.
module tb_ppim_bank_full;
  import ppim_pkg::*;

  localparam int NSUB = 16, NCL = 16, MCAST = 3;
  localparam int COLS = NCL * 32;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cmd_valid = 1'b0, cmd_ready;
  bank_op_e          cmd_op = BK_NOP;
  logic [3:0]        cmd_sub = '0, cmd_src_sub = '0, rd_sub = '0;
  logic [8:0]        cmd_row = '0;
  logic [8:0]        cmd_dst_row [MCAST];
  logic [MCAST-1:0]  cmd_dst_valid = '0;
  logic [NSUB-1:0]   cmd_sub_mask = '0;
  logic              cmd_approx = 1'b0, cmd_chain = 1'b0;
  logic [COLS-1:0]   cmd_data = '0, rd_data;
  logic [NCORE-1:0]  cmd_fw_core_mask = '1;
  fsel_t             cmd_fw_idx = '0;
  logic [7:0]        cmd_fw_addr = '0;
  logic [LUT_W-1:0]  cmd_fw_data = '0;
  logic [31:0]       n_act, n_clone, n_lisa, n_mac;

  int checks = 0, failures = 0;
  logic [COLS-1:0] ref_rb [NSUB];

  ppim_bank dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(bank_op_e op, output int cyc);
    cmd_op    <= op;
    cmd_valid <= 1'b1;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 1'b0;
    cyc = 1;
    #1;
    while (!cmd_ready && cyc < 1000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
  endtask

  task automatic mac_all(bit ap);
    int c;
    logic [7:0] a, b;
    logic [15:0] y;
    cmd_sub_mask <= '1; cmd_approx <= ap;
    issue(BK_MAC, c);
    checks++;
    if (c != (ap ? 6 : 10)) begin
      failures++;
      $display("FAIL MAC latency %0d", c);
    end
    for (int s = 0; s < NSUB; s++) begin
      for (int k = 0; k < NCL; k++) begin
        a = ref_rb[s][k*32 +: 8];
        b = ref_rb[s][k*32 + 8 +: 8];
        y = ref_rb[s][k*32 + 16 +: 16];
        ref_rb[s][k*32 + 16 +: 16] = ap ? y + {8'(a[7:4] * b[7:4]), 8'd0} : y + 16'(a * b);
      end
      rd_sub <= 4'(s);
      #1;
      for (int k = 0; k < NCL; k++) begin
        checks++;
        if (rd_data[k*32 +: 32] !== ref_rb[s][k*32 +: 32]) begin
          failures++;
          $display("FAIL sub %0d cluster %0d: %h exp %h", s, k, rd_data[k*32 +: 32],
                   ref_rb[s][k*32 +: 32]);
        end
      end
    end
  endtask

  initial begin
    int c;
    for (int i = 0; i < MCAST; i++) cmd_dst_row[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 2; w++)
      for (int e = 0; e < 256; e++) begin
        cmd_fw_idx  <= fsel_t'(w);
        cmd_fw_addr <= 8'(e);
        cmd_fw_data <= (w == 0) ? 8'((e >> 4) * (e & 15)) : 8'((e >> 4) + (e & 15));
        issue(BK_FWLOAD, c);
      end
    for (int s = 0; s < NSUB; s++) begin
      for (int i = 0; i < NCL; i++) ref_rb[s][i*32 +: 32] = $urandom;
      cmd_sub <= 4'(s); cmd_data <= ref_rb[s];
      issue(BK_HOSTWR, c);
    end
    mac_all(1'b0);
    mac_all(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
