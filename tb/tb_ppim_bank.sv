// tb_ppim_bank: end-to-end test of the pPIM bank at a reduced size.
//
// A bank of 4 subarrays x 4 clusters (16 clusters, 16-row subarrays; command
// latencies at their defaults) is programmed and exercised through its command
// port only:
//   - function-words A*B and A+B are written into every core (BK_FWLOAD)
//   - rows are written from the chip I/O and stored by RowClone, one of them
//     multicast to three rows, and read back with BK_ACT
//   - exact and precision-scaled MACs run in all clusters and every cluster's
//     Y field is compared with Y + a*b and Y + (aH*bH << 8)
//   - LISA copies over 1 and 3 hops
//   - a chained dot product of length 5 in all 16 clusters
//   - ReLU of the accumulators (BK_RELU), on row-buffer Y and chained
// Latencies are checked: RowClone 79 cycles, LISA 176 + 10/hop, MAC 8 + 2 and
// 4 + 2 cycles from one command to the next, ReLU 2 + 2. Every mechanism must occur at least once.
module tb_ppim_bank;
  import ppim_pkg::*;

  localparam int NSUB = 4, NCL = 4, ROWS = 16, MCAST = 3;
  localparam int COLS = NCL * 32;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              cmd_valid = 1'b0, cmd_ready;
  bank_op_e          cmd_op = BK_NOP;
  logic [1:0]        cmd_sub = '0, cmd_src_sub = '0, rd_sub = '0;
  logic [3:0]        cmd_row = '0;
  logic [3:0]        cmd_dst_row [MCAST];
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
  // mechanism counters
  int m_fwload = 0, m_hostwr = 0, m_act = 0, m_clone = 0, m_multicast = 0;
  int m_relu = 0, m_relu_neg = 0;
  int m_lisa = 0, m_mac_exact = 0, m_mac_approx = 0, m_chain = 0, m_mode_switch = 0;
  bit last_approx = 1'b0;

  logic [COLS-1:0] ref_row [NSUB][ROWS];
  logic [COLS-1:0] ref_rb  [NSUB];

  ppim_bank #(.NSUB(NSUB), .NCL(NCL), .ROWS(ROWS), .MCAST(MCAST)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
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

  // Issue the prepared command; return cycles until the bank is ready again.
  task automatic issue(bank_op_e op, output int cyc);
    cmd_op    <= op;
    cmd_valid <= 1'b1;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 1'b0;
    // cyc = cycles from the edge that took the command to the next edge that
    // could take another one
    cyc = 1;
    #1;
    while (!cmd_ready && cyc < 1000) begin
      @(posedge clk);
      #1;
      cyc++;
    end
  endtask

  task automatic host_write(int s, logic [COLS-1:0] v);
    int c;
    cmd_sub <= 2'(s); cmd_data <= v;
    issue(BK_HOSTWR, c);
    ref_rb[s] = v;
    m_hostwr++;
  endtask

  task automatic clone(int s, int r0, int r1 = -1, int r2 = -1);
    int c;
    cmd_sub <= 2'(s);
    cmd_dst_row[0] <= 4'(r0); cmd_dst_row[1] <= 4'(r1); cmd_dst_row[2] <= 4'(r2);
    cmd_dst_valid <= {r2 >= 0, r1 >= 0, 1'b1};
    issue(BK_CLONE, c);
    cmd_dst_valid <= '0;
    expect_true(c == 79, $sformatf("RowClone latency %0d", c));
    ref_row[s][r0] = ref_rb[s];
    if (r1 >= 0) ref_row[s][r1] = ref_rb[s];
    if (r2 >= 0) ref_row[s][r2] = ref_rb[s];
    m_clone++;
    if (r1 >= 0) m_multicast++;
  endtask

  task automatic activate(int s, int r);
    int c;
    cmd_sub <= 2'(s); cmd_row <= 4'(r);
    issue(BK_ACT, c);
    ref_rb[s] = ref_row[s][r];
    rd_sub <= 2'(s);
    #1 expect_true(rd_data === ref_rb[s], $sformatf("ACT sub %0d row %0d", s, r));
    m_act++;
  endtask

  task automatic lisa(int dst, int src);
    int c, hops;
    hops = dst > src ? dst - src : src - dst;
    cmd_sub <= 2'(dst); cmd_src_sub <= 2'(src);
    issue(BK_LISA, c);
    expect_true(c == 176 + 10 * hops, $sformatf("LISA latency %0d for %0d hops", c, hops));
    ref_rb[dst] = ref_rb[src];
    rd_sub <= 2'(dst);
    #1 expect_true(rd_data === ref_rb[dst], "LISA data");
    m_lisa++;
  endtask

  // MAC in the subarrays of mask; the model updates the Y fields of ref_rb.
  task automatic mac(logic [NSUB-1:0] mask, bit ap, bit chain);
    int c;
    logic [15:0] y;
    logic [7:0]  a, b;
    cmd_sub_mask <= mask; cmd_approx <= ap; cmd_chain <= chain;
    issue(BK_MAC, c);
    cmd_chain <= 1'b0;
    expect_true(c == (ap ? 6 : 10), $sformatf("MAC latency %0d", c));
    for (int s = 0; s < NSUB; s++) if (mask[s]) begin
      for (int k = 0; k < NCL; k++) begin
        a = ref_rb[s][k*32 +: 8];
        b = ref_rb[s][k*32 + 8 +: 8];
        y = chain ? acc[s][k] : ref_rb[s][k*32 + 16 +: 16];
        y = ap ? y + {8'(a[7:4] * b[7:4]), 8'd0} : y + 16'(a * b);
        ref_rb[s][k*32 + 16 +: 16] = y;
        acc[s][k] = y;
      end
      rd_sub <= 2'(s);
      #1 expect_true(rd_data === ref_rb[s], $sformatf("MAC result sub %0d", s));
    end
    if (ap) m_mac_approx++; else m_mac_exact++;
    if (chain) m_chain++;
    if (ap != last_approx) m_mode_switch++;
    last_approx = ap;
  endtask

  logic [15:0] acc [NSUB][NCL];

  // ReLU of Y in the subarrays of mask.
  task automatic relu(logic [NSUB-1:0] mask, bit chain);
    int c, neg;
    logic [15:0] y;
    neg = 0;
    cmd_sub_mask <= mask; cmd_chain <= chain;
    issue(BK_RELU, c);
    cmd_chain <= 1'b0;
    expect_true(c == 4, $sformatf("ReLU latency %0d", c));
    for (int s = 0; s < NSUB; s++) if (mask[s]) begin
      for (int k = 0; k < NCL; k++) begin
        y = chain ? acc[s][k] : ref_rb[s][k*32 + 16 +: 16];
        if (y[15]) neg++;
        y = y[15] ? 16'd0 : y;
        ref_rb[s][k*32 + 16 +: 16] = y;
        acc[s][k] = y;
      end
      rd_sub <= 2'(s);
      #1 expect_true(rd_data === ref_rb[s], $sformatf("ReLU result sub %0d", s));
    end
    m_relu++;
    m_relu_neg += neg;
  endtask

  function automatic logic [COLS-1:0] rnd_row();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    int c;
    logic [COLS-1:0] v;
    for (int i = 0; i < MCAST; i++) cmd_dst_row[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // function-words: word 0 = A*B, word 1 = A+B, entry address {A,B}
    // word 2 = sign gate B[3] ? 0 : {B,A} for the ReLU
    for (int w = 0; w < 3; w++)
      for (int e = 0; e < 256; e++) begin
        cmd_fw_idx  <= fsel_t'(w);
        cmd_fw_addr <= 8'(e);
        case (w)
          0:       cmd_fw_data <= 8'((e >> 4) * (e & 15));
          1:       cmd_fw_data <= 8'((e >> 4) + (e & 15));
          default: cmd_fw_data <= (e & 8) ? 8'd0 : 8'(((e & 15) << 4) | (e >> 4));
        endcase
        issue(BK_FWLOAD, c);
        m_fwload++;
      end
    // rows 0..3 of every subarray, row 1 multicast to 5, 6, 7
    for (int s = 0; s < NSUB; s++) begin
      for (int r = 0; r < 4; r++) begin
        host_write(s, rnd_row());
        if (r == 1) clone(s, 1, 5, 6); else clone(s, r);
      end
      for (int r = 0; r < 7; r++) if (r != 4) activate(s, r);
    end
    // MACs on every subarray, exact then scaled on the same row buffers
    for (int s = 0; s < NSUB; s++) activate(s, 2);
    mac('1, 1'b0, 1'b0);
    mac('1, 1'b1, 1'b0);
    relu('1, 1'b0);
    activate(1, 3);
    mac(4'b0010, 1'b0, 1'b0);
    // store a result row, then LISA moves
    clone(1, 8);
    lisa(2, 1);
    lisa(3, 0);
    lisa(0, 3);
    // chained dot product of length 5 in every cluster: rows 9..13 hold (a_k, b_k)
    for (int s = 0; s < NSUB; s++)
      for (int k = 0; k < 5; k++) begin
        host_write(s, rnd_row());
        clone(s, 9 + k);
      end
    for (int k = 0; k < 5; k++) begin
      for (int s = 0; s < NSUB; s++) activate(s, 9 + k);
      mac('1, 1'b0, k > 0);
    end
    relu('1, 1'b1);
    // bank counters
    expect_true(n_act == 32'(m_act) && n_clone == 32'(m_clone) && n_lisa == 32'(m_lisa)
                && n_mac == 32'(m_mac_exact + m_mac_approx), "activity counters");
    // every mechanism must have happened
    expect_true(m_fwload > 0, "function-word load");
    expect_true(m_hostwr > 0, "host write");
    expect_true(m_act > 0, "activate");
    expect_true(m_clone > 0, "RowClone");
    expect_true(m_multicast > 0, "multicast");
    expect_true(m_lisa > 0, "LISA");
    expect_true(m_mac_exact > 0, "exact MAC");
    expect_true(m_mac_approx > 0, "precision-scaled MAC");
    expect_true(m_chain > 0, "chained accumulation");
    expect_true(m_mode_switch > 0, "precision mode switch");
    expect_true(m_relu > 0 && m_relu_neg > 0, "ReLU clamping a negative Y");
    $display("mechanisms: fwload=%0d hostwr=%0d act=%0d clone=%0d multicast=%0d lisa=%0d mac8=%0d mac4=%0d chain=%0d switch=%0d relu=%0d clamped=%0d",
             m_fwload, m_hostwr, m_act, m_clone, m_multicast, m_lisa, m_mac_exact,
             m_mac_approx, m_chain, m_mode_switch, m_relu, m_relu_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
