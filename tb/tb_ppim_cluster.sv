// tb_ppim_cluster: self-checking test of one pPIM cluster.
//
// Loads the multiply, add and sign-gate function-words into all nine cores,
// then runs random exact 8-bit MACs, precision-scaled 4-bit MACs and ReLUs
// (plus corner values) and compares the result with Y + a*b (mod 2^16),
// Y + (aH*bH << 8) and (Y < 0 ? 0 : Y), computed here with plain integer
// arithmetic. It also checks the latency: 8 cycles from start to done for the
// exact MAC, 4 for the scaled one, 2 for the ReLU.
module tb_ppim_cluster;
  import ppim_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              start = 1'b0;
  cl_op_e            op = OP_MAC8;
  logic [DATA_W-1:0] data_in = '0;
  logic              busy, done;
  logic [ACC_W-1:0]  result;
  logic              fw_we = 1'b0;
  logic [NCORE-1:0]  fw_core_mask = '1;
  fsel_t             fw_idx = '0;
  logic [7:0]        fw_addr = '0;
  logic [LUT_W-1:0]  fw_data = '0;
  logic              ucode_we = 1'b0;
  pc_t               ucode_addr = '0;
  uop_t              ucode_data = '0;

  int checks = 0, failures = 0;

  ppim_cluster dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_words();
    for (int w = 0; w < 3; w++)
      for (int e = 0; e < 256; e++) begin
        fw_we   <= 1'b1;
        fw_idx  <= fsel_t'(w);
        fw_addr <= 8'(e);
        // word 0: A*B, word 1: A+B, word 2: B[3] ? 0 : {B,A}, entry address {A,B}
        case (w)
          0:       fw_data <= 8'((e >> 4) * (e & 15));
          1:       fw_data <= 8'((e >> 4) + (e & 15));
          default: fw_data <= (e & 8) ? 8'd0 : 8'(((e & 15) << 4) | (e >> 4));
        endcase
        @(posedge clk);
      end
    fw_we <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run_mac(input logic [7:0] a, input logic [7:0] b,
                         input logic [15:0] y, input cl_op_e o);
    int cyc;
    logic [15:0] exp_v;
    data_in <= {y, b, a};
    op      <= o;
    start   <= 1'b1;
    @(posedge clk);
    start   <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (!done && cyc < 50);
    case (o)
      OP_MAC4: exp_v = y + {8'(a[7:4] * b[7:4]), 8'd0};
      OP_RELU: exp_v = y[15] ? 16'd0 : y;
      default: exp_v = y + 16'(a * b);
    endcase
    checks++;
    if (result !== exp_v) begin
      failures++;
      $display("FAIL %s a=%h b=%h y=%h got %h exp %h", o.name(),
               a, b, y, result, exp_v);
    end
    checks++;
    if (cyc != (o == OP_MAC4 ? 4 : o == OP_RELU ? 2 : 8)) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    load_words();
    run_mac(8'hFF, 8'hFF, 16'hFFFF, OP_MAC8);
    run_mac(8'hFF, 8'hFF, 16'h01FE, OP_MAC8);
    run_mac(8'h00, 8'h00, 16'h1234, OP_MAC8);
    run_mac(8'hF0, 8'hF0, 16'h0F00, OP_MAC4);
    run_mac(8'hFF, 8'hFF, 16'hFFFF, OP_MAC4);
    run_mac(8'h00, 8'h00, 16'h8000, OP_RELU);
    run_mac(8'h00, 8'h00, 16'h7FFF, OP_RELU);
    for (int i = 0; i < 300; i++)
      run_mac(8'($urandom), 8'($urandom), 16'($urandom), cl_op_e'($urandom_range(2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
