// tb_ppim_core: self-checking test of a single pPIM core.
//
// Fills the four function-words of the register file with A*B, A+B, max(A,B)
// and a random table, then applies random operands and function selects and
// compares the 8-bit result with the function computed here. Also checks that
// the operands hold while ld is low and that the 2:1 feedback multiplexers load
// the core's own result nibbles. A result appears one cycle after the load.
module tb_ppim_core;
  import ppim_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             ld = 1'b0, fb_a = 1'b0, fb_b = 1'b0;
  fsel_t            fsel = '0;
  nib_t             opa_in = '0, opb_in = '0;
  logic             fw_we = 1'b0;
  fsel_t            fw_idx = '0;
  logic [7:0]       fw_addr = '0;
  logic [LUT_W-1:0] fw_data = '0;
  logic [LUT_W-1:0] result;

  logic [7:0] rnd_tab [256];
  int checks = 0, failures = 0;

  ppim_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model(int f, int a, int b);
    case (f)
      0:       return 8'(a * b);
      1:       return 8'(a + b);
      2:       return 8'((a > b) ? a : b);
      default: return rnd_tab[a*16 + b];
    endcase
  endfunction

  task automatic check(logic [7:0] exp_v, string what);
    checks++;
    if (result !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, result, exp_v);
    end
  endtask

  initial begin
    int a, b, f;
    for (int i = 0; i < 256; i++) rnd_tab[i] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < 4; w++)
      for (int a2 = 0; a2 < 16; a2++)
        for (int b2 = 0; b2 < 16; b2++) begin
          fw_we   <= 1'b1;
          fw_idx  <= fsel_t'(w);
          fw_addr <= 8'(a2 * 16 + b2);
          fw_data <= model(w, a2, b2);
          @(posedge clk);
        end
    fw_we <= 1'b0;
    for (int i = 0; i < 500; i++) begin
      a = $urandom_range(15); b = $urandom_range(15); f = $urandom_range(3);
      ld <= 1'b1; opa_in <= nib_t'(a); opb_in <= nib_t'(b); fsel <= fsel_t'(f);
      @(posedge clk);
      ld <= 1'b0; opa_in <= nib_t'($urandom); opb_in <= nib_t'($urandom);
      fsel <= fsel_t'($urandom);
      #1 check(model(f, a, b), "lut");
      @(posedge clk);
      #1 check(model(f, a, b), "hold");
    end
    // Feedback: A <= own lower nibble, B <= own upper nibble (A*B then A+B).
    for (int i = 0; i < 50; i++) begin
      logic [7:0] r;
      a = $urandom_range(15); b = $urandom_range(15);
      ld <= 1'b1; fb_a <= 1'b0; fb_b <= 1'b0;
      opa_in <= nib_t'(a); opb_in <= nib_t'(b); fsel <= 2'd0;
      @(posedge clk);
      r = model(0, a, b);
      ld <= 1'b1; fb_a <= 1'b1; fb_b <= 1'b1; fsel <= 2'd1;
      opa_in <= 4'd0; opb_in <= 4'd0;
      @(posedge clk);
      ld <= 1'b0; fb_a <= 1'b0; fb_b <= 1'b0;
      #1 check(model(1, r[3:0], r[7:4]), "feedback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
