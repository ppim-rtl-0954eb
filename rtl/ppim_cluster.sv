// ppim_cluster: nine pPIM cores in a 3x3 grid, joined by the cluster router.
//
// The cluster runs 8-bit arithmetic by breaking it into 4-bit core operations.
// Its use case is the multiply-and-accumulate of a convolution layer,
//   exact:            Y <= Y + a*b                  (a, b 8-bit, Y 16-bit)
//   precision-scaled: Y <= Y + (a[7:4]*b[7:4]) << 8 (operands truncated to
//                     their four most significant bits)
// The exact MAC uses four 4-bit multiplications for the partial products
// aL*bL, aL*bH, aH*bL, aH*bH and then accumulates them with 4-bit additions in
// core-steps of parallel core operations: 8 core-steps in all. The scaled MAC
// needs one multiplication and three additions in 4 core-steps, half the time.
// Other function-words give other operations; the built-in OP_RELU program
// applies a ReLU to Y in 2 core-steps with a sign-gate word in three cores.
// Both step counts follow the architecture; the exact assignment of operations
// to cores and steps is this design's own (see build_prog in ppim_pkg).
//
// A multiplication is a core whose active function-word holds A*B; an addition
// is one whose word holds A+B, with the carry in the upper result nibble. The
// function-words are not built in: they are written through the fw port, as the
// architecture programs its cores by memory writes.
//
// Interface
//   start, op         start an operation: OP_MAC8, OP_MAC4 (precision-scaled)
//                     or OP_RELU (activation of the signed 16-bit Y)
//   data_in           read-port data-word {Y[15:0], b[7:0], a[7:0]}, latched
//                     at start
//   busy, done        done pulses when result is valid
//   result            16-bit accumulated value
//   fw_we, fw_core_mask, fw_idx, fw_addr, fw_data
//                     write one function-word entry into every masked core
//   ucode_we, ucode_addr, ucode_data  rewrite the step sequencer's program
// Timing: done rises 8 (exact MAC), 4 (scaled MAC) or 2 (ReLU) cycles after start.
module ppim_cluster
  import ppim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  cl_op_e            op,
  input  logic [DATA_W-1:0] data_in,
  output logic              busy,
  output logic              done,
  output logic [ACC_W-1:0]  result,
  input  logic              fw_we,
  input  logic [NCORE-1:0]  fw_core_mask,
  input  fsel_t             fw_idx,
  input  logic [7:0]        fw_addr,
  input  logic [LUT_W-1:0]  fw_data,
  input  logic              ucode_we,
  input  pc_t               ucode_addr,
  input  uop_t              ucode_data
);

  logic [DATA_W-1:0] data_q;      // read-port data-word register
  uop_t              uop;
  logic [LUT_W-1:0]  core_result [NCORE];
  rsel_t             sel [NPORT];
  nib_t              port_out [NPORT];
  nib_t              src_bus [NSRC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              data_q <= '0;
    else if (start && !busy) data_q <= data_in;
  end

  ppim_cluster_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .start_pc   (op_pc(op)),
    .ucode_we, .ucode_addr, .ucode_data,
    .uop, .busy, .done
  );

  always_comb begin
    for (int k = 0; k < int'(NCORE); k++) begin
      sel[2*k]     = uop.core[k].sel_a;
      sel[2*k + 1] = uop.core[k].sel_b;
    end
  end

  ppim_router u_router (
    .data_word (data_q),
    .core_result,
    .sel,
    .port_out,
    .src_bus
  );

  for (genvar k = 0; k < int'(NCORE); k++) begin : g_core
    ppim_core u_core (
      .clk, .rst_n,
      .ld      (uop.core[k].ld),
      .fb_a    (uop.core[k].fb_a),
      .fb_b    (uop.core[k].fb_b),
      .fsel    (uop.core[k].fsel),
      .opa_in  (port_out[2*k]),
      .opb_in  (port_out[2*k + 1]),
      .fw_we   (fw_we && fw_core_mask[k]),
      .fw_idx,
      .fw_addr,
      .fw_data,
      .result  (core_result[k])
    );
  end

  // Result register: nibbles captured from the source bus by the program.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) result <= '0;
    else begin
      for (int i = 0; i < 4; i++)
        if (uop.cap[i]) result[i*NIB +: NIB] <= src_bus[uop.cap_src[i]];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(fw_we && busy))
    else $error("ppim_cluster: function-word written during a MAC");

endmodule
