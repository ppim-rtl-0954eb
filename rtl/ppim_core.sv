// ppim_core: one pPIM processing core, a look-up table with two 4-bit operands.
//
// The core holds two 4-bit operand registers, A and B, and a register file of
// NFW function-words. A function-word is a 256-entry table of 8-bit results; the
// concatenation {A,B} picks one entry through a 256:1 8-bit multiplexer, so the
// core can compute any function of two 4-bit inputs (A*B, A+B, max, ReLU, ...)
// and switches function by selecting another word of its register file. That
// organisation (operand registers, 2:1 input multiplexers, register file of
// function-words, 256:1 8-bit multiplexer) follows the core diagram of the
// architecture. The register-file depth (NFW), the feedback choice of the 2:1
// multiplexers and the write port are this design's own choices.
//
// Interface
//   ld, fsel       when ld is high, A and B load at the clock edge and fsel
//                  (the function-word to apply) is registered with them
//   fb_a, fb_b     2:1 multiplexer selects: load A from the lower / B from the
//                  upper nibble of the core's own result instead of the router
//   opa_in, opb_in operands from the cluster router
//   fw_we, fw_idx, fw_addr, fw_data
//                  function-word write port: one 8-bit entry per clock
//                  ("memory write" programmability, from the read port)
//   result         8-bit LUT output; lower nibble = result[3:0]
// Timing: result is combinational from the registers, so the value produced by
// an operation loaded at edge t is valid for the whole cycle after edge t. That
// cycle is one core-step.
module ppim_core
  import ppim_pkg::*;
#(
  parameter int unsigned FW_WORDS = NFW
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ld,
  input  logic                        fb_a,
  input  logic                        fb_b,
  input  logic [$clog2(FW_WORDS)-1:0] fsel,
  input  nib_t                        opa_in,
  input  nib_t                        opb_in,
  input  logic                        fw_we,
  input  logic [$clog2(FW_WORDS)-1:0] fw_idx,
  input  logic [7:0]                  fw_addr,
  input  logic [LUT_W-1:0]            fw_data,
  output logic [LUT_W-1:0]            result
);

  nib_t                        reg_a, reg_b;
  logic [$clog2(FW_WORDS)-1:0] fsel_q;
  logic [LUT_W-1:0]            fw_rf [FW_WORDS][LUT_D];

  // Operand registers with their 2:1 input multiplexers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a  <= '0;
      reg_b  <= '0;
      fsel_q <= '0;
    end else if (ld) begin
      reg_a  <= fb_a ? result[NIB-1:0]   : opa_in;
      reg_b  <= fb_b ? result[LUT_W-1:NIB] : opb_in;
      fsel_q <= fsel;
    end
  end

  // Function-word register file (written entry by entry).
  always_ff @(posedge clk) begin
    if (fw_we) fw_rf[fw_idx][fw_addr] <= fw_data;
  end

  // 256:1 multiplexer: the operands select one entry of the active word.
  assign result = fw_rf[fsel_q][{reg_a, reg_b}];

endmodule
