// ppim_cluster_ctrl: core-step sequencer of a pPIM cluster.
//
// The architecture splits an 8-bit MAC into a fixed sequence of 4-bit core
// operations, one group of parallel core operations per core-step; how that
// sequence is issued is not specified, so this design uses a small writable
// micro-program store. Each entry (uop_t, see ppim_pkg) is one core-step for all
// nine cores. The store resets to the built-in programs of build_prog(): the
// exact 8-bit MAC at address 0 (8 steps), the precision-scaled 4-bit MAC at
// address 8 (4 steps) and a ReLU of the accumulator at address 12 (2 steps). It can be rewritten through the ucode port, like the
// cores' function-words, to run other sequences.
//
// Interface
//   start, start_pc  begin the program at start_pc (ignored while busy)
//   uop              micro-op of the current core-step, all zero when idle
//   busy             high from the cycle after start until the last step
//   done             one-cycle pulse in the cycle after the step marked last
//   ucode_we/addr/data  write one store entry (not allowed while busy)
// Timing: start is sampled at edge 0; the micro-op at start_pc+i is applied at
// edge i+1, so a program of N steps raises done N cycles after start.
module ppim_cluster_ctrl
  import ppim_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  pc_t  start_pc,
  input  logic ucode_we,
  input  pc_t  ucode_addr,
  input  uop_t ucode_data,
  output uop_t uop,
  output logic busy,
  output logic done
);

  localparam prog_t DEFAULT_PROG = build_prog();

  uop_t store [NSTEP];
  pc_t  pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NSTEP); i++) store[i] <= DEFAULT_PROG[i];
    end else if (ucode_we) begin
      store[ucode_addr] <= ucode_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          pc   <= start_pc;
          busy <= 1'b1;
        end
      end else begin
        pc <= pc + 1'b1;
        if (store[pc].last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign uop = busy ? store[pc] : '0;

  // The program store may not change under a running program.
  assert property (@(posedge clk) disable iff (!rst_n) !(ucode_we && busy))
    else $error("ppim_cluster_ctrl: micro-program written while busy");

endmodule
