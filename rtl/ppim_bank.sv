// ppim_bank: a DRAM bank with a 2-D array of pPIM clusters (top level).
//
// The bank holds NSUB subarrays. Along the row buffer of each subarray sit NCL
// pPIM clusters, giving NSUB x NCL clusters (256 by default, the full-size
// configuration evaluated for the architecture). Cluster c of a subarray owns
// 32 bits of the row buffer, bits [32c +: 32], read as the data-word
// {Y[15:0], b[7:0], a[7:0]}; when a MAC finishes the cluster writes its 16-bit
// result back into the Y field of that slice. Data moves only vertically:
// within a subarray by RowClone (row buffer written to one or several rows,
// the multicast), between subarrays by LISA-style row-buffer-to-row-buffer
// copies. The way clusters map onto the row buffer, the 16 x 16 split and the
// subarray size are this design's own choices.
//
// Commands come from the memory controller, one at a time, with a valid/ready
// handshake (a command is taken at an edge where cmd_valid and cmd_ready are
// both high). The cycle counts below run from that edge to the first edge that
// can take the next command:
//   BK_ACT     row buffer of cmd_sub <= row cmd_row                 1 cycle
//   BK_HOSTWR  row buffer of cmd_sub <= cmd_data (chip I/O)         1 cycle
//   BK_CLONE   rows cmd_dst_row[i] (cmd_dst_valid[i]) of cmd_sub
//              <= its row buffer                         ROWCLONE_CYC cycles
//   BK_LISA    row buffer of cmd_sub <= row buffer of cmd_src_sub
//              LISA_BASE_CYC + LISA_HOP_CYC * |cmd_sub - cmd_src_sub| cycles
//   BK_MAC     every cluster of each subarray in cmd_sub_mask performs a MAC
//              (cmd_approx: precision-scaled); with cmd_chain the cluster
//              uses its previous result as Y instead of the row buffer, so a
//              dot product accumulates across rows      8 or 4 cycles + 2
//   BK_RELU    ReLU of the signed 16-bit Y in every cluster of cmd_sub_mask
//              (Y from the row buffer, or the previous result with cmd_chain),
//              written back like a MAC result                        4 cycles
//   BK_FWLOAD  function-word entry (cmd_fw_*) into the masked cores of every
//              cluster                                             1 cycle
// A MAC costs its core-steps plus one cycle to write the results into the row
// buffer and one to return to idle. The latencies of RowClone and LISA are the published 28 nm figures (63 ns,
// and 148.5/196.5/260.5 ns for 1/7/15 hops, i.e. 140.5 ns + 8 ns per hop)
// expressed in cycles of the 0.8 ns core-step clock. rd_data shows the row
// buffer of subarray rd_sub. Counters report how many commands of each kind ran.
module ppim_bank
  import ppim_pkg::*;
#(
  parameter int unsigned NSUB          = 16,
  parameter int unsigned NCL           = 16,
  parameter int unsigned ROWS          = 512,
  parameter int unsigned MCAST         = 3,
  parameter int unsigned ROWCLONE_CYC  = 79,
  parameter int unsigned LISA_BASE_CYC = 176,
  parameter int unsigned LISA_HOP_CYC  = 10,
  localparam int unsigned COLS = NCL * DATA_W,
  localparam int unsigned SW   = (NSUB > 1) ? $clog2(NSUB) : 1,
  localparam int unsigned RW   = $clog2(ROWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // command port
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  bank_op_e          cmd_op,
  input  logic [SW-1:0]     cmd_sub,
  input  logic [SW-1:0]     cmd_src_sub,
  input  logic [RW-1:0]     cmd_row,
  input  logic [RW-1:0]     cmd_dst_row [MCAST],
  input  logic [MCAST-1:0]  cmd_dst_valid,
  input  logic [NSUB-1:0]   cmd_sub_mask,
  input  logic              cmd_approx,
  input  logic              cmd_chain,
  input  logic [COLS-1:0]   cmd_data,
  input  logic [NCORE-1:0]  cmd_fw_core_mask,
  input  fsel_t             cmd_fw_idx,
  input  logic [7:0]        cmd_fw_addr,
  input  logic [LUT_W-1:0]  cmd_fw_data,
  // read-out
  input  logic [SW-1:0]     rd_sub,
  output logic [COLS-1:0]   rd_data,
  // activity counters
  output logic [31:0]       n_act,
  output logic [31:0]       n_clone,
  output logic [31:0]       n_lisa,
  output logic [31:0]       n_mac
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_MAC} state_e;

  state_e             state;
  logic [15:0]        wait_cnt;
  logic               take;

  logic [COLS-1:0]    row_buf   [NSUB];
  logic [NSUB-1:0]    sa_act, sa_clone, sa_load;
  logic [COLS-1:0]    sa_load_data [NSUB];
  logic [COLS-1:0]    sa_wmask  [NSUB];
  logic [COLS-1:0]    sa_wdata  [NSUB];

  logic [NCL-1:0]     cl_busy   [NSUB];
  logic [NCL-1:0]     cl_done   [NSUB];
  logic [ACC_W-1:0]   cl_result [NSUB][NCL];
  logic [NSUB-1:0]    sub_busy;
  cl_op_e             cl_op;

  assign take      = cmd_valid && cmd_ready;
  assign cl_op     = (cmd_op == BK_RELU) ? OP_RELU : (cmd_approx ? OP_MAC4 : OP_MAC8);
  assign cmd_ready = (state == S_IDLE);
  assign rd_data   = row_buf[rd_sub];

  function automatic logic [15:0] lisa_cycles(logic [SW-1:0] a, logic [SW-1:0] b);
    logic [SW-1:0] hops;
    hops = (a > b) ? a - b : b - a;
    return 16'(LISA_BASE_CYC + LISA_HOP_CYC * hops);
  endfunction

  // Command sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      wait_cnt <= '0;
      n_act    <= '0;
      n_clone  <= '0;
      n_lisa   <= '0;
      n_mac    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          unique case (cmd_op)
            BK_ACT:   n_act <= n_act + 1;
            BK_CLONE: begin
              n_clone  <= n_clone + 1;
              wait_cnt <= 16'(ROWCLONE_CYC - 1);
              state    <= S_WAIT;
            end
            BK_LISA: begin
              n_lisa   <= n_lisa + 1;
              wait_cnt <= lisa_cycles(cmd_sub, cmd_src_sub) - 16'd1;
              state    <= S_WAIT;
            end
            BK_MAC: begin
              n_mac <= n_mac + 1;
              state <= S_MAC;
            end
            BK_RELU: state <= S_MAC;
            default: ;
          endcase
        end
        S_WAIT: begin
          if (wait_cnt <= 16'd1) state <= S_IDLE;
          wait_cnt <= wait_cnt - 1'b1;
        end
        S_MAC: if (sub_busy == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Decode of the command into subarray and cluster controls.
  always_comb begin
    for (int s = 0; s < int'(NSUB); s++) begin
      sa_act[s]       = take && cmd_op == BK_ACT    && cmd_sub == SW'(s);
      sa_clone[s]     = take && cmd_op == BK_CLONE  && cmd_sub == SW'(s);
      sa_load[s]      = take && ((cmd_op == BK_LISA || cmd_op == BK_HOSTWR)
                                 && cmd_sub == SW'(s));
      sa_load_data[s] = (cmd_op == BK_LISA) ? row_buf[cmd_src_sub] : cmd_data;
      sub_busy[s]     = |cl_busy[s];
    end
  end

  for (genvar s = 0; s < int'(NSUB); s++) begin : g_sub
    dram_subarray #(.ROWS(ROWS), .COLS(COLS), .MCAST(MCAST)) u_sa (
      .clk, .rst_n,
      .act          (sa_act[s]),
      .act_row      (cmd_row),
      .clone        (sa_clone[s]),
      .dst_row      (cmd_dst_row),
      .dst_valid    (cmd_dst_valid),
      .rb_load      (sa_load[s]),
      .rb_load_data (sa_load_data[s]),
      .rb_wmask     (sa_wmask[s]),
      .rb_wdata     (sa_wdata[s]),
      .row_buf      (row_buf[s])
    );

    for (genvar c = 0; c < int'(NCL); c++) begin : g_cl
      logic [DATA_W-1:0] slice;
      logic [DATA_W-1:0] data_word;

      assign slice     = row_buf[s][c*DATA_W +: DATA_W];
      assign data_word = cmd_chain ? {cl_result[s][c], slice[15:0]} : slice;

      ppim_cluster u_cl (
        .clk, .rst_n,
        .start        (take && (cmd_op == BK_MAC || cmd_op == BK_RELU) && cmd_sub_mask[s]),
        .op           (cl_op),
        .data_in      (data_word),
        .busy         (cl_busy[s][c]),
        .done         (cl_done[s][c]),
        .result       (cl_result[s][c]),
        .fw_we        (take && cmd_op == BK_FWLOAD),
        .fw_core_mask (cmd_fw_core_mask),
        .fw_idx       (cmd_fw_idx),
        .fw_addr      (cmd_fw_addr),
        .fw_data      (cmd_fw_data),
        .ucode_we     (1'b0),
        .ucode_addr   ('0),
        .ucode_data   ('0)
      );

      // Write-back of the MAC result into the Y field of the slice.
      assign sa_wmask[s][c*DATA_W +: DATA_W] = cl_done[s][c] ? {16'hFFFF, 16'h0000} : '0;
      assign sa_wdata[s][c*DATA_W +: DATA_W] = {cl_result[s][c], 16'h0000};
    end
  end

  // Handshake rule: a command is only held, never dropped, while not ready.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cmd_valid && !cmd_ready |=> cmd_valid)
    else $error("ppim_bank: command withdrawn before it was taken");

endmodule
