// dram_subarray: one DRAM subarray with its row buffer (sense amplifiers).
//
// A storage array of ROWS rows of COLS bits and a row buffer that the pPIM
// clusters of the subarray read and write. It offers the data movements the
// architecture relies on:
//   act         row buffer <= row act_row (a normal row read)
//   clone       RowClone: every valid destination row <= row buffer; with
//               several valid destinations the write is a multicast (up to
//               MCAST rows, three by default)
//   rb_load     row buffer <= rb_load_data (from another subarray's row
//               buffer over the LISA link, or from the chip I/O)
//   rb_wmask    bitwise write of rb_wdata into the row buffer (cluster results)
// Priority when several are asserted: act, then rb_load, then rb_wmask; clone
// writes the row buffer as it was before the edge. The cell array is modelled
// as a plain memory array; charge sharing, precharge and the DRAM timing are not
// modelled here (the bank applies the command latencies). Reset clears the row
// buffer only, as a DRAM does not initialise its cells.
module dram_subarray #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned COLS  = 512,
  parameter int unsigned MCAST = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    act,
  input  logic [$clog2(ROWS)-1:0] act_row,
  input  logic                    clone,
  input  logic [$clog2(ROWS)-1:0] dst_row   [MCAST],
  input  logic [MCAST-1:0]        dst_valid,
  input  logic                    rb_load,
  input  logic [COLS-1:0]         rb_load_data,
  input  logic [COLS-1:0]         rb_wmask,
  input  logic [COLS-1:0]         rb_wdata,
  output logic [COLS-1:0]         row_buf
);

  logic [COLS-1:0] cells [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       row_buf <= '0;
    else if (act)     row_buf <= cells[act_row];
    else if (rb_load) row_buf <= rb_load_data;
    else              row_buf <= (row_buf & ~rb_wmask) | (rb_wdata & rb_wmask);
  end

  always_ff @(posedge clk) begin
    if (clone)
      for (int i = 0; i < int'(MCAST); i++)
        if (dst_valid[i]) cells[dst_row[i]] <= row_buf;
  end

endmodule
