// ppim_router: the intra-cluster interconnect of a pPIM cluster.
//
// Eighteen 8:1 4-bit multiplexers, one for each operand input (A and B) of the
// nine cores, as the architecture specifies. All multiplexers draw on one source
// bus (constant zero, the eight nibbles of the data-word from the read port and
// the upper and lower result nibbles of all nine cores); ROUTE_TABLE in ppim_pkg
// fixes which eight sources each multiplexer is wired to. The architecture names
// the fabric (a SPIN interconnect able to make parallel connections among all
// cores) but not its wiring: the table is this design's own and is chosen so
// that the built-in programs (exact MAC, precision-scaled MAC, ReLU) route
// without conflict.
//
// Interface: data_word (32 bits, nibble i = source id 1+i), core_result (8 bits
// per core), sel (3 bits per port; port 2k is core k operand A, 2k+1 operand B),
// port_out (4 bits per port). Purely combinational.
module ppim_router
  import ppim_pkg::*;
(
  input  logic [DATA_W-1:0]     data_word,
  input  logic [LUT_W-1:0]      core_result [NCORE],
  input  rsel_t                 sel [NPORT],
  output nib_t                  port_out [NPORT],
  output nib_t                  src_bus [NSRC]
);

  // Source bus.
  always_comb begin
    src_bus[0] = '0;
    for (int i = 0; i < int'(NDATA); i++) src_bus[1 + i] = data_word[i*NIB +: NIB];
    for (int k = 0; k < int'(NCORE); k++) begin
      src_bus[1 + NDATA + 2*k] = core_result[k][NIB-1:0];
      src_bus[2 + NDATA + 2*k] = core_result[k][LUT_W-1:NIB];
    end
  end

  // Eighteen 8:1 multiplexers.
  for (genvar p = 0; p < int'(NPORT); p++) begin : g_mux
    nib_t mux_in [RMUX_IN];
    for (genvar i = 0; i < int'(RMUX_IN); i++) begin : g_in
      assign mux_in[i] = src_bus[ROUTE_TABLE[p][i]];
    end
    assign port_out[p] = mux_in[sel[p]];
  end

endmodule
