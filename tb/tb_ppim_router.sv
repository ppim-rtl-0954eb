// tb_ppim_router: self-checking test of the cluster router.
//
// Gives every source-bus value a distinct random nibble pattern over several
// trials and checks, for each of the eighteen multiplexers: select 0 gives zero;
// each of the eight selects gives a source-bus value (the table entry); and the
// connections the MAC programs rely on, listed here by hand as
// (port, source id) pairs, are reachable through some select. It also checks
// the source-bus numbering: id 1+i is data nibble i, 9+2k / 10+2k the lower /
// upper result nibble of core k.
module tb_ppim_router;
  import ppim_pkg::*;

  logic [DATA_W-1:0] data_word;
  logic [LUT_W-1:0]  core_result [NCORE];
  rsel_t             sel [NPORT];
  nib_t              port_out [NPORT];
  nib_t              src_bus [NSRC];

  int checks = 0, failures = 0;

  ppim_router dut (.*);

  // Required connections (port, source id), written out by hand.
  int need_p [$] = '{0,0,0,0, 1,1,1,1, 2,2,2,2, 3,3,3,3, 4,4,4, 5,5,5, 6,6,6,6,
                     7,7,7, 8,8, 9,9, 10,10,10, 11,11,11, 12, 13,13, 14,14,
                     15,15, 16,16, 17,17, 9, 11, 15};
  int need_s [$] = '{1,8,17,2, 3,16,24,4, 1,19,9,7, 4,21,20,9, 2,23,8, 3,25,10,
                     2,20,12,13, 4,22,12, 5,25, 9,14, 6,24,23, 10,26,15, 11,
                     13,18, 7,13, 12,15, 14,9, 15,19, 8, 8, 8};

  function automatic nib_t bus_model(int id);
    if (id == 0) return '0;
    if (id <= 8) return data_word[(id-1)*4 +: 4];
    if ((id - 9) % 2 == 0) return core_result[(id-9)/2][3:0];
    return core_result[(id-10)/2][7:4];
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok, all;
    for (int t = 0; t < 40; t++) begin
      data_word = DATA_W'({$urandom, $urandom});
      for (int k = 0; k < 9; k++) core_result[k] = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        for (int p = 0; p < 18; p++) sel[p] = rsel_t'(s);
        #1;
        for (int id = 0; id < 27; id++) begin
          checks++;
          if (src_bus[id] !== bus_model(id)) begin
            failures++;
            $display("FAIL bus id %0d", id);
          end
        end
        for (int p = 0; p < 18; p++) begin
          checks++;
          if (port_out[p] !== src_bus[ROUTE_TABLE[p][s]]) begin
            failures++;
            $display("FAIL port %0d sel %0d", p, s);
          end
          if (s == 0) begin
            checks++;
            if (port_out[p] !== 4'd0) begin
              failures++;
              $display("FAIL port %0d sel 0 not zero", p);
            end
          end
        end
      end
    end
    // Reachability of required connections: search a select whose output
    // follows the source over many random trials.
    for (int i = 0; i < need_p.size(); i++) begin
      ok = 1'b0;
      for (int s = 0; s < 8 && !ok; s++) begin
        all = 1'b1;
        for (int t = 0; t < 16; t++) begin
          data_word = DATA_W'({$urandom, $urandom});
          for (int k = 0; k < 9; k++) core_result[k] = 8'($urandom);
          sel[need_p[i]] = rsel_t'(s);
          #1;
          if (port_out[need_p[i]] !== bus_model(need_s[i])) all = 1'b0;
        end
        ok = all;
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL port %0d cannot reach source %0d", need_p[i], need_s[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
