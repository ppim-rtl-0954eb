// ppim_pkg: types, constants and built-in programs shared by the pPIM cluster.
//
// A pPIM cluster is nine LUT cores in a 3x3 grid. Every core operand input is fed
// by one 8:1 4-bit multiplexer of the cluster router (eighteen in all). The
// multiplexers choose from a common "source bus" of 4-bit values:
//   id 0          constant zero
//   id 1..8       the eight nibbles of the latched data-word
//                 {Y3,Y2,Y1,Y0,bH,bL,aH,aL} (aL is id 1)
//   id 9+2k       lower nibble of core k's 8-bit result
//   id 10+2k      upper nibble of core k's 8-bit result
// Which eight sources each multiplexer sees is fixed by ROUTE_TABLE. The table is
// this design's own choice: it holds every connection the built-in programs
// need, and the remaining slots are filled with neighbouring cores.
//
// The cluster is driven by a micro-program, one micro-op (uop_t) per core-step.
// A micro-op tells each core whether to load new operands, which router input
// (or its own result, the feedback path) to load, and which function-word of its
// register file to apply; it may also capture up to four source-bus nibbles into
// the cluster result register. build_prog() assembles the default program:
//   address 0..7   exact 8-bit MAC     Y <= Y + a*b            (8 core-steps)
//   address 8..11  precision-scaled    Y <= Y + (aH*bH) << 8   (4 core-steps)
//   address 12..13 activation          Y <= (Y < 0) ? 0 : Y    (2 core-steps)
package ppim_pkg;

  localparam int unsigned NCORE    = 9;    // cores per cluster (3x3 grid)
  localparam int unsigned NIB      = 4;    // operand width of a core
  localparam int unsigned LUT_W    = 8;    // width of one function-word entry
  localparam int unsigned LUT_D    = 256;  // entries of one function-word (2^(2*NIB))
  localparam int unsigned NFW      = 4;    // function-words held per core register file
  localparam int unsigned RMUX_IN  = 8;    // inputs of one router multiplexer
  localparam int unsigned NPORT    = 2 * NCORE;  // router multiplexers (eighteen)
  localparam int unsigned NDATA    = 8;    // nibbles of the cluster data-word
  localparam int unsigned DATA_W   = NDATA * NIB;  // 32-bit data-word {Y, b, a}
  localparam int unsigned ACC_W    = 16;   // accumulator / result width
  localparam int unsigned NSRC     = 1 + NDATA + 2 * NCORE;  // 27 source-bus values
  localparam int unsigned NSTEP    = 16;   // micro-program store depth

  typedef logic [NIB-1:0]             nib_t;
  typedef logic [4:0]                 src_t;     // source-bus id
  typedef logic [$clog2(RMUX_IN)-1:0] rsel_t;    // router multiplexer select
  typedef logic [$clog2(NFW)-1:0]     fsel_t;    // function-word select
  typedef logic [$clog2(NSTEP)-1:0]   pc_t;

  // Function-word slots used by the built-in programs.
  localparam fsel_t FW_MUL = fsel_t'(0);   // entry(A,B) = A * B
  localparam fsel_t FW_ADD = fsel_t'(1);   // entry(A,B) = A + B (carry in upper nibble)
  localparam fsel_t FW_RELU = fsel_t'(2);  // entry(A,B) = B[3] ? 0 : {B,A} (sign gate)

  localparam src_t SRC_ZERO = 5'd0;
  function automatic src_t src_d(int i);  return src_t'(1 + i);          endfunction
  function automatic src_t src_lo(int k); return src_t'(1 + NDATA + 2*k); endfunction
  function automatic src_t src_hi(int k); return src_t'(2 + NDATA + 2*k); endfunction

  // Data-word nibbles.
  localparam int D_AL = 0, D_AH = 1, D_BL = 2, D_BH = 3;
  localparam int D_Y0 = 4, D_Y1 = 5, D_Y2 = 6, D_Y3 = 7;

  // Control of one core for one core-step.
  typedef struct packed {
    logic  ld;     // load operand registers A and B and the function select
    logic  fb_a;   // A <= own result, lower nibble (instead of router)
    logic  fb_b;   // B <= own result, upper nibble (instead of router)
    fsel_t fsel;   // function-word applied from this step on
    rsel_t sel_a;  // router multiplexer select, operand A
    rsel_t sel_b;  // router multiplexer select, operand B
  } core_ctl_t;

  // One micro-op: one core-step of the whole cluster.
  typedef struct packed {
    logic                  last;     // final step of the program
    logic [3:0]            cap;      // capture result nibble i
    src_t [3:0]            cap_src;  // source-bus id captured into nibble i
    core_ctl_t [NCORE-1:0] core;
  } uop_t;


  typedef src_t  [RMUX_IN-1:0] rlist_t;   // sources of one multiplexer
  typedef rlist_t [NPORT-1:0]  route_t;
  typedef uop_t  [NSTEP-1:0]   prog_t;
  typedef src_t  [3:0]         need_t;

  function automatic need_t lst(src_t a, src_t b = SRC_ZERO, src_t c = SRC_ZERO,
                                src_t d = SRC_ZERO);
    need_t l;
    l[0] = a; l[1] = b; l[2] = c; l[3] = d;
    return l;
  endfunction

  // Router connection table. Port p = 2*k + 0 is core k operand A, 2*k + 1 operand B.
  function automatic route_t build_route();
    route_t             r;
    int                 n;
    bit                 present;
    src_t               s;
    need_t  [NPORT-1:0] need;
    r = '0;
    // Connections required by the built-in programs (see build_prog).
    need[0] = lst(src_d(D_AL), src_d(D_Y3), src_lo(4), src_d(D_AH));
    need[1] = lst(src_d(D_BL), src_hi(3), src_hi(7), src_d(D_BH));
    need[2] = lst(src_d(D_AL), src_lo(5), src_lo(0), src_d(D_Y2));
    need[3] = lst(src_d(D_BH), src_lo(6), src_hi(5), src_lo(0));
    need[4] = lst(src_d(D_AH), src_lo(7), src_d(D_Y3));
    need[5] = lst(src_d(D_BL), src_lo(8), src_hi(0));
    need[6] = lst(src_d(D_AH), src_hi(5), src_hi(1), src_lo(2));
    need[7] = lst(src_d(D_BH), src_hi(6), src_hi(1));
    need[8] = lst(src_d(D_Y0), src_lo(8));
    need[9] = lst(src_lo(0), src_hi(2), src_d(D_Y3));
    need[10] = lst(src_d(D_Y1), src_hi(7), src_lo(7));
    need[11] = lst(src_hi(0), src_hi(8), src_lo(3), src_d(D_Y3));
    need[12] = lst(src_lo(1));
    need[13] = lst(src_lo(2), src_hi(4));
    need[14] = lst(src_d(D_Y2), src_lo(2));
    need[15] = lst(src_hi(1), src_lo(3), src_d(D_Y3));
    need[16] = lst(src_hi(2), src_lo(0));
    need[17] = lst(src_lo(3), src_lo(5));
    for (int p = 0; p < int'(NPORT); p++) begin
      r[p][0] = SRC_ZERO;
      n = 1;
      for (int i = 0; i < 4; i++) begin
        if (need[p][i] != SRC_ZERO) begin
          r[p][n] = need[p][i];
          n++;
        end
      end
      // Fill the free slots with the results of the following cores, lower
      // nibble for operand A ports and upper nibble for operand B ports.
      for (int d = 1; d < int'(NCORE) && n < int'(RMUX_IN); d++) begin
        s = (p % 2 == 0) ? src_lo((p / 2 + d) % NCORE) : src_hi((p / 2 + d) % NCORE);
        present = 1'b0;
        for (int j = 0; j < n; j++) if (r[p][j] == s) present = 1'b1;
        if (!present) begin
          r[p][n] = s;
          n++;
        end
      end
    end
    return r;
  endfunction

  localparam route_t ROUTE_TABLE = build_route();

  // Router select that connects source s to port p (0 = zero if not connected).
  function automatic rsel_t route_sel(int p, src_t s);
    rsel_t  sel;
    sel = '0;
    for (int i = RMUX_IN - 1; i >= 0; i--) if (ROUTE_TABLE[p][i] == s) sel = rsel_t'(i);
    return sel;
  endfunction

  // Micro-op helpers.
  function automatic uop_t set_op(uop_t u, int k, fsel_t f, src_t a, src_t b);
    uop_t v;
    v = u;
    v.core[k].ld    = 1'b1;
    v.core[k].fb_a  = 1'b0;
    v.core[k].fb_b  = 1'b0;
    v.core[k].fsel  = f;
    v.core[k].sel_a = route_sel(2*k, a);
    v.core[k].sel_b = route_sel(2*k + 1, b);
    return v;
  endfunction

  function automatic uop_t set_cap(uop_t u, int i, src_t s);
    uop_t v;
    v = u;
    v.cap[i]     = 1'b1;
    v.cap_src[i] = s;
    return v;
  endfunction

  localparam pc_t PROG_EXACT  = pc_t'(0);
  localparam pc_t PROG_APPROX = pc_t'(8);
  localparam pc_t PROG_RELU   = pc_t'(12);

  // Operations of a cluster (start addresses of the built-in programs).
  typedef enum logic [1:0] {
    OP_MAC8 = 2'd0,   // exact 8-bit MAC
    OP_MAC4 = 2'd1,   // precision-scaled MAC
    OP_RELU = 2'd2    // ReLU of the 16-bit signed Y
  } cl_op_e;

  function automatic pc_t op_pc(cl_op_e o);
    case (o)
      OP_MAC4: return PROG_APPROX;
      OP_RELU: return PROG_RELU;
      default: return PROG_EXACT;
    endcase
  endfunction

  // Default micro-program. Comments name the 4-bit values of the column sums of
  // Y + a*b: V0..V3 partial products, c* carries, other letters partial sums.
  function automatic prog_t build_prog();
    prog_t p;
    for (int s = 0; s < int'(NSTEP); s++) p[s] = '0;
    // ---- exact 8-bit MAC ----
    // step 1: V0=aL*bL (c0) V1=aL*bH (c1) V2=aH*bL (c2) V3=aH*bH (c3)
    p[0] = set_op(p[0], 0, FW_MUL, src_d(D_AL), src_d(D_BL));
    p[0] = set_op(p[0], 1, FW_MUL, src_d(D_AL), src_d(D_BH));
    p[0] = set_op(p[0], 2, FW_MUL, src_d(D_AH), src_d(D_BL));
    p[0] = set_op(p[0], 3, FW_MUL, src_d(D_AH), src_d(D_BH));
    // step 2: pairwise column sums
    p[1] = set_op(p[1], 4, FW_ADD, src_d(D_Y0), src_lo(0));  // Y0+V0l -> R0, c0
    p[1] = set_op(p[1], 5, FW_ADD, src_d(D_Y1), src_hi(0));  // Y1+V0h -> a1, ca
    p[1] = set_op(p[1], 6, FW_ADD, src_lo(1), src_lo(2));    // V1l+V2l -> b1, cb
    p[1] = set_op(p[1], 7, FW_ADD, src_d(D_Y2), src_hi(1));  // Y2+V1h -> a2, cc
    p[1] = set_op(p[1], 8, FW_ADD, src_hi(2), src_lo(3));    // V2h+V3l -> b2, cd
    p[1] = set_op(p[1], 0, FW_ADD, src_d(D_Y3), src_hi(3));  // Y3+V3h -> a3
    // step 3
    p[2] = set_op(p[2], 1, FW_ADD, src_lo(5), src_lo(6));    // a1+b1 -> d1, ce
    p[2] = set_op(p[2], 2, FW_ADD, src_lo(7), src_lo(8));    // a2+b2 -> d2, cf
    p[2] = set_op(p[2], 3, FW_ADD, src_hi(5), src_hi(6));    // ca+cb -> e2
    p[2] = set_op(p[2], 5, FW_ADD, src_hi(7), src_hi(8));    // cc+cd -> e3
    p[2] = set_cap(p[2], 0, src_lo(4));                      // R0
    // step 4
    p[3] = set_op(p[3], 6, FW_ADD, src_lo(1), src_hi(4));    // d1+c0 -> R1, cg
    p[3] = set_op(p[3], 7, FW_ADD, src_lo(2), src_lo(3));    // d2+e2 -> f2, ch
    p[3] = set_op(p[3], 8, FW_ADD, src_lo(0), src_lo(5));    // a3+e3 -> f3
    // step 5
    p[4] = set_op(p[4], 3, FW_ADD, src_hi(1), src_hi(6));    // ce+cg -> g2
    p[4] = set_op(p[4], 4, FW_ADD, src_lo(8), src_hi(2));    // f3+cf -> h3
    p[4] = set_cap(p[4], 1, src_lo(6));                      // R1
    // step 6
    p[5] = set_op(p[5], 5, FW_ADD, src_lo(7), src_lo(3));    // f2+g2 -> R2, ci
    p[5] = set_op(p[5], 0, FW_ADD, src_lo(4), src_hi(7));    // h3+ch -> k3
    // step 7
    p[6] = set_op(p[6], 1, FW_ADD, src_lo(0), src_hi(5));    // k3+ci -> R3
    p[6] = set_cap(p[6], 2, src_lo(5));                      // R2
    // step 8
    p[7] = set_cap(p[7], 3, src_lo(1));                      // R3
    p[7].last = 1'b1;
    // ---- precision-scaled 4-bit MAC ----
    p[8]  = set_op(p[8], 0, FW_MUL, src_d(D_AH), src_d(D_BH));  // V = aH*bH
    p[9]  = set_op(p[9], 1, FW_ADD, src_d(D_Y2), src_lo(0));    // Y2+Vl -> R2, c
    p[9]  = set_op(p[9], 2, FW_ADD, src_d(D_Y3), src_hi(0));    // Y3+Vh -> t
    p[10] = set_op(p[10], 3, FW_ADD, src_lo(2), src_hi(1));     // t+c -> R3
    p[10] = set_cap(p[10], 2, src_lo(1));                       // R2
    p[11] = set_cap(p[11], 3, src_lo(3));                       // R3
    p[11] = set_cap(p[11], 0, src_d(D_Y0));                     // Y0 unchanged
    p[11] = set_cap(p[11], 1, src_d(D_Y1));                     // Y1 unchanged
    p[11].last = 1'b1;
    // ---- ReLU of the signed 16-bit Y: every nibble gated by the sign of Y3 ----
    p[12] = set_op(p[12], 4, FW_RELU, src_d(D_Y0), src_d(D_Y3));  // {R3, R0}
    p[12] = set_op(p[12], 5, FW_RELU, src_d(D_Y1), src_d(D_Y3));  // R1
    p[12] = set_op(p[12], 7, FW_RELU, src_d(D_Y2), src_d(D_Y3));  // R2
    p[13] = set_cap(p[13], 0, src_lo(4));
    p[13] = set_cap(p[13], 1, src_lo(5));
    p[13] = set_cap(p[13], 2, src_lo(7));
    p[13] = set_cap(p[13], 3, src_hi(4));
    p[13].last = 1'b1;
    return p;
  endfunction

  // Commands of the bank (issued by the memory controller).
  typedef enum logic [2:0] {
    BK_NOP    = 3'd0,
    BK_ACT    = 3'd1,  // read a row into the subarray row buffer
    BK_CLONE  = 3'd2,  // RowClone: write the row buffer into up to MCAST rows
    BK_LISA   = 3'd3,  // copy a row buffer into another subarray's row buffer
    BK_MAC    = 3'd4,  // MAC in every cluster of the selected subarrays
    BK_FWLOAD = 3'd5,  // write one function-word entry into every cluster
    BK_HOSTWR = 3'd6,  // load the row buffer from the chip I/O
    BK_RELU   = 3'd7   // ReLU of Y in every cluster of the selected subarrays
  } bank_op_e;

  // Function-word contents: entry {A,B} of the multiply and add words.
  function automatic logic [LUT_W-1:0] fw_mul_entry(logic [7:0] addr);
    return LUT_W'(addr[7:4] * addr[3:0]);
  endfunction
  function automatic logic [LUT_W-1:0] fw_add_entry(logic [7:0] addr);
    return LUT_W'({4'd0, addr[7:4]} + {4'd0, addr[3:0]});
  endfunction
  function automatic logic [LUT_W-1:0] fw_relu_entry(logic [7:0] addr);
    return addr[3] ? 8'd0 : {addr[3:0], addr[7:4]};
  endfunction

endpackage
