// memflow_pkg: types and arithmetic shared by the MemFlow accelerator.
//
// Matrix elements are signed fixed-point words (DATA_W bits, FRAC_W fraction
// bits). The fixed-point format is this design's choice; the source design
// names floating-point style units (mul, add, sub, div, sqrt) without giving
// a number format. Multiplication rounds toward minus infinity (arithmetic
// shift of the double-width product), division truncates toward zero, and a
// division by zero returns zero.
//
// The loop-order encoding lists the six nestings of the block loops (i over
// block rows of C, j over block columns of C, l over the shared dimension),
// outermost first.
package memflow_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned FRAC_W = 16;

  typedef logic signed [DATA_W-1:0] data_t;

  // Six block loop orders, outermost loop first.
  typedef enum logic [2:0] {
    ORD_IJL = 3'd0,
    ORD_JIL = 3'd1,
    ORD_LIJ = 3'd2,
    ORD_ILJ = 3'd3,
    ORD_LJI = 3'd4,
    ORD_JLI = 3'd5
  } loop_order_e;

  // Operation the accelerator runs.
  typedef enum logic [2:0] {
    OP_MM    = 3'd0,   // blocked C = C + A * B
    OP_LU    = 3'd1,   // in-place LU factorisation of one block
    OP_QR    = 3'd2,   // Householder QR factorisation of one block
    OP_TRS   = 3'd3,   // one block A -> L^-1 * A
    OP_LUCPL = 3'd4,   // one block A -> A * U^-1
    OP_QRUTR = 3'd5,   // QRUpdateTr: one block A -> H(V)^T * A
    OP_QRCPL = 3'd6,   // QRCPL: eliminate the block B below R
    OP_QRUPD = 3'd7    // QRUpdate: apply the last QRCPL to a pair [A; B]
  } op_e;

  // Macro node run by the QR engine.
  typedef enum logic [1:0] {
    QR_FACT = 2'd0,   // A -> H(V) * R
    QR_UTR  = 2'd1,   // QRUpdateTr: A -> H(V)^T * A
    QR_CPL  = 2'd2,   // QRCPL: [R; B] -> H * [R'; 0]
    QR_UPD  = 2'd3    // QRUpdate: [A; B] -> H^T * [A; B]
  } qr_mode_e;

  // Macro node run by the LU engine.
  typedef enum logic [1:0] {
    LU_FACT = 2'd0,   // A -> L * U
    LU_TRS  = 2'd1,   // A -> L^-1 * A
    LU_CPL  = 2'd2    // A -> A * U^-1
  } lu_mode_e;

  // On-chip destination of a DMA transfer.
  typedef enum logic [2:0] {
    TGT_A   = 3'd0,
    TGT_B   = 3'd1,
    TGT_C   = 3'd2,
    TGT_LU  = 3'd3,
    TGT_QR  = 3'd4,   // QR engine, block A / R
    TGT_QRV = 3'd5,   // QR engine, reflector block V
    TGT_LUF = 3'd6,   // LU engine, factor block (L or U)
    TGT_QRB = 3'd7    // QR engine, lower block of a stacked pair
  } target_e;

  // Dimension (0 = i, 1 = j, 2 = l) walked by loop level lvl (0 = outermost)
  // of a loop order.
  function automatic logic [1:0] level_dim(loop_order_e o, int lvl);
    logic [1:0] d [3];
    unique case (o)
      ORD_IJL: d = '{2'd0, 2'd1, 2'd2};
      ORD_JIL: d = '{2'd1, 2'd0, 2'd2};
      ORD_LIJ: d = '{2'd2, 2'd0, 2'd1};
      ORD_ILJ: d = '{2'd0, 2'd2, 2'd1};
      ORD_LJI: d = '{2'd2, 2'd1, 2'd0};
      ORD_JLI: d = '{2'd1, 2'd2, 2'd0};
      default: d = '{2'd0, 2'd1, 2'd2};
    endcase
    return d[lvl % 3];
  endfunction

  // Event counts of a run, for judging a schedule.
  typedef struct packed {
    logic [31:0] nodes;        // macro nodes executed
    logic [31:0] a_loads;      // blocks loaded from DRAM, per region
    logic [31:0] b_loads;
    logic [31:0] c_loads;      // C blocks reloaded (or read for accumulation)
    logic [31:0] c_stores;     // C blocks written to DRAM
    logic [31:0] c_spills;     // of those, written before the last use
    logic [31:0] a_hits;       // block found resident, per region
    logic [31:0] b_hits;
    logic [31:0] c_hits;
    logic [31:0] c_zero_inits; // C blocks started at zero without a load
    logic [31:0] evictions;    // valid slots replaced, all regions
    logic [31:0] dram_words;   // words moved between DRAM and chip
  } stats_t;

  function automatic data_t fx_mul(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] p;
    p = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    return data_t'(p >>> FRAC_W);
  endfunction

  // Square root of a non-negative fixed-point value, rounded down; negative
  // inputs give zero. Bit-by-bit: the root is built from its top bit down,
  // keeping each bit whose trial square does not exceed a * 2^FRAC_W.
  function automatic data_t fx_sqrt(data_t a);
    logic [2*DATA_W-1:0] n;
    logic [DATA_W-1:0]   root;
    logic [DATA_W-1:0]   trial;
    if (a <= 0) return '0;
    n    = (2*DATA_W)'(unsigned'(a)) << FRAC_W;
    root = '0;
    for (int b = DATA_W - 1; b >= 0; b--) begin
      trial = root | (DATA_W'(1) << b);
      if ((2*DATA_W)'(trial) * (2*DATA_W)'(trial) <= n) root = trial;
    end
    return data_t'(root);
  endfunction

  function automatic data_t fx_div(data_t a, data_t b);
    logic signed [2*DATA_W-1:0] n;
    logic signed [2*DATA_W-1:0] d;
    if (b == '0) return '0;
    n = (2*DATA_W)'(a) <<< FRAC_W;
    d = (2*DATA_W)'(b);
    return data_t'(n / d);
  endfunction

endpackage
