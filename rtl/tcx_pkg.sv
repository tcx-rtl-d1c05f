// tcx_pkg: types and constants shared by the TCX tensor engine.
//
// The engine is a decoupled tensor co-processor: 64-bit tensor instructions are
// issued in order, destination tensor registers are renamed onto a larger pool
// of physical tensor registers (PTRs), and three execution resources (the load/
// store pipeline, the loopback path and the neuron matrices) run concurrently.
// Sizes that follow the published design: 4 neuron matrices (NR) of 4x4 cells,
// 8x8 compute units (CU) per cell, 8-bit operands, 32-bit accumulators,
// 20-bit CU results, 4-dimensional tensors. Everything else here (register
// counts, TRF depth, instruction encoding, bus width) is this implementation's
// own choice.
package tcx_pkg;

  // ---------------- machine size ----------------
  localparam int unsigned NUM_NR    = 4;   // neuron matrices
  localparam int unsigned CELL_DIM  = 4;   // cells per NR side (4x4)
  localparam int unsigned NUM_CELL  = CELL_DIM * CELL_DIM;
  localparam int unsigned CU_DIM    = 8;   // CUs per cell side (8x8)
  localparam int unsigned NUM_ATR   = 8;   // architectural tensor registers
  localparam int unsigned NUM_PTR   = 10;  // physical tensor registers
  localparam int unsigned TRF_ROWS  = 32;  // TRF words per PTR per bank
  localparam int unsigned WORD_W    = 160; // one TRF word: 8 CUs x 20 bits
  localparam int unsigned WORD_B    = WORD_W / 8;  // 20 byte lanes
  localparam int unsigned TILE      = 20;  // feature tile kept in a feeder (rows x byte lanes)
  localparam int unsigned KB_WORDS  = 10;  // kernel cache, TRF words
  localparam int unsigned KB_BYTES  = KB_WORDS * WORD_B;
  localparam int unsigned NUM_DREG  = 8;   // dimension registers
  localparam int unsigned BUS_W     = 64;  // external data port
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned FEED_STAGES = 5; // feeder pipeline depth

  localparam int unsigned PTR_W  = $clog2(NUM_PTR);
  localparam int unsigned ATR_W  = $clog2(NUM_ATR);
  localparam int unsigned ROW_W  = $clog2(TRF_ROWS);
  localparam int unsigned CELL_W = $clog2(NUM_CELL);
  localparam int unsigned NR_W   = $clog2(NUM_NR);

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [PTR_W-1:0]  ptr_t;
  typedef logic [ATR_W-1:0]  atr_t;
  typedef logic [ROW_W-1:0]  row_t;

  // ---------------- enumerations ----------------
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_SETDIM = 4'd1,
    OP_TLOAD  = 4'd2,
    OP_TSTORE = 4'd3,
    OP_TCOMP  = 4'd4,
    OP_TMOVE  = 4'd5,
    OP_SETCFG = 4'd6,
    OP_FENCE  = 4'd7
  } opcode_e;

  // CU operation
  typedef enum logic [1:0] {
    CM_CONV  = 2'd0,   // K x K sliding-window MAC, kernel broadcast
    CM_PW    = 2'd1,   // point-wise / fully connected (Fig. 8 dataflow)
    CM_MAX   = 2'd2,   // max pooling through the comparator
    CM_PRELU = 2'd3    // leaky / parametric ReLU
  } cmode_e;

  // result layout of one row of eight CUs
  typedef enum logic [1:0] {
    FMT_INT8  = 2'd0,
    FMT_INT16 = 2'd1,
    FMT_INT20 = 2'd2
  } fmt_e;

  // ---------------- control bundles ----------------
  // Control shared by all 64 CUs of a cell (one per cycle).
  typedef struct packed {
    logic       valid;      // perform an operation this cycle
    logic       ld;         // load op0 from the feeder
    logic       sh;         // take op0 from the east neighbour (systolic shift)
    cmode_e     mode;
    logic       first;      // use op2 instead of the accumulator as addend
    logic       op1_signed;
    logic       op1_hi;     // op1 is the high byte of a 16-bit kernel value
  } cu_ctl_t;

  // Compute command broadcast by the NR decoder to every cell.
  typedef struct packed {
    cmode_e     mode;
    logic [3:0] k;          // kernel side (conv / max window)
    logic [1:0] stride;     // 1 or 2
    logic [3:0] n_out;      // point-wise: output channels in a cell (1,2,4,8)
    logic [4:0] n_ch;       // point-wise: input channels
    logic       op0_signed;
    logic       op1_signed;
    logic       k16;        // 16-bit kernel values, two cycles per element
    fmt_e       fmt;
    logic [4:0] shift;      // output radix-point shift
    logic       acc_clear;  // start a new accumulation
    logic       write_back; // write the results to dst
    ptr_t       feat;
    ptr_t       kern;
    ptr_t       dst;
  } comp_cmd_t;

  typedef logic [3:0][31:0] dimreg_t;  // four 32-bit dimension fields

  // Load / store command handed to the LSU.
  typedef struct packed {
    logic              store;     // 0 load, 1 store
    ptr_t              ptr;
    dimreg_t           gdim;      // global tensor shape in memory (elements)
    dimreg_t           ldim;      // local sub-tensor extent
    dimreg_t           org;       // origin of the sub-tensor in the global tensor (signed)
    logic [CELL_W-1:0] cell0;     // first target cell
    logic [NR_W-1:0]   nr0;       // first target NR
    logic              dup0;      // duplicate across hardware partitions
    logic              dup1;      // duplicate across all cells of an NR
    logic              dup2;      // duplicate across NRs
    logic              wide;      // 16-bit elements (else 8-bit)
    logic              relu;      // store: ReLU, else linear
    logic [1:0]        hwp_a;     // log2 partition rows
    logic [1:0]        hwp_b;     // log2 partition cols
    logic              expand;    // store: sum partial results of all NRs
    logic [ADDR_W-1:0] base;
  } ls_cmd_t;

  // Loopback (tensor move) command.
  typedef struct packed {
    ptr_t             src;
    ptr_t             dst;
    logic signed [7:0] roff;     // source row = dst row + roff
    logic signed [7:0] boff;     // source byte lane = dst lane + boff
    logic [5:0]       rows;     // rows written per bank
    logic             dup1;     // copy cell 0 of each NR to every cell
  } mv_cmd_t;

  // Access port of the TRF banks used by the load/store and loopback paths.
  // A write goes to the NRs in nr_mask; inside each NR the decoder turns
  // cell, dup0, dup1 and the hardware partition into a cell write mask.
  typedef struct packed {
    logic                en;
    logic                we;
    logic [NUM_NR-1:0]   nr_mask;    // write: NRs written
    logic [CELL_W-1:0]   cell_id;      // target cell (read: the cell read in every NR)
    logic                dup0;       // write: same place in every hardware partition
    logic                dup1;       // write: every cell
    logic [1:0]          hwp_a;      // log2 partition rows (cells)
    logic [1:0]          hwp_b;      // log2 partition cols (cells)
    ptr_t                ptr;
    row_t                row;
    word_t               wdata;
  } trf_req_t;

  // External memory port: posted byte-masked writes, reads answered in order.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;    // byte address, 8-byte aligned
    logic [BUS_W-1:0]  wdata;
    logic [BUS_W/8-1:0] wstrb;
  } bus_req_t;

  // Performance-monitor counters of the engine.
  typedef enum int unsigned {
    PM_CYCLES = 0,      // cycles out of reset
    PM_ISSUED,          // instructions issued
    PM_ALLOC_STALL,     // cycles an instruction waited for a free PTR
    PM_RELEASE,         // PTRs returned to the free stack
    PM_MAC_STEPS,       // compute steps (one MAC or compare per CU)
    PM_SHIFT_STEPS,     // steps that used the systolic shift
    PM_KCACHE_HIT,      // compute commands served by the kernel cache
    PM_PAD,             // load elements padded with zero
    PM_COMBINE,         // load elements served from an already fetched bus word
    PM_EXPAND,          // store rows summed over the four NRs
    PM_LOOPBACK_ROWS,   // rows moved by the loopback path
    PM_FENCE,           // fences completed
    PM_COUNT
  } perf_e;

  // ---------------- helpers ----------------
  function automatic logic [7:0] word_byte(word_t w, int unsigned lane);
    return w[lane*8 +: 8];
  endfunction

  function automatic logic signed [31:0] sat(logic signed [31:0] v, int unsigned bits);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (bits - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (bits - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Instruction encodings (helpers used by software models and testbenches).
  function automatic logic [63:0] enc_setdim(int unsigned dreg, int unsigned field, logic [31:0] val);
    logic [63:0] i;
    i = '0; i[63:60] = OP_SETDIM; i[59:57] = 3'(dreg); i[56:55] = 2'(field); i[31:0] = val;
    return i;
  endfunction

  function automatic logic [63:0] enc_ls(opcode_e op, int unsigned atr, int unsigned gd, int unsigned ld,
                                         int unsigned od, int unsigned cell0, int unsigned nr0,
                                         logic dup0, logic dup1, logic dup2, logic wide, logic relu,
                                         logic [31:0] base);
    logic [63:0] i;
    i = '0; i[63:60] = op; i[59:57] = 3'(atr); i[56:54] = 3'(gd); i[53:51] = 3'(ld); i[50:48] = 3'(od);
    i[47:44] = 4'(cell0); i[43:42] = 2'(nr0); i[41] = dup0; i[40] = dup1; i[39] = dup2;
    i[38] = wide; i[36] = relu; i[31:0] = base;
    return i;
  endfunction

  function automatic logic [63:0] enc_comp(int unsigned dst, int unsigned feat, int unsigned kern,
                                           cmode_e mode, int unsigned k, int unsigned stride,
                                           int unsigned n_out, int unsigned n_ch, logic s0, logic s1,
                                           logic k16, fmt_e fmt, int unsigned shift, logic clr, logic wb);
    logic [63:0] i;
    i = '0; i[63:60] = OP_TCOMP; i[59:57] = 3'(dst); i[56:54] = 3'(feat); i[53:51] = 3'(kern);
    i[50:49] = mode; i[48:45] = 4'(k); i[44:43] = 2'(stride); i[42:39] = 4'(n_out); i[38:34] = 5'(n_ch);
    i[33] = s0; i[32] = s1; i[31] = k16; i[30:29] = fmt; i[28:24] = 5'(shift); i[23] = clr; i[22] = wb;
    return i;
  endfunction

  function automatic logic [63:0] enc_move(int unsigned dst, int unsigned src, int roff, int boff,
                                           int unsigned rows, logic dup1);
    logic [63:0] i;
    i = '0; i[63:60] = OP_TMOVE; i[59:57] = 3'(dst); i[56:54] = 3'(src); i[53:46] = 8'(roff);
    i[45:38] = 8'(boff); i[37:32] = 6'(rows); i[31] = dup1;
    return i;
  endfunction

  function automatic logic [63:0] enc_cfg(int unsigned la, int unsigned lb, logic expand);
    logic [63:0] i;
    i = '0; i[63:60] = OP_SETCFG; i[59:58] = 2'(la); i[57:56] = 2'(lb); i[55] = expand;
    return i;
  endfunction

endpackage
