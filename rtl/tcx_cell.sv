// tcx_cell: one cell of a neuron matrix, an 8x8 mesh of compute units that
// share one control word, with its TRF bank, feeder and sequencer.
//
// A cell executes a compute command on its own, so the 16 cells of an NR run
// the same command in lockstep on different data. Sequence of a command:
//   1. TILE : read the feature tile rows from the bank into the feeder
//             (conv/max: 7*S+K rows, point-wise: C*8/N rows, prelu: 8 rows).
//   2. KERN : read the kernel words into the feeder's kernel cache, unless the
//             cache already holds this kernel register (kernel caching: the
//             tag is the PTR, and any write to that PTR drops it).
//   3. RUN  : one step per cycle; conv/max K*K steps, point-wise C steps,
//             prelu one step, each doubled for 16-bit kernels. With stride 1
//             the features move one CU west per step (systolic shift).
//   4. DRAIN: wait for the feeder (5) and CU (2) pipelines.
//   5. WB   : if write_back, write the eight result rows, packed in the chosen
//             format, to rows 0..7 of the destination register.
// With acc_clear = 0 the accumulators continue from the previous command, so
// several commands (e.g. one per input channel) build one output.
// Port A of the bank is brought out for the load/store and loopback paths.
// The step ordering and the per-phase cycle counts are this implementation's.
module tcx_cell
  import tcx_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  comp_cmd_t cmd_in,
  output logic      busy,
  output logic      done,        // one-cycle pulse at the end of a command
  // bank port A
  input  logic      a_en,
  input  logic      a_we,
  input  ptr_t      a_ptr,
  input  row_t      a_row,
  input  word_t     a_wdata,
  output word_t     a_rdata,
  // activity (one-cycle pulses)
  output logic      ev_step,     // a MAC step issued
  output logic      ev_shift,    // a step used the systolic shift
  output logic      ev_khit      // the kernel came from the cache
);
  typedef enum logic [2:0] {S_IDLE, S_TILE, S_KERN, S_RUN, S_DRAIN, S_WB, S_DONE} state_e;
  state_e    st;
  comp_cmd_t cmd;

  // ---------------- command-derived sizes ----------------
  logic [1:0] nlog;
  always_comb begin
    unique case (cmd.n_out)
      4'd8:    nlog = 2'd3;
      4'd4:    nlog = 2'd2;
      4'd2:    nlog = 2'd1;
      default: nlog = 2'd0;
    endcase
  end
  logic [5:0] n_tile;
  logic [8:0] kbytes;
  logic [3:0] n_kw;
  logic [1:0] s;
  assign s = (cmd.stride == 2'd2) ? 2'd2 : 2'd1;
  always_comb begin
    unique case (cmd.mode)
      CM_PW:    n_tile = 6'(cmd.n_ch) * (6'd8 >> nlog);
      CM_PRELU: n_tile = 6'd8;
      default:  n_tile = 6'd7 * 6'(s) + 6'(cmd.k);
    endcase
    if (n_tile > 6'(TILE)) n_tile = 6'(TILE);
    unique case (cmd.mode)
      CM_PW:    kbytes = 9'(cmd.n_out) * 9'(cmd.n_ch);
      CM_PRELU: kbytes = 9'd1;
      CM_MAX:   kbytes = 9'd0;
      default:  kbytes = 9'(cmd.k) * 9'(cmd.k);
    endcase
    if (cmd.k16) kbytes = kbytes << 1;
    n_kw = 4'((kbytes + 9'(WORD_B) - 9'd1) / 9'(WORD_B));
  end

  // ---------------- kernel cache tag ----------------
  logic kc_valid;
  ptr_t kc_ptr;
  logic [3:0] kc_words;
  logic khit;
  assign khit = (n_kw == 0) || (kc_valid && kc_ptr == cmd.kern && kc_words >= n_kw);

  // ---------------- counters ----------------
  logic [5:0] ridx;          // tile / kernel / write-back row counter
  logic [3:0] kr, kc;
  logic [4:0] ch;
  logic       hi;
  logic       first_step;
  logic [3:0] dcnt;
  logic       last_step;

  always_comb begin
    unique case (cmd.mode)
      CM_PW:    last_step = (ch == cmd.n_ch - 5'd1) && (hi == cmd.k16);
      CM_PRELU: last_step = (hi == cmd.k16);
      default:  last_step = (kr == cmd.k - 4'd1) && (kc == cmd.k - 4'd1) &&
                            (hi == (cmd.k16 && cmd.mode == CM_CONV));
    endcase
  end

  // bank port B
  logic  b_en, b_we;
  ptr_t  b_ptr;
  row_t  b_row;
  word_t b_wdata, b_rdata;

  // pending bank read
  logic       rd_v, rd_tile;
  logic [4:0] rd_idx;

  // feeder
  logic st_valid;
  cu_ctl_t                             cu_ctl;
  logic [CU_DIM-1:0][CU_DIM-1:0][15:0] f_op0;
  logic [CU_DIM-1:0][15:0]             f_east;
  logic [CU_DIM-1:0][7:0]              f_op1;

  assign st_valid = (st == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmd <= '0; ridx <= '0; kr <= '0; kc <= '0; ch <= '0; hi <= '0;
      first_step <= 1'b0; dcnt <= '0; rd_v <= 1'b0; rd_tile <= 1'b0; rd_idx <= '0;
      kc_valid <= 1'b0; kc_ptr <= '0; kc_words <= '0;
    end else begin
      rd_v <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          cmd  <= cmd_in;
          ridx <= '0;
          st   <= S_TILE;
        end
        S_TILE: begin
          rd_v <= 1'b1; rd_tile <= 1'b1; rd_idx <= ridx[4:0];
          if (ridx == n_tile - 6'd1) begin
            ridx <= '0;
            st   <= khit ? S_RUN : S_KERN;
            first_step <= cmd.acc_clear;
            kr <= '0; kc <= '0; ch <= '0; hi <= '0;
          end else ridx <= ridx + 6'd1;
        end
        S_KERN: begin
          rd_v <= 1'b1; rd_tile <= 1'b0; rd_idx <= ridx[4:0];
          if (ridx == 6'(n_kw) - 6'd1) begin
            ridx <= '0;
            st   <= S_RUN;
            kc_valid <= 1'b1; kc_ptr <= cmd.kern; kc_words <= n_kw;
          end else ridx <= ridx + 6'd1;
        end
        S_RUN: begin
          first_step <= 1'b0;
          if (last_step) begin
            st <= S_DRAIN; dcnt <= 4'(FEED_STAGES + 2);
          end else if (cmd.k16 && !hi && cmd.mode != CM_MAX) begin
            hi <= 1'b1;
          end else begin
            hi <= 1'b0;
            unique case (cmd.mode)
              CM_PW: ch <= ch + 5'd1;
              CM_PRELU: ;
              default: if (kc == cmd.k - 4'd1) begin kc <= '0; kr <= kr + 4'd1; end
                        else kc <= kc + 4'd1;
            endcase
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt - 4'd1;
          if (dcnt == 4'd1) st <= cmd.write_back ? S_WB : S_DONE;
        end
        S_WB: begin
          if (ridx == 6'(CU_DIM - 1)) st <= S_DONE;
          ridx <= ridx + 6'd1;
        end
        S_DONE: if (start) begin   // a new command may follow at once
          cmd  <= cmd_in;
          ridx <= '0;
          st   <= S_TILE;
        end else st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
      // any write to the cached kernel register drops the cache
      if ((a_en && a_we && a_ptr == kc_ptr) || (b_en && b_we && b_ptr == kc_ptr))
        kc_valid <= 1'b0;
    end
  end

  assign busy = (st != S_IDLE) && (st != S_DONE);
  assign done = (st == S_DONE);
  assign ev_step  = st_valid;
  assign ev_shift = cu_ctl.valid && cu_ctl.sh;
  assign ev_khit  = (st == S_TILE) && (ridx == n_tile - 6'd1) && khit && (n_kw != 0);

  // ---------------- CU array ----------------
  logic [CU_DIM-1:0][CU_DIM-1:0][15:0] op0_q;
  logic [CU_DIM-1:0][CU_DIM-1:0][19:0] res;
  logic signed [31:0] op2;
  assign op2 = (cmd.mode == CM_MAX) ? 32'sh8000_0000 : 32'sd0;

  for (genvar i = 0; i < CU_DIM; i++) begin : g_row
    for (genvar j = 0; j < CU_DIM; j++) begin : g_col
      logic signed [31:0] acc_unused;
      tcx_cu u_cu (
        .clk, .rst_n,
        .ctl     (cu_ctl),
        .op0_in  (f_op0[i][j]),
        .east_in ((j == CU_DIM - 1) ? f_east[i] : op0_q[i][j+1]),
        .op1_in  (f_op1[i]),
        .op2_in  (op2),
        .fmt     (cmd.fmt),
        .shift   (cmd.shift),
        .op0_q   (op0_q[i][j]),
        .acc_q   (acc_unused),
        .res     (res[i][j])
      );
    end
  end

  // ---------------- feeder ----------------
  tcx_feeder u_feed (
    .clk, .rst_n,
    .cmd        (cmd),
    .tile_we    (rd_v && rd_tile),
    .tile_row   (rd_idx),
    .tile_wdata (b_rdata),
    .kb_we      (rd_v && !rd_tile),
    .kb_idx     (rd_idx[3:0]),
    .kb_wdata   (b_rdata),
    .st_valid   (st_valid),
    .st_kr      (kr),
    .st_kc      (kc),
    .st_c       (ch),
    .st_hi      (hi),
    .st_first   (first_step),
    .cu_ctl     (cu_ctl),
    .op0        (f_op0),
    .east       (f_east),
    .op1        (f_op1)
  );

  // ---------------- bank ----------------
  word_t wb_word;
  tcx_row_pack u_pack (.res(res[ridx[2:0]]), .fmt(cmd.fmt), .word(wb_word));

  always_comb begin
    b_en    = 1'b0;
    b_we    = 1'b0;
    b_ptr   = cmd.feat;
    b_row   = ROW_W'(ridx);
    b_wdata = wb_word;
    unique case (st)
      S_TILE: begin b_en = 1'b1; b_ptr = cmd.feat; end
      S_KERN: begin b_en = 1'b1; b_ptr = cmd.kern; end
      S_WB:   begin b_en = 1'b1; b_we = 1'b1; b_ptr = cmd.dst; end
      default: ;
    endcase
  end

  tcx_trf_bank u_bank (
    .clk,
    .a_en, .a_we, .a_ptr, .a_row, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_ptr, .b_row, .b_wdata, .b_rdata
  );
endmodule
