// tcx_ctrl: tensor instruction front end of TCX.
//
// Takes 64-bit tensor instructions in program order (valid/ready), holds the
// dimension registers and the partition / NR-combination configuration, renames
// tensor registers (tcx_rename) and issues each instruction, in order, to one
// of two decoupled resources: the memory path (tensor load/store or loopback
// move, one at a time) and the neuron matrices (compute). A memory instruction
// and a compute instruction can therefore run at the same time and complete
// out of order. An instruction waits until its source tensor registers are
// ready, its resource is free and, if it writes a tensor register, a physical
// register is free. On completion the destination is marked ready and the
// instruction enters the retire buffer, which retires one instruction per
// cycle and releases its register references. FENCE waits until everything
// issued has retired and then pulses irq.
//
// Instruction fields (bit positions are this implementation's):
//   [63:60] opcode (tcx_pkg::opcode_e)
//   SETDIM  [59:57] dim register, [56:55] field, [31:0] value
//   SETCFG  [59:58] log2 partition rows, [57:56] log2 partition cols,
//           [55] NR mode (0 tile, 1 expand)
//   TLOAD/TSTORE [59:57] ATR, [56:54] global-dim reg, [53:51] local-dim reg,
//           [50:48] origin reg, [47:44] first cell, [43:42] first NR,
//           [41] dup0, [40] dup1, [39] dup2, [38] 16-bit elements,
//           [37] merge (TLOAD only: write into the register's current physical
//           register instead of a new one, so several loads - e.g. one per
//           cell - build one tensor register), [36] ReLU, [31:0] base address
//   A merge load waits until its register is ready and no compute in flight
//   reads it; a compute reading a register that a merge load is filling waits
//   for the load to finish.
//   TCOMP   [59:57] dst, [56:54] feature, [53:51] kernel, [50:49] mode,
//           [48:45] K, [44:43] stride, [42:39] N, [38:34] C, [33] op0 signed,
//           [32] op1 signed, [31] 16-bit kernel, [30:29] format, [28:24] shift,
//           [23] clear accumulators, [22] write back
//   TMOVE   [59:57] dst, [56:54] src, [53:46] row offset, [45:38] lane offset,
//           [37:32] rows, [31] copy cell 0 to all cells
module tcx_ctrl
  import tcx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       insn_valid,
  input  logic [63:0] insn,
  output logic       insn_ready,
  // memory path
  output logic       ls_start,
  output ls_cmd_t    ls_cmd,
  input  logic       ls_done,
  output logic       mv_start,
  output mv_cmd_t    mv_cmd,
  input  logic       mv_done,
  // neuron matrices
  output logic       comp_start,
  output comp_cmd_t  comp_cmd,
  input  logic       comp_done,
  // status
  output logic       irq,
  output logic       idle,
  output logic       ev_issue,
  output logic       ev_alloc_stall,
  output logic       ev_release,
  output logic       ev_retire
);
  opcode_e op;
  assign op = opcode_e'(insn[63:60]);

  dimreg_t    dreg [NUM_DREG];
  logic [1:0] hwp_a, hwp_b;
  logic       expand;

  // ---------------- unit state ----------------
  typedef struct packed {
    logic [2:0] use_v;
    ptr_t [2:0] use_p;
    logic       dst_v;
    ptr_t       dst;
  } rec_t;

  logic mem_busy, comp_busy;
  rec_t mem_rec, comp_rec;

  // ---------------- renaming ----------------
  atr_t [2:0] src_atr;
  ptr_t [2:0] src_ptr;
  logic [2:0] src_ready;
  logic       can_alloc;
  ptr_t       alloc_ptr;
  logic       issue, dst_valid;
  ptr_t [2:0] use_ptr;
  logic [2:0] use_v;
  logic [1:0] cmp_v;
  ptr_t [1:0] cmp_ptr;
  logic       ret_v;
  rec_t       ret_rec;
  logic [$clog2(NUM_PTR+1)-1:0] free_count;

  // sources: [0] = store/move source or compute feature, [1] = compute kernel
  assign src_atr[0] = (op == OP_TCOMP || op == OP_TMOVE) ? insn[56:54] : insn[59:57];
  assign src_atr[1] = insn[53:51];
  assign src_atr[2] = insn[59:57];
  logic merge, mem_merge;
  ptr_t mem_ptr;
  assign merge = (op == OP_TLOAD) && insn[37];

  // ---------------- retire buffer ----------------
  localparam int unsigned RB_DEPTH = 4;
  rec_t       rb [RB_DEPTH];
  logic [2:0] rb_cnt;
  logic [1:0] rb_rd, rb_wr;

  // ---------------- issue decision ----------------
  logic can_issue, wants_alloc, srcs_ok;
  always_comb begin
    wants_alloc = 1'b0;
    srcs_ok     = 1'b1;
    can_issue   = 1'b1;
    use_v       = '0;
    use_ptr     = src_ptr;
    unique case (op)
      OP_TLOAD: begin
        wants_alloc = !merge;
        srcs_ok     = !merge || src_ready[2];
        can_issue   = !mem_busy && !(merge && comp_busy &&
                                     ((comp_rec.use_v[0] && comp_rec.use_p[0] == src_ptr[2]) ||
                                      (comp_rec.use_v[1] && comp_rec.use_p[1] == src_ptr[2])));
        use_v       = {merge, 2'b00};
      end
      OP_TSTORE: begin
        srcs_ok   = src_ready[2];
        can_issue = !mem_busy;
        use_v     = 3'b100;
      end
      OP_TMOVE: begin
        wants_alloc = 1'b1;
        srcs_ok     = src_ready[0];
        can_issue   = !mem_busy;
        use_v       = 3'b001;
      end
      OP_TCOMP: begin
        wants_alloc = insn[22];
        srcs_ok     = src_ready[0] && src_ready[1] &&
                      !(mem_busy && mem_merge && (src_ptr[0] == mem_ptr || src_ptr[1] == mem_ptr));
        can_issue   = !comp_busy;
        use_v       = 3'b011;
      end
      OP_FENCE: can_issue = !mem_busy && !comp_busy && rb_cnt == 0 && !ls_start && !mv_start && !comp_start;
      default: ;
    endcase
    if (wants_alloc) begin
      use_v[2]   = 1'b1;
      use_ptr[2] = alloc_ptr;
    end
  end
  assign dst_valid  = wants_alloc;
  assign issue      = insn_valid && can_issue && srcs_ok && (!wants_alloc || can_alloc);
  assign insn_ready = issue;
  assign ev_issue   = issue;
  assign ev_alloc_stall = insn_valid && can_issue && srcs_ok && wants_alloc && !can_alloc;

  tcx_rename u_rename (
    .clk, .rst_n,
    .src_atr, .src_ptr, .src_ready,
    .can_alloc, .alloc_ptr,
    .issue, .dst_valid, .dst_atr(insn[59:57]),
    .use_ptr, .use_v,
    .cmp_v, .cmp_ptr,
    .ret_v, .ret_ptr(ret_rec.use_p), .ret_use(ret_rec.use_v),
    .ev_release, .free_count
  );

  // ---------------- command formation ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NUM_DREG; d++) dreg[d] <= '0;
      hwp_a <= '0; hwp_b <= '0; expand <= 1'b0;
      ls_start <= 1'b0; mv_start <= 1'b0; comp_start <= 1'b0; irq <= 1'b0;
      ls_cmd <= '0; mv_cmd <= '0; comp_cmd <= '0;
      mem_busy <= 1'b0; comp_busy <= 1'b0; mem_rec <= '0; comp_rec <= '0;
      mem_merge <= 1'b0; mem_ptr <= '0;
    end else begin
      ls_start <= 1'b0; mv_start <= 1'b0; comp_start <= 1'b0; irq <= 1'b0;
      if (ls_done || mv_done) mem_busy <= 1'b0;
      if (comp_done)          comp_busy <= 1'b0;
      if (issue) begin
        unique case (op)
          OP_SETDIM: dreg[insn[59:57]][insn[56:55]] <= insn[31:0];
          OP_SETCFG: begin hwp_a <= insn[59:58]; hwp_b <= insn[57:56]; expand <= insn[55]; end
          OP_FENCE:  irq <= 1'b1;
          OP_TLOAD, OP_TSTORE: begin
            ls_start <= 1'b1;
            mem_busy <= 1'b1;
            ls_cmd.store  <= (op == OP_TSTORE);
            ls_cmd.ptr    <= (op == OP_TSTORE || merge) ? src_ptr[2] : alloc_ptr;
            mem_merge     <= merge;
            mem_ptr       <= src_ptr[2];
            ls_cmd.gdim   <= dreg[insn[56:54]];
            ls_cmd.ldim   <= dreg[insn[53:51]];
            ls_cmd.org    <= dreg[insn[50:48]];
            ls_cmd.cell0  <= insn[47:44];
            ls_cmd.nr0    <= insn[43:42];
            ls_cmd.dup0   <= insn[41];
            ls_cmd.dup1   <= insn[40];
            ls_cmd.dup2   <= insn[39];
            ls_cmd.wide   <= insn[38];
            ls_cmd.relu   <= insn[36];
            ls_cmd.hwp_a  <= hwp_a;
            ls_cmd.hwp_b  <= hwp_b;
            ls_cmd.expand <= expand;
            ls_cmd.base   <= insn[31:0];
            mem_rec <= '{use_v: use_v, use_p: use_ptr, dst_v: (op == OP_TLOAD) && !merge, dst: alloc_ptr};
          end
          OP_TMOVE: begin
            mv_start <= 1'b1;
            mem_busy <= 1'b1;
            mem_merge <= 1'b0;
            mv_cmd <= '{src: src_ptr[0], dst: alloc_ptr, roff: insn[53:46], boff: insn[45:38],
                        rows: insn[37:32], dup1: insn[31]};
            mem_rec <= '{use_v: use_v, use_p: use_ptr, dst_v: 1'b1, dst: alloc_ptr};
          end
          OP_TCOMP: begin
            comp_start <= 1'b1;
            comp_busy  <= 1'b1;
            comp_cmd <= '{mode: cmode_e'(insn[50:49]), k: insn[48:45], stride: insn[44:43],
                          n_out: insn[42:39], n_ch: insn[38:34], op0_signed: insn[33],
                          op1_signed: insn[32], k16: insn[31], fmt: fmt_e'(insn[30:29]),
                          shift: insn[28:24], acc_clear: insn[23], write_back: insn[22],
                          feat: src_ptr[0], kern: src_ptr[1], dst: alloc_ptr};
            comp_rec <= '{use_v: use_v, use_p: use_ptr, dst_v: insn[22], dst: alloc_ptr};
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- completion and retirement ----------------
  logic mem_fin;
  assign mem_fin = ls_done || mv_done;
  assign cmp_v   = {comp_done && comp_rec.dst_v, mem_fin && mem_rec.dst_v};
  assign cmp_ptr = {comp_rec.dst, mem_rec.dst};

  assign ret_v   = (rb_cnt != 0);
  assign ret_rec = rb[rb_rd];
  assign ev_retire = ret_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_cnt <= '0; rb_rd <= '0; rb_wr <= '0;
      for (int e = 0; e < RB_DEPTH; e++) rb[e] <= '0;
    end else begin
      logic [1:0] wr;
      logic [2:0] n;
      wr = rb_wr;
      n  = rb_cnt;
      if (ret_v) begin rb_rd <= rb_rd + 2'd1; n = n - 3'd1; end
      if (mem_fin)   begin rb[wr] <= mem_rec;  wr = wr + 2'd1; n = n + 3'd1; end
      if (comp_done) begin rb[wr] <= comp_rec; wr = wr + 2'd1; n = n + 3'd1; end
      rb_wr  <= wr;
      rb_cnt <= n;
    end
  end

  assign idle = !mem_busy && !comp_busy && rb_cnt == 0 && !insn_valid;

  a_rb_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) rb_cnt <= 3'(RB_DEPTH));
endmodule
