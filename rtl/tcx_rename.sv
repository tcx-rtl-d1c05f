// tcx_rename: tensor register renaming without a reorder buffer.
//
// Architectural tensor registers (ATRs) are mapped onto a larger pool of
// physical tensor registers (PTRs). When an instruction issues, its
// destination ATR is bound to the PTR on top of the free stack (issue must
// wait while the stack is empty), the mapping table is updated, the new PTR is
// marked not ready and the PTR the ATR used before enters the early-free
// state. Every PTR carries a reference count: issue increments it for each
// source and destination use, retirement decrements it. An early-free PTR
// whose count has reached zero is cleared and pushed back onto the free stack
// (at most one per cycle, lowest ID first). Completion of the instruction
// writing a PTR marks it ready; sources are looked up combinationally.
// At reset ATR i maps to PTR i (ready) and the other PTRs are free.
// This follows the published scheme; the counter width, the single release per
// cycle and the two completion ports are this implementation's choices.
module tcx_rename
  import tcx_pkg::*;
#(
  parameter int unsigned NATR = NUM_ATR,
  parameter int unsigned NPTR = NUM_PTR
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  atr_t [2:0]      src_atr,
  output ptr_t [2:0]      src_ptr,
  output logic [2:0]      src_ready,
  // allocation
  output logic            can_alloc,
  output ptr_t            alloc_ptr,
  // issue: bind dst (if dst_valid) and count the references in use_ptr/use_v
  input  logic            issue,
  input  logic            dst_valid,
  input  atr_t            dst_atr,
  input  ptr_t [2:0]      use_ptr,
  input  logic [2:0]      use_v,
  // completion: the PTR's value is written
  input  logic [1:0]      cmp_v,
  input  ptr_t [1:0]      cmp_ptr,
  // retirement: drop references
  input  logic            ret_v,
  input  ptr_t [2:0]      ret_ptr,
  input  logic [2:0]      ret_use,
  // status
  output logic            ev_release,
  output logic [$clog2(NPTR+1)-1:0] free_count
);
  localparam int unsigned SPW = $clog2(NPTR + 1);

  ptr_t       map   [NATR];
  logic [NPTR-1:0] ready, early;
  logic [3:0] refcnt [NPTR];
  ptr_t       fs    [NPTR];
  logic [SPW-1:0] sp;

  for (genvar k = 0; k < 3; k++) begin : g_src
    assign src_ptr[k]   = map[src_atr[k]];
    assign src_ready[k] = ready[map[src_atr[k]]];
  end

  assign can_alloc  = (sp != '0);
  assign alloc_ptr  = fs[sp - SPW'(1)];
  assign free_count = sp;

  // release candidate
  logic rel_v;
  ptr_t rel_p;
  always_comb begin
    rel_v = 1'b0;
    rel_p = '0;
    for (int p = NPTR - 1; p >= 0; p--)
      if (early[p] && refcnt[p] == 4'd0) begin
        rel_v = 1'b1;
        rel_p = ptr_t'(p);
      end
  end
  assign ev_release = rel_v;

  logic pop;
  assign pop = issue && dst_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NATR; a++) map[a] <= ptr_t'(a);
      for (int p = 0; p < NPTR; p++) begin
        refcnt[p] <= '0;
        fs[p]     <= (p < NPTR - NATR) ? ptr_t'(NPTR - 1 - p) : '0;
      end
      ready <= '0;
      for (int p = 0; p < NATR; p++) ready[p] <= 1'b1;
      early <= '0;
      sp    <= SPW'(NPTR - NATR);
    end else begin
      // reference counts
      for (int p = 0; p < NPTR; p++) begin
        logic [3:0] inc, dec;
        inc = '0; dec = '0;
        for (int k = 0; k < 3; k++) begin
          if (issue && use_v[k] && use_ptr[k] == ptr_t'(p)) inc = inc + 4'd1;
          if (ret_v && ret_use[k] && ret_ptr[k] == ptr_t'(p)) dec = dec + 4'd1;
        end
        refcnt[p] <= refcnt[p] + inc - dec;
      end
      for (int k = 0; k < 2; k++)
        if (cmp_v[k]) ready[cmp_ptr[k]] <= 1'b1;
      // release
      if (rel_v) begin
        early[rel_p] <= 1'b0;
        ready[rel_p] <= 1'b0;
      end
      // bind
      if (pop) begin
        map[dst_atr]    <= alloc_ptr;
        early[map[dst_atr]] <= 1'b1;
        ready[alloc_ptr] <= 1'b0;
        early[alloc_ptr] <= 1'b0;
      end
      // free stack
      if (pop && rel_v)      fs[sp - SPW'(1)] <= rel_p;
      else if (rel_v)        begin fs[sp] <= rel_p; sp <= sp + SPW'(1); end
      else if (pop)          sp <= sp - SPW'(1);
    end
  end

  a_refcnt_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    ret_v |-> (refcnt[ret_ptr[0]] != 0 || !ret_use[0]));
  a_no_alloc_when_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> can_alloc);
endmodule
