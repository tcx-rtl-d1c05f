// tb_tcx_rename: random issue / complete / retire traffic against a reference
// model of the renaming scheme (mapping table, free stack, ready bits,
// early-free state and reference counts). Checks every lookup, the allocation
// stall when the free stack is empty, and that every PTR freed by the model
// returns to the free stack, with no PTR ever mapped twice.
module tb_tcx_rename;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  atr_t [2:0] src_atr;
  ptr_t [2:0] src_ptr;
  logic [2:0] src_ready;
  logic can_alloc, issue, dst_valid, ret_v, ev_release;
  ptr_t alloc_ptr;
  atr_t dst_atr;
  ptr_t [2:0] use_ptr, ret_ptr;
  logic [2:0] use_v, ret_use;
  logic [1:0] cmp_v;
  ptr_t [1:0] cmp_ptr;
  logic [$clog2(NUM_PTR+1)-1:0] free_count;
  int checks = 0, failures = 0, stalls = 0, releases = 0;

  tcx_rename dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int m_map [NUM_ATR];
  int m_ready [NUM_PTR];
  int m_early [NUM_PTR];
  int m_ref [NUM_PTR];
  int m_free [NUM_PTR];     // 1 = on the free stack
  typedef struct { int p[3]; int v[3]; int dst; int done; } inflight_t;
  inflight_t q[$];

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d @%0t", what, got, exp, $time);
    end
  endtask

  always @(posedge clk) if (rst_n && ev_release) releases++;

  initial begin
    for (int a = 0; a < NUM_ATR; a++) m_map[a] = a;
    for (int p = 0; p < NUM_PTR; p++) begin
      m_ready[p] = (p < NUM_ATR); m_early[p] = 0; m_ref[p] = 0; m_free[p] = (p >= NUM_ATR);
    end
    src_atr = '0; issue = 0; dst_valid = 0; dst_atr = 0; use_ptr = '0; use_v = '0;
    cmp_v = '0; cmp_ptr = '0; ret_v = 0; ret_ptr = '0; ret_use = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int nfree, rel;
      @(negedge clk);
      // lookups
      for (int k = 0; k < 3; k++) src_atr[k] = atr_t'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        chk("map", src_ptr[k], m_map[src_atr[k]]);
        chk("ready", src_ready[k], m_ready[m_map[src_atr[k]]]);
      end
      nfree = 0;
      for (int p = 0; p < NUM_PTR; p++) nfree += m_free[p];
      chk("can_alloc", can_alloc, nfree > 0);
      chk("free count", free_count, nfree);
      // maybe issue (favouring issue so the stack empties now and then)
      issue = 0; dst_valid = 0; use_v = '0; cmp_v = '0; ret_v = 0; ret_use = '0;
      if ($urandom_range(0, 99) < 60 && q.size() < 12) begin
        inflight_t f;
        dst_valid = $urandom_range(0, 3) != 0;
        if (dst_valid && !can_alloc) begin
          stalls++;
        end else begin
          issue = 1;
          dst_atr = atr_t'($urandom);
          use_v = {dst_valid, 2'($urandom)};
          use_ptr = {alloc_ptr, src_ptr[1], src_ptr[0]};
          if (dst_valid) chk("alloc from free stack", m_free[alloc_ptr], 1);
          for (int k = 0; k < 3; k++) begin f.p[k] = use_ptr[k]; f.v[k] = use_v[k]; end
          f.dst = dst_valid ? alloc_ptr : -1; f.done = 0;
          q.push_back(f);
        end
      end
      // maybe complete the oldest not-done (random order across two)
      for (int k = 0; k < 2; k++)
        if (q.size() > k && !q[k].done && $urandom_range(0, 1)) begin
          q[k].done = 1;
          if (q[k].dst >= 0) begin cmp_v[k] = 1; cmp_ptr[k] = ptr_t'(q[k].dst); end
        end
      // retire the oldest if done in an earlier cycle
      if (q.size() > 0 && q[0].done == 2) begin
        ret_v = 1;
        for (int k = 0; k < 3; k++) begin ret_ptr[k] = ptr_t'(q[0].p[k]); ret_use[k] = q[0].v[k]; end
      end
      // PTR the scheme frees in this cycle: lowest early-free PTR with no references
      rel = -1;
      for (int p = NUM_PTR - 1; p >= 0; p--) if (m_early[p] && m_ref[p] == 0) rel = p;
      @(posedge clk);
      // model update (same rules, applied after the edge)
      if (rel >= 0) begin m_early[rel] = 0; m_ready[rel] = 0; m_free[rel] = 1; end
      if (ret_v) begin
        for (int k = 0; k < 3; k++) if (ret_use[k]) m_ref[ret_ptr[k]]--;
        void'(q.pop_front());
      end
      for (int k = 0; k < q.size(); k++) if (q[k].done == 1) q[k].done = 2;
      for (int k = 0; k < 2; k++) if (cmp_v[k]) m_ready[cmp_ptr[k]] = 1;
      if (issue) begin
        for (int k = 0; k < 3; k++) if (use_v[k]) m_ref[use_ptr[k]]++;
        if (dst_valid) begin
          m_early[m_map[dst_atr]] = 1;
          m_map[dst_atr] = alloc_ptr;
          m_free[alloc_ptr] = 0;
          m_ready[alloc_ptr] = 0;
        end
      end
    end
    // drain: complete and retire everything, then all non-mapped PTRs must be free
    @(negedge clk);
    issue = 0; use_v = '0; cmp_v = '0; ret_v = 0;
    while (q.size() > 0) begin
      @(negedge clk);
      cmp_v = '0; ret_v = 0;
      if (!q[0].done) begin
        q[0].done = 1;
        if (q[0].dst >= 0) begin cmp_v[0] = 1; cmp_ptr[0] = ptr_t'(q[0].dst); end
      end else begin
        ret_v = 1;
        for (int k = 0; k < 3; k++) begin ret_ptr[k] = ptr_t'(q[0].p[k]); ret_use[k] = q[0].v[k]; end
        void'(q.pop_front());
      end
    end
    @(negedge clk);
    cmp_v = '0; ret_v = 0;
    repeat (NUM_PTR + 2) @(posedge clk);
    #1;
    chk("all unmapped PTRs free", free_count, NUM_PTR - NUM_ATR);
    begin
      int seen [NUM_PTR];
      for (int p = 0; p < NUM_PTR; p++) seen[p] = 0;
      for (int a = 0; a < NUM_ATR; a++) begin src_atr[0] = atr_t'(a); #1; seen[src_ptr[0]]++; end
      for (int p = 0; p < NUM_PTR; p++) chk("PTR mapped at most once", seen[p] > 1, 0);
    end
    chk("allocation stalls seen", stalls > 0, 1);
    chk("releases seen", releases > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
