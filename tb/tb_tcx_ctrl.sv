// tb_tcx_ctrl: feeds tensor instruction sequences to the front end, with the
// memory path and the neuron matrices replaced by responders that finish
// after random delays. Checks the commands formed from the dimension
// registers and the configuration, that each load gets a fresh physical
// register, that a store or compute waits until its sources are written,
// that memory and compute instructions overlap, that issue stalls when all
// physical registers are in use, and that FENCE pulses irq only after
// everything issued has retired.
module tb_tcx_ctrl;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic insn_valid, insn_ready, ls_start, ls_done, mv_start, mv_done, comp_start, comp_done;
  logic irq, idle, ev_issue, ev_alloc_stall, ev_release, ev_retire;
  logic [63:0] insn;
  ls_cmd_t ls_cmd;
  mv_cmd_t mv_cmd;
  comp_cmd_t comp_cmd;
  int checks = 0, failures = 0;
  int stalls = 0, overlap = 0, irqs = 0;

  tcx_ctrl dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d @%0t", what, got, exp, $time);
    end
  endtask

  // responders
  int mem_left = -1, comp_left = -1, mem_lat = 20, comp_lat = 30;
  logic mem_active, comp_active;
  ptr_t written [$];       // PTRs whose writer has completed
  ptr_t mem_dst, comp_dst;
  logic mem_wr, comp_wr;
  always @(posedge clk) begin
    ls_done <= 0; mv_done <= 0; comp_done <= 0;
    if (ls_start || mv_start) begin
      mem_left <= mem_lat;
      mem_wr   <= ls_start ? !ls_cmd.store : 1'b1;
      mem_dst  <= ls_start ? ls_cmd.ptr : mv_cmd.dst;
      mem_active <= 1;
    end else if (mem_active) begin
      if (mem_left == 0) begin
        if (mv_cmd.src == mv_cmd.dst && !ls_start) ;
        ls_done <= 1; mem_active <= 0;
        if (mem_wr) written.push_back(mem_dst);
      end else mem_left <= mem_left - 1;
    end
    if (comp_start) begin comp_left <= comp_lat; comp_active <= 1; comp_dst <= comp_cmd.dst; comp_wr <= comp_cmd.write_back; end
    else if (comp_active) begin
      if (comp_left == 0) begin comp_done <= 1; comp_active <= 0; if (comp_wr) written.push_back(comp_dst); end
      else comp_left <= comp_left - 1;
    end
    if (rst_n && mem_active && comp_active) overlap++;
    if (rst_n && ev_alloc_stall) stalls++;
    if (rst_n && irq) irqs++;
  end

  // the move copies ATR3, written by the first compute
  ptr_t atr3_ptr;
  int   ncomp = 0;
  always @(posedge clk) begin
    if (rst_n && comp_start) begin if (ncomp == 0) atr3_ptr <= comp_cmd.dst; ncomp++; end
    if (rst_n && mv_start) chk("move source is the register the compute wrote", mv_cmd.src, atr3_ptr);
  end

  // a register being written again is not written until that writer completes
  always @(posedge clk) begin
    if (ls_start && !ls_cmd.store) forget(ls_cmd.ptr);
    if (mv_start) forget(mv_cmd.dst);
    if (comp_start && comp_cmd.write_back) forget(comp_cmd.dst);
  end
  function automatic void forget(ptr_t p);
    for (int k = written.size() - 1; k >= 0; k--) if (written[k] == p) written.delete(k);
  endfunction

  function automatic logic was_written(ptr_t p);
    foreach (written[k]) if (written[k] == p) return 1;
    return 0;
  endfunction

  // checks on every issued command
  ptr_t load_ptrs [$];
  always @(posedge clk) begin
    if (!rst_n) ;
    else if (ls_start && ls_cmd.store) chk("store source written", was_written(ls_cmd.ptr), 1);
    if (rst_n && comp_start) begin
      chk("feature written", was_written(comp_cmd.feat), 1);
      chk("kernel written", was_written(comp_cmd.kern), 1);
    end
    if (rst_n && ls_start && !ls_cmd.store) begin
      foreach (load_ptrs[k]) if (load_ptrs[k] == ls_cmd.ptr && !was_written(ls_cmd.ptr)) failures++;
      load_ptrs.push_back(ls_cmd.ptr);
    end
  end

  task automatic send(logic [63:0] i);
    @(negedge clk);
    insn = i; insn_valid = 1;
    do @(posedge clk); while (!insn_ready);
    @(negedge clk);
    insn_valid = 0;
  endtask

  initial begin
    mem_active = 0; comp_active = 0; insn_valid = 0; insn = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initial mapping: ATR i holds PTR i, treated as written
    for (int p = 0; p < NUM_ATR; p++) written.push_back(ptr_t'(p));
    send(enc_setdim(0, 0, 32'd100));
    send(enc_setdim(0, 1, 32'd50));
    send(enc_setdim(1, 0, 32'd12));
    send(enc_setdim(2, 0, -32'sd1));
    send(enc_cfg(1, 2, 1'b1));
    // load ATR1 with dims 0/1/2: the command must carry them
    @(negedge clk);
    insn = enc_ls(OP_TLOAD, 1, 0, 1, 2, 5, 2, 1, 0, 1, 0, 0, 32'h1234);
    insn_valid = 1;
    do @(posedge clk); while (!insn_ready);
    @(negedge clk); insn_valid = 0;
    @(posedge clk); #1;
    chk("ls gdim0", ls_cmd.gdim[0], 100);
    chk("ls gdim1", ls_cmd.gdim[1], 50);
    chk("ls ldim0", ls_cmd.ldim[0], 12);
    chk("ls org0", $signed(ls_cmd.org[0]), -1);
    chk("ls base", ls_cmd.base, 'h1234);
    chk("ls cell0", ls_cmd.cell0, 5);
    chk("ls nr0", ls_cmd.nr0, 2);
    chk("ls dup0", ls_cmd.dup0, 1);
    chk("ls dup2", ls_cmd.dup2, 1);
    chk("ls hwp", {ls_cmd.hwp_a, ls_cmd.hwp_b}, {2'd1, 2'd2});
    chk("ls expand", ls_cmd.expand, 1);
    chk("fresh PTR", ls_cmd.ptr >= NUM_ATR, 1);
    // kernel load, compute, store: dependencies through renaming
    send(enc_ls(OP_TLOAD, 2, 0, 1, 2, 0, 0, 0, 1, 0, 0, 0, 32'h2000));
    send(enc_comp(3, 1, 2, CM_CONV, 3, 1, 1, 1, 1, 1, 0, FMT_INT8, 0, 1, 1));
    send(enc_ls(OP_TLOAD, 1, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0, 32'h3000));   // overlaps the compute
    send(enc_ls(OP_TSTORE, 3, 0, 1, 2, 0, 0, 0, 0, 0, 0, 1, 32'h4000));
    send(enc_move(4, 3, 0, 0, 8, 0));
    // a slow compute pins its sources; reloading them and a third register
    // leaves no free physical register until the compute retires
    comp_lat = 300;
    send(enc_comp(5, 2, 3, CM_CONV, 3, 1, 1, 1, 1, 1, 0, FMT_INT8, 0, 1, 1));
    send(enc_ls(OP_TLOAD, 2, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0, 32'h0));
    send(enc_ls(OP_TLOAD, 3, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0, 32'h0));
    send(enc_ls(OP_TLOAD, 6, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0, 32'h0));
    send(enc_ls(OP_TLOAD, 7, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0, 32'h0));
    comp_lat = 30;
    for (int k = 0; k < 8; k++) send(enc_ls(OP_TLOAD, k % 3, 0, 1, 2, 0, 0, 0, 0, 0, 0, 0, 32'h0));
    for (int k = 0; k < 4; k++) send(enc_comp(5, 0, 1, CM_CONV, 3, 1, 1, 1, 1, 1, 0, FMT_INT8, 0, 1, 1));
    send({OP_FENCE, 60'd0});
    @(posedge clk); #1;
    chk("fence waited for retirement", irqs, 1);
    chk("idle after fence", dut.rb_cnt, 0);
    chk("memory and compute overlapped", overlap > 0, 1);
    chk("free-register stalls", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
