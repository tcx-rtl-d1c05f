// tb_tcx_top: runs tensor programs on the whole engine at its full size
// (4 NRs x 16 cells x 64 CUs) against a byte-addressed memory model with
// random back-pressure and read latency, and checks every stored output
// against a model computed here from the input data.
//   1. Tile mode, 4x4 partition: a 32x32 INT8 image with a one-pixel zero
//      border is split into 16 overlapping 10x10 tiles (one load per cell,
//      duplicated to all NRs with dup2); each NR gets its own 3x3 kernel
//      (dup1). One convolution produces 4 output channels of 32x32, stored
//      with ReLU (16 stores). Loads after the first into the same tensor
//      register set the merge bit, so all parts land in one physical register.
//   2. The same kernel again (kernel cache) with a 16-bit result.
//   3. 2x2 max pooling with stride 2.
//   4. A loopback move that crops one row and one lane.
//   5. Expand mode, 2x2 partition: four input channels, one per NR (dup0
//      spreads each to its partitions), one 3x3 kernel per NR; the store adds
//      the four partial results.
//   6. A long 13x13 convolution that pins two physical registers while two
//      loads wait for a free one, then FENCE.
// Each mechanism is counted through the performance counters and must occur.
module tb_tcx_top;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic insn_valid, insn_ready, bus_ready, rsp_valid, irq, idle;
  logic [63:0] insn;
  bus_req_t bus_req;
  logic [BUS_W-1:0] rsp_rdata;
  logic [PM_COUNT-1:0][31:0] perf;
  int checks = 0, failures = 0, irqs = 0;

  tcx_top dut (.*);

  localparam int MEMSZ = 65536;
  localparam int IMG = 'h0000, KER = 'h0800, OUT1 = 'h1000, OUT2 = 'h2000, OUT3 = 'h2100;
  localparam int IMG4 = 'h3000, KER4 = 'h3200, OUT4 = 'h3400, OUT5 = 'h3600;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory model ----------------
  logic [7:0] mem [MEMSZ];
  int lat;
  logic pend;
  logic [ADDR_W-1:0] rd_addr;
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (pend) begin
      if (lat == 0) begin
        rsp_valid <= 1'b1;
        for (int b = 0; b < 8; b++) rsp_rdata[8*b +: 8] <= mem[(rd_addr + b) % MEMSZ];
        pend <= 1'b0;
      end else lat <= lat - 1;
    end
    if (rst_n && bus_req.valid && bus_ready) begin
      if (bus_req.we) begin
        for (int b = 0; b < 8; b++) if (bus_req.wstrb[b]) mem[(bus_req.addr + b) % MEMSZ] = bus_req.wdata[8*b +: 8];
      end else begin
        pend <= 1'b1; rd_addr <= bus_req.addr; lat <= $urandom_range(0, 3);
      end
    end
    bus_ready <= $urandom_range(0, 4) != 0;
    if (rst_n && irq) irqs++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic send(logic [63:0] i);
    @(negedge clk);
    insn = i; insn_valid = 1;
    do @(posedge clk); while (!insn_ready);
    @(negedge clk);
    insn_valid = 0;
  endtask

  task automatic setdim(int d, int a, int b, int c, int e);
    send(enc_setdim(d, 0, a)); send(enc_setdim(d, 1, b));
    send(enc_setdim(d, 2, c)); send(enc_setdim(d, 3, e));
  endtask

  task automatic fence();
    int n;
    n = irqs;
    send({OP_FENCE, 60'd0});
    while (irqs == n) @(posedge clk);
  endtask

  // ---------------- reference model ----------------
  function automatic longint img_px(int y, int x);
    if (y < 0 || y >= 32 || x < 0 || x >= 32) return 0;
    return longint'($signed(mem[IMG + y*32 + x]));
  endfunction
  function automatic longint satv(longint v, int bits);
    longint hi;
    hi = (64'sd1 <<< (bits - 1)) - 1;
    return (v > hi) ? hi : (v < -hi - 1) ? -hi - 1 : v;
  endfunction
  function automatic longint conv1(int n, int y, int x);
    longint a;
    a = 0;
    for (int kr = 0; kr < 3; kr++) for (int kc = 0; kc < 3; kc++)
      a += img_px(y + kr - 1, x + kc - 1) * longint'($signed(mem[KER + n*9 + kr*3 + kc]));
    return a;
  endfunction

  initial begin
    longint v;
    insn_valid = 0; insn = '0; pend = 0; bus_ready = 0;
    for (int a = 0; a < MEMSZ; a++) mem[a] = 8'($urandom);
    repeat (4) @(posedge clk);
    rst_n = 1;

    // ======== 1. tile mode, 4x4 partition, 3x3 convolution ========
    send(enc_cfg(2, 2, 1'b0));
    setdim(0, 32, 32, 1, 1);        // image
    setdim(1, 10, 10, 1, 1);        // tile
    setdim(3, 9, 4, 1, 1);          // kernels
    setdim(4, 9, 1, 1, 1);          // one kernel
    setdim(5, 32, 32, 1, 4);        // output, 4 channels
    setdim(6, 8, 8, 1, 4);          // one cell, all NRs
    for (int c = 0; c < NUM_CELL; c++) begin
      setdim(2, 8*(c%4) - 1, 8*(c/4) - 1, 0, 0);
      send(enc_ls(OP_TLOAD, 1, 0, 1, 2, c, 0, 0, 0, 1, 0, 0, IMG) | (64'(c != 0) << 37));
    end
    for (int n = 0; n < NUM_NR; n++) begin
      setdim(2, 0, n, 0, 0);
      send(enc_ls(OP_TLOAD, 2, 3, 4, 2, 0, n, 0, 1, 0, 0, 0, KER) | (64'(n != 0) << 37));
    end
    send(enc_comp(3, 1, 2, CM_CONV, 3, 1, 1, 1, 1, 1, 0, FMT_INT8, 4, 1, 1));
    fence();
    chk("3x3 convolution takes 9 MAC cycles", perf[PM_MAC_STEPS], 9);
    for (int c = 0; c < NUM_CELL; c++) begin
      setdim(2, 8*(c%4), 8*(c/4), 0, 0);
      send(enc_ls(OP_TSTORE, 3, 5, 6, 2, c, 0, 0, 0, 0, 0, 1, OUT1));
    end
    // ======== 2. cached kernel, 16-bit result from cell 5 of NR 2 ========
    send(enc_comp(4, 1, 2, CM_CONV, 3, 1, 1, 1, 1, 1, 0, FMT_INT16, 0, 1, 1));
    setdim(7, 8, 8, 1, 1);
    setdim(2, 0, 0, 0, 0);
    send(enc_ls(OP_TSTORE, 4, 7, 7, 2, 5, 2, 0, 0, 0, 1, 0, OUT5));
    // ======== 3. max pooling 2x2 / 2 of cell 0, NR 0 ========
    send(enc_comp(5, 1, 2, CM_MAX, 2, 2, 1, 1, 1, 1, 0, FMT_INT8, 0, 1, 1));
    setdim(7, 4, 4, 1, 1);
    send(enc_ls(OP_TSTORE, 5, 7, 7, 2, 0, 0, 0, 0, 0, 0, 0, OUT2));
    // ======== 4. loopback: crop one row and one lane ========
    send(enc_move(6, 3, 1, 1, 7, 1'b0));
    setdim(7, 8, 7, 1, 1);
    send(enc_ls(OP_TSTORE, 6, 7, 7, 2, 0, 1, 0, 0, 0, 0, 0, OUT3));
    fence();

    for (int n = 0; n < NUM_NR; n++)
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          v = satv(conv1(n, y, x) >>> 4, 8);
          if (v < 0) v = 0;
          chk("conv + ReLU", longint'($signed(mem[OUT1 + (n*32 + y)*32 + x])), v);
        end
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
      chk("cached kernel INT16", longint'($signed({mem[OUT5 + 2*(y*8+x) + 1], mem[OUT5 + 2*(y*8+x)]})),
          satv(conv1(2, 8 + y, 8 + x), 16));
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) begin
      longint m;
      m = -1000;
      for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++)
        if (img_px(2*y + a - 1, 2*x + b - 1) > m) m = img_px(2*y + a - 1, 2*x + b - 1);
      chk("max pooling", longint'($signed(mem[OUT2 + y*4 + x])), m);
    end
    for (int y = 0; y < 7; y++) for (int x = 0; x < 8; x++)
      chk("loopback crop", longint'($signed(mem[OUT3 + y*8 + x])),
          (x + 1 < 8) ? satv(conv1(1, y + 1, x + 1) >>> 4, 8) : 0);

    // ======== 5. expand mode: 4 input channels, one per NR ========
    send(enc_cfg(1, 1, 1'b1));
    setdim(0, 10, 10, 4, 1);
    setdim(1, 10, 10, 1, 1);
    for (int n = 0; n < NUM_NR; n++) begin
      setdim(2, 0, 0, n, 0);
      send(enc_ls(OP_TLOAD, 1, 0, 1, 2, 0, n, 1, 0, 0, 0, 0, IMG4) | (64'(n != 0) << 37));
      setdim(2, 0, n, 0, 0);
      send(enc_ls(OP_TLOAD, 2, 3, 4, 2, 0, n, 0, 1, 0, 0, 0, KER4) | (64'(n != 0) << 37));
    end
    send(enc_comp(7, 1, 2, CM_CONV, 3, 1, 1, 1, 1, 1, 0, FMT_INT16, 0, 1, 1));
    setdim(7, 8, 8, 1, 1);
    setdim(2, 0, 0, 0, 0);
    send(enc_ls(OP_TSTORE, 7, 7, 7, 2, 10, 0, 0, 0, 0, 1, 0, OUT4));
    fence();
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      longint s;
      s = 0;
      for (int n = 0; n < NUM_NR; n++) begin
        longint a;
        a = 0;
        for (int kr = 0; kr < 3; kr++) for (int kc = 0; kc < 3; kc++)
          a += longint'($signed(mem[IMG4 + n*100 + (y+kr)*10 + x+kc])) * longint'($signed(mem[KER4 + n*9 + kr*3 + kc]));
        s += satv(a, 16);
      end
      chk("expand-mode channel sum", longint'($signed({mem[OUT4 + 2*(y*8+x) + 1], mem[OUT4 + 2*(y*8+x)]})), satv(s, 16));
    end

    // ======== 6. register pressure ========
    setdim(7, 1, 1, 1, 1);
    send(enc_comp(1, 1, 2, CM_CONV, 13, 1, 1, 1, 1, 1, 0, FMT_INT8, 0, 1, 1));
    send(enc_ls(OP_TLOAD, 2, 7, 7, 2, 0, 0, 0, 0, 0, 0, 0, IMG));
    send(enc_ls(OP_TLOAD, 4, 7, 7, 2, 0, 0, 0, 0, 0, 0, 0, IMG));
    fence();

    chk("MAC steps", perf[PM_MAC_STEPS], 9 + 9 + 4 + 9 + 169);
    $display("mechanisms: shift=%0d kcache=%0d pad=%0d combine=%0d expand=%0d loopback=%0d stall=%0d release=%0d fence=%0d cycles=%0d",
             perf[PM_SHIFT_STEPS], perf[PM_KCACHE_HIT], perf[PM_PAD], perf[PM_COMBINE], perf[PM_EXPAND],
             perf[PM_LOOPBACK_ROWS], perf[PM_ALLOC_STALL], perf[PM_RELEASE], perf[PM_FENCE], perf[PM_CYCLES]);
    chk("systolic shift happened", perf[PM_SHIFT_STEPS] > 0, 1);
    chk("kernel cache hit happened", perf[PM_KCACHE_HIT] > 0, 1);
    chk("zero padding happened", perf[PM_PAD] > 0, 1);
    chk("bus-word combining happened", perf[PM_COMBINE] > 0, 1);
    chk("expand-mode sum happened", perf[PM_EXPAND] > 0, 1);
    chk("loopback happened", perf[PM_LOOPBACK_ROWS] > 0, 1);
    chk("free-register stall happened", perf[PM_ALLOC_STALL] > 0, 1);
    chk("register release happened", perf[PM_RELEASE] > 0, 1);
    chk("fences", perf[PM_FENCE], 4);
    chk("idle at the end", idle, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
