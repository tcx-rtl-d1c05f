// tb_tcx_lsu: tests the tensor load/store pipeline against a byte-addressed
// memory model with random bus back-pressure and read latency, and a model of
// the TRF banks. Checks zero padding outside the global tensor, combining of
// element reads that share a bus word (request count), 8- and 16-bit
// elements, duplication flags, store-side ReLU with saturation, cropping, and
// the expand-mode sum over the four NRs.
module tb_tcx_lsu;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, bus_ready, rsp_valid, ev_pad, ev_comb, ev_expand;
  ls_cmd_t cmd_in;
  bus_req_t bus;
  logic [BUS_W-1:0] rsp_rdata;
  trf_req_t trf;
  word_t [NUM_NR-1:0] trf_rdata;
  int checks = 0, failures = 0;
  int n_rd, n_wr, n_pad, n_comb, n_exp;

  tcx_lsu dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory
  logic [7:0] mem [4096];
  // TRF model: [nr][cell][row] of one PTR
  word_t trfm [NUM_NR][NUM_CELL][TRF_ROWS];
  logic  last_dup1, last_dup0;

  // bus model
  int lat;
  logic [ADDR_W-1:0] rd_addr;
  logic pend;
  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (pend) begin
      if (lat == 0) begin
        rsp_valid <= 1'b1;
        for (int b = 0; b < 8; b++) rsp_rdata[8*b +: 8] <= mem[(rd_addr + b) % 4096];
        pend <= 1'b0;
      end else lat <= lat - 1;
    end
    if (bus.valid && bus_ready) begin
      if (bus.we) begin
        n_wr++;
        for (int b = 0; b < 8; b++) if (bus.wstrb[b]) mem[(bus.addr + b) % 4096] = bus.wdata[8*b +: 8];
      end else begin
        n_rd++;
        pend <= 1'b1; rd_addr <= bus.addr; lat <= $urandom_range(0, 2);
      end
    end
    bus_ready <= $urandom_range(0, 3) != 0;
    // TRF model
    for (int n = 0; n < NUM_NR; n++) trf_rdata[n] <= trfm[n][trf.cell_id][trf.row];
    if (trf.en && trf.we) begin
      for (int n = 0; n < NUM_NR; n++) if (trf.nr_mask[n]) trfm[n][trf.cell_id][trf.row] = trf.wdata;
      last_dup0 = trf.dup0; last_dup1 = trf.dup1;
    end
    if (ev_pad) n_pad++;
    if (ev_comb) n_comb++;
    if (ev_expand) n_exp++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic ls_cmd_t mk(logic store, int g0, int g1, int l0, int l1, int o0, int o1, int base);
    ls_cmd_t c;
    c = '0;
    c.store = store; c.ptr = 5;
    c.gdim[0] = g0; c.gdim[1] = g1; c.gdim[2] = 1; c.gdim[3] = 1;
    c.ldim[0] = l0; c.ldim[1] = l1; c.ldim[2] = 1; c.ldim[3] = 1;
    c.org[0] = o0; c.org[1] = o1;
    c.base = base;
    return c;
  endfunction

  task automatic run(ls_cmd_t c);
    n_rd = 0; n_wr = 0; n_pad = 0; n_comb = 0; n_exp = 0;
    @(negedge clk); cmd_in = c; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    ls_cmd_t c;
    start = 0; cmd_in = '0; pend = 0; rsp_valid = 0; bus_ready = 0;
    for (int a = 0; a < 4096; a++) mem[a] = 8'($urandom);
    for (int n = 0; n < NUM_NR; n++) for (int k = 0; k < NUM_CELL; k++) for (int r = 0; r < TRF_ROWS; r++) trfm[n][k][r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. 2-D load of a 10x6 byte image with a one-element zero border
    c = mk(0, 10, 6, 12, 8, -1, -1, 'h100); c.cell0 = 3; c.nr0 = 1;
    run(c);
    for (int r = 0; r < 8; r++)
      for (int l = 0; l < 12; l++) begin
        int y, x; logic [7:0] e;
        y = r - 1; x = l - 1;
        e = (y >= 0 && y < 6 && x >= 0 && x < 10) ? mem['h100 + y*10 + x] : 8'h00;
        chk("load byte", trfm[1][3][r][8*l +: 8], e);
      end
    chk("padded elements", n_pad, 12*8 - 10*6);
    chk("combined elements", n_comb, 60 - n_rd);
    checks++; if (n_rd > 16) failures++;   // 60 bytes in at most 2 words per row

    // 2. 16-bit load, 4 planes (dim 2 = cells), duplicated to all NRs
    c = mk(0, 8, 2, 8, 2, 0, 0, 'h400); c.wide = 1; c.dup2 = 1; c.dup1 = 0;
    c.gdim[2] = 3; c.ldim[2] = 3; c.cell0 = 5;
    run(c);
    for (int n = 0; n < NUM_NR; n++)
      for (int p = 0; p < 3; p++)
        for (int r = 0; r < 2; r++)
          for (int l = 0; l < 8; l++) begin
            int a;
            a = 'h400 + 2 * ((p*2 + r)*8 + l);
            chk("wide load", {trfm[n][5+p][r][64 + 8*l +: 8], trfm[n][5+p][r][8*l +: 8]}, {mem[a+1], mem[a]});
          end

    // 3. load with dup1: the flag reaches the TRF port
    c = mk(0, 4, 1, 4, 1, 0, 0, 'h10); c.dup1 = 1;
    run(c);
    chk("dup1 forwarded", last_dup1, 1);

    // 4. store INT8 with ReLU, cropped to a 5x3 window of a 7x3 tensor
    for (int r = 0; r < 4; r++)
      for (int b = 0; b < WORD_W/32; b++) trfm[2][7][r][32*b +: 32] = $urandom;
    for (int a = 'h800; a < 'h800 + 64; a++) mem[a] = 8'hAA;
    c = mk(1, 7, 3, 8, 4, 2, 0, 'h800); c.relu = 1; c.cell0 = 7; c.nr0 = 2;
    run(c);
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 7; x++) begin
        logic [7:0] e;
        if (x >= 2) begin
          e = trfm[2][7][y][8*(x-2) +: 8];
          if ($signed(e) < 0) e = 0;
        end else e = 8'hAA;   // outside the stored window: untouched
        chk("store relu", mem['h800 + y*7 + x], e);
      end
    chk("store write combining", n_wr, 3);

    // 5. expand mode: 16-bit store of the sum of the four NRs' partial results
    for (int n = 0; n < NUM_NR; n++)
      for (int b = 0; b < WORD_W/32; b++) trfm[n][0][0][32*b +: 32] = $urandom & 32'h0FFF_0FFF;
    c = mk(1, 8, 1, 8, 1, 0, 0, 'hA00); c.wide = 1; c.expand = 1;
    run(c);
    for (int l = 0; l < 8; l++) begin
      longint s;
      s = 0;
      for (int n = 0; n < NUM_NR; n++) s += longint'($signed({trfm[n][0][0][64+8*l +: 8], trfm[n][0][0][8*l +: 8]}));
      if (s > 32767) s = 32767;
      if (s < -32768) s = -32768;
      chk("expand sum", longint'($signed({mem['hA00 + 2*l + 1], mem['hA00 + 2*l]})), s);
    end
    chk("expand rows", n_exp, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
