// tb_tcx_nr: tests a neuron matrix. First the hardware-partition write
// steering: for each of the nine partition shapes a word written with dup0
// must land in exactly the cells at the same position of every partition, a
// dup1 write in all cells and a plain write in one cell (checked by reading
// every cell back). Then every cell gets its own feature tile and a shared
// kernel (dup1), one 3x3 convolution command runs on all 16 cells in
// lockstep, and each cell's eight result rows are checked against a model.
module tb_tcx_nr;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, req_sel, ev_step, ev_shift, ev_khit;
  comp_cmd_t cmd;
  trf_req_t req;
  word_t rdata;
  int checks = 0, failures = 0;

  tcx_nr dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wr(int cid, ptr_t p, int r, word_t w, logic d0, logic d1, int la, int lb);
    @(negedge clk);
    req = '0; req.en = 1; req.we = 1; req.cell_id = CELL_W'(cid); req.ptr = p; req.row = row_t'(r);
    req.wdata = w; req.dup0 = d0; req.dup1 = d1; req.hwp_a = 2'(la); req.hwp_b = 2'(lb);
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(int cid, ptr_t p, int r, output word_t w);
    @(negedge clk);
    req = '0; req.en = 1; req.cell_id = CELL_W'(cid); req.ptr = p; req.row = row_t'(r);
    @(posedge clk); #1;
    w = rdata;
    @(negedge clk);
    req = '0;
  endtask

  logic [7:0] T [NUM_CELL][TILE][WORD_B];
  logic [7:0] K [9];

  initial begin
    word_t w;
    start = 0; cmd = '0; req = '0; req_sel = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- partition steering ----
    for (int la = 0; la < 3; la++)
      for (int lb = 0; lb < 3; lb++) begin
        int tgt;
        tgt = $urandom_range(0, NUM_CELL - 1);
        for (int c = 0; c < NUM_CELL; c++) wr(c, 7, 0, '0, 0, 0, 0, 0);
        wr(tgt, 7, 0, word_t'(la * 3 + lb + 1), 1, 0, la, lb);
        for (int c = 0; c < NUM_CELL; c++) begin
          logic same;
          same = (((c >> 2) % (1 << la)) == ((tgt >> 2) % (1 << la))) &&
                 (((c & 3) % (1 << lb)) == ((tgt & 3) % (1 << lb)));
          rd(c, 7, 0, w);
          chk("dup0 partition", w, same ? la * 3 + lb + 1 : 0);
        end
      end
    wr(6, 7, 1, word_t'(99), 0, 0, 2, 2);
    for (int c = 0; c < NUM_CELL; c++) begin rd(c, 7, 1, w); chk("single write", w == 99, c == 6); end
    wr(0, 7, 2, word_t'(77), 0, 1, 0, 0);
    for (int c = 0; c < NUM_CELL; c++) begin rd(c, 7, 2, w); chk("dup1 write", w, 77); end

    // ---- lockstep convolution ----
    for (int c = 0; c < NUM_CELL; c++)
      for (int r = 0; r < 10; r++) begin
        for (int l = 0; l < WORD_B; l++) begin T[c][r][l] = 8'($urandom); w[8*l +: 8] = T[c][r][l]; end
        wr(c, 1, r, w, 0, 0, 0, 0);
      end
    w = '0;
    for (int k = 0; k < 9; k++) begin K[k] = 8'($urandom); w[8*k +: 8] = K[k]; end
    wr(0, 2, 0, w, 0, 1, 0, 0);
    @(negedge clk);
    cmd = '0; cmd.mode = CM_CONV; cmd.k = 3; cmd.stride = 1; cmd.op0_signed = 1; cmd.op1_signed = 1;
    cmd.fmt = FMT_INT20; cmd.acc_clear = 1; cmd.write_back = 1; cmd.feat = 1; cmd.kern = 2; cmd.dst = 3;
    cmd.n_out = 1; cmd.n_ch = 1;
    start = 1;
    @(negedge clk); start = 0;
    chk("busy while computing", busy, 1);
    while (!done) @(posedge clk);
    @(posedge clk);
    for (int c = 0; c < NUM_CELL; c++)
      for (int i = 0; i < CU_DIM; i++) begin
        rd(c, 3, i, w);
        for (int j = 0; j < CU_DIM; j++) begin
          longint a, got;
          a = 0;
          for (int kr = 0; kr < 3; kr++) for (int kc = 0; kc < 3; kc++)
            a += longint'($signed(T[c][i+kr][j+kc])) * longint'($signed(K[kr*3+kc]));
          got = longint'($signed({w[64+8*j +: 8], w[8*j +: 8], w[128+4*j +: 4]}));
          chk("cell conv", got, a);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
