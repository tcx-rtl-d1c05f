// tb_tcx_cell: end-to-end test of one cell. Feature tiles and kernels are
// written through bank port A, compute commands are started, and the eight
// result rows are read back through port A and compared with a behavioural
// model of the arithmetic. Covers 3x3 convolution with stride 1 (systolic
// shift) and stride 2, a 16-bit kernel, max pooling, the point-wise (Fig. 8)
// mapping, PReLU, accumulation over two commands and the kernel cache. The
// number of MAC steps of each command (K*K, doubled for 16-bit kernels) is
// checked against the step count of the published dataflow.
module tb_tcx_cell;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, a_en, a_we, ev_step, ev_shift, ev_khit;
  comp_cmd_t cmd_in;
  ptr_t a_ptr; row_t a_row; word_t a_wdata, a_rdata;
  int checks = 0, failures = 0;
  int steps, shifts, khits;

  tcx_cell dut (.*);

  always @(posedge clk) begin
    if (ev_step)  steps++;
    if (ev_shift) shifts++;
    if (ev_khit)  khits++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] T [TILE][WORD_B];    // feature tile (ptr 1)
  logic [7:0] KB [KB_BYTES];       // kernel bytes (ptr 2)
  longint acc [CU_DIM][CU_DIM];    // model accumulators

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wr(ptr_t p, int r, word_t w);
    @(negedge clk);
    a_en = 1; a_we = 1; a_ptr = p; a_row = row_t'(r); a_wdata = w;
    @(negedge clk);
    a_en = 0; a_we = 0;
  endtask

  task automatic rd(ptr_t p, int r, output word_t w);
    @(negedge clk);
    a_en = 1; a_we = 0; a_ptr = p; a_row = row_t'(r);
    @(posedge clk); #1;
    w = a_rdata;
    @(negedge clk);
    a_en = 0;
  endtask

  task automatic load_data();
    for (int r = 0; r < TILE; r++) begin
      word_t w;
      for (int l = 0; l < WORD_B; l++) begin T[r][l] = 8'($urandom); w[8*l +: 8] = T[r][l]; end
      wr(1, r, w);
    end
    for (int r = 0; r < KB_WORDS; r++) begin
      word_t w;
      for (int l = 0; l < WORD_B; l++) begin KB[r*WORD_B + l] = 8'($urandom); w[8*l +: 8] = KB[r*WORD_B + l]; end
      wr(2, r, w);
    end
  endtask

  function automatic longint ext8(logic [7:0] b, logic s);
    return s ? longint'($signed(b)) : longint'(b);
  endfunction

  function automatic longint kval(int idx, logic k16, logic s);
    if (k16) return s ? longint'($signed({KB[2*idx+1], KB[2*idx]})) : longint'({KB[2*idx+1], KB[2*idx]});
    return ext8(KB[idx], s);
  endfunction

  task automatic model(comp_cmd_t c);
    int s;
    s = (c.stride == 2) ? 2 : 1;
    for (int i = 0; i < CU_DIM; i++)
      for (int j = 0; j < CU_DIM; j++) begin
        longint a;
        a = c.acc_clear ? ((c.mode == CM_MAX) ? -64'sd2147483648 : 0) : acc[i][j];
        case (c.mode)
          CM_CONV: for (int kr = 0; kr < c.k; kr++) for (int kc = 0; kc < c.k; kc++)
                     a += ext8(T[i*s+kr][j*s+kc], c.op0_signed) * kval(kr*c.k+kc, c.k16, c.op1_signed);
          CM_MAX:  for (int kr = 0; kr < c.k; kr++) for (int kc = 0; kc < c.k; kc++)
                     if (ext8(T[i*s+kr][j*s+kc], c.op0_signed) > a) a = ext8(T[i*s+kr][j*s+kc], c.op0_signed);
          CM_PW: begin
            int n, pr, R;
            R = 8 / c.n_out; n = i % c.n_out; pr = i / c.n_out;
            for (int ch = 0; ch < c.n_ch; ch++)
              a += ext8(T[ch*R+pr][j], c.op0_signed) * kval(n*c.n_ch+ch, c.k16, c.op1_signed);
          end
          default: begin
            longint x;
            x = ext8(T[i][j], c.op0_signed);
            a += (x < 0) ? x * kval(0, c.k16, c.op1_signed) : x * (64'sd1 <<< c.shift);
          end
        endcase
        acc[i][j] = a;
      end
  endtask

  function automatic longint fmt_val(longint a, comp_cmd_t c);
    longint v, hi;
    v  = a >>> c.shift;
    hi = (c.fmt == FMT_INT8) ? 127 : (c.fmt == FMT_INT16) ? 32767 : 524287;
    if (v > hi) v = hi;
    if (v < -hi - 1) v = -hi - 1;
    return v;
  endfunction

  task automatic run(comp_cmd_t c, int exp_steps, string name);
    int t0;
    model(c);
    steps = 0;
    @(negedge clk);
    cmd_in = c; start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (!done) begin @(posedge clk); #1; end
    chk({name, " steps"}, steps, exp_steps);
    if (c.write_back)
      for (int i = 0; i < CU_DIM; i++) begin
        word_t w;
        rd(c.dst, i, w);
        for (int j = 0; j < CU_DIM; j++) begin
          longint got;
          case (c.fmt)
            FMT_INT8:  got = longint'($signed(w[8*j +: 8]));
            FMT_INT16: got = longint'($signed({w[64+8*j +: 8], w[8*j +: 8]}));
            default:   got = longint'($signed({w[64+8*j +: 8], w[8*j +: 8], w[128+4*j +: 4]}));
          endcase
          chk({name, " result"}, got, fmt_val(acc[i][j], c));
        end
      end
  endtask

  function automatic comp_cmd_t mk(cmode_e m, int k, int s, fmt_e f, int sh);
    comp_cmd_t c;
    c = '0;
    c.mode = m; c.k = 4'(k); c.stride = 2'(s); c.fmt = f; c.shift = 5'(sh);
    c.op0_signed = 1; c.op1_signed = 1; c.acc_clear = 1; c.write_back = 1;
    c.feat = 1; c.kern = 2; c.dst = 3; c.n_out = 1; c.n_ch = 1;
    return c;
  endfunction

  initial begin
    comp_cmd_t c;
    start = 0; cmd_in = '0; a_en = 0; a_we = 0; a_ptr = 0; a_row = 0; a_wdata = 0;
    steps = 0; shifts = 0; khits = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      load_data();
      // 3x3 stride-1 convolution: 9 steps, 6 of them shifted
      shifts = 0;
      c = mk(CM_CONV, 3, 1, FMT_INT20, 0);
      run(c, 9, "conv3x3s1");
      chk("shift steps", shifts, 6);
      // same kernel again: served from the kernel cache
      khits = 0;
      c = mk(CM_CONV, 3, 1, FMT_INT16, 2); c.op0_signed = 0;
      run(c, 9, "conv3x3s1 cached");
      chk("kernel cache hit", khits, 1);
      // stride 2, 8-bit output
      c = mk(CM_CONV, 3, 2, FMT_INT8, 6);
      run(c, 9, "conv3x3s2");
      // 16-bit kernel: two cycles per element
      c = mk(CM_CONV, 2, 1, FMT_INT20, 8); c.k16 = 1;
      run(c, 8, "conv2x2 k16");
      // 5x5 with accumulation over two commands
      c = mk(CM_CONV, 5, 1, FMT_INT20, 0); c.write_back = 0;
      run(c, 25, "conv5x5 part1");
      c = mk(CM_CONV, 5, 1, FMT_INT20, 0); c.acc_clear = 0; c.op1_signed = 0;
      run(c, 25, "conv5x5 part2");
      // max pooling 2x2 stride 2
      c = mk(CM_MAX, 2, 2, FMT_INT8, 0);
      run(c, 4, "maxpool");
      // point-wise, N = 4 output channels, C = 3 input channels
      c = mk(CM_PW, 1, 1, FMT_INT20, 0); c.n_out = 4; c.n_ch = 3;
      run(c, 3, "pointwise");
      c = mk(CM_PW, 1, 1, FMT_INT20, 0); c.n_out = 8; c.n_ch = 2; c.k16 = 1;
      run(c, 4, "pointwise k16");
      // PReLU with slope kernel byte, 4 fractional bits
      c = mk(CM_PRELU, 1, 1, FMT_INT8, 4);
      run(c, 1, "prelu");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
