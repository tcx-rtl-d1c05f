// tb_tcx_feeder: drives random steps into the feeder and checks, exactly five
// cycles later, the CU control word (load / shift / hold), every CU's op0,
// the east-edge values and each CU row's kernel byte against the operand
// mapping of each mode (conv stride 1 and 2, max, point-wise, PReLU, 16-bit
// kernels).
module tb_tcx_feeder;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  comp_cmd_t cmd;
  logic tile_we, kb_we, st_valid, st_hi, st_first;
  logic [4:0] tile_row, st_c;
  logic [3:0] kb_idx, st_kr, st_kc;
  word_t tile_wdata, kb_wdata;
  cu_ctl_t cu_ctl;
  logic [CU_DIM-1:0][CU_DIM-1:0][15:0] op0;
  logic [CU_DIM-1:0][15:0] east;
  logic [CU_DIM-1:0][7:0] op1;
  int checks = 0, failures = 0;

  tcx_feeder dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] T [TILE][WORD_B];
  logic [7:0] KB [KB_BYTES];

  typedef struct { logic v; logic ld; logic sh; logic hi; logic [15:0] o [CU_DIM][CU_DIM];
                   logic [15:0] e [CU_DIM]; logic [7:0] k [CU_DIM]; } exp_t;
  exp_t pipe [FEED_STAGES];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d @%0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [15:0] ext(logic [7:0] b);
    return cmd.op0_signed ? 16'($signed(b)) : {8'h00, b};
  endfunction

  function automatic logic [7:0] tb(int r, int l);
    return (r < TILE && l < WORD_B) ? T[r][l] : 8'h00;
  endfunction

  function automatic exp_t model(int kr, int kc, int c, logic hi);
    exp_t x;
    int s, N, B;
    s = (cmd.stride == 2) ? 2 : 1; N = cmd.n_out; B = cmd.k16 ? 2 : 1;
    x.v = 1; x.hi = hi;
    x.sh = !hi && (cmd.mode inside {CM_CONV, CM_MAX}) && s == 1 && kc != 0;
    x.ld = !hi && !x.sh;
    for (int i = 0; i < CU_DIM; i++) begin
      int ki;
      for (int j = 0; j < CU_DIM; j++)
        case (cmd.mode)
          CM_PW:    x.o[i][j] = ext(tb(c*(8/N) + i/N, j));
          CM_PRELU: x.o[i][j] = ext(tb(i, j));
          default:  x.o[i][j] = ext(tb(i*s + kr, j*s + kc));
        endcase
      x.e[i] = ext(tb(i*s + kr, CU_DIM - 1 + kc));
      case (cmd.mode)
        CM_PW:    ki = ((i % N) * cmd.n_ch + c) * B + hi;
        CM_PRELU: ki = hi;
        default:  ki = (kr * cmd.k + kc) * B + hi;
      endcase
      x.k[i] = (cmd.mode == CM_MAX) ? 8'd1 : KB[ki];
    end
    return x;
  endfunction

  initial begin
    cmd = '0; tile_we = 0; kb_we = 0; st_valid = 0; st_hi = 0; st_first = 0;
    tile_row = 0; st_c = 0; kb_idx = 0; st_kr = 0; st_kc = 0; tile_wdata = 0; kb_wdata = 0;
    for (int p = 0; p < FEED_STAGES; p++) pipe[p].v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < TILE; r++) begin
      @(negedge clk);
      for (int l = 0; l < WORD_B; l++) begin T[r][l] = 8'($urandom); tile_wdata[8*l +: 8] = T[r][l]; end
      tile_we = 1; tile_row = 5'(r);
    end
    for (int r = 0; r < KB_WORDS; r++) begin
      @(negedge clk);
      tile_we = 0;
      for (int l = 0; l < WORD_B; l++) begin KB[r*WORD_B + l] = 8'($urandom); kb_wdata[8*l +: 8] = KB[r*WORD_B + l]; end
      kb_we = 1; kb_idx = 4'(r);
    end
    @(negedge clk); kb_we = 0;
    for (int t = 0; t < 3000; t++) begin
      exp_t x;
      if (t % 100 == 0) begin
        // new configuration (the feeder expects it stable while steps run)
        st_valid = 0;
        repeat (FEED_STAGES + 1) begin
          @(posedge clk); #1;
          for (int p = FEED_STAGES - 1; p > 0; p--) pipe[p] = pipe[p-1];
          pipe[0].v = 0;
        end
        @(negedge clk);
        cmd = '0;
        cmd.mode = cmode_e'($urandom_range(0, 3));
        cmd.k = 4'($urandom_range(1, 5)); cmd.stride = 2'($urandom_range(1, 2));
        cmd.n_out = 4'(1 << $urandom_range(0, 3)); cmd.n_ch = 5'($urandom_range(1, 2));
        cmd.op0_signed = $urandom_range(0, 1); cmd.k16 = $urandom_range(0, 1);
      end
      @(negedge clk);
      st_valid = 1;
      st_kr = 4'($urandom_range(0, cmd.k - 1)); st_kc = 4'($urandom_range(0, cmd.k - 1));
      st_c = 5'($urandom_range(0, cmd.n_ch - 1)); st_hi = cmd.k16 && $urandom_range(0, 1);
      x = model(st_kr, st_kc, st_c, st_hi);
      @(posedge clk); #1;
      for (int p = FEED_STAGES - 1; p > 0; p--) pipe[p] = pipe[p-1];
      pipe[0] = x;
      // output now corresponds to the step entered FEED_STAGES edges ago
      if (pipe[FEED_STAGES-1].v) begin
        exp_t e;
        e = pipe[FEED_STAGES-1];
        chk("valid", cu_ctl.valid, 1);
        chk("ld", cu_ctl.ld, e.ld);
        chk("sh", cu_ctl.sh, e.sh);
        chk("hi", cu_ctl.op1_hi, e.hi);
        for (int i = 0; i < CU_DIM; i++) begin
          for (int j = 0; j < CU_DIM; j++) chk("op0", op0[i][j], e.o[i][j]);
          if (e.sh) chk("east", east[i], e.e[i]);
          chk("op1", op1[i], e.k[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
