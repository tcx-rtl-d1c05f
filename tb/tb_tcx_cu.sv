// tb_tcx_cu: self-checking test of the compute unit.
// Random operation sequences (MAC with 8-bit and two-cycle 16-bit kernels,
// mixed signedness, max pooling, PReLU, systolic operand shift) are applied
// back to back, one per cycle; a behavioural model computes the accumulator
// and the formatted output, and both are compared after each sequence. The
// two-cycle latency from control to accumulator is checked as well.
module tb_tcx_cu;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cu_ctl_t ctl;
  logic signed [15:0] op0_in, east_in, op0_q;
  logic [7:0] op1_in;
  logic signed [31:0] op2_in, acc_q;
  fmt_e fmt;
  logic [4:0] shift;
  logic [19:0] res;
  int checks = 0, failures = 0;

  tcx_cu dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] model_res(logic signed [31:0] a, fmt_e f, logic [4:0] sh);
    logic signed [31:0] v;
    v = a >>> sh;
    case (f)
      FMT_INT8:  v = (v > 127) ? 127 : (v < -128) ? -128 : v;
      FMT_INT16: v = (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
      default:   v = (v > 524287) ? 524287 : (v < -524288) ? -524288 : v;
    endcase
    return v;
  endfunction

  task automatic check(string what, logic signed [31:0] got, logic signed [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic signed [31:0] m_acc, m_prev;
    logic signed [15:0] m_op0;
    ctl = '0; op0_in = '0; east_in = '0; op1_in = '0; op2_in = '0; fmt = FMT_INT20; shift = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    m_op0 = 0; m_acc = 0;
    for (int seq = 0; seq < 300; seq++) begin
      cmode_e mode;
      int len;
      logic k16, s1;
      mode = cmode_e'($urandom_range(0, 3));
      if (mode == CM_PW) mode = CM_CONV;
      len  = $urandom_range(1, 9);
      k16  = (mode == CM_CONV) && $urandom_range(0, 1);
      s1   = $urandom_range(0, 1);
      shift = 5'($urandom_range(0, 6));
      fmt   = fmt_e'($urandom_range(0, 2));
      for (int e = 0; e < len; e++) begin
        logic signed [15:0] a;
        logic [15:0] w;
        int parts;
        parts = k16 ? 2 : 1;
        w = 16'($urandom);
        for (int p = 0; p < parts; p++) begin
          @(negedge clk);
          ctl = '0;
          ctl.valid = 1'b1;
          ctl.mode  = mode;
          ctl.first = (e == 0 && p == 0);
          ctl.op1_hi = (p == 1);
          ctl.op1_signed = k16 ? (p == 1 ? s1 : 1'b0) : s1;
          op1_in  = (p == 1) ? w[15:8] : (k16 ? w[7:0] : w[15:8]);
          op0_in  = 16'($signed(8'($urandom)));
          east_in = 16'($urandom_range(0, 255));
          op2_in  = (mode == CM_MAX) ? 32'sh8000_0000 : 32'($urandom_range(0, 1000)) - 500;
          if (p == 0) begin
            if ($urandom_range(0, 3) == 0 && e > 0) begin ctl.sh = 1'b1; m_op0 = east_in; end
            else begin ctl.ld = 1'b1; m_op0 = op0_in; end
          end
          // model
          begin
            logic signed [31:0] base, b, prod;
            m_prev = m_acc;
            base = ctl.first ? op2_in : m_acc;
            b = ctl.op1_signed ? 32'($signed(op1_in)) : 32'({24'd0, op1_in});
            if (mode == CM_PRELU && m_op0 >= 0) b = 32'sd1 <<< shift;
            prod = 32'(m_op0) * b;
            if (ctl.op1_hi) prod = prod <<< 8;
            if (mode == CM_MAX) m_acc = (32'(m_op0) > base) ? 32'(m_op0) : base;
            else m_acc = base + prod;
          end
        end
      end
      // accumulator updates on the second edge after the last control
      @(posedge clk); #1;
      if (len * (k16 ? 2 : 1) > 1) check("latency: last op not yet applied", acc_q, m_prev);
      @(negedge clk);
      ctl = '0;
      @(posedge clk); #1;
      check("acc", acc_q, m_acc);
      check("res", 32'(signed'(res)), model_res(m_acc, fmt, shift));
      check("op0_q", 32'(op0_q), 32'(m_op0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
