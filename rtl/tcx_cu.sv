// tcx_cu: integer compute unit (CU) of the TCX neuron matrix.
//
// Computes y = op0 * op1 + op2, where op2 is either the external op2 input
// (first step of an accumulation) or the unit's own 32-bit accumulator. op0 is a
// 16-bit value (the cell sign- or zero-extends 8-bit features), op1 one byte of
// a kernel. An 8-bit kernel value takes one cycle; a 16-bit one takes two, the
// op1_hi control line saying which byte is present (the high byte is weighted
// by 256), as in the published design. Besides MAC the unit has a comparator
// for max pooling (op1 fixed to 1, the accumulator keeps the maximum) and a
// PReLU mode (negative op0 is multiplied by op1, positive op0 by 2^shift so
// that the output shift leaves it unchanged).
//
// op0 is held in an operand register that can be loaded from the feeder (ld)
// or from the east neighbour's operand register (sh); this is the systolic
// shift of features between adjacent CUs.
//
// Timing: controls and operands presented in cycle t are registered in the
// operand stage at t+1, and the accumulator is updated at the edge ending t+1.
// The result output is combinational from the accumulator: the accumulator
// shifted right by `shift` (radix point) and saturated to the selected 8-, 16-
// or 20-bit format, sign-extended to 20 bits. Output saturation is this
// implementation's choice.
module tcx_cu
  import tcx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cu_ctl_t            ctl,
  input  logic signed [15:0] op0_in,    // from the feeder
  input  logic signed [15:0] east_in,   // east neighbour's operand register
  input  logic [7:0]         op1_in,    // kernel byte
  input  logic signed [31:0] op2_in,    // addend on the first step
  input  fmt_e               fmt,
  input  logic [4:0]         shift,
  output logic signed [15:0] op0_q,     // to the west neighbour
  output logic signed [31:0] acc_q,
  output logic [19:0]        res
);

  cu_ctl_t            ctl_q;
  logic [7:0]         op1_q;
  logic signed [31:0] op2_q;

  // operand stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_q <= '0;
      op0_q <= '0;
      op1_q <= '0;
      op2_q <= '0;
    end else begin
      ctl_q <= ctl;
      if (ctl.valid && ctl.ld)      op0_q <= op0_in;
      else if (ctl.valid && ctl.sh) op0_q <= east_in;
      if (ctl.valid) begin
        op1_q <= op1_in;
        op2_q <= op2_in;
      end
    end
  end

  // execute stage
  logic signed [8:0]  b;
  logic signed [16:0] mult;
  logic signed [31:0] prod, base, nxt;

  always_comb begin
    b    = ctl_q.op1_signed ? 9'(signed'(op1_q)) : signed'({1'b0, op1_q});
    base = ctl_q.first ? op2_q : acc_q;
    mult = 17'(b);
    if (ctl_q.mode == CM_PRELU && op0_q >= 0) mult = 17'sd1 <<< shift;
    prod = 32'(op0_q * mult);
    if (ctl_q.op1_hi) prod = prod <<< 8;
    unique case (ctl_q.mode)
      CM_MAX:  nxt = (32'(op0_q) > base) ? 32'(op0_q) : base;
      default: nxt = base + prod;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           acc_q <= '0;
    else if (ctl_q.valid) acc_q <= nxt;
  end

  // output select
  logic signed [31:0] shifted;
  always_comb begin
    shifted = acc_q >>> shift;
    unique case (fmt)
      FMT_INT8:  res = 20'(sat(shifted, 8));
      FMT_INT16: res = 20'(sat(shifted, 16));
      default:   res = 20'(sat(shifted, 20));
    endcase
  end

endmodule
