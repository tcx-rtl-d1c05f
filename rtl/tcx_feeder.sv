// tcx_feeder: five-stage operand pipeline between a cell's TRF bank and its
// 8x8 compute units, with a feature tile buffer and a kernel cache.
//
// The cell's sequencer first copies the feature tile (up to TILE rows of one
// TRF word, i.e. 20 byte lanes each) and the kernel (KB_WORDS words, byte-
// addressed as a flat array) into the feeder, then presents one step per
// cycle: kernel row/column (kr, kc), input channel c and high/low byte of a
// 16-bit kernel. For every step the feeder produces the CU control word, the
// op0 value of every CU, the east-edge op0 value of every CU row (fed to the
// rightmost column during a systolic shift) and one kernel byte per CU row.
//
// Operand mapping per mode (CU at row i, column j, stride S):
//   conv / max : op0 = tile[i*S+kr][j*S+kc], kernel byte (kr*K+kc)*B+hi, the
//                same for every CU (broadcast). With S = 1, steps with kc > 0
//                shift op0 one CU westwards and only the east edge is new;
//                kc = 0 reloads the whole window.
//   point-wise : N output channels share the cell; CU row i computes channel
//                n = i mod N for pixel row i / N. op0 = tile[c*(8/N) + i/N][j],
//                kernel byte (n*C + c)*B + hi.
//   prelu      : op0 = tile[i][j], kernel byte hi (the slope).
// B is 2 for 16-bit kernels, else 1; a high-byte step holds op0.
// Pipeline: S1 registers the step and decides load/shift, S2 selects the tile
// row of each CU row and the kernel byte index, S3 selects columns and kernel
// bytes, S4 extends op0 to 16 bits, S5 drives the CUs. Latency 5 cycles,
// one step per cycle. The stage split is this implementation's own; the
// five-stage depth is the published one.
module tcx_feeder
  import tcx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  comp_cmd_t  cmd,          // held stable while the command runs
  // buffer fill
  input  logic       tile_we,
  input  logic [4:0] tile_row,
  input  word_t      tile_wdata,
  input  logic       kb_we,
  input  logic [3:0] kb_idx,
  input  word_t      kb_wdata,
  // step
  input  logic       st_valid,
  input  logic [3:0] st_kr,
  input  logic [3:0] st_kc,
  input  logic [4:0] st_c,
  input  logic       st_hi,
  input  logic       st_first,
  // to the CU array
  output cu_ctl_t                               cu_ctl,
  output logic [CU_DIM-1:0][CU_DIM-1:0][15:0]   op0,
  output logic [CU_DIM-1:0][15:0]               east,
  output logic [CU_DIM-1:0][7:0]                op1
);
  localparam int unsigned KIW = $clog2(KB_BYTES);

  logic [TILE-1:0][WORD_W-1:0]     tile;
  logic [KB_WORDS-1:0][WORD_W-1:0] kbuf;

  always_ff @(posedge clk) begin
    if (tile_we && tile_row < 5'(TILE)) tile[tile_row] <= tile_wdata;
    if (kb_we && kb_idx < 4'(KB_WORDS)) kbuf[kb_idx] <= kb_wdata;
  end

  logic [1:0] nlog;   // log2 of point-wise output channels
  always_comb begin
    unique case (cmd.n_out)
      4'd8:    nlog = 2'd3;
      4'd4:    nlog = 2'd2;
      4'd2:    nlog = 2'd1;
      default: nlog = 2'd0;
    endcase
  end
  logic [1:0] s;
  assign s = (cmd.stride == 2'd2) ? 2'd2 : 2'd1;

  // ---------------- S1 ----------------
  cu_ctl_t    c1;
  logic [3:0] kr1, kc1;
  logic [4:0] ch1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; kr1 <= '0; kc1 <= '0; ch1 <= '0;
    end else begin
      c1.valid      <= st_valid;
      c1.mode       <= cmd.mode;
      c1.first      <= st_first;
      c1.op1_hi     <= st_hi;
      c1.op1_signed <= st_hi ? cmd.op1_signed : (cmd.op1_signed && !cmd.k16);
      c1.sh         <= !st_hi && (cmd.mode inside {CM_CONV, CM_MAX}) && s == 2'd1 && st_kc != 0;
      c1.ld         <= !st_hi && !((cmd.mode inside {CM_CONV, CM_MAX}) && s == 2'd1 && st_kc != 0);
      kr1 <= st_kr; kc1 <= st_kc; ch1 <= st_c;
    end
  end

  // ---------------- S2 ----------------
  cu_ctl_t                          c2;
  logic [3:0]                       kc2;
  logic [CU_DIM-1:0][WORD_W-1:0]    rowv2;
  logic [CU_DIM-1:0][KIW-1:0]       kidx2;
  logic [CU_DIM-1:0][5:0]           ri;
  logic [CU_DIM-1:0][KIW-1:0]       ki;
  always_comb begin
    for (int i = 0; i < CU_DIM; i++) begin
      logic [KIW-1:0] e;
      unique case (cmd.mode)
        CM_PW: begin
          ri[i] = 6'(ch1) * (6'd8 >> nlog) + 6'(i >> nlog);
          e     = KIW'((KIW'(i) & ((KIW'(1) << nlog) - 1)) * KIW'(cmd.n_ch) + KIW'(ch1));
        end
        CM_PRELU: begin
          ri[i] = 6'(i);
          e     = '0;
        end
        default: begin
          ri[i] = 6'(i) * 6'(s) + 6'(kr1);
          e     = KIW'(kr1) * KIW'(cmd.k) + KIW'(kc1);
        end
      endcase
      ki[i] = cmd.k16 ? KIW'({e, c1.op1_hi}) : e;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c2 <= '0; kc2 <= '0; rowv2 <= '0; kidx2 <= '0;
    end else begin
      c2  <= c1;
      kc2 <= kc1;
      for (int i = 0; i < CU_DIM; i++) begin
        rowv2[i] <= (ri[i] < 6'(TILE)) ? tile[ri[i][4:0]] : '0;
        kidx2[i] <= ki[i];
      end
    end
  end

  // ---------------- S3 ----------------
  cu_ctl_t                                c3;
  logic [CU_DIM-1:0][CU_DIM-1:0][7:0]     b3;
  logic [CU_DIM-1:0][7:0]                 e3, k3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c3 <= '0; b3 <= '0; e3 <= '0; k3 <= '0;
    end else begin
      c3 <= c2;
      for (int i = 0; i < CU_DIM; i++) begin
        for (int j = 0; j < CU_DIM; j++) begin
          int unsigned col;
          col = (c2.mode inside {CM_CONV, CM_MAX}) ? j * s + kc2 : j;
          b3[i][j] <= (col < WORD_B) ? rowv2[i][col*8 +: 8] : 8'h00;
        end
        e3[i] <= (CU_DIM - 1 + kc2 < WORD_B) ? rowv2[i][(CU_DIM - 1 + kc2)*8 +: 8] : 8'h00;
        k3[i] <= (kidx2[i] < KIW'(KB_BYTES)) ? kbuf[kidx2[i] / WORD_B][(kidx2[i] % WORD_B)*8 +: 8] : 8'h00;
      end
    end
  end

  // ---------------- S4 ----------------
  cu_ctl_t                                c4;
  logic [CU_DIM-1:0][CU_DIM-1:0][15:0]    b4;
  logic [CU_DIM-1:0][15:0]                e4;
  logic [CU_DIM-1:0][7:0]                 k4;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c4 <= '0; b4 <= '0; e4 <= '0; k4 <= '0;
    end else begin
      c4 <= c3;
      k4 <= (c3.mode == CM_MAX) ? {CU_DIM{8'd1}} : k3;
      for (int i = 0; i < CU_DIM; i++) begin
        for (int j = 0; j < CU_DIM; j++)
          b4[i][j] <= cmd.op0_signed ? 16'(signed'(b3[i][j])) : {8'h00, b3[i][j]};
        e4[i] <= cmd.op0_signed ? 16'(signed'(e3[i])) : {8'h00, e3[i]};
      end
    end
  end

  // ---------------- S5 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cu_ctl <= '0; op0 <= '0; east <= '0; op1 <= '0;
    end else begin
      cu_ctl <= c4;
      op0    <= b4;
      east   <= e4;
      op1    <= k4;
    end
  end
endmodule
