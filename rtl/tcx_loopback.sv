// tcx_loopback: direct path from the store side to the load side of the TRF
// access port, so tensor registers can be copied without passing through a
// neuron matrix or external memory.
//
// For each cell (only cell 0 with dup1) and each destination row r < rows,
// the source row r + roff is read from that cell in all four NRs at once; each
// NR's word is then shifted by boff byte lanes (destination lane l takes source
// lane l + boff) and written to row r of the destination register in the same
// NR, and with dup1 to every cell of it. Source rows or lanes outside the
// register read as zero. One move thus covers register copy, cropping
// (positive offsets), padding (negative offsets or rows beyond the source)
// and duplication. Cost per source row: one read cycle, one capture cycle
// and four write cycles. The per-row operations are this implementation's
// reading of the published list (move, pad, reshape, duplicate, crop).
module tcx_loopback
  import tcx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  mv_cmd_t            cmd_in,
  output logic               busy,
  output logic               done,
  output trf_req_t           trf,
  input  word_t [NUM_NR-1:0] trf_rdata,
  output logic               ev_row,
  output logic               ev_pad
);
  typedef enum logic [2:0] {M_IDLE, M_RD, M_CAP, M_WR, M_DONE} state_e;
  state_e  st;
  mv_cmd_t cmd;
  logic [CELL_W-1:0] cell_q;
  logic [5:0]        r;
  logic [NR_W-1:0]   n;
  word_t [NUM_NR-1:0] cap;

  logic signed [8:0] srow;
  logic              row_ok;
  assign srow   = $signed({3'b000, r}) + 9'(cmd.roff);
  assign row_ok = (srow >= 0) && (srow < $signed(9'(TRF_ROWS)));

  function automatic word_t lane_shift(word_t w, logic signed [7:0] off);
    word_t o;
    o = '0;
    for (int l = 0; l < WORD_B; l++) begin
      int sl;
      sl = l + int'(off);
      if (sl >= 0 && sl < WORD_B) o[8*l +: 8] = w[8*sl +: 8];
    end
    return o;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; cmd <= '0; cell_q <= '0; r <= '0; n <= '0; cap <= '0;
    end else begin
      unique case (st)
        M_IDLE: if (start) begin
          cmd <= cmd_in; cell_q <= '0; r <= '0; n <= '0;
          st <= (cmd_in.rows == 0) ? M_DONE : M_RD;
        end
        M_RD:  st <= M_CAP;
        M_CAP: begin
          for (int k = 0; k < NUM_NR; k++)
            cap[k] <= row_ok ? lane_shift(trf_rdata[k], cmd.boff) : '0;
          n  <= '0;
          st <= M_WR;
        end
        M_WR: begin
          n <= n + NR_W'(1);
          if (n == NR_W'(NUM_NR - 1)) begin
            if (r != cmd.rows - 6'd1) begin
              r <= r + 6'd1; st <= M_RD;
            end else if (!cmd.dup1 && cell_q != CELL_W'(NUM_CELL - 1)) begin
              r <= '0; cell_q <= cell_q + CELL_W'(1); st <= M_RD;
            end else st <= M_DONE;
          end
        end
        M_DONE: st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  assign busy   = (st != M_IDLE);
  assign done   = (st == M_DONE);
  assign ev_row = (st == M_CAP);
  assign ev_pad = (st == M_CAP) && !row_ok;

  always_comb begin
    trf = '0;
    trf.cell_id = cell_q;
    trf.ptr     = cmd.src;
    trf.row     = ROW_W'(srow);
    trf.dup1    = cmd.dup1;
    trf.wdata   = cap[n];
    if (st == M_RD) trf.en = row_ok;
    if (st == M_WR) begin
      trf.en      = 1'b1;
      trf.we      = 1'b1;
      trf.ptr     = cmd.dst;
      trf.row     = ROW_W'(r);
      trf.nr_mask = NUM_NR'(1) << n;
    end
  end
endmodule
