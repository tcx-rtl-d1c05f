// tcx_lsu: tensor load/store pipeline.
//
// One instruction moves a whole 4-D sub-tensor between the external memory
// port and the distributed TRF banks. Two dimension operands describe it: the
// global dimensions (gdim, shape of the whole tensor in memory) and the local
// dimensions (ldim, extent of the sub-tensor held in a tensor register), plus
// an origin (org, signed) of the sub-tensor in_bounds the global tensor.
// Element (i0,i1,i2,i3) of the local tensor is byte lane i0 (16-bit: lanes i0
// and 8+i0) of row i1 in cell cell0+i2 of NR nr0+i3; in memory it is at
//   base + esize * (((c3*G2 + c2)*G1 + c1)*G0 + c0),   ck = org_k + i_k.
// Load: elements outside the global tensor are padded with zero and cost no
// memory access; an element in the same 8-byte memory word as the previous
// one reuses that word (requests are combined); a finished row is written to
// the TRF, duplicated as dup0/dup1 (cells, see tcx_nr) and dup2 (all NRs) say.
// Store: rows are read back, ReLU is applied if requested (linear otherwise),
// values are saturated to the element size, elements outside the global
// tensor are cropped, and bytes are gathered into 8-byte words with byte
// strobes, one bus write per word touched. In expand mode the store adds the
// partial results of the same row in all four NRs before writing.
// The element order, the row-at-a-time TRF access and the one-element-per-
// cycle rate are this implementation's choices.
// Bus: requests use valid/ready; a read's data returns later with rsp_valid
// (one outstanding read); writes are posted.
module tcx_lsu
  import tcx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  ls_cmd_t     cmd_in,
  output logic        busy,
  output logic        done,
  // memory port
  output bus_req_t    bus,
  input  logic        bus_ready,
  input  logic        rsp_valid,
  input  logic [BUS_W-1:0] rsp_rdata,
  // TRF port
  output trf_req_t    trf,
  input  word_t [NUM_NR-1:0] trf_rdata,
  // activity
  output logic        ev_pad,
  output logic        ev_comb,
  output logic        ev_expand
);
  typedef enum logic [3:0] {
    L_IDLE, L_ELEM, L_REQ, L_WAIT, L_WROW,
    S_RD, S_RDW, S_ELEM, S_FLUSH, S_LAST, L_DONE
  } state_e;
  state_e  st;
  ls_cmd_t cmd;

  logic [31:0] i0, i1, i2, i3;
  word_t       rowbuf;
  word_t [NUM_NR-1:0] sword;

  // held memory word (load) / write-combining buffer (store)
  logic              held_v, fresh;
  logic [ADDR_W-1:0] held_a;
  logic [BUS_W-1:0]  held_d;
  logic [BUS_W/8-1:0] held_s;

  // ---------------- address generation ----------------
  logic signed [32:0] c [4];
  logic               in_bounds;
  logic [ADDR_W-1:0]  ea, wa;
  logic [2:0]         boff;
  always_comb begin
    c[0] = $signed({1'b0, i0}) + $signed({cmd.org[0][31], cmd.org[0]});
    c[1] = $signed({1'b0, i1}) + $signed({cmd.org[1][31], cmd.org[1]});
    c[2] = $signed({1'b0, i2}) + $signed({cmd.org[2][31], cmd.org[2]});
    c[3] = $signed({1'b0, i3}) + $signed({cmd.org[3][31], cmd.org[3]});
    in_bounds = 1'b1;
    for (int k = 0; k < 4; k++)
      if (c[k] < 0 || c[k] >= $signed({1'b0, cmd.gdim[k]})) in_bounds = 1'b0;
    ea = ((32'(c[3]) * cmd.gdim[2] + 32'(c[2])) * cmd.gdim[1] + 32'(c[1])) * cmd.gdim[0] + 32'(c[0]);
    ea = cmd.base + (cmd.wide ? (ea << 1) : ea);
    wa   = {ea[ADDR_W-1:3], 3'b000};
    boff = ea[2:0];
  end

  logic row_end, last_row, all_end;
  assign row_end  = (i0 == cmd.ldim[0] - 32'd1);
  assign last_row = (i1 == cmd.ldim[1] - 32'd1) && (i2 == cmd.ldim[2] - 32'd1) &&
                    (i3 == cmd.ldim[3] - 32'd1);
  assign all_end  = row_end && last_row;

  // ---------------- store element value ----------------
  logic signed [31:0] sval;
  logic [15:0]        sbytes;
  always_comb begin
    sval = '0;
    for (int n = 0; n < NUM_NR; n++) begin
      logic signed [31:0] v;
      v = cmd.wide ? 32'(signed'({sword[n][64 + 8*i0[2:0] +: 8], sword[n][8*i0[2:0] +: 8]}))
                   : 32'(signed'(sword[n][8*i0[4:0] +: 8]));
      if (cmd.expand || NR_W'(n) == NR_W'(32'(cmd.nr0) + i3)) sval = sval + v;
    end
    if (cmd.relu && sval < 0) sval = '0;
    sval   = sat(sval, cmd.wide ? 16 : 8);
    sbytes = sval[15:0];
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; cmd <= '0; i0 <= '0; i1 <= '0; i2 <= '0; i3 <= '0;
      rowbuf <= '0; sword <= '0; held_v <= 1'b0; fresh <= 1'b0;
      held_a <= '0; held_d <= '0; held_s <= '0;
    end else begin
      unique case (st)
        L_IDLE: if (start) begin
          cmd <= cmd_in;
          i0 <= '0; i1 <= '0; i2 <= '0; i3 <= '0;
          rowbuf <= '0; held_v <= 1'b0; held_s <= '0;
          st <= cmd_in.store ? S_RD : L_ELEM;
        end
        // ---------------- load ----------------
        L_ELEM: begin
          if (!in_bounds || (held_v && held_a == wa)) begin
            if (cmd.wide) begin
              rowbuf[8*i0[2:0] +: 8]      <= in_bounds ? held_d[8*boff +: 8] : 8'h00;
              rowbuf[64 + 8*i0[2:0] +: 8] <= in_bounds ? held_d[8*(boff + 3'd1) +: 8] : 8'h00;
            end else begin
              rowbuf[8*i0[4:0] +: 8] <= in_bounds ? held_d[8*boff +: 8] : 8'h00;
            end
            fresh <= 1'b0;
            if (row_end) begin
              i0 <= '0;
              st <= L_WROW;
            end else i0 <= i0 + 32'd1;
          end else st <= L_REQ;
        end
        L_REQ:  if (bus_ready) st <= L_WAIT;
        L_WAIT: if (rsp_valid) begin
          held_v <= 1'b1; held_a <= wa; held_d <= rsp_rdata; fresh <= 1'b1;
          st <= L_ELEM;
        end
        L_WROW: begin
          rowbuf <= '0;
          if (last_row) st <= L_DONE;
          else begin
            st <= L_ELEM;
            if (i1 != cmd.ldim[1] - 32'd1) i1 <= i1 + 32'd1;
            else begin
              i1 <= '0;
              if (i2 != cmd.ldim[2] - 32'd1) i2 <= i2 + 32'd1;
              else begin i2 <= '0; i3 <= i3 + 32'd1; end
            end
          end
        end
        // ---------------- store ----------------
        S_RD:  st <= S_RDW;
        S_RDW: begin sword <= trf_rdata; st <= S_ELEM; end
        S_ELEM: begin
          if (in_bounds && held_v && held_a != wa) st <= S_FLUSH;
          else begin
            if (in_bounds) begin
              held_v <= 1'b1;
              held_a <= wa;
              held_d[8*boff +: 8] <= sbytes[7:0];
              held_s[boff]        <= 1'b1;
              if (cmd.wide) begin
                held_d[8*(boff + 3'd1) +: 8] <= sbytes[15:8];
                held_s[boff + 3'd1]          <= 1'b1;
              end
            end
            if (row_end) begin
              i0 <= '0;
              if (all_end) st <= S_LAST;
              else begin
                st <= S_RD;
                if (i1 != cmd.ldim[1] - 32'd1) i1 <= i1 + 32'd1;
                else begin
                  i1 <= '0;
                  if (i2 != cmd.ldim[2] - 32'd1) i2 <= i2 + 32'd1;
                  else begin i2 <= '0; i3 <= i3 + 32'd1; end
                end
              end
            end else i0 <= i0 + 32'd1;
          end
        end
        S_FLUSH: if (bus_ready) begin
          held_v <= 1'b0; held_s <= '0;
          st <= S_ELEM;
        end
        S_LAST: begin
          if (!held_v) st <= L_DONE;
          else if (bus_ready) begin held_v <= 1'b0; held_s <= '0; st <= L_DONE; end
        end
        L_DONE: st <= L_IDLE;
        default: st <= L_IDLE;
      endcase
    end
  end

  assign busy = (st != L_IDLE);
  assign done = (st == L_DONE);
  assign ev_pad    = (st == L_ELEM) && !in_bounds;
  assign ev_comb   = (st == L_ELEM) && in_bounds && held_v && held_a == wa && !fresh;
  assign ev_expand = (st == S_RDW) && cmd.expand;

  // memory requests
  always_comb begin
    bus = '0;
    if (st == L_REQ) begin
      bus.valid = 1'b1;
      bus.addr  = wa;
    end else if (st == S_FLUSH || (st == S_LAST && held_v)) begin
      bus.valid = 1'b1;
      bus.we    = 1'b1;
      bus.addr  = held_a;
      bus.wdata = held_d;
      bus.wstrb = held_s;
    end
  end

  // TRF requests
  always_comb begin
    trf = '0;
    trf.ptr     = cmd.ptr;
    trf.row     = ROW_W'(i1);
    trf.cell_id = CELL_W'(32'(cmd.cell0) + i2);
    trf.dup0    = cmd.dup0;
    trf.dup1    = cmd.dup1;
    trf.hwp_a   = cmd.hwp_a;
    trf.hwp_b   = cmd.hwp_b;
    trf.wdata   = rowbuf;
    trf.nr_mask = cmd.dup2 ? '1 : (NUM_NR'(1) << NR_W'(32'(cmd.nr0) + i3));
    if (st == L_WROW) begin
      trf.en = 1'b1;
      trf.we = 1'b1;
    end else if (st == S_RD) begin
      trf.en = 1'b1;
    end
  end
endmodule
