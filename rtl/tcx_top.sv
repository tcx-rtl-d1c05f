// tcx_top: the TCX tensor engine.
//
// A tensor co-processor with 4096 compute units: four identical neuron
// matrices (NR) of 4x4 cells, each cell an 8x8 mesh of 8-bit multiply-
// accumulate units with its own bank of the tensor register file. A host
// (a scalar CPU sharing its instruction stream, outside this design) feeds
// 64-bit tensor instructions on insn/insn_valid/insn_ready. tcx_ctrl renames
// and issues them; tcx_lsu moves tensors between the 64-bit memory port and
// the TRF banks; tcx_loopback copies between tensor registers; the four NRs
// compute. The load/store and loopback paths share the TRF access port of
// all banks (only one runs at a time). All NRs run the same compute command
// on their own data: with the kernels split by output channel and the
// features duplicated (dup2) this is the tile mode; with inputs and kernels
// split by input channel and the partial sums added by the store (SETCFG
// expand bit) it is the expand mode.
// Memory port: bus_req.valid/bus_ready handshake, byte address, posted
// writes with byte strobes; read data returns later with rsp_valid.
// Performance counters (perf, indexed by tcx_pkg::perf_e) count cycles, issue
// stalls, MAC steps and the other mechanisms; irq pulses when a FENCE
// completes; idle is high when nothing is queued or running.
module tcx_top
  import tcx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               insn_valid,
  input  logic [63:0]        insn,
  output logic               insn_ready,
  output bus_req_t           bus_req,
  input  logic               bus_ready,
  input  logic               rsp_valid,
  input  logic [BUS_W-1:0]   rsp_rdata,
  output logic               irq,
  output logic               idle,
  output logic [PM_COUNT-1:0][31:0] perf
);
  logic      ls_start, ls_done, mv_start, mv_done, comp_start, comp_done;
  ls_cmd_t   ls_cmd;
  mv_cmd_t   mv_cmd;
  comp_cmd_t comp_cmd;
  logic      ev_issue, ev_alloc_stall, ev_release, ev_retire;

  tcx_ctrl u_ctrl (
    .clk, .rst_n,
    .insn_valid, .insn, .insn_ready,
    .ls_start, .ls_cmd, .ls_done,
    .mv_start, .mv_cmd, .mv_done,
    .comp_start, .comp_cmd, .comp_done,
    .irq, .idle,
    .ev_issue, .ev_alloc_stall, .ev_release, .ev_retire
  );

  // ---------------- memory path ----------------
  trf_req_t            ls_trf, mv_trf, trf;
  word_t [NUM_NR-1:0]  trf_rdata;
  logic                ls_busy, mv_busy;
  logic                ev_pad, ev_comb, ev_expand, ev_row, ev_mvpad;

  tcx_lsu u_lsu (
    .clk, .rst_n,
    .start (ls_start), .cmd_in (ls_cmd), .busy (ls_busy), .done (ls_done),
    .bus (bus_req), .bus_ready, .rsp_valid, .rsp_rdata,
    .trf (ls_trf), .trf_rdata,
    .ev_pad, .ev_comb, .ev_expand
  );

  tcx_loopback u_loop (
    .clk, .rst_n,
    .start (mv_start), .cmd_in (mv_cmd), .busy (mv_busy), .done (mv_done),
    .trf (mv_trf), .trf_rdata,
    .ev_row, .ev_pad (ev_mvpad)
  );

  assign trf = mv_busy ? mv_trf : ls_trf;

  // ---------------- neuron matrices ----------------
  logic [NUM_NR-1:0] nr_busy, nr_done, nr_step, nr_shift, nr_khit;
  for (genvar n = 0; n < NUM_NR; n++) begin : g_nr
    tcx_nr u_nr (
      .clk, .rst_n,
      .start    (comp_start),
      .cmd      (comp_cmd),
      .busy     (nr_busy[n]),
      .done     (nr_done[n]),
      .req      (trf),
      .req_sel  (trf.we ? trf.nr_mask[n] : 1'b1),
      .rdata    (trf_rdata[n]),
      .ev_step  (nr_step[n]),
      .ev_shift (nr_shift[n]),
      .ev_khit  (nr_khit[n])
    );
  end
  assign comp_done = &nr_done;

  // ---------------- performance monitor ----------------
  logic [PM_COUNT-1:0] ev;
  always_comb begin
    ev = '0;
    ev[PM_CYCLES]        = 1'b1;
    ev[PM_ISSUED]        = ev_issue;
    ev[PM_ALLOC_STALL]   = ev_alloc_stall;
    ev[PM_RELEASE]       = ev_release;
    ev[PM_MAC_STEPS]     = nr_step[0];
    ev[PM_SHIFT_STEPS]   = nr_shift[0];
    ev[PM_KCACHE_HIT]    = nr_khit[0];
    ev[PM_PAD]           = ev_pad || ev_mvpad;
    ev[PM_COMBINE]       = ev_comb;
    ev[PM_EXPAND]        = ev_expand;
    ev[PM_LOOPBACK_ROWS] = ev_row;
    ev[PM_FENCE]         = irq;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) perf <= '0;
    else
      for (int k = 0; k < PM_COUNT; k++)
        if (ev[k]) perf[k] <= perf[k] + 32'd1;
  end

  a_one_mem_user: assert property (@(posedge clk) disable iff (!rst_n) !(ls_busy && mv_busy));
endmodule
