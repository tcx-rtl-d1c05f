// tcx_nr: neuron matrix (NR), a 4x4 mesh of cells with its decoder.
//
// The decoder broadcasts a compute command to all 16 cells, which run it in
// lockstep on the data in their own TRF banks; the NR is done when every cell
// is. For the load/store and loopback port it forms the hardware partition
// (HWP): the cells are grouped into partitions of 2^hwp_a x 2^hwp_b cells
// (1, 2 or 4 each way, nine forms) and a write is steered to
//   - the one target cell,
//   - with dup0, the cell at the same position in every partition
//     (feature maps common to all partitions),
//   - with dup1, every cell (kernels shared by all cells).
// Cell (y, x) has index 4*y + x. A read returns the word of the addressed
// cell one cycle after the request.
// Cells exchange no data with each other here: each cell's feature tile
// already carries the halo it needs (see the feeder), which replaces the
// nearest-neighbour cell links of the published design.
module tcx_nr
  import tcx_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  comp_cmd_t cmd,
  output logic      busy,
  output logic      done,
  input  trf_req_t  req,
  input  logic      req_sel,       // this NR takes part in the access
  output word_t     rdata,
  output logic      ev_step,
  output logic      ev_shift,
  output logic      ev_khit
);
  logic [NUM_CELL-1:0] wmask, c_busy, c_done, c_step, c_shift, c_khit;
  word_t               c_rdata [NUM_CELL];
  logic [CELL_W-1:0]   rd_cell_q;

  // partition write mask
  always_comb begin
    logic [1:0] ty, tx, py, px, my, mx;
    ty = 2'(req.cell_id >> 2);
    tx = 2'(req.cell_id);
    my = 2'((3'd1 << req.hwp_a) - 3'd1);
    mx = 2'((3'd1 << req.hwp_b) - 3'd1);
    for (int c = 0; c < NUM_CELL; c++) begin
      py = 2'(c >> 2);
      px = 2'(c);
      if (req.dup1)      wmask[c] = 1'b1;
      else if (req.dup0) wmask[c] = ((py & my) == (ty & my)) && ((px & mx) == (tx & mx));
      else               wmask[c] = (CELL_W'(c) == req.cell_id);
    end
  end

  for (genvar c = 0; c < NUM_CELL; c++) begin : g_cell
    tcx_cell u_cell (
      .clk, .rst_n,
      .start   (start),
      .cmd_in  (cmd),
      .busy    (c_busy[c]),
      .done    (c_done[c]),
      .a_en    (req.en && req_sel && (req.we ? wmask[c] : (CELL_W'(c) == req.cell_id))),
      .a_we    (req.we),
      .a_ptr   (req.ptr),
      .a_row   (req.row),
      .a_wdata (req.wdata),
      .a_rdata (c_rdata[c]),
      .ev_step (c_step[c]),
      .ev_shift(c_shift[c]),
      .ev_khit (c_khit[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_cell_q <= '0;
    else if (req.en && !req.we) rd_cell_q <= req.cell_id;
  end

  assign rdata    = c_rdata[rd_cell_q];
  assign busy     = |c_busy;
  assign done     = &c_done;
  assign ev_step  = c_step[0];
  assign ev_shift = c_shift[0];
  assign ev_khit  = c_khit[0];

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (c_done == '0) || (&c_done));
endmodule
