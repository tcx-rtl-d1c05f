// tcx_trf_bank: one bank of the banked tensor register file (TRF).
//
// Every cell owns one bank, so a tensor register is spread over all cells and
// each bank sits next to the 64 CUs it feeds. A bank holds TRF_ROWS words of
// 160 bits for each of the NUM_PTR physical tensor registers. Port A serves the
// load/store and loopback paths, port B the cell's own feeder and result
// write-back. Both ports read and write; reads return data one cycle after the
// request. A write on both ports to the same word in the same cycle is an
// error (asserted); port B would win. Bank depth and port count are this
// implementation's choice.
module tcx_trf_bank
  import tcx_pkg::*;
#(
  parameter int unsigned NPTR = NUM_PTR,
  parameter int unsigned ROWS = TRF_ROWS
) (
  input  logic  clk,
  input  logic  a_en,
  input  logic  a_we,
  input  ptr_t  a_ptr,
  input  row_t  a_row,
  input  word_t a_wdata,
  output word_t a_rdata,
  input  logic  b_en,
  input  logic  b_we,
  input  ptr_t  b_ptr,
  input  row_t  b_row,
  input  word_t b_wdata,
  output word_t b_rdata
);
  localparam int unsigned DEPTH = NPTR * ROWS;
  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  logic [AW-1:0] a_addr, b_addr;
  assign a_addr = AW'(a_ptr) * AW'(ROWS) + AW'(a_row);
  assign b_addr = AW'(b_ptr) * AW'(ROWS) + AW'(b_row);

  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

  a_no_collide: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr));
endmodule
