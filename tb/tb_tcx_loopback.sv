// tb_tcx_loopback: tensor moves through the loopback path against a model of
// the TRF banks of all four NRs. Checks a plain copy of every cell, a copy
// with a row offset (crop at the top, zero rows past the source end) and a
// lane offset (zero lanes shifted in), and a duplication of cell 0 into every
// cell with dup1.
module tb_tcx_loopback;
  import tcx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, ev_row, ev_pad;
  mv_cmd_t cmd_in;
  trf_req_t trf;
  word_t [NUM_NR-1:0] trf_rdata;
  int checks = 0, failures = 0, rows, pads;

  tcx_loopback dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t m [NUM_NR][NUM_CELL][NUM_PTR][TRF_ROWS];

  always @(posedge clk) begin
    for (int n = 0; n < NUM_NR; n++) trf_rdata[n] <= m[n][trf.cell_id][trf.ptr][trf.row];
    if (trf.en && trf.we)
      for (int n = 0; n < NUM_NR; n++)
        if (trf.nr_mask[n])
          for (int c = 0; c < NUM_CELL; c++)
            if (trf.dup1 || c == trf.cell_id) m[n][c][trf.ptr][trf.row] = trf.wdata;
    if (ev_row) rows++;
    if (ev_pad) pads++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(mv_cmd_t c);
    rows = 0; pads = 0;
    @(negedge clk); cmd_in = c; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  function automatic logic [7:0] src_byte(int n, int c, int p, int r, int l);
    if (r < 0 || r >= TRF_ROWS || l < 0 || l >= WORD_B) return 8'h00;
    return m[n][c][p][r][8*l +: 8];
  endfunction

  initial begin
    mv_cmd_t c;
    word_t snap [NUM_NR][NUM_CELL][TRF_ROWS];
    start = 0; cmd_in = '0;
    for (int n = 0; n < NUM_NR; n++) for (int k = 0; k < NUM_CELL; k++) for (int p = 0; p < NUM_PTR; p++)
      for (int r = 0; r < TRF_ROWS; r++) for (int b = 0; b < WORD_W/32; b++) m[n][k][p][r][32*b +: 32] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NUM_NR; n++) for (int k = 0; k < NUM_CELL; k++) for (int r = 0; r < TRF_ROWS; r++) snap[n][k][r] = m[n][k][1][r];

    // 1. copy 4 rows of every cell
    c = '{src: 1, dst: 2, roff: 0, boff: 0, rows: 4, dup1: 0};
    run(c);
    for (int n = 0; n < NUM_NR; n++) for (int k = 0; k < NUM_CELL; k++) for (int r = 0; r < 4; r++)
      chk("copy", m[n][k][2][r] == snap[n][k][r], 1);
    chk("rows moved", rows, NUM_CELL * 4);

    // 2. crop 30 rows starting at row 3, shift lanes by 2 / -3
    c = '{src: 1, dst: 3, roff: 3, boff: 2, rows: 30, dup1: 0};
    run(c);
    for (int n = 0; n < NUM_NR; n++) for (int k = 0; k < NUM_CELL; k += 5) for (int r = 0; r < 30; r++)
      for (int l = 0; l < WORD_B; l++)
        chk("crop", m[n][k][3][r][8*l +: 8], src_byte(n, k, 1, r + 3, l + 2));
    chk("padded rows", pads, NUM_CELL * 1);
    c = '{src: 1, dst: 4, roff: -2, boff: -3, rows: 6, dup1: 0};
    run(c);
    for (int n = 0; n < NUM_NR; n++) for (int r = 0; r < 6; r++) for (int l = 0; l < WORD_B; l++)
      chk("pad", m[n][9][4][r][8*l +: 8], src_byte(n, 9, 1, r - 2, l - 3));

    // 3. duplicate cell 0 into every cell
    c = '{src: 1, dst: 5, roff: 0, boff: 0, rows: 3, dup1: 1};
    run(c);
    for (int n = 0; n < NUM_NR; n++) for (int k = 0; k < NUM_CELL; k++) for (int r = 0; r < 3; r++)
      chk("dup1", m[n][k][5][r] == snap[n][0][r], 1);
    chk("dup1 rows", rows, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
