// tb_tcx_trf_bank: random reads and writes on both ports of a TRF bank against
// a shadow array, checking one-cycle read latency and port independence.
// Addresses cover every physical register and the first eight rows, so reads
// often hit freshly written data; the two ports never write the same address
// in one cycle (the bank asserts that rule). Only rows written before are
// compared, because the bank is not reset.
module tb_tcx_trf_bank;
  import tcx_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic  a_en, a_we, b_en, b_we;
  ptr_t  a_ptr, b_ptr;
  row_t  a_row, b_row;
  word_t a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;

  tcx_trf_bank dut (.*);

  word_t shadow [NUM_PTR][TRF_ROWS];
  logic  written [NUM_PTR][TRF_ROWS];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rnd_word();
    word_t w;
    for (int k = 0; k < WORD_W / 32; k++) w[32*k +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_ptr = 0; b_ptr = 0; a_row = 0; b_row = 0; a_wdata = 0; b_wdata = 0;
    for (int p = 0; p < NUM_PTR; p++) for (int r = 0; r < TRF_ROWS; r++) written[p][r] = 0;
    for (int t = 0; t < 4000; t++) begin
      logic a_chk, b_chk;
      word_t a_exp, b_exp;
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_ptr = ptr_t'($urandom_range(0, NUM_PTR - 1)); a_row = row_t'($urandom_range(0, 7));
      b_ptr = ptr_t'($urandom_range(0, NUM_PTR - 1)); b_row = row_t'($urandom_range(0, 7));
      a_we = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      if (a_we && b_we && a_ptr == b_ptr && a_row == b_row) b_we = 0;
      a_wdata = rnd_word(); b_wdata = rnd_word();
      a_chk = !a_we && written[a_ptr][a_row];
      b_chk = !b_we && written[b_ptr][b_row];
      a_exp = shadow[a_ptr][a_row];
      b_exp = shadow[b_ptr][b_row];
      @(posedge clk); #1;
      if (a_we) begin shadow[a_ptr][a_row] = a_wdata; written[a_ptr][a_row] = 1; end
      if (b_we) begin shadow[b_ptr][b_row] = b_wdata; written[b_ptr][b_row] = 1; end
      if (a_chk) begin checks++; if (a_rdata !== a_exp) failures++; end
      if (b_chk) begin checks++; if (b_rdata !== b_exp) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
