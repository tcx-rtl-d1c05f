// tb_tcx_row_pack: checks the row layouts (INT8 in the low 64 bits, INT16 as
// low/high byte planes, 20-bit as High/Middle/Low fields) for random results,
// by reassembling every result from the packed word. The block is
// combinational, so each random case is applied and checked after a delay;
// the unused planes of each format must be zero.
module tb_tcx_row_pack;
  import tcx_pkg::*;
  logic [CU_DIM-1:0][19:0] res;
  fmt_e  fmt;
  word_t word;
  int checks = 0, failures = 0;

  tcx_row_pack dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < CU_DIM; j++) res[j] = 20'($urandom);
      fmt = fmt_e'(t % 3);
      #1;
      for (int j = 0; j < CU_DIM; j++) begin
        logic [19:0] got, exp;
        case (fmt)
          FMT_INT8:  begin got = {12'd0, word[8*j +: 8]}; exp = {12'd0, res[j][7:0]}; end
          FMT_INT16: begin got = {4'd0, word[64+8*j +: 8], word[8*j +: 8]}; exp = {4'd0, res[j][15:0]}; end
          default:   begin got = {word[64+8*j +: 8], word[8*j +: 8], word[128+4*j +: 4]}; exp = res[j]; end
        endcase
        checks++;
        if (got !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL fmt %0d cu %0d got %h exp %h", fmt, j, got, exp);
        end
      end
      checks++;
      if (fmt == FMT_INT8 && word[WORD_W-1:64] != '0) failures++;
      if (fmt == FMT_INT16 && word[WORD_W-1:128] != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
