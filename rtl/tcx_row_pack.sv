// tcx_row_pack: places the results of one row of eight CUs into a 160-bit TRF
// word (the row layout of the published design).
//
// A word is three planes: plane 0 = bits [63:0], plane 1 = [127:64],
// plane 2 = [159:128]. Byte lane j of plane 0/1 and nibble j of plane 2 belong
// to CU j.
//   FMT_INT8  ("Out INT8"):  the eight 8-bit results, sequenced in the low
//             64 bits; the rest of the word is zero.
//   FMT_INT16 ("Out INT16"): low byte in plane 0, high byte in plane 1.
//   FMT_INT20: High (bits 19:12) in plane 1, Middle (11:4) in plane 0,
//             Low (3:0) as nibble j of plane 2. Read as INT16 the same word
//             gives the result with its four low bits dropped.
// Which byte of a result goes to which plane is this implementation's reading
// of the layout; the split into 8+8+4 bits is the published one.
// Purely combinational.
module tcx_row_pack
  import tcx_pkg::*;
(
  input  logic [CU_DIM-1:0][19:0] res,
  input  fmt_e                    fmt,
  output word_t                   word
);
  always_comb begin
    word = '0;
    for (int j = 0; j < CU_DIM; j++) begin
      unique case (fmt)
        FMT_INT8:  word[8*j +: 8] = res[j][7:0];
        FMT_INT16: begin
          word[8*j +: 8]      = res[j][7:0];
          word[64 + 8*j +: 8] = res[j][15:8];
        end
        default: begin
          word[64 + 8*j +: 8] = res[j][19:12];
          word[8*j +: 8]      = res[j][11:4];
          word[128 + 4*j +: 4] = res[j][3:0];
        end
      endcase
    end
  end
endmodule
