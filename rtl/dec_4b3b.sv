// dec_4b3b: the 4-bit decoding table of the 10b/8b decoder.
//
// Maps a received fghj sub-block (f in bit 3) back to HGF.  After the
// control sub-block 110000 (k28n = 1) the K28.y forms are the complements of
// the data forms, so the sub-block is complemented before the lookup.  alt7
// marks the alternate 7 (0111/1000), which the caller needs to recognise
// Kx.7; bad marks 0000 and 1111.  The running disparity after the sub-block
// follows the same rule as the 6-bit one, with 0011 counting as positive
// and 1100 as negative.  Purely combinational; its rd_in is the disparity
// left by the 6-bit sub-block.
module dec_4b3b (
  input  logic [3:0] code4,
  input  logic       k28n,
  input  logic       rd_in,
  output logic [2:0] y,
  output logic       alt7,
  output logic       bad,
  output logic       rd_out
);

  logic [3:0] c;
  logic [2:0] ones;

  always_comb begin
    c    = k28n ? ~code4 : code4;
    y    = '0;
    alt7 = 1'b0;
    bad  = 1'b0;
    unique case (c)
      4'b1011, 4'b0100: y = 3'd0;
      4'b1001:          y = 3'd1;
      4'b0101:          y = 3'd2;
      4'b1100, 4'b0011: y = 3'd3;
      4'b1101, 4'b0010: y = 3'd4;
      4'b1010:          y = 3'd5;
      4'b0110:          y = 3'd6;
      4'b1110, 4'b0001: y = 3'd7;
      4'b0111, 4'b1000: begin y = 3'd7; alt7 = 1'b1; end
      default:          bad = 1'b1;
    endcase

    ones = 3'($countones(code4));
    if (ones > 3'd2 || code4 == 4'b0011)      rd_out = pcs_pkg::RD_POS;
    else if (ones < 3'd2 || code4 == 4'b1100) rd_out = pcs_pkg::RD_NEG;
    else                                      rd_out = rd_in;
  end

endmodule
