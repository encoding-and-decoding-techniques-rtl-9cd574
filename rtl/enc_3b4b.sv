// enc_3b4b: the 3-bit to 4-bit sub-block of the 8b/10b code.
//
// The three high bits HGF of a byte select a 4-bit sub-block fghj (f in
// bit 3).  Its input disparity is the running disparity left by the 6-bit
// sub-block.  Data codes are stored in their negative-disparity form; D.x.0,
// D.x.4 and D.x.7 (three ones) are complemented at positive disparity and
// flip it, and D.x.3 (1100 / 0011) also changes form without changing the
// disparity.  D.x.7 uses the alternate form 0111/1000 where the primary form
// would give a run of five equal bits: x = 17, 18, 20 at negative and
// x = 11, 13, 14 at positive disparity.  For a control character the
// sub-block follows the K column of the code table: K28.y takes its own
// 4-bit forms (complements of the data forms for y = 1, 2, 5, 6) and Kx.7
// always takes the alternate 7.  Purely combinational.
//
// Values and the alternate-7 rule are IEEE 802.3's, as sampled in the
// document's code tables; the formulation is this design's.
module enc_3b4b (
  input  logic [2:0] y,
  input  logic [4:0] x,
  input  logic       k,
  input  logic       rd_in,
  output logic [3:0] code4,
  output logic       rd_out
);

  logic [3:0] base;   // form sent at negative disparity
  logic       alt7;
  logic       flip;   // form changes with disparity

  always_comb begin
    alt7 = (y == 3'd7) &&
           (k ||
            (rd_in == pcs_pkg::RD_NEG && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
            (rd_in == pcs_pkg::RD_POS && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    unique case (y)
      3'd0: base = 4'b1011;
      3'd1: base = k ? 4'b0110 : 4'b1001;
      3'd2: base = k ? 4'b1010 : 4'b0101;
      3'd3: base = 4'b1100;
      3'd4: base = 4'b1101;
      3'd5: base = k ? 4'b0101 : 4'b1010;
      3'd6: base = k ? 4'b1001 : 4'b0110;
      default: base = alt7 ? 4'b0111 : 4'b1110;
    endcase
    // Control codes change form with disparity for every y; data codes only
    // when unbalanced or D.x.3.
    flip  = k || ($countones(base) != 2) || (y == 3'd3);
    code4 = (rd_in == pcs_pkg::RD_POS && flip) ? ~base : base;
    rd_out = ($countones(base) != 2) ? ~rd_in : rd_in;
  end

endmodule
