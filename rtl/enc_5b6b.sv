// enc_5b6b: the 5-bit to 6-bit sub-block of the 8b/10b code.
//
// The five low bits EDCBA of a byte select a 6-bit sub-block abcdei (a in
// bit 5).  Each entry is stored in the form sent at negative running
// disparity.  Entries with four ones or two ones (disparity +2 / -2) are
// complemented when the running disparity is positive, and they flip the
// running disparity.  Balanced entries are sent as they are and leave it
// unchanged, except D.7, which is 111000 at negative and 000111 at positive
// disparity.  k28 selects the control sub-block 001111/110000 in place of
// D.28.  Purely combinational.
//
// The table values are those of IEEE 802.3 clause 36, of which the
// document's code tables print a sample; splitting the code table in
// a stored negative form plus a complement rule is this design's choice.
module enc_5b6b (
  input  logic [4:0] x,
  input  logic       k28,
  input  logic       rd_in,
  output logic [5:0] code6,
  output logic       rd_out
);

  logic [5:0] base;   // form sent at negative running disparity
  logic       unbal;

  always_comb begin
    unique case (x)
      5'd0:  base = 6'b100111;
      5'd1:  base = 6'b011101;
      5'd2:  base = 6'b101101;
      5'd3:  base = 6'b110001;
      5'd4:  base = 6'b110101;
      5'd5:  base = 6'b101001;
      5'd6:  base = 6'b011001;
      5'd7:  base = 6'b111000;
      5'd8:  base = 6'b111001;
      5'd9:  base = 6'b100101;
      5'd10: base = 6'b010101;
      5'd11: base = 6'b110100;
      5'd12: base = 6'b001101;
      5'd13: base = 6'b101100;
      5'd14: base = 6'b011100;
      5'd15: base = 6'b010111;
      5'd16: base = 6'b011011;
      5'd17: base = 6'b100011;
      5'd18: base = 6'b010011;
      5'd19: base = 6'b110010;
      5'd20: base = 6'b001011;
      5'd21: base = 6'b101010;
      5'd22: base = 6'b011010;
      5'd23: base = 6'b111010;
      5'd24: base = 6'b110011;
      5'd25: base = 6'b100110;
      5'd26: base = 6'b010110;
      5'd27: base = 6'b110110;
      5'd28: base = k28 ? 6'b001111 : 6'b001110;
      5'd29: base = 6'b101110;
      5'd30: base = 6'b011110;
      default: base = 6'b101011;  // 5'd31
    endcase
    unbal = ($countones(base) != 3);
    if (rd_in == pcs_pkg::RD_POS && (unbal || x == 5'd7)) code6 = ~base;
    else                                                   code6 = base;
    rd_out = unbal ? ~rd_in : rd_in;
  end

endmodule
