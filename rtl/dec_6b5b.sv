// dec_6b5b: the 6-bit decoding table of the 10b/8b decoder.
//
// Maps a received abcdei sub-block (a in bit 5) back to EDCBA, accepting
// both its negative- and positive-disparity forms.  k28 marks the control
// sub-block 001111/110000 (decoded as x = 28); bad marks a pattern that is
// in no column of the code table.  The running disparity after the
// sub-block is taken from the received bits: positive after a sub-block
// with more ones or after 000111, negative after one with more zeros or
// after 111000, otherwise unchanged.  Purely combinational.
//
// The table is IEEE 802.3's, sampled in the document's code tables; the
// disparity rule is the standard's too, the document only saying that each
// sub-block's disparity feeds the other.
module dec_6b5b (
  input  logic [5:0] code6,
  input  logic       rd_in,
  output logic [4:0] x,
  output logic       k28,
  output logic       bad,
  output logic       rd_out
);

  logic [2:0] ones;

  always_comb begin
    x   = '0;
    k28 = 1'b0;
    bad = 1'b0;
    unique case (code6)
      6'b100111, 6'b011000: x = 5'd0;
      6'b011101, 6'b100010: x = 5'd1;
      6'b101101, 6'b010010: x = 5'd2;
      6'b110001:            x = 5'd3;
      6'b110101, 6'b001010: x = 5'd4;
      6'b101001:            x = 5'd5;
      6'b011001:            x = 5'd6;
      6'b111000, 6'b000111: x = 5'd7;
      6'b111001, 6'b000110: x = 5'd8;
      6'b100101:            x = 5'd9;
      6'b010101:            x = 5'd10;
      6'b110100:            x = 5'd11;
      6'b001101:            x = 5'd12;
      6'b101100:            x = 5'd13;
      6'b011100:            x = 5'd14;
      6'b010111, 6'b101000: x = 5'd15;
      6'b011011, 6'b100100: x = 5'd16;
      6'b100011:            x = 5'd17;
      6'b010011:            x = 5'd18;
      6'b110010:            x = 5'd19;
      6'b001011:            x = 5'd20;
      6'b101010:            x = 5'd21;
      6'b011010:            x = 5'd22;
      6'b111010, 6'b000101: x = 5'd23;
      6'b110011, 6'b001100: x = 5'd24;
      6'b100110:            x = 5'd25;
      6'b010110:            x = 5'd26;
      6'b110110, 6'b001001: x = 5'd27;
      6'b001110:            x = 5'd28;
      6'b001111, 6'b110000: begin x = 5'd28; k28 = 1'b1; end
      6'b101110, 6'b010001: x = 5'd29;
      6'b011110, 6'b100001: x = 5'd30;
      6'b101011, 6'b010100: x = 5'd31;
      default:              bad = 1'b1;
    endcase

    ones = 3'($countones(code6));
    if (ones > 3'd3 || code6 == 6'b000111)      rd_out = pcs_pkg::RD_POS;
    else if (ones < 3'd3 || code6 == 6'b111000) rd_out = pcs_pkg::RD_NEG;
    else                                        rd_out = rd_in;
  end

endmodule
