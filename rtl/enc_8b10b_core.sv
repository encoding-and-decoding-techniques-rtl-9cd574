// enc_8b10b_core: combinational 8b/10b code-group encoder.
//
// Splits the byte HGFEDCBA into EDCBA (5b/6b sub-block) and HGF (3b/4b
// sub-block); the disparity left by the 6-bit sub-block is the input
// disparity of the 4-bit one, and the disparity after the 4-bit sub-block is
// the running disparity handed to the next byte.  The code group is
// {abcdei, fghj}, a in bit 9.  A control request (k) for a byte that is not
// one of the twelve control characters is encoded as data and flagged on
// kerr; that handling is this design's choice.  Used by the registered
// encoder and by the decoder's code-group check.
module enc_8b10b_core (
  input  logic [7:0] data,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out,
  output logic       kerr
);

  logic       k_ok;
  logic [5:0] code6;
  logic [3:0] code4;
  logic       rd_mid;

  assign k_ok = k && pcs_pkg::is_control_byte(data);
  assign kerr = k && !k_ok;

  enc_5b6b u_5b6b (
    .x     (data[4:0]),
    .k28   (k_ok && data[4:0] == 5'd28),
    .rd_in (rd_in),
    .code6 (code6),
    .rd_out(rd_mid)
  );

  enc_3b4b u_3b4b (
    .y     (data[7:5]),
    .x     (data[4:0]),
    .k     (k_ok),
    .rd_in (rd_mid),
    .code4 (code4),
    .rd_out(rd_out)
  );

  assign code = {code6, code4};

endmodule
