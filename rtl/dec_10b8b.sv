// dec_10b8b: the 10b/8b decoding scheme, one code group per clock.
//
// The code group {abcdei, fghj} is split: the six most significant bits go
// to the 6-bit decoding table, the four least significant to the 4-bit
// table, with the running disparity passed from one to the other.  The
// candidate byte is {HGF, EDCBA}; it is a control character when the 6-bit
// sub-block was K28's, or when an alternate 7 follows x = 23, 27, 29 or 30.
// To decide code_err exactly as the code table does (a group is accepted
// only if it stands in the RD- or RD+ column of some data or control row),
// the candidate is encoded again at both disparities and compared with what
// was received.  disp_err, this design's addition, flags an accepted group
// that stands only in the column of the other running disparity.  For a
// group with code_err set, data and k are undefined in the document; here
// they are whatever the tables gave.
//
// Timing, as the document describes: the 5-bit and 3-bit results are
// registered on the first edge after en and joined into the byte on the
// second, so valid follows en by two cycles.  rd_out (combinational) is the
// disparity after this group; the owner of the stream keeps the register.
module dec_10b8b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] code,
  input  logic       rd_in,
  output logic       rd_out,
  output logic       valid,
  output logic [7:0] data,
  output logic       k,
  output logic       code_err,
  output logic       disp_err
);

  logic [4:0] x;
  logic [2:0] y;
  logic       k28, alt7, bad6, bad4, rd_mid;
  logic       kc;
  logic [9:0] enc_n, enc_p;
  logic       unused_rdn, unused_rdp, unused_ken, unused_kep;
  logic       in_n, in_p, cerr_c, derr_c;

  dec_6b5b u_6b5b (
    .code6(code[9:4]), .rd_in(rd_in), .x(x), .k28(k28), .bad(bad6), .rd_out(rd_mid)
  );

  dec_4b3b u_4b3b (
    .code4(code[3:0]), .k28n(code[9:4] == 6'b110000), .rd_in(rd_mid),
    .y(y), .alt7(alt7), .bad(bad4), .rd_out(rd_out)
  );

  assign kc = k28 ||
              (alt7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));

  // the code table, read from the encoder at both starting disparities
  enc_8b10b_core u_chk_n (
    .data({y, x}), .k(kc), .rd_in(pcs_pkg::RD_NEG),
    .code(enc_n), .rd_out(unused_rdn), .kerr(unused_ken)
  );
  enc_8b10b_core u_chk_p (
    .data({y, x}), .k(kc), .rd_in(pcs_pkg::RD_POS),
    .code(enc_p), .rd_out(unused_rdp), .kerr(unused_kep)
  );

  assign in_n   = (code == enc_n);
  assign in_p   = (code == enc_p);
  assign cerr_c = bad6 || bad4 || !(in_n || in_p);
  assign derr_c = !cerr_c && ((rd_in == pcs_pkg::RD_NEG) ? !in_n : !in_p);

  // stage 1: 5-bit and 3-bit sub-block results
  logic [4:0] x_q;
  logic [2:0] y_q;
  logic       k_q, cerr_q, derr_q, v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= '0;
      y_q      <= '0;
      k_q      <= 1'b0;
      cerr_q   <= 1'b0;
      derr_q   <= 1'b0;
      v1_q     <= 1'b0;
      valid    <= 1'b0;
      data     <= '0;
      k        <= 1'b0;
      code_err <= 1'b0;
      disp_err <= 1'b0;
    end else begin
      v1_q  <= en;
      valid <= v1_q;
      if (en) begin
        x_q    <= x;
        y_q    <= y;
        k_q    <= kc;
        cerr_q <= cerr_c;
        derr_q <= derr_c;
      end
      if (v1_q) begin
        data     <= {y_q, x_q};
        k        <= k_q;
        code_err <= cerr_q;
        disp_err <= derr_q;
      end
    end
  end

endmodule
