// enc_8b10b: the 8b/10b encoding scheme, one byte per clock.
//
// On the first clock edge after a byte is presented (en = 1) its 6-bit and
// 4-bit sub-blocks are registered; on the next edge they are joined into the
// 10-bit code group, so code/valid follow en by two cycles, as the document
// describes.  The running disparity is not stored here: rd_in is the
// disparity before the byte and rd_out (combinational, same cycle) the
// disparity after it, so the owner of the stream keeps the register and
// several encoders can be chained within one cycle.  kerr flags a control
// request for a byte that is not a control character; it travels with the
// code.  Reset clears valid and the registers.
module enc_8b10b (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] data,
  input  logic       k,
  input  logic       rd_in,
  output logic       rd_out,
  output logic       valid,
  output logic [9:0] code,
  output logic       kerr
);

  logic [9:0] code_c;
  logic       kerr_c;

  // stage 1: sub-block registers
  logic [5:0] sb6_q;
  logic [3:0] sb4_q;
  logic       v1_q, kerr1_q;

  enc_8b10b_core u_core (
    .data  (data),
    .k     (k),
    .rd_in (rd_in),
    .code  (code_c),
    .rd_out(rd_out),
    .kerr  (kerr_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb6_q   <= '0;
      sb4_q   <= '0;
      v1_q    <= 1'b0;
      kerr1_q <= 1'b0;
      code    <= '0;
      valid   <= 1'b0;
      kerr    <= 1'b0;
    end else begin
      v1_q  <= en;
      valid <= v1_q;
      if (en) begin
        sb6_q   <= code_c[9:4];
        sb4_q   <= code_c[3:0];
        kerr1_q <= kerr_c;
      end
      if (v1_q) begin
        code <= {sb6_q, sb4_q};
        kerr <= kerr1_q;
      end
    end
  end

endmodule
