// enc_32b40b: the 32b/40b encoding scheme, four 8b/10b encoders and a
// joining register.
//
// The four bytes are encoded in the same cycle with the running disparity
// chained from byte 0 (data[7:0]) to byte 3; the disparity after byte 3 is
// rd_out.  After the two edges of the 8b/10b encoders the four 10-bit code
// groups are joined into the 40-bit word on a third edge, as the document
// describes for this width, so code/valid follow en by three cycles.  Code
// group i lands in code[10i+9:10i] (byte order is this design's choice).
module enc_32b40b (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [31:0] data,
  input  logic [3:0]  k,
  input  logic        rd_in,
  output logic        rd_out,
  output logic        valid,
  output logic [39:0] code,
  output logic [3:0]  kerr
);

  logic [4:0]  rd;
  logic [3:0]  v;
  logic [39:0] lane_code;
  logic [3:0]  lane_kerr;

  assign rd[0] = rd_in;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    enc_8b10b u_enc (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .data  (data[8*i +: 8]),
      .k     (k[i]),
      .rd_in (rd[i]),
      .rd_out(rd[i+1]),
      .valid (v[i]),
      .code  (lane_code[10*i +: 10]),
      .kerr  (lane_kerr[i])
    );
  end

  assign rd_out = rd[4];

  // stage 3: join the four code groups
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      code  <= '0;
      kerr  <= '0;
    end else begin
      valid <= v[0];
      if (v[0]) begin
        code <= lane_code;
        kerr <= lane_kerr;
      end
    end
  end

  // all lanes advance together
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    v == '0 || v == '1)
    else $error("enc_32b40b: lanes out of step");

endmodule
