// enc_16b20b: the 16b/20b encoding scheme, two 8b/10b encoders side by side.
//
// Both bytes are encoded in the same cycle.  Byte 0 (data[7:0]) comes first
// in the disparity chain: its rd_out is byte 1's rd_in, and byte 1's rd_out
// is the scheme's rd_out.  Code group i lands in code[10i+9:10i].  The
// latency is that of one 8b/10b encoder, two cycles.  The byte order is this
// design's choice; the document only says two 8b/10b blocks are used.
module enc_16b20b (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] data,
  input  logic [1:0]  k,
  input  logic        rd_in,
  output logic        rd_out,
  output logic        valid,
  output logic [19:0] code,
  output logic [1:0]  kerr
);

  logic [2:0] rd;
  logic [1:0] v;

  assign rd[0] = rd_in;

  for (genvar i = 0; i < 2; i++) begin : g_lane
    enc_8b10b u_enc (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .data  (data[8*i +: 8]),
      .k     (k[i]),
      .rd_in (rd[i]),
      .rd_out(rd[i+1]),
      .valid (v[i]),
      .code  (code[10*i +: 10]),
      .kerr  (kerr[i])
    );
  end

  assign rd_out = rd[2];
  assign valid  = v[0];

  // all lanes advance together
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    v == '0 || v == '1)
    else $error("enc_16b20b: lanes out of step");

endmodule
