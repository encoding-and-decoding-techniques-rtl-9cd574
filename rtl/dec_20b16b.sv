// dec_20b16b: the 20b/16b decoding scheme, two 10b/8b decoders side by side.
//
// Code group 0 (code[9:0]) is first in the disparity chain and gives byte 0
// (data[7:0]); group 1 gives byte 1.  Flags are per group.  Latency is two
// cycles, as for one 10b/8b decoder.  The group order mirrors enc_16b20b and
// is this design's choice.
module dec_20b16b (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [19:0] code,
  input  logic        rd_in,
  output logic        rd_out,
  output logic        valid,
  output logic [15:0] data,
  output logic [1:0]  k,
  output logic [1:0]  code_err,
  output logic [1:0]  disp_err
);

  logic [2:0] rd;
  logic [1:0] v;

  assign rd[0] = rd_in;

  for (genvar i = 0; i < 2; i++) begin : g_lane
    dec_10b8b u_dec (
      .clk(clk), .rst_n(rst_n), .en(en), .code(code[10*i +: 10]),
      .rd_in(rd[i]), .rd_out(rd[i+1]), .valid(v[i]), .data(data[8*i +: 8]),
      .k(k[i]), .code_err(code_err[i]), .disp_err(disp_err[i])
    );
  end

  assign rd_out = rd[2];
  assign valid  = v[0];

  // all lanes advance together
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    v == '0 || v == '1)
    else $error("dec_20b16b: lanes out of step");

endmodule
