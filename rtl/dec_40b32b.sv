// dec_40b32b: the 40b/32b decoding scheme, four 10b/8b decoders and a
// joining register.
//
// The four code groups are decoded in the same cycle with the running
// disparity chained from group 0 (code[9:0]) to group 3.  After the two
// edges of the 10b/8b decoders, the four bytes and their flags are joined on
// a third edge, as the document describes for this width: valid follows en
// by three cycles.  Byte i is data[8i+7:8i].
module dec_40b32b (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [39:0] code,
  input  logic        rd_in,
  output logic        rd_out,
  output logic        valid,
  output logic [31:0] data,
  output logic [3:0]  k,
  output logic [3:0]  code_err,
  output logic [3:0]  disp_err
);

  logic [4:0]  rd;
  logic [3:0]  v;
  logic [31:0] lane_data;
  logic [3:0]  lane_k, lane_cerr, lane_derr;

  assign rd[0] = rd_in;

  for (genvar i = 0; i < 4; i++) begin : g_lane
    dec_10b8b u_dec (
      .clk(clk), .rst_n(rst_n), .en(en), .code(code[10*i +: 10]),
      .rd_in(rd[i]), .rd_out(rd[i+1]), .valid(v[i]), .data(lane_data[8*i +: 8]),
      .k(lane_k[i]), .code_err(lane_cerr[i]), .disp_err(lane_derr[i])
    );
  end

  assign rd_out = rd[4];

  // stage 3: join the four bytes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      data     <= '0;
      k        <= '0;
      code_err <= '0;
      disp_err <= '0;
    end else begin
      valid <= v[0];
      if (v[0]) begin
        data     <= lane_data;
        k        <= lane_k;
        code_err <= lane_cerr;
        disp_err <= lane_derr;
      end
    end
  end

  // all lanes advance together
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    v == '0 || v == '1)
    else $error("dec_40b32b: lanes out of step");

endmodule
