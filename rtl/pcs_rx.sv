// pcs_rx: PCS receiver -- three decoding schemes and the output mux.
//
// The select lines (mode) enable one scheme per cycle, with the same codes
// as the transmitter: 00 10b/8b (group 0 only), 01 20b/16b (groups 0-1),
// 10 40b/32b (groups 0-3); 11, the "default setting", decodes nothing and
// holds the running disparity (this design's reading).  One running-
// disparity register, reset to negative, serves all three schemes and is
// updated from the received bits of each enabled word.  The mux passes the
// scheme whose result is valid; bytes of unused lanes and their flags are
// zero, and mode_out gives the width of the result.
//
// Per byte: k_out marks a control character, code_err a code group that is
// in no column of the code table (its byte is then meaningless), disp_err a
// valid group received in the column of the other running disparity.
//
// Timing: valid_out follows valid_in by 2 cycles in modes 00 and 01 and by 3
// in mode 10; a mode-00/01 word must not follow a mode-10 word in the next
// cycle (assertion).
module pcs_rx
  import pcs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  pcs_mode_e             mode,
  input  logic                  valid_in,
  input  logic [CODE_W-1:0]     code_in,
  output logic                  valid_out,
  output pcs_mode_e             mode_out,
  output logic [DATA_W-1:0]     data_out,
  output logic [BYTE_LANES-1:0] k_out,
  output logic [BYTE_LANES-1:0] code_err,
  output logic [BYTE_LANES-1:0] disp_err,
  output logic                  rd
);

  logic en8, en16, en32;
  logic rd8, rd16, rd32;
  logic v8, v16, v32;
  logic [7:0]  d8;
  logic [15:0] d16;
  logic [31:0] d32;
  logic        k8, ce8, de8;
  logic [1:0]  k16, ce16, de16;
  logic [3:0]  k32, ce32, de32;

  assign en8  = valid_in && mode == MODE_8B10B;
  assign en16 = valid_in && mode == MODE_16B20B;
  assign en32 = valid_in && mode == MODE_32B40B;

  dec_10b8b u_dec8 (
    .clk(clk), .rst_n(rst_n), .en(en8), .code(code_in[9:0]), .rd_in(rd),
    .rd_out(rd8), .valid(v8), .data(d8), .k(k8), .code_err(ce8), .disp_err(de8)
  );

  dec_20b16b u_dec16 (
    .clk(clk), .rst_n(rst_n), .en(en16), .code(code_in[19:0]), .rd_in(rd),
    .rd_out(rd16), .valid(v16), .data(d16), .k(k16), .code_err(ce16), .disp_err(de16)
  );

  dec_40b32b u_dec32 (
    .clk(clk), .rst_n(rst_n), .en(en32), .code(code_in), .rd_in(rd),
    .rd_out(rd32), .valid(v32), .data(d32), .k(k32), .code_err(ce32), .disp_err(de32)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rd <= RD_NEG;
    else if (en8)  rd <= rd8;
    else if (en16) rd <= rd16;
    else if (en32) rd <= rd32;
  end

  always_comb begin
    valid_out = 1'b0;
    mode_out  = MODE_DEFAULT;
    data_out  = '0;
    k_out     = '0;
    code_err  = '0;
    disp_err  = '0;
    if (v32) begin
      valid_out = 1'b1;
      mode_out  = MODE_32B40B;
      data_out  = d32;
      k_out     = k32;
      code_err  = ce32;
      disp_err  = de32;
    end else if (v16) begin
      valid_out = 1'b1;
      mode_out  = MODE_16B20B;
      data_out  = {16'b0, d16};
      k_out     = {2'b0, k16};
      code_err  = {2'b0, ce16};
      disp_err  = {2'b0, de16};
    end else if (v8) begin
      valid_out = 1'b1;
      mode_out  = MODE_8B10B;
      data_out  = {24'b0, d8};
      k_out     = {3'b0, k8};
      code_err  = {3'b0, ce8};
      disp_err  = {3'b0, de8};
    end
  end

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({v8, v16, v32}))
    else $error("pcs_rx: two schemes produced a result in the same cycle");

endmodule
