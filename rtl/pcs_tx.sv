// pcs_tx: PCS transmitter -- three encoding schemes and the output mux.
//
// The select lines (mode) enable one scheme per cycle: 00 8b/10b (byte 0
// only), 01 16b/20b (bytes 0-1), 10 32b/40b (bytes 0-3).  Mode 11 is the
// "default setting"; the document does not say what it does, and here it
// encodes nothing, keeps the output invalid and holds the running disparity.
// One running-disparity register, reset to negative, serves all three
// schemes: the enabled scheme takes it as rd_in and its rd_out is stored at
// the same edge, so the line stays DC-balanced across mode changes.  The mux
// passes the scheme whose result is valid; unused upper code groups are zero
// and mode_out tells the width of the word on code_out.
//
// Timing: valid_out follows valid_in by 2 cycles in modes 00 and 01 and by 3
// cycles in mode 10 (the document's extra joining edge).  Hence a word in
// mode 00/01 must not directly follow a mode-10 word: leave one idle cycle
// (checked by an assertion).  Words can be presented every cycle otherwise.
module pcs_tx
  import pcs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  pcs_mode_e           mode,
  input  logic                valid_in,
  input  logic [DATA_W-1:0]   data_in,
  input  logic [BYTE_LANES-1:0] k_in,
  output logic                valid_out,
  output pcs_mode_e           mode_out,
  output logic [CODE_W-1:0]   code_out,
  output logic [BYTE_LANES-1:0] kerr_out,
  output logic                rd
);

  logic en8, en16, en32;
  logic rd8, rd16, rd32;
  logic v8, v16, v32;
  logic [9:0]  c8;
  logic [19:0] c16;
  logic [39:0] c32;
  logic        ke8;
  logic [1:0]  ke16;
  logic [3:0]  ke32;

  assign en8  = valid_in && mode == MODE_8B10B;
  assign en16 = valid_in && mode == MODE_16B20B;
  assign en32 = valid_in && mode == MODE_32B40B;

  enc_8b10b u_enc8 (
    .clk(clk), .rst_n(rst_n), .en(en8), .data(data_in[7:0]), .k(k_in[0]),
    .rd_in(rd), .rd_out(rd8), .valid(v8), .code(c8), .kerr(ke8)
  );

  enc_16b20b u_enc16 (
    .clk(clk), .rst_n(rst_n), .en(en16), .data(data_in[15:0]), .k(k_in[1:0]),
    .rd_in(rd), .rd_out(rd16), .valid(v16), .code(c16), .kerr(ke16)
  );

  enc_32b40b u_enc32 (
    .clk(clk), .rst_n(rst_n), .en(en32), .data(data_in), .k(k_in),
    .rd_in(rd), .rd_out(rd32), .valid(v32), .code(c32), .kerr(ke32)
  );

  // running disparity of the transmitted stream
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rd <= RD_NEG;
    else if (en8)  rd <= rd8;
    else if (en16) rd <= rd16;
    else if (en32) rd <= rd32;
  end

  // output mux
  always_comb begin
    valid_out = 1'b0;
    mode_out  = MODE_DEFAULT;
    code_out  = '0;
    kerr_out  = '0;
    if (v32) begin
      valid_out = 1'b1;
      mode_out  = MODE_32B40B;
      code_out  = c32;
      kerr_out  = ke32;
    end else if (v16) begin
      valid_out = 1'b1;
      mode_out  = MODE_16B20B;
      code_out  = {20'b0, c16};
      kerr_out  = {2'b0, ke16};
    end else if (v8) begin
      valid_out = 1'b1;
      mode_out  = MODE_8B10B;
      code_out  = {30'b0, c8};
      kerr_out  = {3'b0, ke8};
    end
  end

  // A mode-00/01 word may not follow a mode-10 word in the next cycle: both
  // results would reach the mux together.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({v8, v16, v32}))
    else $error("pcs_tx: two schemes produced a result in the same cycle");

endmodule
