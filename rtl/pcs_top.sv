// pcs_top: Physical Coding Sublayer with its transmitter and receiver.
//
// The transmit path turns bytes from the MAC side (data plus a control flag
// per byte) into 8b/10b code groups, one, two or four per clock as chosen by
// tx_mode; the receive path turns code groups from the medium attachment
// back into bytes with control, code-error and disparity-error flags, its
// width chosen by rx_mode.  The two paths share only clock and reset: the
// medium attachment that serialises tx_code_out and delivers rx_code_in is
// not part of this design, so both ends are ports.  Code group i occupies
// bits 10i+9:10i and byte i bits 8i+7:8i.  Latency is 2 cycles in modes 00
// and 01, 3 cycles in mode 10, on either path.
module pcs_top
  import pcs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // transmit: MAC side in, code groups out
  input  pcs_mode_e             tx_mode,
  input  logic                  tx_valid_in,
  input  logic [DATA_W-1:0]     tx_data_in,
  input  logic [BYTE_LANES-1:0] tx_k_in,
  output logic                  tx_valid_out,
  output pcs_mode_e             tx_mode_out,
  output logic [CODE_W-1:0]     tx_code_out,
  output logic [BYTE_LANES-1:0] tx_kerr_out,
  output logic                  tx_rd,
  // receive: code groups in, MAC side out
  input  pcs_mode_e             rx_mode,
  input  logic                  rx_valid_in,
  input  logic [CODE_W-1:0]     rx_code_in,
  output logic                  rx_valid_out,
  output pcs_mode_e             rx_mode_out,
  output logic [DATA_W-1:0]     rx_data_out,
  output logic [BYTE_LANES-1:0] rx_k_out,
  output logic [BYTE_LANES-1:0] rx_code_err,
  output logic [BYTE_LANES-1:0] rx_disp_err,
  output logic                  rx_rd
);

  pcs_tx u_tx (
    .clk(clk), .rst_n(rst_n), .mode(tx_mode), .valid_in(tx_valid_in),
    .data_in(tx_data_in), .k_in(tx_k_in), .valid_out(tx_valid_out),
    .mode_out(tx_mode_out), .code_out(tx_code_out), .kerr_out(tx_kerr_out),
    .rd(tx_rd)
  );

  pcs_rx u_rx (
    .clk(clk), .rst_n(rst_n), .mode(rx_mode), .valid_in(rx_valid_in),
    .code_in(rx_code_in), .valid_out(rx_valid_out), .mode_out(rx_mode_out),
    .data_out(rx_data_out), .k_out(rx_k_out), .code_err(rx_code_err),
    .disp_err(rx_disp_err), .rd(rx_rd)
  );

endmodule
