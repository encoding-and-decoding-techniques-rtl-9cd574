// pcs_pkg: types and constants shared by the PCS encoder and decoder.
//
// The select lines of the transmitter and receiver choose one of three
// encoding widths (8b/10b, 16b/20b, 32b/40b); code 11 is the "default"
// setting, in which this design converts nothing.  Running disparity is a
// single bit throughout: 1 = positive (more ones sent), 0 = negative.  The
// latencies are the number of clock edges from a word entering a scheme to
// its result leaving it: two for the 8-bit and 16-bit schemes, three for the
// 32-bit scheme, whose four lane results pass one extra joining register.
package pcs_pkg;

  typedef enum logic [1:0] {
    MODE_8B10B   = 2'b00,
    MODE_16B20B  = 2'b01,
    MODE_32B40B  = 2'b10,
    MODE_DEFAULT = 2'b11
  } pcs_mode_e;

  localparam int unsigned BYTE_LANES = 4;   // widest scheme: 32b/40b
  localparam int unsigned DATA_W     = 8 * BYTE_LANES;
  localparam int unsigned CODE_W     = 10 * BYTE_LANES;

  localparam int unsigned LAT_8B10B  = 2;
  localparam int unsigned LAT_16B20B = 2;
  localparam int unsigned LAT_32B40B = 3;

  localparam logic RD_NEG = 1'b0;
  localparam logic RD_POS = 1'b1;

  // Control characters accepted by the encoder: K28.0-K28.7, K23.7, K27.7,
  // K29.7 and K30.7 (byte = {y, x}).
  function automatic logic is_control_byte(input logic [7:0] b);
    logic [4:0] x;
    logic [2:0] y;
    x = b[4:0];
    y = b[7:5];
    return (x == 5'd28) ||
           (y == 3'd7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
  endfunction

endpackage
