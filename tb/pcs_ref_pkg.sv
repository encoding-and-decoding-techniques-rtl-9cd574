// pcs_ref_pkg: reference model of the 8b/10b code for the PCS testbenches.
//
// Written from the code table in its column form: every 6-bit and 4-bit
// sub-block is listed for negative and for positive running disparity, and
// the twelve control characters are listed as whole 10-bit groups.  The
// running disparity is then computed from the bits sent.  The decoder model
// searches the whole table (256 data bytes and 12 control characters at
// both disparities), so it shares no structure with the RTL.
package pcs_ref_pkg;

  typedef logic [5:0] sb6_t;
  typedef logic [3:0] sb4_t;

  localparam sb6_t D6_NEG [32] = '{
    6'b100111, 6'b011101, 6'b101101, 6'b110001, 6'b110101, 6'b101001, 6'b011001, 6'b111000,
    6'b111001, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b010111,
    6'b011011, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b111010,
    6'b110011, 6'b100110, 6'b010110, 6'b110110, 6'b001110, 6'b101110, 6'b011110, 6'b101011};
  localparam sb6_t D6_POS [32] = '{
    6'b011000, 6'b100010, 6'b010010, 6'b110001, 6'b001010, 6'b101001, 6'b011001, 6'b000111,
    6'b000110, 6'b100101, 6'b010101, 6'b110100, 6'b001101, 6'b101100, 6'b011100, 6'b101000,
    6'b100100, 6'b100011, 6'b010011, 6'b110010, 6'b001011, 6'b101010, 6'b011010, 6'b000101,
    6'b001100, 6'b100110, 6'b010110, 6'b001001, 6'b001110, 6'b010001, 6'b100001, 6'b010100};
  // index 0..7 = D.x.0 .. D.x.P7, index 8 = D.x.A7
  localparam sb4_t D4_NEG [9] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101,
                                  4'b1010, 4'b0110, 4'b1110, 4'b0111};
  localparam sb4_t D4_POS [9] = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010,
                                  4'b1010, 4'b0110, 4'b0001, 4'b1000};

  localparam logic [7:0] K_BYTE [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC,
                                         8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};
  localparam logic [9:0] K_NEG [12] = '{
    10'b001111_0100, 10'b001111_1001, 10'b001111_0101, 10'b001111_0011,
    10'b001111_0010, 10'b001111_1010, 10'b001111_0110, 10'b001111_1000,
    10'b111010_1000, 10'b110110_1000, 10'b101110_1000, 10'b011110_1000};
  localparam logic [9:0] K_POS [12] = '{
    10'b110000_1011, 10'b110000_0110, 10'b110000_1010, 10'b110000_1100,
    10'b110000_1101, 10'b110000_0101, 10'b110000_1001, 10'b110000_0111,
    10'b000101_0111, 10'b001001_0111, 10'b010001_0111, 10'b100001_0111};

  function automatic int k_index(input logic [7:0] b);
    for (int i = 0; i < 12; i++) if (K_BYTE[i] == b) return i;
    return -1;
  endfunction

  // disparity after a block of bits given the disparity before it
  function automatic logic rd_after(input logic rd, input int ones, input int len);
    if (2 * ones > len) return 1'b1;
    if (2 * ones < len) return 1'b0;
    return rd;
  endfunction

  function automatic sb4_t ref_4b(input int y, input int x, input logic rd4);
    bit alt;
    alt = (y == 7) && ((!rd4 && (x == 17 || x == 18 || x == 20)) ||
                       ( rd4 && (x == 11 || x == 13 || x == 14)));
    if (alt) return rd4 ? D4_POS[8] : D4_NEG[8];
    return rd4 ? D4_POS[y] : D4_NEG[y];
  endfunction

  // Encode one byte; k for a byte that is no control character is
  // treated as data (as the design under test does).
  function automatic logic [9:0] ref_encode(input logic [7:0] b, input logic k,
                                            input logic rd, output logic rd_next);
    int ki;
    logic [5:0] c6;
    logic [3:0] c4;
    logic [9:0] c;
    ki = k ? k_index(b) : -1;
    if (ki >= 0) begin
      c = rd ? K_POS[ki] : K_NEG[ki];
    end else begin
      c6 = rd ? D6_POS[b[4:0]] : D6_NEG[b[4:0]];
      c4 = ref_4b(int'(b[7:5]), int'(b[4:0]), rd_after(rd, $countones(c6), 6));
      c  = {c6, c4};
    end
    rd_next = rd_after(rd, $countones(c), 10);
    return c;
  endfunction

  // Search the table for a received group.  found_n/found_p: in the
  // RD-/RD+ column.  b/k: the byte it stands for (if found).
  function automatic void ref_decode(input logic [9:0] c, output logic found_n,
                                     output logic found_p, output logic [7:0] b,
                                     output logic k);
    logic dummy;
    found_n = 1'b0;
    found_p = 1'b0;
    b = '0;
    k = 1'b0;
    for (int i = 0; i < 256; i++) begin
      if (ref_encode(8'(i), 1'b0, 1'b0, dummy) == c) begin found_n = 1'b1; b = 8'(i); end
      if (ref_encode(8'(i), 1'b0, 1'b1, dummy) == c) begin found_p = 1'b1; b = 8'(i); end
    end
    for (int i = 0; i < 12; i++) begin
      if (K_NEG[i] == c) begin found_n = 1'b1; b = K_BYTE[i]; k = 1'b1; end
      if (K_POS[i] == c) begin found_p = 1'b1; b = K_BYTE[i]; k = 1'b1; end
    end
  endfunction

  // Running disparity after a received group, from its sub-blocks
  // (000111 and 0011 count positive, 111000 and 1100 negative).
  function automatic logic ref_rx_rd(input logic [9:0] c, input logic rd);
    logic r;
    r = rd;
    if ($countones(c[9:4]) > 3 || c[9:4] == 6'b000111) r = 1'b1;
    else if ($countones(c[9:4]) < 3 || c[9:4] == 6'b111000) r = 1'b0;
    if ($countones(c[3:0]) > 2 || c[3:0] == 4'b0011) r = 1'b1;
    else if ($countones(c[3:0]) < 2 || c[3:0] == 4'b1100) r = 1'b0;
    return r;
  endfunction

endpackage
