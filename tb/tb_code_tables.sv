// tb_code_tables: checks the encoder and decoder against code groups
// written out by hand, independent of any table-driven model: the data rows
// D0.0-D3.0, D31.0, D0.2-D3.2 and D31.2 and all twelve control characters,
// each at both running disparities (first column: sent at negative
// disparity), and a short decoder sequence starting from reset disparity.
module tb_code_tables;
  logic [7:0] data;
  logic       k, rd_in, rd_out, kerr;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc_8b10b_core u_enc (.data(data), .k(k), .rd_in(rd_in), .code(code), .rd_out(rd_out), .kerr(kerr));

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, drd, drd_q, dvalid, dk, dcerr, dderr;
  logic [9:0] dcode = '0;
  logic [7:0] ddata;

  dec_10b8b u_dec (.clk(clk), .rst_n(rst_n), .en(en), .code(dcode), .rd_in(drd_q), .rd_out(drd),
                   .valid(dvalid), .data(ddata), .k(dk), .code_err(dcerr), .disp_err(dderr));

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) drd_q <= 1'b0;
    else if (en) drd_q <= drd;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic row(input logic [7:0] b, input logic kk, input logic [9:0] neg, input logic [9:0] pos);
    data = b; k = kk;
    rd_in = 1'b0; #1;
    checks++;
    if (code !== neg || kerr) begin
      failures++;
      $display("FAIL %h k=%0d at RD-: %b expected %b", b, kk, code, neg);
    end
    rd_in = 1'b1; #1;
    checks++;
    if (code !== pos || kerr) begin
      failures++;
      $display("FAIL %h k=%0d at RD+: %b expected %b", b, kk, code, pos);
    end
  endtask

  // decoder: present one group, check the result two edges later
  task automatic dec(input logic [9:0] c, input logic [7:0] b, input logic kk, input logic cerr);
    @(negedge clk);
    dcode = c; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    @(negedge clk);
    checks++;
    if (!dvalid || dcerr !== cerr || (!cerr && (ddata !== b || dk !== kk))) begin
      failures++;
      $display("FAIL decode %b: %h k=%0d err=%0d valid=%0d", c, ddata, dk, dcerr, dvalid);
    end
  endtask

  initial begin
    row(8'h00, 0, 10'b100111_0100, 10'b011000_1011);   // D0.0
    row(8'h01, 0, 10'b011101_0100, 10'b100010_1011);   // D1.0
    row(8'h02, 0, 10'b101101_0100, 10'b010010_1011);   // D2.0
    row(8'h03, 0, 10'b110001_1011, 10'b110001_0100);   // D3.0
    row(8'h1F, 0, 10'b101011_0100, 10'b010100_1011);   // D31.0
    row(8'h40, 0, 10'b100111_0101, 10'b011000_0101);   // D0.2
    row(8'h41, 0, 10'b011101_0101, 10'b100010_0101);   // D1.2
    row(8'h42, 0, 10'b101101_0101, 10'b010010_0101);   // D2.2
    row(8'h43, 0, 10'b110001_0101, 10'b110001_0101);   // D3.2
    row(8'h5F, 0, 10'b101011_0101, 10'b010100_0101);   // D31.2
    row(8'h1C, 1, 10'b001111_0100, 10'b110000_1011);   // K28.0
    row(8'h3C, 1, 10'b001111_1001, 10'b110000_0110);   // K28.1
    row(8'h5C, 1, 10'b001111_0101, 10'b110000_1010);   // K28.2
    row(8'h7C, 1, 10'b001111_0011, 10'b110000_1100);   // K28.3
    row(8'h9C, 1, 10'b001111_0010, 10'b110000_1101);   // K28.4
    row(8'hBC, 1, 10'b001111_1010, 10'b110000_0101);   // K28.5
    row(8'hDC, 1, 10'b001111_0110, 10'b110000_1001);   // K28.6
    row(8'hFC, 1, 10'b001111_1000, 10'b110000_0111);   // K28.7
    row(8'hF7, 1, 10'b111010_1000, 10'b000101_0111);   // K23.7
    row(8'hFB, 1, 10'b110110_1000, 10'b001001_0111);   // K27.7
    row(8'hFD, 1, 10'b101110_1000, 10'b010001_0111);   // K29.7
    row(8'hFE, 1, 10'b011110_1000, 10'b100001_0111);   // K30.7
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    dec(10'b110001_1011, 8'h03, 0, 0);   // D3.0
    dec(10'b110001_0101, 8'h43, 0, 0);   // D3.2
    dec(10'b001111_1010, 8'hBC, 1, 0);   // K28.5
    dec(10'b110000_0101, 8'hBC, 1, 0);   // K28.5, other column
    dec(10'b111111_0000, 8'h00, 0, 1);   // in no column
    dec(10'b100011_1110, 8'h00, 0, 1);   // D17.P7: replaced by the alternate 7
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
