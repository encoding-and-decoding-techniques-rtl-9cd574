// tb_enc_3b4b: exhaustive check of the 3b/4b sub-block encoder: every y and
// x at both disparities for data (including the alternate-7 rule), and the
// 4-bit part of all twelve control characters.
module tb_enc_3b4b;
  import pcs_ref_pkg::*;

  logic [2:0] y;
  logic [4:0] x;
  logic       k, rd_in, rd_out;
  logic [3:0] code4;
  int checks = 0, failures = 0;

  enc_3b4b dut (.y(y), .x(x), .k(k), .rd_in(rd_in), .code4(code4), .rd_out(rd_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e;
    for (int r = 0; r < 2; r++)
      for (int yi = 0; yi < 8; yi++)
        for (int xi = 0; xi < 32; xi++) begin
          y = 3'(yi); x = 5'(xi); k = 1'b0; rd_in = r[0];
          #1;
          e = ref_4b(yi, xi, rd_in);
          checks++;
          if (code4 !== e || rd_out !== rd_after(rd_in, $countones(e), 4)) begin
            failures++;
            $display("FAIL D%0d.%0d rd=%0d: got %b exp %b", xi, yi, rd_in, code4, e);
          end
        end
    // control characters: the 4-bit disparity is the one left by the 6-bit
    // part, which is unbalanced for all of them, so it is the opposite of
    // the column's.
    for (int i = 0; i < 12; i++)
      for (int r = 0; r < 2; r++) begin
        y = K_BYTE[i][7:5]; x = K_BYTE[i][4:0]; k = 1'b1; rd_in = r[0];
        #1;
        e = rd_in ? K_NEG[i][3:0] : K_POS[i][3:0];
        checks++;
        if (code4 !== e) begin
          failures++;
          $display("FAIL K%0d.%0d rd4=%0d: got %b exp %b", x, y, rd_in, code4, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
