// tb_dec_4b3b: all 16 four-bit patterns, after a data or a 110000 K28
// sub-block, at both disparities: decoded y, alternate-7 and unknown flags,
// and the disparity after the group.
module tb_dec_4b3b;
  import pcs_ref_pkg::*;

  logic [3:0] code4;
  logic       k28n, rd_in, alt7, bad, rd_out;
  logic [2:0] y;
  int checks = 0, failures = 0;

  dec_4b3b dut (.code4(code4), .k28n(k28n), .rd_in(rd_in), .y(y), .alt7(alt7), .bad(bad), .rd_out(rd_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey; logic ea, erd; int ones;
    for (int kk = 0; kk < 2; kk++)
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 16; c++) begin
          code4 = 4'(c); k28n = kk[0]; rd_in = r[0];
          #1;
          ey = -1; ea = 1'b0;
          // after 110000 the K28.y forms are the complements of data forms
          // (e.g. K28.5 = 110000 0101); the sub-block is read complemented.
          for (int i = 0; i < 8; i++)
            if (D4_NEG[i] == (kk ? ~code4 : code4) || D4_POS[i] == (kk ? ~code4 : code4)) ey = i;
          if (D4_NEG[8] == (kk ? ~code4 : code4) || D4_POS[8] == (kk ? ~code4 : code4)) begin
            ey = 7; ea = 1'b1;
          end
          // the table's own K28.y entries at positive disparity
          if (kk == 1)
            for (int i = 0; i < 8; i++) if (K_POS[i][3:0] == code4 && ey != i) ey = -2;
          ones = $countones(code4);
          erd = (ones > 2 || code4 == 4'b0011) ? 1'b1 :
                (ones < 2 || code4 == 4'b1100) ? 1'b0 : rd_in;
          checks++;
          if (ey == -2 || bad !== (ey < 0) || (ey >= 0 && (y !== 3'(ey) || alt7 !== ea)) || rd_out !== erd) begin
            failures++;
            $display("FAIL %b k28n=%0d rd=%0d: y=%0d alt7=%0d bad=%0d exp y=%0d", code4, k28n, rd_in, y, alt7, bad, ey);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
