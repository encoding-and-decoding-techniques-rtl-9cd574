// tb_dec_6b5b: all 64 six-bit patterns at both disparities against the
// column-form table: decoded x, K28 flag, unknown-pattern flag and the
// disparity after the sub-block.
module tb_dec_6b5b;
  import pcs_ref_pkg::*;

  logic [5:0] code6;
  logic       rd_in, k28, bad, rd_out;
  logic [4:0] x;
  int checks = 0, failures = 0;

  dec_6b5b dut (.code6(code6), .rd_in(rd_in), .x(x), .k28(k28), .bad(bad), .rd_out(rd_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex; logic ek, erd; int ones;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 64; c++) begin
        code6 = 6'(c); rd_in = r[0];
        #1;
        ex = -1; ek = 1'b0;
        for (int i = 0; i < 32; i++)
          if (D6_NEG[i] == code6 || D6_POS[i] == code6) ex = i;
        if (code6 == K_NEG[0][9:4] || code6 == K_POS[0][9:4]) begin ex = 28; ek = 1'b1; end
        ones = $countones(code6);
        erd = (ones > 3 || code6 == 6'b000111) ? 1'b1 :
              (ones < 3 || code6 == 6'b111000) ? 1'b0 : rd_in;
        checks++;
        if (bad !== (ex < 0) || (ex >= 0 && (x !== 5'(ex) || k28 !== ek)) || rd_out !== erd) begin
          failures++;
          $display("FAIL %b rd=%0d: x=%0d k28=%0d bad=%0d rd=%0d exp x=%0d", code6, rd_in, x, k28, bad, rd_out, ex);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
