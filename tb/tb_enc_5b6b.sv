// tb_enc_5b6b: exhaustive check of the 5b/6b sub-block encoder against the
// column-form code table: every x at both disparities, data and K28.
module tb_enc_5b6b;
  import pcs_ref_pkg::*;

  logic [4:0] x;
  logic       k28, rd_in, rd_out;
  logic [5:0] code6;
  int checks = 0, failures = 0;

  enc_5b6b dut (.x(x), .k28(k28), .rd_in(rd_in), .code6(code6), .rd_out(rd_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp6;
    for (int r = 0; r < 2; r++) begin
      for (int i = 0; i < 32; i++) begin
        x = 5'(i); rd_in = r[0]; k28 = 1'b0;
        #1;
        exp6 = rd_in ? D6_POS[i] : D6_NEG[i];
        checks++;
        if (code6 !== exp6 || rd_out !== rd_after(rd_in, $countones(exp6), 6)) begin
          failures++;
          $display("FAIL D%0d rd=%0d: got %b/%0d exp %b", i, rd_in, code6, rd_out, exp6);
        end
      end
      x = 5'd28; k28 = 1'b1; rd_in = r[0];
      #1;
      exp6 = rd_in ? K_POS[0][9:4] : K_NEG[0][9:4];
      checks++;
      if (code6 !== exp6 || rd_out !== ~rd_in) begin
        failures++;
        $display("FAIL K28 rd=%0d: got %b", rd_in, code6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
