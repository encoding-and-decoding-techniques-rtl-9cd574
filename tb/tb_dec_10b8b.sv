// tb_dec_10b8b: self-checking testbench of the 10-bit decoding scheme.
//
// Phase 1 presents every 10-bit pattern in each lane at both running
// disparities (other lanes carry random valid groups).  Phase 2 decodes a
// stream encoded by the reference model, with the testbench keeping the
// running disparity from rd_out as the receiver does, and with occasional
// single-bit errors.  Each result (byte, k, code_err, disp_err) and its
// arrival time (2 cycles after en) is compared with a search of the
// reference code table; rd_out is compared with the received-bit rule.
module tb_dec_10b8b;
  import pcs_ref_pkg::*;

  localparam int N   = 1;
  localparam int LAT = 2;

  logic            clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [10*N-1:0] code = '0;
  logic            rd_drv = 1'b0, rd_out, valid;
  logic [8*N-1:0]  data;
  logic [N-1:0]    k, code_err, disp_err;
  int checks = 0, failures = 0, cycle = 0;
  int n_cerr = 0, n_derr = 0;

  typedef struct {
    logic [8*N-1:0] data; logic [N-1:0] k, cerr, derr; int due;
  } exp_t;
  exp_t q[$];

  dec_10b8b dut (.clk(clk), .rst_n(rst_n), .en(en), .code(code), .rd_in(rd_drv),
           .rd_out(rd_out), .valid(valid), .data(data), .k(k),
           .code_err(code_err), .disp_err(disp_err));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        exp_t e;
        logic bad;
        e = q.pop_front();
        bad = (code_err !== e.cerr) || (disp_err !== e.derr) || (cycle != e.due);
        for (int i = 0; i < N; i++)
          if (!e.cerr[i] && (data[8*i +: 8] !== e.data[8*i +: 8] || k[i] !== e.k[i])) bad = 1'b1;
        if (bad) begin
          failures++;
          $display("FAIL cycle %0d: data %h k %b cerr %b derr %b, expected %h %b %b %b at %0d",
                   cycle, data, k, code_err, disp_err, e.data, e.k, e.cerr, e.derr, e.due);
        end
      end
    end
  end

  // present one word at disparity rd; returns the disparity after it
  task automatic send(input logic [10*N-1:0] c, input logic rd, output logic rd_next);
    exp_t e;
    logic r, fn, fp, kk;
    logic [7:0] b;
    @(negedge clk);
    if ($urandom_range(0, 3) == 0) begin
      en = 1'b0;
      @(negedge clk);
    end
    code = c; rd_drv = rd; en = 1'b1;
    r = rd;
    for (int i = 0; i < N; i++) begin
      ref_decode(c[10*i +: 10], fn, fp, b, kk);
      e.cerr[i] = !(fn || fp);
      e.derr[i] = !e.cerr[i] && !(r ? fp : fn);
      e.data[8*i +: 8] = b;
      e.k[i] = kk;
      n_cerr += int'(e.cerr[i]);
      n_derr += int'(e.derr[i]);
      r = ref_rx_rd(c[10*i +: 10], r);
    end
    #1;
    checks++;
    if (rd_out !== r) begin
      failures++;
      $display("FAIL rd_out %0d expected %0d for %h", rd_out, r, c);
    end
    rd_next = r;
    e.due = cycle + LAT;
    q.push_back(e);
  endtask

  function automatic logic [10*N-1:0] valid_word(input logic rd);
    logic [10*N-1:0] c;
    logic r, rn;
    r = rd;
    for (int i = 0; i < N; i++) begin
      if ($urandom_range(0, 7) == 0)
        c[10*i +: 10] = ref_encode(K_BYTE[$urandom_range(0, 11)], 1'b1, r, rn);
      else
        c[10*i +: 10] = ref_encode(8'($urandom()), 1'b0, r, rn);
      r = rn;
    end
    return c;
  endfunction

  initial begin
    logic [10*N-1:0] c;
    logic rd, rn;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: every pattern in every lane, at both disparities
    for (int l = 0; l < N; l++)
      for (int r = 0; r < 2; r++)
        for (int p = 0; p < 1024; p++) begin
          c = valid_word(r[0]);
          c[10*l +: 10] = 10'(p);
          send(c, r[0], rn);
        end
    // phase 2: a valid stream with occasional bit errors
    rd = 1'b0;
    for (int i = 0; i < 1500; i++) begin
      c = valid_word(rd);
      if ($urandom_range(0, 9) == 0) c[$urandom_range(0, 10*N-1)] ^= 1'b1;
      send(c, rd, rn);
      rd = rn;
    end
    @(negedge clk);
    en = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_cerr == 0 || n_derr == 0) begin
      failures++;
      $display("FAIL left %0d, code errors %0d, disparity errors %0d", q.size(), n_cerr, n_derr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
