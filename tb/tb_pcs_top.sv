// tb_pcs_top: end-to-end testbench of the PCS, transmitter looped back into
// the receiver through a channel that sometimes flips one bit.
//
// The receiver's select lines follow the width of each transmitted word.
// Traffic is random data mixed with control characters, invalid control
// requests, idle cycles and the default mode 11, and runs in all three
// widths with frequent mode changes.  After a mode-10 word the source waits
// two cycles before a mode-00/01 word (one at each end of the loop).
//
// Checked: every received byte, control flag and error flag against the
// reference code table (and, for words the channel left intact while both
// ends agree on the running disparity, against the bytes sent, with no
// error flags); the end-to-end latency (4 cycles in
// modes 00/01, 6 in mode 10); on the serial stream of transmitted code
// groups, group 0 first and bit a first, that no run of equal bits exceeds
// five and that the running digital sum is -1 or +1 at every group
// boundary, agreeing at the end with the transmitter's rd output.  Each mechanism --
// each mode, mode change, idle default mode, control character, comma
// (K28.5), alternate D.x.A7, invalid control request, code error, disparity
// error, both running-disparity signs -- is counted and must occur.
module tb_pcs_top;
  import pcs_pkg::*;
  import pcs_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  pcs_mode_e   tx_mode = MODE_8B10B;
  logic        tx_valid_in = 1'b0;
  logic [31:0] tx_data_in = '0;
  logic [3:0]  tx_k_in = '0;
  logic        tx_valid_out, tx_rd;
  pcs_mode_e   tx_mode_out;
  logic [39:0] tx_code_out;
  logic [3:0]  tx_kerr_out;
  logic [39:0] flip = '0, rx_code_in;
  logic        rx_valid_out, rx_rd;
  pcs_mode_e   rx_mode_out;
  logic [31:0] rx_data_out;
  logic [3:0]  rx_k_out, rx_code_err, rx_disp_err;

  assign rx_code_in = tx_code_out ^ flip;

  pcs_top dut (
    .clk(clk), .rst_n(rst_n),
    .tx_mode(tx_mode), .tx_valid_in(tx_valid_in), .tx_data_in(tx_data_in), .tx_k_in(tx_k_in),
    .tx_valid_out(tx_valid_out), .tx_mode_out(tx_mode_out), .tx_code_out(tx_code_out),
    .tx_kerr_out(tx_kerr_out), .tx_rd(tx_rd),
    .rx_mode(tx_mode_out), .rx_valid_in(tx_valid_out), .rx_code_in(rx_code_in),
    .rx_valid_out(rx_valid_out), .rx_mode_out(rx_mode_out), .rx_data_out(rx_data_out),
    .rx_k_out(rx_k_out), .rx_code_err(rx_code_err), .rx_disp_err(rx_disp_err), .rx_rd(rx_rd)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_k = 0, n_comma = 0, n_alt7 = 0, n_kerr = 0;
  int n_cerr = 0, n_derr = 0, n_rdpos = 0, n_rdneg = 0, n_words = 0;

  typedef struct {
    pcs_mode_e mode; int lanes; logic [31:0] data; logic [3:0] k; int due;
  } sent_t;
  sent_t sq[$];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel: flip one bit of some transmitted words
  always @(negedge clk) begin
    flip = '0;
    if (tx_valid_out && $urandom_range(0, 9) == 0) begin
      int n;
      n = (tx_mode_out == MODE_8B10B) ? 1 : (tx_mode_out == MODE_16B20B) ? 2 : 4;
      flip[$urandom_range(0, 10*n-1)] = 1'b1;
    end
  end

  // serial stream checks and receiver expectations
  int   rds = -1, run = 0;
  logic last_bit = 1'b0;
  logic rd_rx = 1'b0;
  typedef struct {
    logic [3:0] cerr, derr; logic [31:0] data; logic [3:0] k; logic intact;
  } rexp_t;
  rexp_t rq[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && tx_valid_out) begin
      int n;
      rexp_t r;
      logic fn, fp, kk;
      logic [7:0] b;
      n = (tx_mode_out == MODE_8B10B) ? 1 : (tx_mode_out == MODE_16B20B) ? 2 : 4;
      // intact: the channel left the word alone and the receiver's running
      // disparity still agrees with the transmitter's
      r = '{cerr: '0, derr: '0, data: '0, k: '0, intact: (flip == '0 && rd_rx == (rds > 0))};
      for (int i = 0; i < n; i++) begin
        for (int j = 9; j >= 0; j--) begin
          logic bt;
          bt = tx_code_out[10*i + j];
          rds += bt ? 1 : -1;
          run = (bt == last_bit) ? run + 1 : 1;
          last_bit = bt;
          check(run <= 5, "run of more than five equal bits");
        end
        check(rds == 1 || rds == -1, $sformatf("running digital sum %0d", rds));
        if (tx_code_out[10*i +: 4] == 4'b0111 || tx_code_out[10*i +: 4] == 4'b1000) n_alt7++;
      end
      if (rds > 0) n_rdpos++; else n_rdneg++;
      // what the receiver must make of the (possibly corrupted) word
      for (int i = 0; i < n; i++) begin
        ref_decode(rx_code_in[10*i +: 10], fn, fp, b, kk);
        r.cerr[i] = !(fn || fp);
        r.derr[i] = !r.cerr[i] && !(rd_rx ? fp : fn);
        r.data[8*i +: 8] = b;
        r.k[i] = kk;
        rd_rx = ref_rx_rd(rx_code_in[10*i +: 10], rd_rx);
        if (rx_code_in[10*i +: 10] == 10'b001111_1010 || rx_code_in[10*i +: 10] == 10'b110000_0101)
          n_comma++;
      end
      rq.push_back(r);
    end
    if (rst_n && rx_valid_out) begin
      sent_t s;
      rexp_t r;
      check(sq.size() > 0 && rq.size() > 0, "unexpected receiver output");
      if (sq.size() > 0 && rq.size() > 0) begin
        s = sq.pop_front();
        r = rq.pop_front();
        n_words++;
        n_cerr += $countones(rx_code_err);
        n_derr += $countones(rx_disp_err);
        check(cycle == s.due, $sformatf("latency: arrived %0d, due %0d", cycle, s.due));
        check(rx_mode_out == s.mode, "receiver mode");
        check(rx_code_err == r.cerr && rx_disp_err == r.derr,
              $sformatf("error flags %b %b, expected %b %b", rx_code_err, rx_disp_err, r.cerr, r.derr));
        for (int i = 0; i < s.lanes; i++)
          if (!r.cerr[i])
            check(rx_data_out[8*i +: 8] == r.data[8*i +: 8] && rx_k_out[i] == r.k[i],
                  $sformatf("lane %0d: %h/%b expected %h/%b", i, rx_data_out[8*i +: 8],
                            rx_k_out[i], r.data[8*i +: 8], r.k[i]));
        if (r.intact) begin
          logic [31:0] m;
          m = (s.lanes == 4) ? 32'hFFFF_FFFF : (s.lanes == 2) ? 32'h0000_FFFF : 32'h0000_00FF;
          check((rx_data_out & m) == (s.data & m) && rx_k_out == s.k &&
                rx_code_err == '0 && rx_disp_err == '0,
                $sformatf("end to end: %h/%b/%b/%b expected %h/%b mode %s", rx_data_out, rx_k_out,
                          rx_code_err, rx_disp_err, s.data, s.k, s.mode.name()));
        end
      end
    end
  end

  pcs_mode_e last_mode = MODE_8B10B;
  int        last32 = -10;

  task automatic send(input pcs_mode_e m, input logic [31:0] d, input logic [3:0] kk);
    sent_t s;
    int gap;
    @(negedge clk);
    gap = ($urandom_range(0, 4) == 0) ? 1 : 0;
    repeat (gap) begin
      tx_valid_in = 1'b0;
      @(negedge clk);
    end
    // two cycles without a mode-10 word before a mode-00/01 word
    while ((m == MODE_8B10B || m == MODE_16B20B) && cycle - last32 < 3) begin
      tx_valid_in = 1'b0;
      @(negedge clk);
    end
    if (m == MODE_32B40B) last32 = cycle;
    if (m != last_mode) n_switch++;
    last_mode = m;
    n_mode[m]++;
    s.mode  = m;
    s.lanes = (m == MODE_8B10B) ? 1 : (m == MODE_16B20B) ? 2 : (m == MODE_32B40B) ? 4 : 0;
    s.data  = d;
    s.k     = '0;
    for (int i = 0; i < s.lanes; i++) begin
      s.k[i] = kk[i] && k_index(d[8*i +: 8]) >= 0;
      n_k += int'(s.k[i]);
      n_kerr += int'(kk[i] && !s.k[i]);
    end
    s.due = cycle + ((m == MODE_32B40B) ? 2 * LAT_32B40B : 2 * LAT_8B10B);
    if (s.lanes > 0) sq.push_back(s);
    tx_mode = m; tx_data_in = d; tx_k_in = kk; tx_valid_in = 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // K28.5 commas in every width first, then mixed traffic
    send(MODE_8B10B, 32'h0000_00BC, 4'b0001);
    send(MODE_16B20B, 32'h0000_BC4A, 4'b0010);
    send(MODE_32B40B, 32'hBCB5_BC4A, 4'b1010);
    for (int i = 0; i < 3000; i++) begin
      pcs_mode_e m;
      logic [31:0] d;
      logic [3:0] kk;
      // modes stay for a while, then change
      m = ($urandom_range(0, 7) == 0) ? pcs_mode_e'($urandom_range(0, 3)) : last_mode;
      d = $urandom();
      kk = '0;
      if ($urandom_range(0, 7) == 0) d[7:5] = 3'd7;   // D.x.7 often, for the alternate form
      if ($urandom_range(0, 4) == 0) begin
        int l;
        l = $urandom_range(0, 3);
        d[8*l +: 8] = ($urandom_range(0, 7) == 0) ? 8'h55 : K_BYTE[$urandom_range(0, 11)];
        kk[l] = 1'b1;
      end
      send(m, d, kk);
    end
    @(negedge clk);
    tx_valid_in = 1'b0;
    repeat (10) @(posedge clk);
    check(sq.size() == 0 && rq.size() == 0, "words lost in the loop");
    check((rds > 0) == tx_rd, "tx rd disagrees with the serial stream");
    $display("words %0d modes 00:%0d 01:%0d 10:%0d 11:%0d switches %0d", n_words,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch);
    $display("control %0d comma %0d alt7 %0d kerr %0d code_err %0d disp_err %0d rd+ %0d rd- %0d",
             n_k, n_comma, n_alt7, n_kerr, n_cerr, n_derr, n_rdpos, n_rdneg);
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_mode[3] > 0, "a mode never used");
    check(n_switch > 0, "no mode change");
    check(n_k > 0 && n_comma > 0 && n_alt7 > 0, "no control, comma or alternate-7 group");
    check(n_kerr > 0, "no invalid control request");
    check(n_cerr > 0 && n_derr > 0, "no code or disparity error");
    check(n_rdpos > 0 && n_rdneg > 0, "running disparity never took both signs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
