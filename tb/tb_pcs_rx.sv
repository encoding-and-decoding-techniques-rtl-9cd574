// tb_pcs_rx: self-checking testbench of the PCS receiver.
//
// Feeds words of code groups, encoded by the reference model in random
// modes (including the default mode 11, which must produce nothing), with
// occasional single-bit errors and an idle cycle wherever a mode-00/01 word
// would directly follow a mode-10 word.  Each result (bytes, k, code_err,
// disp_err, mode_out) and its arrival time (2 cycles in modes 00/01, 3 in
// mode 10) is compared with a search of the reference code table, and the
// rd output with the received-bit disparity rule.
module tb_pcs_rx;
  import pcs_pkg::*;
  import pcs_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  pcs_mode_e   mode = MODE_8B10B;
  logic [39:0] code_in = '0;
  logic        valid_out, rd;
  pcs_mode_e   mode_out;
  logic [31:0] data_out;
  logic [3:0]  k_out, code_err, disp_err;
  int checks = 0, failures = 0, cycle = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_cerr = 0, n_derr = 0, n_k = 0;

  typedef struct {
    logic [31:0] data; logic [3:0] k, cerr, derr; pcs_mode_e mode; int due;
  } exp_t;
  exp_t q[$];
  logic rd_tx = 1'b0, rd_rx = 1'b0;

  pcs_rx dut (.clk(clk), .rst_n(rst_n), .mode(mode), .valid_in(valid_in), .code_in(code_in),
              .valid_out(valid_out), .mode_out(mode_out), .data_out(data_out), .k_out(k_out),
              .code_err(code_err), .disp_err(disp_err), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && valid_out) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        exp_t e;
        logic bad;
        e = q.pop_front();
        bad = code_err !== e.cerr || disp_err !== e.derr || mode_out !== e.mode || cycle != e.due;
        for (int i = 0; i < 4; i++)
          if (!e.cerr[i] && (data_out[8*i +: 8] !== e.data[8*i +: 8] || k_out[i] !== e.k[i]))
            bad = 1'b1;
        if (bad) begin
          failures++;
          $display("FAIL cycle %0d: %h %b %b %b %s, expected %h %b %b %b %s at %0d", cycle,
                   data_out, k_out, code_err, disp_err, mode_out.name(), e.data, e.k, e.cerr,
                   e.derr, e.mode.name(), e.due);
        end
      end
    end
  end

  pcs_mode_e last_mode = MODE_8B10B;

  task automatic send(input pcs_mode_e m);
    exp_t e;
    int n;
    logic [39:0] c;
    logic rn, fn, fp, kk;
    logic [7:0] b;
    @(negedge clk);
    checks++;
    if (rd !== rd_rx) begin
      failures++;
      $display("FAIL rd %0d expected %0d", rd, rd_rx);
    end
    if ((last_mode == MODE_32B40B && (m == MODE_8B10B || m == MODE_16B20B)) ||
        $urandom_range(0, 3) == 0) begin
      valid_in = 1'b0;
      @(negedge clk);
    end
    last_mode = m;
    n_mode[m]++;
    n = (m == MODE_8B10B) ? 1 : (m == MODE_16B20B) ? 2 : (m == MODE_32B40B) ? 4 : 0;
    c = 40'($urandom()) << 20 | 40'($urandom());   // unused groups carry junk
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 5) == 0)
        c[10*i +: 10] = ref_encode(K_BYTE[$urandom_range(0, 11)], 1'b1, rd_tx, rn);
      else
        c[10*i +: 10] = ref_encode(8'($urandom()), 1'b0, rd_tx, rn);
      rd_tx = rn;
    end
    if (n > 0 && $urandom_range(0, 7) == 0) c[$urandom_range(0, 10*n-1)] ^= 1'b1;
    e = '{data: '0, k: '0, cerr: '0, derr: '0, mode: m, due: 0};
    for (int i = 0; i < n; i++) begin
      ref_decode(c[10*i +: 10], fn, fp, b, kk);
      e.cerr[i] = !(fn || fp);
      e.derr[i] = !e.cerr[i] && !(rd_rx ? fp : fn);
      e.data[8*i +: 8] = b;
      e.k[i] = kk && !e.cerr[i];
      n_cerr += int'(e.cerr[i]);
      n_derr += int'(e.derr[i]);
      n_k += int'(e.k[i]);
      rd_rx = ref_rx_rd(c[10*i +: 10], rd_rx);
    end
    mode = m; code_in = c; valid_in = 1'b1;
    e.due = cycle + ((m == MODE_32B40B) ? LAT_32B40B : LAT_8B10B);
    if (n > 0) q.push_back(e);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) send(pcs_mode_e'($urandom_range(0, 3)));
    @(negedge clk);
    valid_in = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 ||
        n_mode[3] == 0 || n_cerr == 0 || n_derr == 0 || n_k == 0) begin
      failures++;
      $display("FAIL left %0d modes %0d/%0d/%0d/%0d cerr %0d derr %0d k %0d", q.size(),
               n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_cerr, n_derr, n_k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
