// tb_pcs_tx: self-checking testbench of the PCS transmitter.
//
// Sends random words in random modes, including the default mode 11 and
// invalid control requests, with an idle cycle inserted whenever a mode-00
// or mode-01 word would directly follow a mode-10 word.  The expected code
// word, its width (mode_out), kerr flags and arrival time (2 cycles in
// modes 00/01, 3 in mode 10) come from the reference model, which carries
// one running disparity across all modes; the rd output is checked after
// every word.
module tb_pcs_tx;
  import pcs_pkg::*;
  import pcs_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, valid_in = 1'b0;
  pcs_mode_e   mode = MODE_8B10B;
  logic [31:0] data_in = '0;
  logic [3:0]  k_in = '0;
  logic        valid_out, rd;
  pcs_mode_e   mode_out;
  logic [39:0] code_out;
  logic [3:0]  kerr_out;
  int checks = 0, failures = 0, cycle = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_kerr = 0;

  typedef struct { logic [39:0] code; logic [3:0] kerr; pcs_mode_e mode; int due; } exp_t;
  exp_t q[$];
  logic rd_model = 1'b0;

  pcs_tx dut (.clk(clk), .rst_n(rst_n), .mode(mode), .valid_in(valid_in), .data_in(data_in),
              .k_in(k_in), .valid_out(valid_out), .mode_out(mode_out), .code_out(code_out),
              .kerr_out(kerr_out), .rd(rd));

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
        e = q.pop_front();
        if (code_out !== e.code || kerr_out !== e.kerr || mode_out !== e.mode || cycle != e.due) begin
          failures++;
          $display("FAIL cycle %0d: %h %b %s, expected %h %b %s at %0d", cycle, code_out,
                   kerr_out, mode_out.name(), e.code, e.kerr, e.mode.name(), e.due);
        end
      end
    end
  end

  pcs_mode_e last_mode = MODE_8B10B;

  task automatic send(input pcs_mode_e m, input logic [31:0] d, input logic [3:0] kk);
    exp_t e;
    int n;
    logic r, rn;
    @(negedge clk);
    checks++;
    if (rd !== rd_model) begin
      failures++;
      $display("FAIL rd %0d expected %0d", rd, rd_model);
    end
    // a mode-00/01 word may not directly follow a mode-10 word
    if ((last_mode == MODE_32B40B && (m == MODE_8B10B || m == MODE_16B20B)) ||
        $urandom_range(0, 3) == 0) begin
      valid_in = 1'b0;
      @(negedge clk);
    end
    if (m != last_mode) n_switch++;
    last_mode = m;
    n_mode[m]++;
    mode = m; data_in = d; k_in = kk; valid_in = 1'b1;
    n = (m == MODE_8B10B) ? 1 : (m == MODE_16B20B) ? 2 : (m == MODE_32B40B) ? 4 : 0;
    e.code = '0; e.kerr = '0; e.mode = m;
    r = rd_model;
    for (int i = 0; i < n; i++) begin
      e.code[10*i +: 10] = ref_encode(d[8*i +: 8], kk[i], r, rn);
      e.kerr[i] = kk[i] && k_index(d[8*i +: 8]) < 0;
      n_kerr += int'(e.kerr[i]);
      r = rn;
    end
    rd_model = r;
    e.due = cycle + ((m == MODE_32B40B) ? LAT_32B40B : LAT_8B10B);
    if (n > 0) q.push_back(e);
  endtask

  initial begin
    logic [31:0] d;
    logic [3:0]  kk;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      pcs_mode_e m;
      m = pcs_mode_e'($urandom_range(0, 3));
      d = $urandom();
      kk = '0;
      if ($urandom_range(0, 3) == 0) begin
        int l;
        l = $urandom_range(0, 3);
        d[8*l +: 8] = ($urandom_range(0, 9) == 0) ? 8'h00 : K_BYTE[$urandom_range(0, 11)];
        kk[l] = 1'b1;
      end
      send(m, d, kk);
    end
    @(negedge clk);
    valid_in = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 ||
        n_mode[3] == 0 || n_switch == 0 || n_kerr == 0) begin
      failures++;
      $display("FAIL left %0d modes %0d/%0d/%0d/%0d switches %0d kerr %0d", q.size(),
               n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_kerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
