// tb_enc_32b40b: self-checking testbench of the 32-bit encoding scheme.
//
// Streams every data byte value, all twelve control characters, invalid
// control requests and random bytes through the scheme with random idle
// cycles.  The testbench keeps the running-disparity register itself (as the
// transmitter does) and compares each code word, its kerr flags and its
// arrival time (3 cycles after en) with the column-form reference model.
module tb_enc_32b40b;
  import pcs_ref_pkg::*;

  localparam int N   = 4;
  localparam int LAT = 3;

  logic            clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [8*N-1:0]  data = '0;
  logic [N-1:0]    k = '0;
  logic            rd_q, rd_out, valid;
  logic [10*N-1:0] code;
  logic [N-1:0]    kerr;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { logic [10*N-1:0] code; logic [N-1:0] kerr; int due; } exp_t;
  exp_t q[$];
  logic rd_model = 1'b0;

  enc_32b40b dut (.clk(clk), .rst_n(rst_n), .en(en), .data(data), .k(k), .rd_in(rd_q),
           .rd_out(rd_out), .valid(valid), .code(code), .kerr(kerr));

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_q <= 1'b0;
    else if (en) rd_q <= rd_out;

  initial begin
    repeat (20000) @(posedge clk);
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
        $display("FAIL unexpected output %h", code);
      end else begin
        exp_t e;
        e = q.pop_front();
        if (code !== e.code || kerr !== e.kerr || cycle != e.due) begin
          failures++;
          $display("FAIL cycle %0d: code %h kerr %b, expected %h %b at cycle %0d",
                   cycle, code, kerr, e.code, e.kerr, e.due);
        end
      end
    end
  end

  task automatic send(input logic [8*N-1:0] d, input logic [N-1:0] kk);
    exp_t e;
    logic r;
    @(negedge clk);
    if ($urandom_range(0, 3) == 0) begin
      en = 1'b0;
      @(negedge clk);
    end
    data = d; k = kk; en = 1'b1;
    r = rd_model;
    for (int i = 0; i < N; i++) begin
      logic rn;
      e.code[10*i +: 10] = ref_encode(d[8*i +: 8], kk[i], r, rn);
      e.kerr[i] = kk[i] && (k_index(d[8*i +: 8]) < 0);
      r = rn;
    end
    #1;
    checks++;
    if (rd_out !== r) begin
      failures++;
      $display("FAIL rd_out %0d expected %0d", rd_out, r);
    end
    rd_model = r;
    e.due = cycle + LAT;
    q.push_back(e);
  endtask

  initial begin
    logic [8*N-1:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // every byte value as data, in every lane
    for (int i = 0; i < 256; i++) begin
      for (int l = 0; l < N; l++) d[8*l +: 8] = 8'(i + 37 * l);
      send(d, '0);
    end
    // every control character in every lane, mixed with data
    for (int i = 0; i < 12; i++)
      for (int l = 0; l < N; l++) begin
        for (int m = 0; m < N; m++) d[8*m +: 8] = 8'($urandom());
        d[8*l +: 8] = K_BYTE[i];
        send(d, N'(1) << l);
      end
    // control requests for bytes that are not control characters
    for (int i = 0; i < 8; i++) send({N{8'h00 + 8'(i)}}, '1);
    // random traffic
    for (int i = 0; i < 400; i++) begin
      for (int m = 0; m < N; m++) d[8*m +: 8] = 8'($urandom());
      send(d, N'($urandom()) & N'({N{$urandom_range(0, 3) == 0}}));
    end
    @(negedge clk);
    en = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
