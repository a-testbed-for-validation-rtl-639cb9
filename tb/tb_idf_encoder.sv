// tb_idf_encoder: sends good and bad packets into the IDF encoder with a randomly
// stalling consumer and checks that good packets come out whole behind a correct IDF
// header, bad ones are discarded, and a packet that does not fit is dropped.
module tb_idf_encoder;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_err = 0;
  beat_t in_beat = '0;
  logic out_valid, out_ready;
  beat_t out_beat;
  logic [31:0] dropped;
  bit stall_all = 0;

  idf_encoder #(.BUF_BYTES(512), .LEN_DEPTH(8)) dut (.*);

  always @(posedge clk) out_ready <= !stall_all && ($urandom_range(0, 3) != 0);

  bytes_t exp_q[$];
  bytes_t cur;
  int n_out = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_beat.sop) cur.delete();
    cur.push_back(out_beat.data);
    if (out_beat.eop) begin
      bytes_t e;
      e = exp_q.pop_front();
      check(cur[0] == 8'h00 && cur[1] == 8'h00, "IDF flags and FEC cleared");
      check({cur[2], cur[3]} == 16'(e.size()), "IDF length");
      check(cur[4:$] == e, "packet bytes");
      n_out++;
    end
  end

  task automatic send(input bytes_t f, input bit err);
    foreach (f[i]) begin
      in_valid <= 1;
      in_beat  <= '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
      in_err   <= err && (i == f.size() - 1);
      @(posedge clk);
    end
    in_valid <= 0;
    in_err   <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p;
    int n_exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_exp = 0;
    for (int k = 0; k < 12; k++) begin
      p = make_pkt(60 + 13 * k, 12'(k), k);
      if (k % 4 == 3) send(p, 1);
      else begin exp_q.push_back(p); n_exp++; send(p, 0); end
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == n_exp, "all good packets out");
    check(dropped == 3, "bad packets dropped");
    // fill the 512-byte buffer while the consumer stalls: the third 200-byte packet drops
    stall_all = 1;
    for (int k = 0; k < 3; k++) begin
      p = make_pkt(200, 12'h9, 50 + k);
      if (k < 2) exp_q.push_back(p);
      send(p, 0);
    end
    check(dropped == 4, "overflow packet dropped");
    stall_all = 0;
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == n_exp + 2, "stored packets out after the stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
