// tb_gfp_encoder: encodes interleaved packets of several FECs and compares every output
// byte with a bit-serial GFP model that keeps one scrambler history per FEC. Also checks
// the state clear, pass-through of unclassified packets, and refusal of a packet whose
// buffer lacks space.
module tb_gfp_encoder;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N_FEC-1:0] clear_i = '0;
  logic [15:0] fec_free [N_FEC];
  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic out_valid, out_ready;
  beat_t out_beat;
  logic [31:0] overflow;

  gfp_encoder dut (.*);

  always @(posedge clk) out_ready <= ($urandom_range(0, 4) != 0);

  bit hist [N_FEC][$];
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
      check(cur == e, $sformatf("encoded packet %0d (%0d vs %0d bytes)", n_out, cur.size(), e.size()));
      n_out++;
    end
  end

  // valid: classified; fec; expect_enc: encoder should accept it
  task automatic send(input bytes_t p, input bit valid, input int fec, input bit expect_enc);
    bytes_t f, e;
    f = {8'(valid ? 8'h80 : 8'h00), 8'(fec), 8'(p.size() >> 8), 8'(p.size())};
    f = {f, p};
    if (expect_enc) begin
      e = {8'h80, 8'(fec), 8'((p.size() + 8) >> 8), 8'(p.size() + 8)};
      e = {e, ref_gfp(p, hist[fec])};
    end else begin
      e = f;
      if (valid) e[0] = 8'hC0;           // drop flag set
    end
    exp_q.push_back(e);
    foreach (f[i]) begin
      @(negedge clk);
      in_valid = 1;
      in_beat  = '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
      #1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (fec_free[i]) fec_free[i] = 16'd16384;
    foreach (hist[i]) hist_clear(hist[i]);
    // known CRC-16 check value of the header error check polynomial
    check(hec16(16'h0001) == ref_hec(16'h0001), "tHEC of type 0x0001");
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 14; k++) send(make_pkt(60 + 37 * k, 12'h1, k), 1, k % 3, 1);
    send(make_pkt(80, 12'h1, 99), 0, 0, 0);            // unclassified: unchanged
    // clear FEC 1 state, model likewise
    wait (exp_q.size() == 0);
    @(posedge clk); clear_i[1] <= 1; @(posedge clk); clear_i[1] <= 0;
    hist_clear(hist[1]);
    send(make_pkt(200, 12'h1, 7), 1, 1, 1);
    send(make_pkt(200, 12'h1, 8), 1, 2, 1);
    // FEC 4 has 100 free bytes: a 92-byte packet fits exactly, a 93-byte one does not
    fec_free[4] = 16'd100;
    send(make_pkt(92, 12'h1, 9), 1, 4, 1);
    send(make_pkt(93, 12'h1, 10), 1, 4, 0);
    send(make_pkt(64, 12'h1, 11), 1, 4, 1);             // scrambler state untouched
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == 20, "all packets out");
    check(overflow == 1, "one packet refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
