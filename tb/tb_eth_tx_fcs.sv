// tb_eth_tx_fcs: frames in, frames with FCS out. The FCS is compared with an independent
// CRC model and with the standard check value of CRC-32 ("123456789" -> 0xCBF43926).
module tb_eth_tx_fcs;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic out_valid;
  beat_t out_beat;
  logic [31:0] frames;

  eth_tx_fcs dut (.*);

  bytes_t exp_q[$], cur;
  int n_out = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_beat.sop) cur.delete();
    cur.push_back(out_beat.data);
    if (out_beat.eop) begin
      check(cur == exp_q.pop_front(), $sformatf("frame %0d with FCS", n_out));
      n_out++;
    end
  end

  task automatic send(input bytes_t f);
    exp_q.push_back(add_fcs(f));
    foreach (f[i]) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_beat  = '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
      while (!in_valid) begin @(negedge clk); in_valid = 1; end
      #1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t s;
    s = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(ref_fcs(s) == 32'hCBF43926, "reference CRC-32 check value");
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(s);
    send(make_pkt(64, 12'h1, 1));
    send(make_pkt(1500, 12'h2, 2));
    send(make_pkt(60, 12'h3, 3));
    wait (exp_q.size() == 0);
    repeat (8) @(posedge clk);
    check(n_out == 4 && frames == 4, "four frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
