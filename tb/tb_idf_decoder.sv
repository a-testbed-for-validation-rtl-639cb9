// tb_idf_decoder: IDF frames in, plain frames out: the 4 header bytes must be gone, the
// first remaining byte marked sop and the rest unchanged.
module tb_idf_decoder;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic out_valid, out_ready;
  beat_t out_beat;

  idf_decoder dut (.*);

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  bytes_t exp_q[$], cur;
  int n_out = 0, n_sop = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_beat.sop) begin cur.delete(); n_sop++; end
    cur.push_back(out_beat.data);
    if (out_beat.eop) begin
      check(cur == exp_q.pop_front(), $sformatf("frame %0d", n_out));
      n_out++;
    end
  end

  task automatic send(input int n, input int seed);
    bytes_t f, e;
    f = {8'hFC, 8'h02, 8'(n >> 8), 8'(n)};
    for (int i = 0; i < n; i++) begin f.push_back(8'(seed + i)); e.push_back(8'(seed + i)); end
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(30, 1); send(1, 2); send(200, 3);
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == 3 && n_sop == 3, "three frames, one sop each");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
