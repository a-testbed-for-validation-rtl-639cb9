// tb_rr_scheduler: emulates seven components with frames of different lengths. Checks
// that grants follow round-robin order among the requesters, that only one grant is
// active, and that each granted frame passes the multiplexer intact with its length.
module tb_rr_scheduler;
  import fau_pkg::*;

  localparam int NF = N_FEC;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NF-1:0] req = '0, grant, in_valid, in_ready;
  beat_t in_beat [NF];
  logic out_valid, out_ready;
  beat_t out_beat;
  logic [15:0] in_len [NF], out_len;
  int pending [NF];          // frames each component still has
  int pos [NF];

  rr_scheduler dut (.*);

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  // component models: frame of 5 + i bytes, data = {i, index}
  always_comb for (int i = 0; i < NF; i++) begin
    req[i]      = (pending[i] > 0) && !grant[i];
    in_valid[i] = grant[i];
    in_beat[i]  = '{data: 8'(i * 16 + pos[i]), sop: (pos[i] == 0), eop: (pos[i] == 4 + i)};
    in_len[i]   = 16'(5 + i);
  end

  int order[$];
  bit seen_grant = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cur = -1, exp_pos = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(grant) > 1) check(0, "more than one grant");
    for (int i = 0; i < NF; i++) if (grant[i] && in_ready[i]) begin
      check(out_valid && out_beat == in_beat[i], "multiplexer passes granted stream");
      check(out_len == 16'(5 + i), "frame length of the granted component");
      if (pos[i] == 0) order.push_back(i);
      if (pos[i] == 4 + i) begin pos[i] <= 0; pending[i] <= pending[i] - 1; end
      else pos[i] <= pos[i] + 1;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp1[$], exp2[$];
    foreach (pending[i]) begin pending[i] = 0; pos[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // all seven request two frames each: 0..6, 0..6
    @(negedge clk);
    foreach (pending[i]) pending[i] = 2;
    wait (order.size() == 2 * NF);
    for (int k = 0; k < 2 * NF; k++) exp1.push_back(k % NF);
    check(order == exp1, "full round-robin order");
    repeat (20) @(posedge clk);
    // only 2 and 5 request, 3 frames each: order 2,5,2,5,2,5 (last served was 6)
    order.delete();
    @(negedge clk);
    pending[2] = 3; pending[5] = 3;
    wait (order.size() == 6);
    exp2 = '{2, 5, 2, 5, 2, 5};
    check(order == exp2, "round robin between two requesters");
    repeat (20) @(posedge clk);
    check(grant == '0, "no grant when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
