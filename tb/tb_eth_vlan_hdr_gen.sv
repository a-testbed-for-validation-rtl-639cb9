// tb_eth_vlan_hdr_gen: frames of different FECs must leave with the Ethernet/VLAN header
// of their table entry in front of the unchanged payload and with the IDF length
// increased by 18.
module tb_eth_vlan_hdr_gen;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  hdr_entry_t table_i [N_FEC];
  logic [47:0] src_mac = 48'h02_AA_BB_CC_DD_EE;
  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic out_valid, out_ready;
  beat_t out_beat;

  eth_vlan_hdr_gen dut (.*);

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  bytes_t exp_q[$], cur;
  int n_out = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_beat.sop) cur.delete();
    cur.push_back(out_beat.data);
    if (out_beat.eop) begin
      begin bytes_t e; e = exp_q.pop_front(); check(cur == e, $sformatf("frame %0d", n_out)); end
      n_out++;
    end
  end

  task automatic send(input int fec, input int n);
    bytes_t f, e;
    f = {8'hFC, 8'(fec), 8'(n >> 8), 8'(n)};
    e = {8'hFC, 8'(fec), 8'((n + 18) >> 8), 8'(n + 18)};
    for (int i = 5; i >= 0; i--) e.push_back(table_i[fec].dst_mac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) e.push_back(src_mac[8*i +: 8]);
    e.push_back(8'h81); e.push_back(8'h00);
    e.push_back(8'({table_i[fec].pcp, 1'b0, table_i[fec].vid[11:8]}));
    e.push_back(table_i[fec].vid[7:0]);
    e.push_back(8'h88); e.push_back(8'hB5);
    for (int i = 0; i < n; i++) begin f.push_back(8'(i * 7 + fec)); e.push_back(8'(i * 7 + fec)); end
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
    foreach (table_i[i])
      table_i[i] = '{vid: 12'(12'h100 + 17 * i), pcp: 3'(i), dst_mac: 48'h0A_00_00_00_00_00 + 48'(i)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(0, 50);
    send(6, 20);
    send(3, 300);
    send(6, 1);
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == 4, "four frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
