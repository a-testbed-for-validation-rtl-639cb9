// tb_vlan_classifier: IDF packets with assigned, unassigned and missing VLAN tags pass the
// classifier; the FEC field and valid flag must match the table, the packet bytes must
// pass unchanged, and disabling an entry must stop its classification.
module tb_vlan_classifier;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cls_entry_t table_i [N_FEC];
  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic out_valid, out_ready;
  beat_t out_beat;
  logic [31:0] unclassified;

  vlan_classifier dut (.*);

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  typedef struct { bytes_t b; bit hit; int fec; } exp_t;
  exp_t exp_q[$];
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
      exp_t e;
      e = exp_q.pop_front();
      check(cur[0][7] == e.hit, $sformatf("valid flag, packet %0d", n_out));
      if (e.hit) check(cur[1] == 8'(e.fec), $sformatf("FEC number, packet %0d", n_out));
      check(cur[2:$] == e.b[2:$], "rest of packet unchanged");
      n_out++;
    end
  end

  task automatic send(input bytes_t p, input bit hit, input int fec);
    bytes_t f;
    exp_t e;
    f = {8'h00, 8'h00, 8'(p.size() >> 8), 8'(p.size())};
    f = {f, p};
    e.b = f; e.hit = hit; e.fec = fec;
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
    bytes_t p;
    foreach (table_i[i]) table_i[i] = '0;
    table_i[0] = '{en: 1, vid: 12'h100};
    table_i[3] = '{en: 1, vid: 12'hABC};
    table_i[6] = '{en: 1, vid: 12'h005};
    table_i[2] = '{en: 0, vid: 12'h200};
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(make_pkt(64, 12'h100, 1), 1, 0);
    send(make_pkt(100, 12'hABC, 2), 1, 3);
    send(make_pkt(80, 12'h005, 3), 1, 6);
    send(make_pkt(70, 12'h200, 4), 0, 0);     // disabled entry
    send(make_pkt(70, 12'h777, 5), 0, 0);     // unknown VLAN
    p = make_pkt(90, 12'h100, 6);
    p[12] = 8'h08;                             // untagged (IPv4 EtherType)
    send(p, 0, 0);
    p = make_pkt(60, 12'h100, 7);
    p = p[0:13];                               // ends before the tag is complete
    send(p, 0, 0);
    table_i[0].en = 0;                         // tear down FEC 0
    send(make_pkt(64, 12'h100, 8), 0, 0);
    table_i[5] = '{en: 1, vid: 12'h100};       // set up FEC 5 with the same VLAN
    send(make_pkt(300, 12'h100, 9), 1, 5);
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == 9, "all packets out");
    check(unclassified == 5, "unclassified counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
