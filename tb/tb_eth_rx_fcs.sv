// tb_eth_rx_fcs: checks FCS stripping, error marking and length limits of the client
// receive MAC, and its 4-byte delay.
module tb_eth_rx_fcs;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic vlan_en = 1, jumbo_en = 0;
  logic in_valid = 0;
  beat_t in_beat = '0;
  logic out_valid, out_err;
  beat_t out_beat;
  logic [31:0] bad_frames;

  eth_rx_fcs dut (.*);

  bytes_t got;
  bit got_err, got_sop_ok;
  int first_out_cycle, cyc;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (out_beat.sop) begin got.delete(); got_sop_ok = 1; first_out_cycle = cyc; end
    got.push_back(out_beat.data);
    if (out_beat.eop) got_err = out_err;
  end

  task automatic send(input bytes_t f);
    foreach (f[i]) begin
      in_valid <= 1;
      in_beat  <= '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p, f;
    int start;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // good frames of several sizes
    for (int n = 60; n <= 1500; n += 360) begin
      p = make_pkt(n, 12'h123, n);
      f = add_fcs(p);
      start = cyc;
      send(f);
      check(got == p, $sformatf("payload of %0d-byte frame", n));
      check(!got_err, "good frame not flagged");
      check(first_out_cycle - start == 6, $sformatf("delay %0d", first_out_cycle - start));
    end
    check(bad_frames == 0, "no bad frames counted");
    // corrupted FCS
    p = make_pkt(200, 12'h5, 3);
    f = add_fcs(p);
    f[50] ^= 8'h01;
    send(f);
    check(got_err, "bit error flagged");
    check(bad_frames == 1, "bad frame counted");
    // 1600 bytes: too long without jumbo support, fine with it
    p = make_pkt(1600, 12'h7, 4);
    f = add_fcs(p);
    send(f);
    check(got_err, "oversize flagged with jumbo off");
    jumbo_en = 1;
    send(f);
    check(!got_err && got == p, "1600 bytes accepted with jumbo on");
    // runt
    p = make_pkt(40, 12'h7, 5);
    f = add_fcs(p);
    send(f);
    check(got_err, "runt flagged");
    check(bad_frames == 3, "three bad frames counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
