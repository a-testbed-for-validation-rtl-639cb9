// tb_fau_latency: packet latency through the FAU ingress under threshold-only assembly,
// the measurement of the testbed evaluation. A background flow of 0.5, 1 and 2 Gbit/s and
// a test flow of 500-byte packets at constant spacing share one FEC; 9000-byte containers
// leave only when full. For each load, the testbench takes every packet's latency:
//   from the packet's first byte on the client line
//   to the end of the container that completes it.
// It prints the distribution in 10 us bins for the test flow and checks four things:
//   - every packet arrives intact, and nothing is dropped or refused;
//   - the mean waiting time is about half the time it takes the load to fill one container.
//     Waiting time is the latency minus the container's transmit time. This is the
//     reciprocal dependence on the load. The bound is 0.35 to 0.9 of the fill time: each
//     packet also spends its own length in the store-and-forward stage, and at 2 Gbit/s
//     the core link is 87 % busy, so a full container sometimes waits for the one before;
//   - the mean latency grows as the load falls;
//   - the largest latency stays far below 1 ms.
// The load levels, the 500-byte test packets, threshold-only assembly and the 9000-byte
// containers follow the evaluation. The rest is this testbench's own choice:
//   - Clock. The datapath moves one byte per clock, so 2 Gbit/s needs more than 250 MHz.
//     One cycle stands for 1/300 us, a 300 MHz clock, and the timer runs at 3 clocks per
//     10 ns.
//   - Background traffic. Poisson arrivals. Packet sizes are 64 bytes (45 %), 576 bytes
//     (15 %) or 1500 bytes (40 %).
//   - Wire overhead. Each packet also takes 20 bytes of preamble and inter-frame gap.
//   - Test flow. It runs at 50 Mbit/s instead of 10 Mbit/s, to collect more samples in a
//     short run.
// Each load uses its own connection (FECs 0, 1, 2). At the end, a teardown flushes the
// connection with the timer.
module tb_fau_latency;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  localparam int    MHZ       = 300;             // cycles per microsecond
  localparam int    TEST_GAP  = 24000;           // 500 bytes every 80 us = 50 Mbit/s
  localparam int    SEND_CYC  = JUMBO_BYTES + 20; // container plus wire overhead on the core link
  localparam real   GBPS [3]  = '{0.5, 1.0, 2.0};
  localparam int    RUN  [3]  = '{1200000, 600000, 400000};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rx_valid = 0;
  beat_t rx_beat = '0;
  logic tx_valid;
  beat_t tx_beat;
  logic req_valid = 0, req_write = 0;
  logic [15:0] req_addr = 0;
  logic [31:0] req_wdata = 0;
  logic rsp_valid;
  logic [31:0] rsp_rdata;

  fau_ingress #(.CLK_PER_10NS(3)) dut (.*);
  fau_frame_checker #(.PAYLOAD(FRAME_PAYLOAD), .NF(N_FEC)) chk (.clk, .tx_valid(tx_valid && rst_n), .tx_beat);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_valid = 0; req_write = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = a;
    @(negedge clk);
    req_valid = 0;
    d = rsp_rdata;
  endtask

  function automatic int bg_len();
    int u;
    u = $urandom_range(99);
    return (u < 45) ? 64 : (u < 60) ? 576 : 1500;
  endfunction

  function automatic longint expo(input real mean);
    real u;
    u = real'($urandom_range(1000000, 1)) / 1000000.0;
    return longint'(-mean * $ln(u)) + 1;
  endfunction

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  initial begin
    real mean_wait [3];
    for (int f = 0; f < N_FEC; f++) begin chk.vid[f] = 12'hFFF; chk.pcp[f] = 0; chk.dst_mac[f] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(16'h0001, 32'h0000_0200); wr(16'h0002, 32'h0000_0001);
    chk.src_mac = 48'h0200_0000_0001;

    for (int l = 0; l < 3; l++) begin
      logic [15:0] b;
      logic [11:0] cvid;
      bytes_t pend [$];
      bit     pend_test [$];
      longint t_sop [$];
      bit     is_test [$];
      bytes_t cur;
      int     idx, gap;
      longint t0, next_bg, next_test;
      longint gfp_bytes;
      real    mean_bg, fill, sum_all, sum_test, w;
      longint lat, lat_max;
      int     n_test, hist [int];
      logic [31:0] d;

      pend.delete(); pend_test.delete(); t_sop.delete(); is_test.delete();
      hist.delete(); cur.delete();

      // connection l: client VLAN 0x100+l, threshold only (timer off, timeout 0)
      b    = 16'h0100 + 16'(16 * l);
      cvid = 12'h100 + 12'(l);
      wr(b + 1, 1);
      wr(b + 3, 0); wr(b + 2, 0);
      wr(b + 4, {17'd0, 3'(l), 12'h700 + 12'(l)});
      wr(b + 5, 32'h0000_0A00); wr(b + 6, 32'h0000_0000 + 32'(l));
      chk.vid[l] = 12'h700 + 12'(l); chk.pcp[l] = 3'(l);
      chk.dst_mac[l] = {16'h0A00, 32'(l)};
      wr(b + 0, 32'h1000 | 32'(cvid));

      // mean background spacing: average wire bytes per packet over bytes per cycle
      mean_bg = (0.45 * 64 + 0.15 * 576 + 0.40 * 1500 + 24.0) / (GBPS[l] * 1000.0 / 8.0 / MHZ);
      t0 = cyc;
      next_bg = t0 + expo(mean_bg);
      next_test = t0 + TEST_GAP / 2;
      idx = 0; gap = 0; gfp_bytes = 0;
      while (cyc < t0 + RUN[l] || idx < cur.size()) begin
        @(negedge clk);
        if (cyc < t0 + RUN[l]) begin
          if (cyc >= next_bg) begin
            pend.push_back(make_pkt(bg_len(), cvid, $urandom_range(255)));
            pend_test.push_back(0);
            next_bg += expo(mean_bg);
          end
          if (cyc >= next_test) begin
            pend.push_back(make_pkt(500, cvid, 7));
            pend_test.push_back(1);
            next_test += TEST_GAP;
          end
        end
        if (idx < cur.size()) begin
          rx_valid = 1;
          rx_beat  = '{data: cur[idx], sop: (idx == 0), eop: (idx == cur.size() - 1)};
          idx++;
          if (idx == cur.size()) gap = 20;
        end else begin
          rx_valid = 0;
          if (gap > 0) gap--;
          else if (pend.size() > 0 && cyc < t0 + RUN[l]) begin
            bytes_t p;
            p = pend.pop_front();
            chk.expect_pkt(l, p);
            gfp_bytes += p.size() + 8;
            t_sop.push_back(cyc);
            is_test.push_back(pend_test.pop_front());
            cur = add_fcs(p);
            idx = 0;
            rx_valid = 1;
            rx_beat  = '{data: cur[idx], sop: 1'b1, eop: 1'b0};
            idx++;
          end
        end
      end
      @(negedge clk);
      rx_valid = 0;

      // latencies of the packets the full containers carried
      repeat (2 * SEND_CYC) @(posedge clk);
      fill = real'(FRAME_PAYLOAD) * real'(RUN[l]) / real'(gfp_bytes);
      sum_all = 0; sum_test = 0; n_test = 0; lat_max = 0;
      foreach (chk.dtime[l][i]) begin
        lat = chk.dtime[l][i] / 10 - t_sop[i];
        sum_all += real'(lat);
        if (lat > lat_max) lat_max = lat;
        if (is_test[i]) begin
          sum_test += real'(lat);
          n_test++;
          hist[int'(lat / (10 * MHZ))]++;
        end
      end
      check(chk.dtime[l].size() > 0 && n_test > 0, "packets delivered");
      w = sum_all / real'(chk.dtime[l].size()) - real'(SEND_CYC);
      mean_wait[l] = w;
      $display("load %0.1f Gbit/s: %0d packets in %0d containers, fill time %0.1f us",
               GBPS[l], chk.dtime[l].size(), chk.frames_of[l], fill / MHZ);
      $display("  mean latency all %0.1f us, test flow %0.1f us (%0d packets), max %0.1f us",
               sum_all / real'(chk.dtime[l].size()) / MHZ, sum_test / real'(n_test) / MHZ, n_test,
               real'(lat_max) / MHZ);
      for (int k = 0; k < 40; k++) if (hist.exists(k))
        $display("    test flow %3d..%3d us: %0d", 10 * k, 10 * k + 10, hist[k]);
      check(w > 0.35 * fill && w < 0.9 * fill,
            $sformatf("mean wait %0.1f us is about half the fill time %0.1f us", w / MHZ, fill / MHZ));
      check(lat_max < 1000 * MHZ, "largest latency below 1 ms");
      check(chk.lost == 0, "no packet lost");

      // teardown: gate closed, then the timer flushes the rest
      wr(b + 0, 0);
      wr(b + 3, 100); wr(b + 2, 1);
      wait (chk.exp_q[l].size() == 0);
      repeat (10) @(posedge clk);
      check(chk.dtime[l].size() == t_sop.size(), "all packets delivered after teardown");
      wr(b + 2, 0);
      for (int s = 0; s < 6; s++) begin
        rd(16'h0010 + 16'(s), d);
        check(d == 0, $sformatf("status counter %0d stays 0", s));
      end
    end
    check(mean_wait[0] > mean_wait[1] && mean_wait[1] > mean_wait[2],
          "latency falls as the load rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
