// tb_fau_ingress_full: the FAU ingress direction at its full size (seven FECs, 9000-byte
// jumbo containers, 32 KiB assembly buffers). One connection is set up for threshold assembly,
// 500-byte client packets are sent until a full container leaves (a packet is segmented
// at its end), then the connection is torn down and the rest flushed by the timer into a
// padded container. Both containers are checked byte by byte by fau_frame_checker.
module tb_fau_ingress_full;
  import fau_pkg::*;
  import fau_tb_pkg::*;

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

  fau_ingress dut (.*);
  fau_frame_checker #(.PAYLOAD(FRAME_PAYLOAD), .NF(N_FEC)) chk (.clk, .tx_valid(tx_valid && rst_n), .tx_beat);

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

  task automatic send_client(input bytes_t p);
    bytes_t f;
    f = add_fcs(p);
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1;
      rx_beat  = '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
    end
    @(negedge clk);
    rx_valid = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  initial begin
    int t_first;
    for (int f = 0; f < N_FEC; f++) begin chk.vid[f] = 12'hFFF; chk.pcp[f] = 0; chk.dst_mac[f] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(16'h0001, 32'h0000_02AA); wr(16'h0002, 32'hBBCC_DDEE);
    chk.src_mac = 48'h02AA_BBCC_DDEE;
    // connection on FEC 2: client VLAN 0x123 -> core VLAN 0x456, priority 3
    wr(16'h0121, 1);
    wr(16'h0122, 0);
    wr(16'h0124, 32'h3456);
    wr(16'h0125, 32'h0000_0A0B); wr(16'h0126, 32'h0C0D_0E0F);
    chk.vid[2] = 12'h456; chk.pcp[2] = 3'd3; chk.dst_mac[2] = 48'h0A0B_0C0D_0E0F;
    wr(16'h0120, 32'h1123);
    // 19 packets of 500 bytes = 9652 GFP bytes: one full container, 674 bytes left
    for (int k = 0; k < 19; k++) begin
      bytes_t p;
      p = make_pkt(500, 12'h123, k);
      chk.expect_pkt(2, p);
      send_client(p);
    end
    wait (chk.frames == 1);
    t_first = $time / 10;
    // teardown: gate closed, then timer flush
    wr(16'h0120, 0);
    wr(16'h0123, 32'd100); wr(16'h0122, 1);
    wait (chk.frames == 2);
    repeat (10) @(posedge clk);
    check(chk.padded_frames == 1, "flushed container is padded");
    check(chk.segmented == 1, "one packet segmented at the container border");
    check(chk.pkts_ok == 19 && chk.exp_q[2].size() == 0, "all 19 packets recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
