// tb_fau_ingress: end-to-end test of the FAU ingress direction at a reduced container
// size (400-byte payload, 2 KiB assembly buffers). The control plane port sets up three
// connections in the required order (encoder state clear, timer, header entry, then the
// classifier entry), client frames of all three plus bad, unassigned and untagged frames
// are sent, and every container frame is checked by fau_frame_checker, which recovers
// the client packets from the GFP streams. Finally one connection is torn down: its
// classifier entry removed, then its timer switched on to flush the rest.
// Each mechanism must occur at least once: threshold and timeout frames, segmentation,
// idle padding, an idle frame cut at a frame border, FCS drop, unassigned drop,
// buffer overflow drop, round-robin alternation, the teardown flush, and a shorter
// unpadded frame from a connection switched to variable-size frames.
module tb_fau_ingress;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  localparam int P   = 400;
  localparam int NFC = N_FEC;

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

  fau_ingress #(.PAYLOAD(P), .BUF_BYTES(2048)) dut (.*);
  fau_frame_checker #(.PAYLOAD(P), .NF(NFC)) chk (.clk, .tx_valid(tx_valid && rst_n), .tx_beat);

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

  // connection setup in the order the control plane must keep
  task automatic setup(input int f, input logic [11:0] client_vid, input logic [11:0] core_vid,
                       input logic [2:0] prio, input bit timer, input int tmo);
    logic [15:0] b;
    b = 16'h0100 + 16'(16 * f);
    wr(b + 1, 1);                                    // A: clear GFP state
    wr(b + 3, tmo); wr(b + 2, 32'(timer));           // B: timer
    wr(b + 4, {17'd0, prio, core_vid});              // C: header entry
    wr(b + 5, 32'h0000_0A00 + 32'(f));
    wr(b + 6, 32'h1234_5600 + 32'(f));
    chk.vid[f] = core_vid; chk.pcp[f] = prio;
    chk.dst_mac[f] = {16'h0A00 + 16'(f), 32'h1234_5600 + 32'(f)};
    chk.reset_fec(f);
    wr(b + 0, 32'h1000 | 32'(client_vid));          // D: classifier, opens the gate
  endtask

  int fec_of_vid [int];

  task automatic send_frame(input bytes_t p, input bit corrupt);
    bytes_t f;
    f = add_fcs(p);
    if (corrupt) f[20] ^= 8'h40;
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1;
      rx_beat  = '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
    end
    @(negedge clk);
    rx_valid = 0;
    repeat (12) @(negedge clk);                      // inter-frame gap
  endtask

  task automatic send_client(input int len, input logic [11:0] v, input int seed);
    bytes_t p;
    p = make_pkt(len, v, seed);
    if (fec_of_vid.exists(int'(v))) chk.expect_pkt(fec_of_vid[int'(v)], p);
    send_frame(p, 0);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  initial begin
    logic [31:0] st [9];
    int left;
    for (int f = 0; f < NFC; f++) begin chk.vid[f] = 12'hFFF; chk.pcp[f] = 0; chk.dst_mac[f] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(16'h0001, 32'h0000_02AA);
    wr(16'h0002, 32'hBBCC_DDEE);
    chk.src_mac = 48'h02AA_BBCC_DDEE;
    setup(0, 12'h100, 12'h0A0, 3'd1, 0, 0);
    setup(1, 12'h200, 12'h0A1, 3'd5, 1, 600);
    setup(4, 12'h300, 12'h0A4, 3'd7, 0, 0);
    fec_of_vid[12'h100] = 0; fec_of_vid[12'h200] = 1; fec_of_vid[12'h300] = 4;
    // phase 1: mixed traffic with bad and unassigned frames
    for (int k = 0; k < 40; k++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 4)       send_client($urandom_range(60, 700), 12'h100, k);
      else if (r < 7)  send_client($urandom_range(60, 700), 12'h300, k);
      else if (r == 7) send_client($urandom_range(60, 200), 12'h200, k);
      else if (r == 8) send_client(100, 12'h555, k);          // no connection
      else             send_frame(make_pkt(120, 12'h100, k), 1); // bad FCS
    end
    // phase 2: sparse small packets on the timer connection
    for (int k = 0; k < 4; k++) begin
      send_client(81, 12'h200, 100 + k);   // 89 GFP bytes: the padding ends inside an idle frame
      repeat (900) @(negedge clk);
    end
    // phase 3: back-to-back large packets to two threshold connections
    for (int k = 0; k < 24; k++) send_client(1500, (k % 2) ? 12'h300 : 12'h100, 200 + k);
    // phase 4: tear down connection 0: gate closed first, then flush by timer
    send_client(250, 12'h100, 300);
    repeat (4000) @(negedge clk);
    wr(16'h0100, 32'h0);                              // D removed
    send_frame(make_pkt(90, 12'h100, 301), 0);        // now unassigned
    wr(16'h0103, 32'd50); wr(16'h0102, 32'd1);        // B: timer on
    chk.var_ok[4] = 1;                                // flush connection 4 as well, as a
    wr(16'h0143, 32'd50); wr(16'h0142, 32'd3);        // variable-size (unpadded) frame
    // let everything drain
    repeat (20000) @(negedge clk);
    for (int i = 0; i < 9; i++) rd(16'h0010 + 16'(i), st[i]);
    // packets still expected at the end can only be refused ones at the tail
    left = 0;
    for (int f = 0; f < NFC; f++) left += chk.exp_q[f].size();
    check(chk.lost + left == int'(st[3]),
          $sformatf("missing packets %0d equal refused packets %0d", chk.lost + left, st[3]));
    check(int'(st[7]) == chk.frames && int'(st[6]) == chk.frames, "frame counters");
    check(int'(st[8]) == chk.padded_frames + chk.short_frames, "timeout frame counter");
    $display("mechanisms: frames=%0d packets=%0d segmented=%0d padded=%0d cut_idles=%0d switches=%0d",
             chk.frames, chk.pkts_ok, chk.segmented, chk.padded_frames, chk.cut_idles, chk.fec_switches);
    $display("            fcs_drop=%0d unassigned=%0d refused=%0d variable=%0d", st[0], st[4], st[3],
             chk.short_frames);
    check(chk.frames - chk.padded_frames > 0, "threshold frames occurred");
    check(chk.padded_frames > 0, "timeout frames with padding occurred");
    check(chk.segmented > 0, "segmentation occurred");
    check(chk.cut_idles > 0, "idle frame cut at a frame border occurred");
    check(chk.fec_switches > 0, "round robin alternation occurred");
    check(st[0] > 0, "FCS drop occurred");
    check(st[4] > 0, "unassigned drop occurred");
    check(st[3] > 0, "buffer overflow occurred");
    check(chk.short_frames > 0, "variable-size frame occurred");
    check(chk.frames_of[0] > 0 && chk.frames_of[1] > 0 && chk.frames_of[4] > 0, "all connections carried frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end
endmodule
