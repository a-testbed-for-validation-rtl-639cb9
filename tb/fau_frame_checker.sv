// fau_frame_checker: receives the container frames leaving the FAU on the core link and
// checks them independently of the RTL: frame length, FCS, Ethernet/VLAN header of the
// connection, and the GFP stream of each FEC, which it delineates and descrambles to get
// the client packets back. Every recovered packet must equal the next one expected for
// its FEC. It also counts what the frames show about the assembly: packets segmented
// across two frames, frames with idle padding, idle frames cut at a frame border, and
// shorter frames of FECs set to variable-size frames.
// For latency measurements it records, per FEC, the time each sent packet was recovered
// (the end of the container that completed it).
module fau_frame_checker
  import fau_tb_pkg::*;
#(
  parameter int PAYLOAD = 8978,
  parameter int NF      = 7
) (
  input  logic            clk,
  input  logic            tx_valid,
  input  fau_pkg::beat_t  tx_beat
);

  int checks = 0, failures = 0;
  int frames = 0, pkts_ok = 0, segmented = 0, padded_frames = 0, cut_idles = 0, lost = 0;
  int fec_switches = 0, last_fec = -1, short_frames = 0;
  bit var_ok [NF];                 // FEC set to variable-size frames: shorter frames allowed
  int frames_of [NF];

  logic [47:0] src_mac;
  logic [47:0] dst_mac [NF];
  logic [11:0] vid [NF];
  logic [2:0]  pcp [NF];
  bytes_t      exp_q [NF][$];
  longint      dtime [NF][$];    // per FEC and sent packet: time it was recovered, 0 if lost

  // per-FEC GFP receive state
  byte unsigned rxq [NF][$];      // payload bytes not yet delineated
  int           rxf [NF][$];      // container frame number of each byte
  bit           dhist [NF][$];    // last 43 received scrambled bits
  bit           frame_had_idle;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic void expect_pkt(input int fec, input bytes_t p);
    exp_q[fec].push_back(p);
  endfunction

  function automatic void reset_fec(input int fec);
    hist_clear(dhist[fec]);
    rxq[fec].delete();
    rxf[fec].delete();
  endfunction

  initial for (int f = 0; f < NF; f++) begin
    var_ok[f] = 0;
    hist_clear(dhist[f]);
    frames_of[f] = 0;
  end

  function automatic byte unsigned descramble(input int f, input byte unsigned b);
    byte unsigned o;
    for (int k = 7; k >= 0; k--) begin
      o[k] = b[k] ^ dhist[f][dhist[f].size() - 43];
      dhist[f].push_back(b[k]);
      void'(dhist[f].pop_front());
    end
    return o;
  endfunction

  // delineate as many GFP frames as the buffered bytes of FEC f allow
  task automatic deliver(input int f);
    forever begin
      logic [31:0] core;
      logic [15:0] pli;
      if (rxq[f].size() < 4) return;
      core = {rxq[f][0], rxq[f][1], rxq[f][2], rxq[f][3]} ^ 32'hB6AB31E0;
      pli  = core[31:16];
      check(core[15:0] == ref_hec(pli), $sformatf("cHEC of FEC %0d", f));
      if (pli == 0) begin
        if (rxf[f][0] != rxf[f][3]) cut_idles++;
        frame_had_idle = 1;
        repeat (4) begin void'(rxq[f].pop_front()); void'(rxf[f].pop_front()); end
        continue;
      end
      if (rxq[f].size() < 4 + pli) return;
      begin
        bytes_t area, pkt;
        if (rxf[f][0] != rxf[f][3 + pli]) segmented++;
        repeat (4) begin void'(rxq[f].pop_front()); void'(rxf[f].pop_front()); end
        for (int i = 0; i < pli; i++) begin
          area.push_back(descramble(f, rxq[f].pop_front()));
          void'(rxf[f].pop_front());
        end
        check({area[0], area[1]} == 16'h0001, "payload type: frame-mapped Ethernet");
        check({area[2], area[3]} == ref_hec(16'h0001), "tHEC");
        pkt = area[4:$];
        if (exp_q[f].size() == 0) begin
          check(0, $sformatf("unexpected packet on FEC %0d", f));
        end else begin
          // packets refused for lack of buffer space are skipped and counted as lost
          int k;
          k = -1;
          foreach (exp_q[f][j]) if (k < 0 && exp_q[f][j] == pkt) k = j;
          check(k >= 0, $sformatf("packet on FEC %0d is one that was sent", f));
          if (k >= 0) begin
            lost += k;
            repeat (k + 1) void'(exp_q[f].pop_front());
            repeat (k) dtime[f].push_back(0);
            dtime[f].push_back(longint'($time));
            pkts_ok++;
          end
        end
      end
    end
  endtask

  bytes_t cur;
  always @(posedge clk) if (tx_valid) begin
    if (tx_beat.sop) cur.delete();
    cur.push_back(tx_beat.data);
    if (tx_beat.eop) process(cur);
  end

  task automatic process(input bytes_t fr);
    int f;
    bytes_t body;
    f = -1;
    frames++;
    check(ref_fcs(fr[0:fr.size() - 5]) == {fr[fr.size()-1], fr[fr.size()-2], fr[fr.size()-3], fr[fr.size()-4]},
          "container FCS");
    check({fr[12], fr[13]} == 16'h8100 && {fr[16], fr[17]} == 16'h88B5, "TPID and EtherType");
    check({fr[6], fr[7], fr[8], fr[9], fr[10], fr[11]} == src_mac, "source MAC");
    for (int i = 0; i < NF; i++) if (vid[i] == {fr[14][3:0], fr[15]}) f = i;
    check(f >= 0, "VLAN ID of a connection");
    if (f < 0) return;
    if (fr.size() < PAYLOAD + 22) short_frames++;
    check(fr.size() == PAYLOAD + 22 || (var_ok[f] && fr.size() < PAYLOAD + 22 && fr.size() >= 64),
          $sformatf("container frame length %0d", fr.size()));    frames_of[f]++;
    if (last_fec >= 0 && last_fec != f) fec_switches++;
    last_fec = f;
    check(fr[14][7:5] == pcp[f], "VLAN priority of the connection");
    check({fr[0], fr[1], fr[2], fr[3], fr[4], fr[5]} == dst_mac[f], "destination MAC");
    for (int i = 18; i < fr.size() - 4; i++) begin
      rxq[f].push_back(fr[i]);
      rxf[f].push_back(frames);
    end
    frame_had_idle = 0;
    deliver(f);
    if (frame_had_idle) padded_frames++;
  endtask

endmodule
