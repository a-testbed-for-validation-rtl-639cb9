// tb_fec_demux: packets for valid FECs must appear, without their IDF header, on the
// write port of their FEC; unassigned and drop-flagged packets must not be written.
module tb_fec_demux;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic [N_FEC-1:0] wr_en;
  logic [7:0] wr_data;
  logic wr_last;
  logic [31:0] dropped_unassigned, dropped_overflow;

  fec_demux dut (.*);

  bytes_t got [N_FEC];
  int lasts [N_FEC];
  always @(posedge clk) if (rst_n) for (int i = 0; i < N_FEC; i++) if (wr_en[i]) begin
    got[i].push_back(wr_data);
    if (wr_last) lasts[i]++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input bytes_t p, input logic [7:0] flags, input int fec);
    bytes_t f;
    f = {flags, 8'(fec), 8'(p.size() >> 8), 8'(p.size())};
    f = {f, p};
    foreach (f[i]) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_beat  = '{data: f[i], sop: (i == 0), eop: (i == f.size() - 1)};
      while (!in_valid) begin @(negedge clk); in_valid = 1; end
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
    bytes_t e [N_FEC];
    bytes_t p;
    int nl [N_FEC];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      int f;
      f = (k * 5) % N_FEC;
      p = make_pkt(60 + k, 12'h3, k);
      if (k % 7 == 2)      send(p, 8'h00, f);          // unassigned
      else if (k % 7 == 5) send(p, 8'hC0, f);          // refused by the encoder
      else begin send(p, 8'h80, f); e[f] = {e[f], p}; nl[f]++; end
    end
    repeat (3) @(posedge clk);
    for (int i = 0; i < N_FEC; i++) begin
      check(got[i] == e[i], $sformatf("bytes written for FEC %0d", i));
      check(lasts[i] == nl[i], $sformatf("packet ends for FEC %0d", i));
    end
    check(dropped_unassigned == 3, "unassigned counted");
    check(dropped_overflow == 3, "refused counted");
    check(in_ready, "never stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
