// tb_fms: writes every configuration register through the address/value port, checks
// the configuration outputs and the read-back values, the one-clock clear pulse, status
// reads, and that writes outside the map change nothing.
module tb_fms;
  import fau_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_write = 0;
  logic [15:0] req_addr = 0;
  logic [31:0] req_wdata = 0;
  logic rsp_valid;
  logic [31:0] rsp_rdata;
  logic [31:0] status_i [9];
  logic vlan_en, jumbo_en;
  logic [47:0] src_mac;
  cls_entry_t cls_table [N_FEC];
  logic [N_FEC-1:0] gfp_clear, timer_en, var_size;
  logic [31:0] timeout [N_FEC];
  hdr_entry_t hdr_table [N_FEC];

  fms dut (.*);

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
    check(rsp_valid, "read answered one clock later");
    d = rsp_rdata;
  endtask

  int clear_pulses [N_FEC];
  always @(posedge clk) if (rst_n) for (int i = 0; i < N_FEC; i++) if (gfp_clear[i]) clear_pulses[i]++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    foreach (status_i[i]) status_i[i] = 32'h1000 + i;
    foreach (clear_pulses[i]) clear_pulses[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(vlan_en && jumbo_en, "MAC support on after reset");
    check(cls_table[0].en == 0 && timer_en == '0, "FECs off after reset");
    wr(16'h0000, 32'h1);
    wr(16'h0001, 32'h0002);
    wr(16'h0002, 32'hA0B0C0D0);
    for (int f = 0; f < N_FEC; f++) begin
      wr(16'h0100 + 16'(16 * f) + 0, 32'h1000 | (32'h10 + f));
      wr(16'h0100 + 16'(16 * f) + 2, 32'(f % 2) | (32'(f % 3 == 1) << 1));
      wr(16'h0100 + 16'(16 * f) + 3, 32'd1000 * f);
      wr(16'h0100 + 16'(16 * f) + 4, 32'((f << 12) | (12'h200 + f)));
      wr(16'h0100 + 16'(16 * f) + 5, 32'h0A00 + f);
      wr(16'h0100 + 16'(16 * f) + 6, 32'h11223300 + f);
      wr(16'h0100 + 16'(16 * f) + 7, 32'(f % 3 == 0));
    end
    wr(16'h0100 + 16 * 4 + 1, 32'h1);           // clear GFP state of FEC 4
    wr(16'h0100 + 16 * 7 + 0, 32'h1FFF);        // outside the map (FEC 7 does not exist)
    repeat (2) @(negedge clk);
    check(vlan_en && !jumbo_en, "MAC control written");
    check(src_mac == 48'h0002_A0B0C0D0, "source MAC");
    for (int f = 0; f < N_FEC; f++) begin
      check(cls_table[f].en && cls_table[f].vid == 12'(12'h10 + f), $sformatf("classifier entry %0d", f));
      check(timer_en[f] == (f % 2) && timeout[f] == 32'd1000 * f, $sformatf("timer of %0d", f));
      check(var_size[f] == (f % 3 == 1), $sformatf("frame size mode of %0d", f));
      rd(16'h0100 + 16'(16 * f) + 2, d);
      check(d == (32'(f % 2) | (32'(f % 3 == 1) << 1)), "assembly control read back");
      check(hdr_table[f].pcp == 3'(f) && hdr_table[f].vid == 12'(12'h200 + f), $sformatf("VLAN of %0d", f));
      check(hdr_table[f].dst_mac == {16'h0A00 + 16'(f), 32'h11223300 + 32'(f)}, $sformatf("dst MAC of %0d", f));
      check(clear_pulses[f] == ((f == 4) ? 1 : 0), $sformatf("clear pulses of %0d", f));
      rd(16'h0100 + 16'(16 * f) + 3, d);
      check(d == 32'd1000 * f, "timeout read back");
      rd(16'h0100 + 16'(16 * f) + 0, d);
      check(d == (32'h1000 | (32'h10 + f)), "classifier read back");
      rd(16'h0100 + 16'(16 * f) + 7, d);
      check(d == 32'(f % 3 == 0), "resource state read back");
    end
    rd(16'h0013, d);
    check(d == 32'h1003, "status register 3");
    rd(16'h0018, d);
    check(d == 32'h1008, "status register 8");
    rd(16'h0000, d);
    check(d == 32'h1, "MAC control read back");
    // tear down FEC 2: classifier entry removed, then timer switched on
    wr(16'h0120, 32'h0);
    wr(16'h0122, 32'h1);
    @(negedge clk);
    check(!cls_table[2].en && timer_en[2], "teardown writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
