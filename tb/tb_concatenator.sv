// tb_concatenator: frames made of one to three chunks enter; the output must be one IDF
// frame header (FEC, payload length) followed by the chunk bodies back to back. The
// length comes from frame_len: full-size frames of P bytes and one shorter
// variable-size frame.
module tb_concatenator;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  localparam int P = 40;
  logic [15:0] frame_len = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready;
  beat_t in_beat = '0;
  logic out_valid, out_ready;
  beat_t out_beat;
  logic [31:0] frames;

  concatenator dut (.*);

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

  task automatic put(input byte unsigned d, input bit sop, input bit eop);
    @(negedge clk);
    in_valid = 1;
    in_beat  = '{data: d, sop: sop, eop: eop};
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  // frame of FEC fec split into chunks of the given lengths
  task automatic send_frame(input int fec, input int l[$]);
    bytes_t e;
    int n = 0, len = 0;
    foreach (l[c]) len += l[c];
    frame_len = 16'(len);
    e = {8'hBC, 8'(fec), 8'(len >> 8), 8'(len)};
    for (int i = 0; i < len; i++) e.push_back(8'(fec * 50 + i));
    exp_q.push_back(e);
    foreach (l[c]) begin
      logic [7:0] fl;
      fl = {1'b1, 1'b0, (c == 1) ? 2'd1 : 2'd2, (c == 0), (c == l.size() - 1), 2'b00};
      put(fl, c == 0, 0);
      put(8'(fec), 0, 0);
      put(8'(l[c] >> 8), 0, 0);
      put(8'(l[c]), 0, 0);
      for (int i = 0; i < l[c]; i++) begin
        byte unsigned d;
        d = 8'(fec * 50 + n);
        n++;
        put(d, 0, (c == l.size() - 1) && (i == l[c] - 1));
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(3, '{40});
    send_frame(1, '{2, 30, 8});
    send_frame(6, '{25, 15});
    send_frame(0, '{1, 39});
    send_frame(5, '{2, 17});              // variable-size frame, no pad
    send_frame(4, '{300, 4});             // length above 255
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(n_out == 6 && frames == 6, "six frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
