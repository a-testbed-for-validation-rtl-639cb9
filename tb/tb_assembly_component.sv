// tb_assembly_component: drives one assembly component with a reduced payload size and
// acts as its scheduler. Checks threshold frames (with a packet segmented across two
// frames), timeout frames padded with GFP idle bytes, the idle bytes carried over into
// the next frame, the chunk headers, and the time from the first byte to a timeout.
// A variable-size timeout frame carries only its data, no padding. frame_len is checked
// against every frame.
module tb_assembly_component;
  import fau_pkg::*;
  import fau_tb_pkg::*;

  localparam int P = 200;
  localparam int DIV = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic timer_en = 0, var_size = 0;
  logic [15:0] frame_len;
  logic [31:0] timeout = 0;
  logic wr_en = 0, wr_last = 0;
  logic [7:0] wr_data = 0;
  logic [15:0] free_bytes;
  logic frame_rdy, grant = 0, frame_by_timeout;
  logic out_valid, out_ready;
  beat_t out_beat;

  assembly_component #(.FEC_ID(5), .BUF_BYTES(512), .PAYLOAD(P), .CLK_PER_10NS(DIV)) dut (.*);

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference state
  byte unsigned wq[$];     // written, not yet sent
  int  committed = 0;      // bytes of complete packets in wq
  int  phase = 0;          // idle bytes already sent of a cut idle frame
  byte unsigned idle[4] = '{8'hB6, 8'hAB, 8'h31, 8'hE0};
  int  n_thr = 0, n_tmo = 0;

  task automatic write_pkt(input int n, input int seed);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en = 1; wr_data = 8'(seed + 3 * i); wr_last = (i == n - 1);
      wq.push_back(wr_data);
    end
    committed = wq.size();
    @(negedge clk);
    wr_en = 0; wr_last = 0;
  endtask

  // grant one frame and compare everything it sends
  task automatic take_frame();
    byte unsigned exp_body[$], got_body[$];
    int lead, nd, np, kinds[$], lens[$];
    byte unsigned hdr[$];
    bit thr;
    wait (frame_rdy);
    @(negedge clk);
    lead = (phase == 0) ? 0 : 4 - phase;
    thr  = (wq.size() + lead >= P);
    check(frame_by_timeout == !thr, "timeout flag");
    for (int i = 0; i < lead; i++) exp_body.push_back(idle[phase + i]);
    if (thr) begin nd = P - lead; np = 0; n_thr++; end
    else     begin nd = committed; np = var_size ? 0 : P - lead - nd; n_tmo++; end
    for (int i = 0; i < nd; i++) exp_body.push_back(wq.pop_front());
    committed = (committed > nd) ? committed - nd : 0;
    for (int i = 0; i < np; i++) exp_body.push_back(idle[i % 4]);
    phase = np % 4;
    grant = 1;
    // collect chunks
    forever begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (hdr.size() < 4) begin
          hdr.push_back(out_beat.data);
          if (hdr.size() == 4) begin
            if (kinds.size() == 0)
              check(frame_len == 16'(lead + nd + np), $sformatf("frame_len %0d", frame_len));
            kinds.push_back(hdr[0][5:4]);
            lens.push_back({hdr[2], hdr[3]});
            check(hdr[0][7] == 1 && hdr[1] == 8'd5, "chunk header flags and FEC");
            check(hdr[0][3] == (kinds.size() == 1), "first-chunk flag");
          end
        end else begin
          got_body.push_back(out_beat.data);
          if (got_body.size() == lens.sum()) begin
            check(hdr[0][2] == out_beat.eop, "last-chunk flag matches frame end");
            hdr.delete();
          end
          if (out_beat.eop) break;
        end
      end
    end
    @(negedge clk);
    grant = 0;
    check(got_body.size() == lead + nd + np, $sformatf("frame payload size %0d", got_body.size()));
    check(var_size || got_body.size() == P, "fixed-size frame is full size");
    check(got_body == exp_body, "frame payload bytes");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // threshold only: 3 x 90 bytes; first frame cuts the third packet
    write_pkt(90, 1); write_pkt(90, 2);
    repeat (50) @(posedge clk);
    check(!frame_rdy, "no frame below threshold with timer off");
    check(free_bytes == 16'(512 - 180), "free bytes");
    write_pkt(90, 3);
    take_frame();
    check(wq.size() == 70, "segment of the third packet left");
    // timer on with timeout 0 is pure threshold assembly: nothing leaves
    timer_en = 1; timeout = 0;
    repeat (200) @(posedge clk);
    check(!frame_rdy, "timeout 0 sends no timeout frame");
    // timer on: the 70 left bytes go out after the timeout, padded
    timer_en = 1; timeout = 20;
    t0 = $time / 10;
    take_frame();
    t1 = $time / 10;
    // add 2 more packets; threshold frame starts with the rest of the cut idle frame
    timer_en = 0;
    write_pkt(120, 4); write_pkt(100, 5);
    take_frame();
    // timeout measured from the first byte in an empty buffer
    timer_en = 1; timeout = 30;
    repeat (3) @(posedge clk);
    take_frame();                     // 20 bytes left, timeout
    t0 = $time / 10;
    write_pkt(33, 6);
    wait (frame_rdy);
    t1 = $time / 10;
    check(t1 - t0 >= 30 * DIV - 2 && t1 - t0 <= 30 * DIV + 4,
          $sformatf("timeout after %0d cycles", t1 - t0));
    take_frame();
    check(n_thr == 2 && n_tmo == 3, "two threshold and three timeout frames");
    // variable-size frames: a timeout frame is only as long as its data
    var_size = 1;
    write_pkt(45, 7); write_pkt(23, 8);
    take_frame();
    check(n_tmo == 4 && phase == 0 && wq.size() == 0, "variable-size timeout frame, no pad");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
