// idf_decoder: removes the 4-byte IDF header from each frame, leaving the plain Ethernet
// frame (without FCS) for the transmit MAC.
// The first byte after the header is marked sop. The stage adds no latency: the header
// bytes are consumed without output and the rest passes combinationally.
// Function from the document; form this design's own.
module idf_decoder
  import fau_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat
);

  logic [2:0] cnt;     // header bytes consumed, 4 = in body
  logic       first;

  always_comb begin
    in_ready     = (cnt < 3'd4) ? 1'b1 : out_ready;
    out_valid    = (cnt == 3'd4) && in_valid;
    out_beat     = in_beat;
    out_beat.sop = first;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      first <= 1'b0;
    end else if (in_valid && in_ready) begin
      if (cnt < 3'd4) begin
        cnt   <= cnt + 3'd1;
        first <= 1'b1;
      end else begin
        first <= 1'b0;
        if (in_beat.eop) cnt <= '0;
      end
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
