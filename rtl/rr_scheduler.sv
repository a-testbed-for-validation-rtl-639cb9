// rr_scheduler: assigns the single outgoing link to the assembly components that have a
// frame ready, in round-robin order.
//
// When no frame is in flight, the scheduler grants the first requesting component after
// the one served last and keeps the grant until the last byte of that frame (eop) has
// been accepted downstream. While granted, the component's chunk stream is switched
// through to the concatenator, together with its frame length (in_len/out_len). One idle
// clock separates two frames.
// Round robin and the scheduler's place follow the document; the frame-granular grant
// and the multiplexer inside the scheduler are this design's choices.
module rr_scheduler
  import fau_pkg::*;
#(
  parameter int unsigned NF = N_FEC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NF-1:0] req,
  output logic [NF-1:0] grant,
  input  logic [NF-1:0] in_valid,
  output logic [NF-1:0] in_ready,
  input  beat_t         in_beat [NF],
  input  logic [15:0]   in_len [NF],
  output logic          out_valid,
  input  logic          out_ready,
  output beat_t         out_beat,
  output logic [15:0]   out_len
);

  localparam int unsigned IW = (NF > 1) ? $clog2(NF) : 1;

  logic          busy;
  logic [IW-1:0] cur;     // granted (or last granted) component

  // next requester after cur, cyclically
  logic          found;
  logic [IW-1:0] nxt;
  always_comb begin
    found = 1'b0;
    nxt   = cur;
    for (int k = 1; k <= NF; k++) begin
      int unsigned c;
      c = (int'(cur) + k) % NF;
      if (!found && req[c]) begin
        found = 1'b1;
        nxt   = IW'(c);
      end
    end
  end

  always_comb begin
    grant     = '0;
    in_ready  = '0;
    out_valid = 1'b0;
    out_beat  = '0;
    out_len   = in_len[cur];
    if (busy) begin
      grant[cur]    = 1'b1;
      out_valid     = in_valid[cur];
      out_beat      = in_beat[cur];
      in_ready[cur] = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= IW'(NF - 1);
    end else if (!busy) begin
      if (found) begin
        busy <= 1'b1;
        cur  <= nxt;
      end
    end else if (out_valid && out_ready && out_beat.eop) begin
      busy <= 1'b0;
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
