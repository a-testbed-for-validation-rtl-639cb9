// concatenator: joins the chunks of one frame into a continuous container payload.
//
// The granted assembly component sends a frame as chunks (lead idle bytes, packet data,
// padding), each behind an IDF header. The concatenator removes the chunk headers and
// sends the chunk bodies back to back, behind a single IDF frame header carrying the
// FEC number and the payload length, which the header generator uses. The length comes
// from the granted assembly component (frame_len, sampled with the first chunk header
// byte): the full container payload, or less for an unpadded variable-size frame.
// With a byte-wide datapath the chunks need no realignment; in a wider datapath this is
// where the alignment the document mentions would happen.
// The stage's role follows the document; the header formats are this design's choice.
// Timing: per chunk the 4 header bytes are consumed in 4 clocks; before the first chunk
// the 4 frame header bytes are sent while the input waits; bodies stream at one byte per
// clock.
module concatenator
  import fau_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  input  logic [15:0] frame_len,     // payload length of the frame, valid with its first chunk
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output logic [31:0] frames
);

  typedef enum logic [1:0] {S_CHDR, S_FHDR, S_BODY} state_e;
  state_e     state;
  logic [1:0] cnt;
  logic [7:0] fec;
  logic       first_chunk;
  logic [15:0] clen, bcnt;

  idf_flags_t ffl;
  logic [15:0] plen;
  always_comb begin
    ffl = '0;
    ffl.fec_valid = 1'b1;
    ffl.kind  = IDF_FRAME;
    ffl.first = 1'b1;
    ffl.last  = 1'b1;
  end

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_beat  = '0;
    case (state)
      S_CHDR: in_ready = 1'b1;
      S_FHDR: begin
        out_valid    = 1'b1;
        out_beat.sop = (cnt == 2'd0);
        case (cnt)
          2'd0:    out_beat.data = ffl;
          2'd1:    out_beat.data = fec;
          2'd2:    out_beat.data = plen[15:8];
          default: out_beat.data = plen[7:0];
        endcase
      end
      default: begin
        in_ready  = out_ready;
        out_valid = in_valid;
        out_beat.data = in_beat.data;
        out_beat.eop  = in_beat.eop;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_CHDR;
      cnt         <= '0;
      fec         <= '0;
      plen        <= '0;
      first_chunk <= 1'b0;
      frames      <= '0;
      clen        <= '0;
      bcnt        <= '0;
    end else begin
      case (state)
        S_CHDR: if (in_valid) begin
          cnt <= cnt + 2'd1;
          if (cnt == 2'd0) first_chunk <= in_beat.sop;
          if (cnt == 2'd0 && in_beat.sop) plen <= frame_len;
          if (cnt == 2'd1) fec <= in_beat.data;
          if (cnt == 2'd2) clen[15:8] <= in_beat.data;
          if (cnt == 2'd3) begin
            clen[7:0] <= in_beat.data;
            bcnt      <= '0;
            state     <= first_chunk ? S_FHDR : S_BODY;
          end
        end
        S_FHDR: if (out_ready) begin
          cnt <= cnt + 2'd1;
          if (cnt == 2'd3) state <= S_BODY;
        end
        default: if (in_valid && out_ready) begin
          if (in_beat.eop) frames <= frames + 32'd1;
          // a chunk ends when its length is used up
          if (in_beat.eop || bcnt == clen - 16'd1) state <= S_CHDR;
          bcnt <= bcnt + 16'd1;
        end
      endcase
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
