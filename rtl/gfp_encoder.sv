// gfp_encoder: Generic Framing Procedure (ITU-T G.7041) encoder shared by all FECs.
//
// Every classified packet is wrapped in a frame-mapped GFP client data frame:
//   core header    PLI (16 bit, payload area length = packet + 4) and cHEC (CRC-16 of PLI),
//                  XORed with 0xB6AB31E0
//   payload header type 0x0001 (frame-mapped Ethernet, no extension) and tHEC
//   payload        the client packet
// The payload area (payload header and packet) is scrambled with the self-synchronous
// x^43+1 scrambler. The scrambler runs on as one continuous stream per FEC, so its 43-bit
// state is kept per FEC in a state memory: loaded when a packet of that FEC starts and
// written back when it ends. A pulse on clear_i[f] zeroes FEC f's state; the control plane
// does this before a new connection (A in the FAU block diagram).
// The encoder also admits the packet to its assembly buffer: if the FEC's buffer has fewer
// than length+8 free bytes, the packet is not encoded (the scrambler state is untouched)
// and leaves flagged drop, so the stream of that FEC stays a valid GFP stream.
// Unclassified packets pass unchanged and are dropped after the encoder.
// The document gives GFP encoding, its per-FEC state and the clear operation; the choice
// of the scrambler as that state and the admission check are this design's reading.
// Timing: the 4-byte IDF header is collected first, then 4 IDF + 8 GFP header bytes are
// sent while the input waits; the packet then streams through at one byte per clock.
module gfp_encoder
  import fau_pkg::*;
#(
  parameter int unsigned NF = N_FEC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [NF-1:0] clear_i,
  input  logic [15:0] fec_free [NF],   // free bytes in each assembly buffer
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output logic [31:0] overflow         // packets refused for lack of buffer space
);

  typedef enum logic [2:0] {S_HDR, S_IDF, S_CORE, S_PHDR, S_PAY} state_e;
  state_e state;

  logic [42:0] st_mem [NF];
  logic [42:0] scr;
  logic [7:0]  hdr [4];
  logic [1:0]  cnt;
  logic        enc;              // this packet is GFP encoded
  logic [FEC_W-1:0] fec;

  idf_flags_t  in_fl;
  logic [15:0] pkt_len, pli, out_len;
  logic [31:0] core_hdr, pay_hdr;
  logic [50:0] scr_res;
  logic [7:0]  pay_in;

  assign in_fl    = idf_flags_t'(hdr[0]);
  assign pkt_len  = {hdr[2], hdr[3]};
  assign pli      = pkt_len + 16'd4;
  assign out_len  = enc ? pkt_len + 16'(GFP_OVERHEAD) : pkt_len;
  assign core_hdr = {pli, hec16(pli)} ^ GFP_CORE_XOR;
  assign pay_hdr  = {GFP_TYPE_ETH, hec16(GFP_TYPE_ETH)};

  always_comb begin
    pay_in = (state == S_PHDR) ? pay_hdr[8*(3-int'(cnt)) +: 8] : in_beat.data;
    scr_res = scramble_byte(scr, pay_in);
  end

  always_comb begin
    idf_flags_t f;
    f = in_fl;
    f.drop = in_fl.drop | (in_fl.fec_valid & ~enc);
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_beat  = '0;
    case (state)
      S_HDR: in_ready = 1'b1;
      S_IDF: begin
        out_valid = 1'b1;
        out_beat.sop = (cnt == 2'd0);
        case (cnt)
          2'd0: out_beat.data = f;
          2'd1: out_beat.data = hdr[1];
          2'd2: out_beat.data = out_len[15:8];
          default: out_beat.data = out_len[7:0];
        endcase
      end
      S_CORE: begin
        out_valid     = 1'b1;
        out_beat.data = core_hdr[8*(3-int'(cnt)) +: 8];
      end
      S_PHDR: begin
        out_valid     = 1'b1;
        out_beat.data = scr_res[7:0];
      end
      default: begin
        out_valid     = in_valid;
        in_ready      = out_ready;
        out_beat.eop  = in_beat.eop;
        out_beat.data = enc ? scr_res[7:0] : in_beat.data;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_HDR;
      cnt      <= '0;
      enc      <= 1'b0;
      fec      <= '0;
      scr      <= '0;
      overflow <= '0;
      for (int i = 0; i < 4; i++) hdr[i] <= '0;
      for (int i = 0; i < NF; i++) st_mem[i] <= '0;
    end else begin
      for (int i = 0; i < NF; i++) if (clear_i[i]) st_mem[i] <= '0;
      case (state)
        S_HDR: if (in_valid) begin
          hdr[cnt] <= in_beat.data;
          cnt <= cnt + 2'd1;
          if (cnt == 2'd3) begin
            // decide on the complete header (byte 3 arrives now)
            logic [15:0] l;
            logic [FEC_W-1:0] f;
            logic ok;
            l  = {hdr[2], in_beat.data};
            f  = FEC_W'(hdr[1]);
            ok = in_fl.fec_valid && !in_fl.drop && (int'(f) < NF) &&
                 (fec_free[f] >= l + 16'(GFP_OVERHEAD));
            enc <= ok;
            fec <= f;
            scr <= (int'(f) < NF) ? st_mem[f] : '0;
            if (in_fl.fec_valid && !ok) overflow <= overflow + 32'd1;
            state <= S_IDF;
          end
        end
        S_IDF: if (out_ready) begin
          cnt <= cnt + 2'd1;
          if (cnt == 2'd3) state <= enc ? S_CORE : S_PAY;
        end
        S_CORE: if (out_ready) begin
          cnt <= cnt + 2'd1;
          if (cnt == 2'd3) state <= S_PHDR;
        end
        S_PHDR: if (out_ready) begin
          cnt <= cnt + 2'd1;
          scr <= scr_res[50:8];
          if (cnt == 2'd3) state <= S_PAY;
        end
        default: if (in_valid && out_ready) begin
          if (enc) scr <= scr_res[50:8];
          if (in_beat.eop) begin
            if (enc && !clear_i[fec]) st_mem[fec] <= scr_res[50:8];
            state <= S_HDR;
          end
        end
      endcase
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
