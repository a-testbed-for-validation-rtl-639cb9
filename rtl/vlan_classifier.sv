// vlan_classifier: assigns each client packet to a forwarding equivalent class (FEC).
//
// Packets arrive in IDF form. The classifier holds the IDF header and the first 16 packet
// bytes (destination and source MAC, TPID, TCI), reads the 12-bit VLAN ID from a is_tagged
// packet (TPID 0x8100) and compares it with the N_FEC table entries set by the control
// plane (D in the FAU block diagram). On a hit it writes the FEC number and sets the FEC
// valid flag in the IDF header; otherwise the packet leaves with the flag clear and is
// dropped in the assembly stage. The lowest matching entry wins. Because the table is
// read when a packet is classified, clearing an entry stops that FEC's traffic from the
// next packet on, which is how the control plane opens and closes a connection.
// The document gives the function (VLAN ID to FEC, result kept in the IDF header); the
// look-ahead buffer and table form are this design's choices.
// Timing: the first output byte follows the 20th input byte (or the end of a shorter
// packet) by one clock; afterwards one byte per clock with ready passed through.
module vlan_classifier
  import fau_pkg::*;
#(
  parameter int unsigned NF = N_FEC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cls_entry_t  table_i [NF],
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output logic [31:0] unclassified
);

  localparam int unsigned HOLD = IDF_HDR_BYTES + 16;

  typedef enum logic [1:0] {S_COLLECT, S_EMIT, S_PASS} state_e;
  state_e      state;
  logic [7:0]  hold [HOLD];
  logic [4:0]  cnt;        // bytes collected
  logic [4:0]  idx;        // bytes emitted
  logic        ended;      // packet ended inside the held bytes

  // classification of the held header
  logic        hit;
  logic [FEC_W-1:0] fec;
  logic [11:0] vid;
  logic        is_tagged;
  always_comb begin
    is_tagged = (cnt == 5'(HOLD)) && ({hold[16], hold[17]} == TPID_VLAN);
    vid    = {hold[18][3:0], hold[19]};
    hit    = 1'b0;
    fec    = '0;
    for (int i = NF - 1; i >= 0; i--) begin
      if (is_tagged && table_i[i].en && table_i[i].vid == vid) begin
        hit = 1'b1;
        fec = FEC_W'(i);
      end
    end
  end

  logic [7:0] hdr0;
  always_comb begin
    idf_flags_t f;
    f = idf_flags_t'(hold[0]);
    f.fec_valid = hit;
    hdr0 = f;
  end

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_beat  = '0;
    case (state)
      S_COLLECT: in_ready = 1'b1;
      S_EMIT: begin
        out_valid     = 1'b1;
        out_beat.sop  = (idx == 5'd0);
        out_beat.eop  = ended && (idx == cnt - 5'd1);
        out_beat.data = (idx == 5'd0) ? hdr0 :
                        (idx == 5'd1) ? (hit ? 8'(fec) : 8'h00) : hold[idx];
      end
      default: begin
        in_ready  = out_ready;
        out_valid = in_valid;
        out_beat  = in_beat;
        out_beat.sop = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_COLLECT;
      cnt   <= '0;
      idx   <= '0;
      ended <= 1'b0;
      unclassified <= '0;
      for (int i = 0; i < HOLD; i++) hold[i] <= '0;
    end else begin
      case (state)
        S_COLLECT: if (in_valid) begin
          hold[cnt] <= in_beat.data;
          cnt <= cnt + 5'd1;
          if (in_beat.eop || cnt == 5'(HOLD - 1)) begin
            ended <= in_beat.eop;
            idx   <= '0;
            state <= S_EMIT;
          end
        end
        S_EMIT: if (out_ready) begin
          if (idx == 5'd0 && !hit) unclassified <= unclassified + 32'd1;
          if (idx == cnt - 5'd1) begin
            if (ended) begin
              state <= S_COLLECT;
              cnt   <= '0;
            end else begin
              state <= S_PASS;
            end
          end
          idx <= idx + 5'd1;
        end
        default: if (in_valid && out_ready && in_beat.eop) begin
          state <= S_COLLECT;
          cnt   <= '0;
        end
      endcase
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
