// eth_vlan_hdr_gen: turns a container payload into an Ethernet jumbo frame by putting an
// Ethernet header with VLAN tag in front of it.
//
// The FEC number in the frame's IDF header selects an entry of the per-FEC table written
// by the control plane (C in the FAU block diagram): destination MAC, VLAN ID and the
// 3-bit VLAN priority that carries the connection's service class. The source MAC is the
// FAU port's own address. The 18 header bytes are
//   destination MAC (6), source MAC (6), TPID 0x8100, TCI {PCP, DEI=0, VID}, EtherType
// The IDF header is passed on with its length increased by 18.
// Fields and their sources follow the document; the EtherType of the container frames is
// not given there, and the IEEE local experimental value 0x88B5 is used.
// Timing: 4 IDF bytes are collected, then 4 + 18 bytes are sent while the input waits,
// then the payload streams at one byte per clock.
module eth_vlan_hdr_gen
  import fau_pkg::*;
#(
  parameter int unsigned NF = N_FEC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  hdr_entry_t  table_i [NF],
  input  logic [47:0] src_mac,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat
);

  typedef enum logic [1:0] {S_IN, S_OUT, S_PAY} state_e;
  state_e      state;
  logic [7:0]  idf [4];
  logic [1:0]  icnt;
  logic [4:0]  ocnt;           // 0..3 IDF, 4..21 Ethernet header

  hdr_entry_t  ent;
  logic [15:0] len_out;
  logic [15:0] tci;
  logic [8*ETH_HDR_BYTES-1:0] eth;
  assign ent     = (int'(idf[1]) < NF) ? table_i[idf[1][FEC_W-1:0]] : '0;
  assign len_out = {idf[2], idf[3]} + 16'(ETH_HDR_BYTES);
  assign tci     = {ent.pcp, 1'b0, ent.vid};
  assign eth     = {ent.dst_mac, src_mac, TPID_VLAN, tci, FS_ETHERTYPE};

  always_comb begin
    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_beat  = '0;
    case (state)
      S_IN: in_ready = 1'b1;
      S_OUT: begin
        out_valid    = 1'b1;
        out_beat.sop = (ocnt == 5'd0);
        case (ocnt)
          5'd0:    out_beat.data = idf[0];
          5'd1:    out_beat.data = idf[1];
          5'd2:    out_beat.data = len_out[15:8];
          5'd3:    out_beat.data = len_out[7:0];
          default: out_beat.data = eth[8*(ETH_HDR_BYTES - 1 - (int'(ocnt) - 4)) +: 8];
        endcase
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
      state <= S_IN;
      icnt  <= '0;
      ocnt  <= '0;
      for (int i = 0; i < 4; i++) idf[i] <= '0;
    end else begin
      case (state)
        S_IN: if (in_valid) begin
          idf[icnt] <= in_beat.data;
          icnt <= icnt + 2'd1;
          if (icnt == 2'd3) begin
            ocnt  <= '0;
            state <= S_OUT;
          end
        end
        S_OUT: if (out_ready) begin
          ocnt <= ocnt + 5'd1;
          if (ocnt == 5'(IDF_HDR_BYTES + ETH_HDR_BYTES - 1)) state <= S_PAY;
        end
        default: if (in_valid && out_ready && in_beat.eop) state <= S_IN;
      endcase
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
