// fau_ingress: ingress direction of the frame assembly unit (FAU), the part of an
// assembly edge node that packs client Ethernet packets into Ethernet jumbo frames
// (fixed size, or variable size per FEC) for the frame switching core.
//
// Pipeline, one byte per clock between stages:
//   eth_rx_fcs        FCS check/strip of client frames
//   idf_encoder       store-and-forward, prepends the internal (IDF) header
//   vlan_classifier   VLAN ID -> FEC, written into the IDF header
//   gfp_encoder       GFP framing with per-FEC scrambler state, buffer admission
//   fec_demux         write into the FEC's assembly buffer, drop unassigned packets
//   assembly_component x NF   threshold/timer assembly, segmentation, padding
//   rr_scheduler      round-robin choice of the ready component, chunk multiplexer
//   concatenator      continuous payload behind one frame header
//   eth_vlan_hdr_gen  Ethernet + VLAN header from the FEC's table entry
//   idf_decoder       IDF header removed
//   eth_tx_fcs        FCS appended, frame to the core link
// The management block fms holds all configuration and exposes status counters through
// an address/value register port; the UMP transport over 1G Ethernet is outside.
// Ports: client line in (byte stream with sop/eop), core line out (byte stream with
// sop/eop, no back-pressure), register port. Every container frame on the core side is
// exactly JUMBO_BYTES long (9000), except the timeout frames of a FEC set to
// variable-size frames, which are shorter and unpadded.
// The stage order and what each stage does follow the document; widths, formats and
// buffer sizes are this design's choices, described in each module.
module fau_ingress
  import fau_pkg::*;
#(
  parameter int unsigned NF           = N_FEC,
  parameter int unsigned PAYLOAD      = FRAME_PAYLOAD,
  parameter int unsigned BUF_BYTES    = 32768,
  parameter int unsigned CLK_PER_10NS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // client side (from the 10G PHY)
  input  logic        rx_valid,
  input  beat_t       rx_beat,
  // core side (to the 10G PHY)
  output logic        tx_valid,
  output beat_t       tx_beat,
  // control plane register port
  input  logic        req_valid,
  input  logic        req_write,
  input  logic [15:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata
);

  // configuration
  logic          vlan_en, jumbo_en;
  logic [47:0]   src_mac;
  cls_entry_t    cls_table [NF];
  logic [NF-1:0] gfp_clear, timer_en, var_size;
  logic [15:0]   a_len [NF];
  logic [15:0]   s_len;
  logic [31:0]   timeout [NF];
  hdr_entry_t    hdr_table [NF];
  logic [31:0]   status [9];

  // stage links
  logic  m_valid, m_err;            beat_t m_beat;
  logic  i_valid, i_ready;          beat_t i_beat;
  logic  c_valid, c_ready;          beat_t c_beat;
  logic  g_valid, g_ready;          beat_t g_beat;
  logic [NF-1:0] d_wr;  logic [7:0] d_data; logic d_last;
  logic [15:0]   fec_free [NF];
  logic [NF-1:0] a_rdy, a_grant, a_valid, a_ready, a_tmo;
  beat_t         a_beat [NF];
  logic  s_valid, s_ready;          beat_t s_beat;
  logic  k_valid, k_ready;          beat_t k_beat;
  logic  h_valid, h_ready;          beat_t h_beat;
  logic  x_valid, x_ready;          beat_t x_beat;

  logic [31:0] rx_bad, enc_drop, uncls, ovf, unassigned, ovf_dm, frames_cat, frames_tx, frames_tmo;

  fms #(.NF(NF)) u_fms (
    .clk, .rst_n, .req_valid, .req_write, .req_addr, .req_wdata, .rsp_valid, .rsp_rdata,
    .status_i(status), .vlan_en, .jumbo_en, .src_mac, .cls_table, .gfp_clear, .timer_en, .var_size,
    .timeout, .hdr_table);

  assign status[0] = rx_bad;
  assign status[1] = enc_drop;
  assign status[2] = uncls;
  assign status[3] = ovf;
  assign status[4] = unassigned;
  assign status[5] = ovf_dm;
  assign status[6] = frames_cat;
  assign status[7] = frames_tx;
  assign status[8] = frames_tmo;

  // containers sent because of the timer rather than the size threshold
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              frames_tmo <= '0;
    else if ((a_grant & a_rdy & a_tmo) != '0) frames_tmo <= frames_tmo + 32'd1;
  end

  eth_rx_fcs u_rx (
    .clk, .rst_n, .vlan_en, .jumbo_en, .in_valid(rx_valid), .in_beat(rx_beat),
    .out_valid(m_valid), .out_beat(m_beat), .out_err(m_err), .bad_frames(rx_bad));

  idf_encoder u_idf_enc (
    .clk, .rst_n, .in_valid(m_valid), .in_beat(m_beat), .in_err(m_err),
    .out_valid(i_valid), .out_ready(i_ready), .out_beat(i_beat), .dropped(enc_drop));

  vlan_classifier #(.NF(NF)) u_cls (
    .clk, .rst_n, .table_i(cls_table), .in_valid(i_valid), .in_ready(i_ready),
    .in_beat(i_beat), .out_valid(c_valid), .out_ready(c_ready), .out_beat(c_beat),
    .unclassified(uncls));

  gfp_encoder #(.NF(NF)) u_gfp (
    .clk, .rst_n, .clear_i(gfp_clear), .fec_free, .in_valid(c_valid), .in_ready(c_ready),
    .in_beat(c_beat), .out_valid(g_valid), .out_ready(g_ready), .out_beat(g_beat),
    .overflow(ovf));

  fec_demux #(.NF(NF)) u_demux (
    .clk, .rst_n, .in_valid(g_valid), .in_ready(g_ready), .in_beat(g_beat),
    .wr_en(d_wr), .wr_data(d_data), .wr_last(d_last),
    .dropped_unassigned(unassigned), .dropped_overflow(ovf_dm));

  for (genvar f = 0; f < NF; f++) begin : g_asm
    assembly_component #(
      .FEC_ID(f), .BUF_BYTES(BUF_BYTES), .PAYLOAD(PAYLOAD), .CLK_PER_10NS(CLK_PER_10NS)
    ) u_asm (
      .clk, .rst_n, .timer_en(timer_en[f]), .timeout(timeout[f]), .var_size(var_size[f]),
      .wr_en(d_wr[f]), .wr_data(d_data), .wr_last(d_last), .free_bytes(fec_free[f]),
      .frame_rdy(a_rdy[f]), .grant(a_grant[f]), .frame_by_timeout(a_tmo[f]), .frame_len(a_len[f]),
      .out_valid(a_valid[f]), .out_ready(a_ready[f]), .out_beat(a_beat[f]));
  end

  rr_scheduler #(.NF(NF)) u_sched (
    .clk, .rst_n, .req(a_rdy), .grant(a_grant), .in_valid(a_valid), .in_ready(a_ready),
    .in_beat(a_beat), .in_len(a_len), .out_valid(s_valid), .out_ready(s_ready), .out_beat(s_beat),
    .out_len(s_len));

  concatenator u_cat (
    .clk, .rst_n, .in_valid(s_valid), .in_ready(s_ready), .in_beat(s_beat), .frame_len(s_len),
    .out_valid(k_valid), .out_ready(k_ready), .out_beat(k_beat), .frames(frames_cat));

  eth_vlan_hdr_gen #(.NF(NF)) u_hdr (
    .clk, .rst_n, .table_i(hdr_table), .src_mac, .in_valid(k_valid), .in_ready(k_ready),
    .in_beat(k_beat), .out_valid(h_valid), .out_ready(h_ready), .out_beat(h_beat));

  idf_decoder u_idf_dec (
    .clk, .rst_n, .in_valid(h_valid), .in_ready(h_ready), .in_beat(h_beat),
    .out_valid(x_valid), .out_ready(x_ready), .out_beat(x_beat));

  eth_tx_fcs u_tx (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready), .in_beat(x_beat),
    .out_valid(tx_valid), .out_beat(tx_beat), .frames(frames_tx));

endmodule
