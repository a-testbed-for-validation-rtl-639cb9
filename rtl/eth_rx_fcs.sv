// eth_rx_fcs: receive side of the client-facing 10G Ethernet MAC of the FAU.
//
// Receives frames byte by byte from the line (no back-pressure, as on a real link),
// checks the frame check sequence and forwards each frame without its 4 FCS bytes, as
// the FAU's first pipeline stage does. The frame is delayed by four bytes: byte k leaves
// when byte k+4 arrives, so when the last FCS byte arrives the last payload byte leaves,
// marked eop and, if the frame is bad, err. A frame is bad if its CRC-32 residue is wrong,
// if it is shorter than 64 bytes, or longer than the maximum set by the control plane:
// 1518 bytes, plus 4 with VLAN support on, or 9018 (+4) with jumbo support on.
// Frames of 4 bytes or less produce no output at all; they are only counted.
// The FCS check and the VLAN/jumbo settings follow the document; the length limits
// are standard Ethernet values chosen here. Latency: 4 bytes.
module eth_rx_fcs
  import fau_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        vlan_en,
  input  logic        jumbo_en,
  // line side
  input  logic        in_valid,
  input  beat_t       in_beat,
  // client side
  output logic        out_valid,
  output beat_t       out_beat,
  output logic        out_err,        // with out_beat.eop: frame must be discarded
  // status
  output logic [31:0] bad_frames
);

  logic [7:0]  dly [4];
  logic [2:0]  fill;          // bytes held in the delay line (saturates at 4)
  logic        first_pend;    // next byte leaving is the first of the frame
  logic [31:0] crc;
  logic [15:0] len;

  logic [31:0] crc_next;
  logic [15:0] len_next;
  logic [15:0] max_len;
  logic        frame_bad;

  always_comb begin
    crc_next = crc32_byte(in_beat.sop ? 32'hFFFFFFFF : crc, in_beat.data);
    len_next = in_beat.sop ? 16'd1 : len + 16'd1;
    max_len  = (jumbo_en ? 16'd9018 : 16'd1518) + (vlan_en ? 16'd4 : 16'd0);
    frame_bad = (crc_next != CRC32_RESIDUE) || (len_next < 16'd64) || (len_next > max_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill       <= '0;
      first_pend <= 1'b0;
      crc        <= '1;
      len        <= '0;
      out_valid  <= 1'b0;
      out_beat   <= '0;
      out_err    <= 1'b0;
      bad_frames <= '0;
      for (int i = 0; i < 4; i++) dly[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_err   <= 1'b0;
      if (in_valid) begin
        crc <= crc_next;
        len <= len_next;
        dly[0] <= in_beat.data;
        for (int i = 1; i < 4; i++) dly[i] <= dly[i-1];
        if (in_beat.sop) begin
          fill       <= 3'd1;
          first_pend <= 1'b1;
        end else begin
          if (fill == 3'd4) begin
            out_valid      <= 1'b1;
            out_beat.data  <= dly[3];
            out_beat.sop   <= first_pend;
            out_beat.eop   <= in_beat.eop;
            out_err        <= in_beat.eop && frame_bad;
            first_pend     <= 1'b0;
          end else begin
            fill <= fill + 3'd1;
          end
        end
        if (in_beat.eop) begin
          fill <= '0;
          if (frame_bad) bad_frames <= bad_frames + 32'd1;
        end
      end
    end
  end

endmodule
