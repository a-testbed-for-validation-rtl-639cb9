// eth_tx_fcs: transmit side of the core-facing 10G Ethernet MAC of the FAU.
//
// Passes each frame to the line and appends the 4-byte Ethernet FCS (CRC-32, sent low
// byte first) behind its last byte. While the FCS is sent the input is held off, and one
// idle clock follows each frame. The line side has no back-pressure.
// Appending the FCS follows the document; the rest is this design's choice.
module eth_tx_fcs
  import fau_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_beat,
  output logic        out_valid,
  output beat_t       out_beat,
  output logic [31:0] frames
);

  logic [31:0] crc;
  logic [2:0]  fcnt;       // 0: data, 1..4: FCS byte, 5: gap
  logic [31:0] fcs;
  logic [31:0] crc_next;

  assign crc_next = crc32_byte(in_beat.sop ? 32'hFFFFFFFF : crc, in_beat.data);
  assign fcs      = ~crc;
  assign in_ready = (fcnt == 3'd0);

  always_comb begin
    out_valid = 1'b0;
    out_beat  = '0;
    if (fcnt == 3'd0) begin
      out_valid    = in_valid;
      out_beat     = in_beat;
      out_beat.eop = 1'b0;
    end else if (fcnt <= 3'd4) begin
      out_valid     = 1'b1;
      out_beat.data = fcs[8*(int'(fcnt) - 1) +: 8];
      out_beat.eop  = (fcnt == 3'd4);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc    <= '1;
      fcnt   <= '0;
      frames <= '0;
    end else if (fcnt == 3'd0) begin
      if (in_valid) begin
        crc <= crc_next;
        if (in_beat.eop) fcnt <= 3'd1;
      end
    end else begin
      fcnt <= (fcnt == 3'd5) ? 3'd0 : fcnt + 3'd1;
      if (fcnt == 3'd4) frames <= frames + 32'd1;
    end
  end

endmodule
