// fau_pkg: types, constants and functions shared by the frame assembly unit (FAU)
// ingress pipeline.
//
// All stages move one byte per clock over a valid/ready handshake; a beat carries the
// byte plus start-of-packet and end-of-packet marks (beat_t). Between the IDF encoder and
// the IDF decoder every packet, chunk and frame starts with a 4-byte internal data format
// (IDF) header:
//   byte 0  flags: [7] FEC valid, [6] drop/error, [5:4] kind, [3] first chunk of a frame,
//           [2] last chunk of a frame, [1:0] zero
//   byte 1  FEC number (0 .. N_FEC-1)
//   byte 2  length of what follows the header, bits 15:8
//   byte 3  length, bits 7:0
// The document names the IDF and its header but not its layout; this layout is this
// design's own. The CRC and scrambler functions follow the Ethernet and ITU-T G.7041 (GFP)
// standards that the document relies on.
package fau_pkg;

  // Seven FECs per direction, as built in the prototype.
  localparam int unsigned N_FEC = 7;
  localparam int unsigned FEC_W = 3;

  // Container: fixed-size Ethernet jumbo frame of 9 KByte, taken as 9000 bytes on the wire
  // from destination address to FCS. Ethernet header with VLAN tag is 18 bytes, FCS 4 bytes.
  localparam int unsigned JUMBO_BYTES  = 9000;
  localparam int unsigned ETH_HDR_BYTES = 18;
  localparam int unsigned FCS_BYTES     = 4;
  localparam int unsigned FRAME_PAYLOAD = JUMBO_BYTES - ETH_HDR_BYTES - FCS_BYTES; // 8978

  localparam int unsigned IDF_HDR_BYTES = 4;
  localparam int unsigned GFP_OVERHEAD  = 8;   // core header + payload header

  localparam logic [15:0] TPID_VLAN      = 16'h8100;
  // EtherType of the container frames: IEEE local experimental EtherType.
  localparam logic [15:0] FS_ETHERTYPE   = 16'h88B5;
  // GFP core header scrambling pattern and client payload type (frame-mapped Ethernet).
  localparam logic [31:0] GFP_CORE_XOR   = 32'hB6AB31E0;
  localparam logic [15:0] GFP_TYPE_ETH   = 16'h0001;

  typedef enum logic [1:0] {
    IDF_PACKET = 2'd0,   // one client packet
    IDF_DATA   = 2'd1,   // chunk of buffered GFP bytes inside a frame
    IDF_PAD    = 2'd2,   // chunk of GFP idle bytes inside a frame
    IDF_FRAME  = 2'd3    // a complete container payload
  } idf_kind_e;

  typedef struct packed {
    logic [7:0] data;
    logic       sop;
    logic       eop;
  } beat_t;

  typedef struct packed {
    logic       fec_valid;
    logic       drop;
    idf_kind_e  kind;
    logic       first;
    logic       last;
    logic [1:0] rsvd;
  } idf_flags_t;

  // Per-FEC header generator entry (C in the FAU block diagram).
  typedef struct packed {
    logic [11:0] vid;
    logic [2:0]  pcp;
    logic [47:0] dst_mac;
  } hdr_entry_t;

  // Per-FEC classifier entry (D in the FAU block diagram).
  typedef struct packed {
    logic        en;
    logic [11:0] vid;
  } cls_entry_t;

  // CRC-16 of GFP header error checks: x^16 + x^12 + x^5 + 1, MSB first, preset 0.
  function automatic logic [15:0] crc16_byte(input logic [15:0] crc, input logic [7:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  function automatic logic [15:0] hec16(input logic [15:0] field);
    return crc16_byte(crc16_byte(16'h0000, field[15:8]), field[7:0]);
  endfunction

  // Ethernet CRC-32, bit-reflected form (LSB of each byte first), register preset to all
  // ones. The FCS is the inverted register, sent low byte first. Running the check over
  // a frame including its FCS leaves the register at CRC32_RESIDUE.
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB20E3;
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = c[0] ^ d[i];
      c  = {1'b0, c[31:1]};
      if (fb) c = c ^ 32'hEDB88320;
    end
    return c;
  endfunction

  // GFP payload scrambler, self-synchronous x^43 + 1, bits MSB first. The state is the
  // last 43 scrambled bits, newest in bit 0. Returns {new_state, scrambled_byte}.
  function automatic logic [50:0] scramble_byte(input logic [42:0] st, input logic [7:0] d);
    logic [42:0] s;
    logic [7:0]  q;
    s = st;
    for (int i = 7; i >= 0; i--) begin
      q[i] = d[i] ^ s[42];
      s    = {s[41:0], q[i]};
    end
    return {s, q};
  endfunction

endpackage
