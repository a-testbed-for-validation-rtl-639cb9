// fau_tb_pkg: reference models shared by the FAU testbenches. They are written
// independently of the RTL functions: CRC-32 with the non-reflected polynomial on
// bit-reversed data, CRC-16 bit by bit on a bit queue, and the GFP scrambler as a
// bit-serial history queue.
package fau_tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] rev32(input logic [31:0] v);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  // Ethernet FCS value (as a 32-bit number; transmitted low byte first).
  function automatic logic [31:0] ref_fcs(input bytes_t b);
    logic [31:0] c;
    c = 32'hFFFFFFFF;
    foreach (b[k]) begin
      for (int i = 0; i < 8; i++) begin          // LSB of each byte first
        logic bit_in;
        bit_in = b[k][i];
        if (c[31] ^ bit_in) c = (c << 1) ^ 32'h04C11DB7;
        else                c = c << 1;
      end
    end
    return ~rev32(c);
  endfunction

  function automatic bytes_t add_fcs(input bytes_t b);
    logic [31:0] f;
    bytes_t r;
    f = ref_fcs(b);
    r = b;
    for (int i = 0; i < 4; i++) r.push_back(f[8*i +: 8]);
    return r;
  endfunction

  // GFP HEC: CRC-16 x^16+x^12+x^5+1, preset 0, MSB first
  function automatic logic [15:0] ref_hec(input logic [15:0] v);
    logic [15:0] c;
    c = 0;
    for (int i = 15; i >= 0; i--) begin
      if (c[15] ^ v[i]) c = (c << 1) ^ 16'h1021;
      else              c = c << 1;
    end
    return c;
  endfunction

  // Client frame with VLAN tag, without FCS. Payload bytes derived from seed.
  function automatic bytes_t make_pkt(input int len, input logic [11:0] vid, input int seed);
    bytes_t b;
    for (int i = 0; i < 6; i++) b.push_back(8'h02 + i);              // dst
    for (int i = 0; i < 6; i++) b.push_back(8'h10 + i);              // src
    b.push_back(8'h81); b.push_back(8'h00);
    b.push_back({4'h0, vid[11:8]}); b.push_back(vid[7:0]);
    b.push_back(8'h08); b.push_back(8'h00);
    while (b.size() < len) b.push_back(8'((seed * 31 + b.size() * 7) ^ (b.size() >> 3)));
    return b;
  endfunction

  // GFP encoding of one packet for a FEC stream: core header, payload header, payload;
  // payload area scrambled with the bit-serial x^43+1 history in hist (oldest first).
  function automatic bytes_t ref_gfp(input bytes_t p, ref bit hist[$]);
    bytes_t r, area;
    logic [15:0] pli;
    logic [31:0] core;
    pli  = 16'(p.size() + 4);
    core = {pli, ref_hec(pli)} ^ 32'hB6AB31E0;
    for (int i = 3; i >= 0; i--) r.push_back(core[8*i +: 8]);
    area.push_back(8'h00); area.push_back(8'h01);
    area.push_back(ref_hec(16'h0001) >> 8); area.push_back(ref_hec(16'h0001) & 8'hFF);
    foreach (p[i]) area.push_back(p[i]);
    foreach (area[i]) begin
      byte unsigned o;
      for (int k = 7; k >= 0; k--) begin
        bit s;
        s = area[i][k] ^ hist[hist.size() - 43];
        o[k] = s;
        hist.push_back(s);
        void'(hist.pop_front());
      end
      r.push_back(o);
    end
    return r;
  endfunction

  function automatic void hist_clear(ref bit hist[$]);
    hist.delete();
    for (int i = 0; i < 43; i++) hist.push_back(1'b0);
  endfunction

endpackage
