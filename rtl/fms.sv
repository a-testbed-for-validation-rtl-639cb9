// fms: FPGA management system, the FAU's register interface to the control plane.
//
// The control plane reads and writes FAU registers as address/value pairs (the document's
// UMP protocol rests on such pairs). This block decodes one request per clock and answers
// reads one clock later. Register map (32-bit words, word addresses):
//   0x0000  MAC control     [0] VLAN support on, [1] jumbo support on      (reset 0x3)
//   0x0001  source MAC      bits 47:32 in [15:0]
//   0x0002  source MAC      bits 31:0
//   0x0010 + i, i < 9       status counter i (read only, from status_i)
//   0x0100 + 16*f + r       FEC f, f < NF:
//     r=0  classifier entry  [12] enable, [11:0] VLAN ID            (D)
//     r=1  GFP state clear   any write clears FEC f's encoder state   (A)
//     r=2  assembly control  [0] timer based assembly on             (B)
//                            [1] variable-size frames (timeout frames unpadded)
//     r=3  timeout           in units of 10 ns                       (B)
//     r=4  header entry      [14:12] VLAN priority, [11:0] VLAN ID    (C)
//     r=5  destination MAC   bits 47:32 in [15:0]                    (C)
//     r=6  destination MAC   bits 31:0                               (C)
//     r=7  resource state    [0] FEC in use; kept for the control plane's gateway,
//                            which records here which FECs hold a connection
// The configuration items and their meaning follow the document; the address map, the
// reset values and the request/response port are this design's own (the UMP frame format
// is not given, so UMP framing over the 1G Ethernet port is not part of this block).
// All FECs reset disabled with timers off.
module fms
  import fau_pkg::*;
#(
  parameter int unsigned NF = N_FEC
) (
  input  logic          clk,
  input  logic          rst_n,
  // address/value requests
  input  logic          req_valid,
  input  logic          req_write,
  input  logic [15:0]   req_addr,
  input  logic [31:0]   req_wdata,
  output logic          rsp_valid,
  output logic [31:0]   rsp_rdata,
  // status
  input  logic [31:0]   status_i [9],
  // configuration
  output logic          vlan_en,
  output logic          jumbo_en,
  output logic [47:0]   src_mac,
  output cls_entry_t    cls_table [NF],
  output logic [NF-1:0] gfp_clear,
  output logic [NF-1:0] timer_en,
  output logic [NF-1:0] var_size,
  output logic [31:0]   timeout [NF],
  output hdr_entry_t    hdr_table [NF]
);

  logic [NF-1:0] fec_used;   // resource state, only read back
  logic        is_fec;
  logic [3:0]  reg_sel;
  localparam int unsigned IW = (NF > 1) ? $clog2(NF) : 1;
  logic [IW-1:0] fec_sel;
  assign is_fec  = (req_addr[15:8] != 8'h00) && ((req_addr - 16'h0100) < 16'(16 * NF));
  assign fec_sel = IW'((req_addr - 16'h0100) >> 4);
  assign reg_sel = req_addr[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vlan_en   <= 1'b1;
      jumbo_en  <= 1'b1;
      src_mac   <= '0;
      gfp_clear <= '0;
      timer_en  <= '0;
      var_size  <= '0;
      fec_used  <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      for (int i = 0; i < NF; i++) begin
        cls_table[i] <= '0;
        timeout[i]   <= '0;
        hdr_table[i] <= '0;
      end
    end else begin
      gfp_clear <= '0;
      rsp_valid <= req_valid && !req_write;
      if (req_valid && req_write) begin
        if (req_addr == 16'h0000) {jumbo_en, vlan_en} <= req_wdata[1:0];
        if (req_addr == 16'h0001) src_mac[47:32] <= req_wdata[15:0];
        if (req_addr == 16'h0002) src_mac[31:0]  <= req_wdata;
        if (is_fec) begin
          case (reg_sel)
            4'd0: cls_table[fec_sel] <= '{en: req_wdata[12], vid: req_wdata[11:0]};
            4'd1: gfp_clear[fec_sel] <= 1'b1;
            4'd2: begin
              timer_en[fec_sel] <= req_wdata[0];
              var_size[fec_sel] <= req_wdata[1];
            end
            4'd3: timeout[fec_sel]   <= req_wdata;
            4'd4: begin
              hdr_table[fec_sel].pcp <= req_wdata[14:12];
              hdr_table[fec_sel].vid <= req_wdata[11:0];
            end
            4'd5: hdr_table[fec_sel].dst_mac[47:32] <= req_wdata[15:0];
            4'd6: hdr_table[fec_sel].dst_mac[31:0]  <= req_wdata;
            4'd7: fec_used[fec_sel]  <= req_wdata[0];
            default: ;
          endcase
        end
      end
      if (req_valid && !req_write) begin
        rsp_rdata <= '0;
        if (req_addr == 16'h0000) rsp_rdata <= {30'd0, jumbo_en, vlan_en};
        if (req_addr == 16'h0001) rsp_rdata <= {16'd0, src_mac[47:32]};
        if (req_addr == 16'h0002) rsp_rdata <= src_mac[31:0];
        if (req_addr[15:3] == 13'h0002) rsp_rdata <= status_i[{1'b0, req_addr[2:0]}];
        if (req_addr == 16'h0018)       rsp_rdata <= status_i[8];
        if (is_fec) begin
          case (reg_sel)
            4'd0: rsp_rdata <= {19'd0, cls_table[fec_sel].en, cls_table[fec_sel].vid};
            4'd2: rsp_rdata <= {30'd0, var_size[fec_sel], timer_en[fec_sel]};
            4'd3: rsp_rdata <= timeout[fec_sel];
            4'd4: rsp_rdata <= {17'd0, hdr_table[fec_sel].pcp, hdr_table[fec_sel].vid};
            4'd5: rsp_rdata <= {16'd0, hdr_table[fec_sel].dst_mac[47:32]};
            4'd6: rsp_rdata <= hdr_table[fec_sel].dst_mac[31:0];
            4'd7: rsp_rdata <= {31'd0, fec_used[fec_sel]};
            default: ;
          endcase
        end
      end
    end
  end

endmodule
