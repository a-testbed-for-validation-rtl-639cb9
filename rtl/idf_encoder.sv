// idf_encoder: converts received packets into the internal data format (IDF).
//
// The stage prepends a 4-byte IDF header to every packet (see fau_pkg). The header holds
// the packet length, which later stages need up front (the GFP core header carries it),
// so the stage stores each packet completely before sending it on: a circular packet
// buffer of BUF_BYTES bytes plus a queue of LEN_DEPTH lengths. A packet that arrives
// marked bad by the MAC, or that does not fit in the buffer or length queue, is
// discarded by rewinding the write pointer, and counted. The FEC field is left invalid;
// the VLAN classifier fills it in.
// The document says only that this stage adds an IDF header; the store-and-forward
// buffer and its sizes are this design's choices.
// Input: one byte per clock, no back-pressure. Output: valid/ready byte stream; the first
// header byte carries sop, the last packet byte eop.
module idf_encoder
  import fau_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 16384,   // power of two, holds one maximum jumbo
  parameter int unsigned LEN_DEPTH = 256      // power of two
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  beat_t       in_beat,
  input  logic        in_err,
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat,
  output logic [31:0] dropped
);

  localparam int unsigned AW = $clog2(BUF_BYTES);
  localparam int unsigned LW = $clog2(LEN_DEPTH);

  logic [7:0]  mem  [BUF_BYTES];
  logic [15:0] lenq [LEN_DEPTH];

  logic [AW:0] wr_ptr, wr_start, rd_ptr;
  logic [LW:0] lq_wr, lq_rd;
  logic [15:0] wr_len;
  logic        wr_bad;          // current incoming packet is being discarded

  // read side
  logic        busy;
  logic [15:0] rd_len;          // bytes of the current packet
  logic [15:0] rd_cnt;          // index over header + packet
  logic        lq_full, lq_empty;

  assign lq_full  = (lq_wr - lq_rd) == (LW+1)'(LEN_DEPTH);
  assign lq_empty = (lq_wr == lq_rd);

  // write side ------------------------------------------------------------------
  logic [AW:0] p_pos, p_next;     // write position of this byte, pointer after it
  logic        w_store, bad_next, commit;
  logic [15:0] len_next;
  always_comb begin
    logic bad;
    p_pos    = in_beat.sop ? wr_start : wr_ptr;   // a new packet restarts at the commit point
    bad      = in_beat.sop ? 1'b0 : wr_bad;
    len_next = in_beat.sop ? 16'd0 : wr_len;
    w_store  = in_valid && !bad && ((p_pos - rd_ptr) < (AW+1)'(BUF_BYTES));
    p_next   = p_pos;
    if (w_store) begin
      p_next   = p_pos + 1'b1;
      len_next = len_next + 16'd1;
    end else begin
      bad = 1'b1;
    end
    commit   = in_valid && in_beat.eop && !bad && !in_err && !lq_full;
    if (in_valid && in_beat.eop && !commit) p_next = wr_start;   // rewind
    bad_next = bad && !in_beat.eop;
  end

  always_ff @(posedge clk) begin
    if (w_store) mem[p_pos[AW-1:0]] <= in_beat.data;
    if (commit)  lenq[lq_wr[LW-1:0]] <= len_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      wr_start <= '0;
      wr_len   <= '0;
      wr_bad   <= 1'b0;
      lq_wr    <= '0;
      dropped  <= '0;
    end else if (in_valid) begin
      wr_ptr <= p_next;
      wr_bad <= bad_next;
      wr_len <= len_next;
      if (commit) begin
        lq_wr    <= lq_wr + 1'b1;
        wr_start <= p_next;
      end
      if (in_beat.eop && !commit) dropped <= dropped + 32'd1;
    end
  end

  // read side -------------------------------------------------------------------
  idf_flags_t fl;
  always_comb begin
    fl      = '0;
    fl.kind = IDF_PACKET;
    out_valid = busy;
    out_beat  = '0;
    out_beat.sop = (rd_cnt == 16'd0);
    out_beat.eop = (rd_cnt == rd_len + 16'(IDF_HDR_BYTES) - 16'd1);
    case (rd_cnt)
      16'd0:   out_beat.data = fl;
      16'd1:   out_beat.data = 8'h00;
      16'd2:   out_beat.data = rd_len[15:8];
      16'd3:   out_beat.data = rd_len[7:0];
      default: out_beat.data = mem[rd_ptr[AW-1:0]];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      rd_len <= '0;
      rd_cnt <= '0;
      rd_ptr <= '0;
      lq_rd  <= '0;
    end else if (!busy) begin
      if (!lq_empty) begin
        busy   <= 1'b1;
        rd_len <= lenq[lq_rd[LW-1:0]];
        lq_rd  <= lq_rd + 1'b1;
        rd_cnt <= '0;
      end
    end else if (out_ready) begin
      if (rd_cnt >= 16'(IDF_HDR_BYTES)) rd_ptr <= rd_ptr + 1'b1;
      if (out_beat.eop) busy <= 1'b0;
      else              rd_cnt <= rd_cnt + 16'd1;
    end
  end

  // handshake rule: a beat once offered stays offered, unchanged, until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_beat))
    else $error("%m: output beat withdrawn or changed before it was taken");

endmodule
