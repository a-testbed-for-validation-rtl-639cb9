// assembly_component: collects the GFP-encoded packets of one FEC and cuts them into
// fixed-size container payloads (combined threshold and timer based assembly).
//
// Buffer: a circular byte buffer of BUF_BYTES written by the FEC demultiplexer. The
// control block watches its fill level. A frame is ready when
//   threshold: buffered bytes fill a whole payload of PAYLOAD bytes, or
//   timeout:   the timer is enabled, `timeout` is not 0, at least one complete packet
//              is buffered and the timer has counted `timeout` units of 10 ns since data
//              was last sent or first arrived in an empty buffer. A timeout of 0 means
//              pure threshold based assembly, as the document signals it.
// When the round-robin scheduler grants the link, the component sends exactly PAYLOAD
// bytes as up to three chunks, each behind its own IDF header:
//   lead  the remaining bytes of a GFP idle frame cut at the end of the previous payload
//   data  buffered GFP bytes; on a threshold frame this cuts (segments) a packet at the
//         payload border, the rest follows in the next frame
//   pad   GFP idle frames (0xB6AB31E0 after core-header scrambling) filling a timeout
//         frame up to PAYLOAD bytes; a pad may end in the middle of an idle frame
// With var_size set (variable-size frames), a timeout frame carries no pad and is only as
// long as the data it holds; threshold frames stay PAYLOAD bytes long, so PAYLOAD is then
// the largest frame. frame_len gives the length of the frame being sent, from the grant
// to its last byte.
// A timeout frame sends only complete packets, so padding never lands inside a packet.
// Threshold, timer in 10 ns units, timer on/off (B in the FAU block diagram), segmentation
// and padding follow the document. The chunk format, the idle-frame padding and the
// buffer size are this design's choices.
// Interface: byte write port (no back-pressure; the encoder admits only what fits),
// free_bytes for that admission, frame_rdy/grant to the scheduler, valid/ready chunk
// stream out (sop on the first header byte, eop on the last byte of the frame).
module assembly_component
  import fau_pkg::*;
#(
  parameter int unsigned FEC_ID       = 0,
  parameter int unsigned BUF_BYTES    = 32768,          // power of two, >= PAYLOAD + largest GFP packet
  parameter int unsigned PAYLOAD      = FRAME_PAYLOAD,  // bytes per container payload
  parameter int unsigned CLK_PER_10NS = 1               // clock cycles per timer unit
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        timer_en,
  input  logic [31:0] timeout,
  input  logic        var_size,           // variable-size frames: timeout frames unpadded
  // from the demultiplexer
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  input  logic        wr_last,
  output logic [15:0] free_bytes,
  // scheduler
  output logic        frame_rdy,
  input  logic        grant,
  output logic        frame_by_timeout,   // ready came from the timer (status)
  output logic [15:0] frame_len,          // payload length of the frame being sent
  // chunk stream to the concatenator
  output logic        out_valid,
  input  logic        out_ready,
  output beat_t       out_beat
);

  localparam int unsigned AW = $clog2(BUF_BYTES);
  localparam int unsigned DW = $clog2(CLK_PER_10NS + 1);

  logic [7:0]  mem [BUF_BYTES];
  logic [AW:0] wr_ptr, rd_ptr, fill, partial, committed;
  logic [1:0]  idle_phase;          // idle-frame bytes already sent of a cut idle frame
  logic [31:0] tcnt;
  logic [DW-1:0] pre;
  logic [15:0] lead;

  assign fill       = wr_ptr - rd_ptr;
  assign committed  = fill - partial;
  assign free_bytes = 16'(BUF_BYTES) - 16'(fill);
  assign lead       = (idle_phase == 2'd0) ? 16'd0 : 16'd4 - 16'(idle_phase);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_BODY} state_e;
  state_e state;

  logic thr_rdy, tmo_rdy;
  assign thr_rdy   = (32'(fill) + 32'(lead)) >= 32'(PAYLOAD);
  assign tmo_rdy   = timer_en && (timeout != '0) && (committed != '0) && (tcnt >= timeout);
  assign frame_rdy = (state == S_IDLE) && (thr_rdy || tmo_rdy);
  assign frame_by_timeout = frame_rdy && !thr_rdy;

  // chunk bookkeeping
  logic [15:0] clen [3];            // lead, data, pad
  logic [1:0]  ci, cfirst, clast;
  logic [1:0]  hcnt;
  logic [15:0] bcnt;
  logic [1:0]  lead_phase;          // idle byte index where the lead starts

  idf_flags_t fl;
  logic [7:0] idle_byte;
  always_comb begin
    logic [1:0] j;
    fl = '0;
    fl.fec_valid = 1'b1;
    fl.kind  = (ci == 2'd1) ? IDF_DATA : IDF_PAD;
    fl.first = (ci == cfirst);
    fl.last  = (ci == clast);
    j = (ci == 2'd0) ? lead_phase + bcnt[1:0] : bcnt[1:0];
    idle_byte = GFP_CORE_XOR[8*(3-int'(j)) +: 8];
  end

  always_comb begin
    out_valid = (state != S_IDLE);
    out_beat  = '0;
    if (state == S_HDR) begin
      out_beat.sop = (hcnt == 2'd0) && (ci == cfirst);
      case (hcnt)
        2'd0:    out_beat.data = fl;
        2'd1:    out_beat.data = 8'(FEC_ID);
        2'd2:    out_beat.data = clen[ci][15:8];
        default: out_beat.data = clen[ci][7:0];
      endcase
    end else if (state == S_BODY) begin
      out_beat.data = (ci == 2'd1) ? mem[rd_ptr[AW-1:0]] : idle_byte;
      out_beat.eop  = (ci == clast) && (bcnt == clen[ci] - 16'd1);
    end
  end

  // write side
  always_ff @(posedge clk) if (wr_en) mem[wr_ptr[AW-1:0]] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      partial <= '0;
    end else if (wr_en) begin
      wr_ptr  <= wr_ptr + 1'b1;
      partial <= wr_last ? '0 : partial + 1'b1;
    end
  end

  // timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt <= '0;
      pre  <= '0;
    end else if (state != S_IDLE || fill == '0 || (grant && frame_rdy)) begin
      tcnt <= '0;
      pre  <= '0;
    end else if (pre == DW'(CLK_PER_10NS - 1)) begin
      pre <= '0;
      if (tcnt != '1) tcnt <= tcnt + 32'd1;
    end else begin
      pre <= pre + 1'b1;
    end
  end

  // frame transmission
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rd_ptr     <= '0;
      idle_phase <= '0;
      lead_phase <= '0;
      ci         <= '0;
      cfirst     <= '0;
      clast      <= '0;
      hcnt       <= '0;
      bcnt       <= '0;
      frame_len  <= '0;
      for (int i = 0; i < 3; i++) clen[i] <= '0;
    end else begin
      case (state)
        S_IDLE: if (grant && frame_rdy) begin
          logic [15:0] nd, np;
          if (thr_rdy) begin
            nd = 16'(PAYLOAD) - lead;
            np = 16'd0;
          end else begin
            nd = 16'(committed);
            np = var_size ? 16'd0 : 16'(PAYLOAD) - lead - 16'(committed);
          end
          frame_len  <= lead + nd + np;
          clen[0]    <= lead;
          clen[1]    <= nd;
          clen[2]    <= np;
          lead_phase <= idle_phase;
          cfirst     <= (lead != 0) ? 2'd0 : (nd != 0) ? 2'd1 : 2'd2;
          clast      <= (np != 0) ? 2'd2 : (nd != 0) ? 2'd1 : 2'd0;
          ci         <= (lead != 0) ? 2'd0 : (nd != 0) ? 2'd1 : 2'd2;
          idle_phase <= np[1:0];
          hcnt       <= '0;
          bcnt       <= '0;
          state      <= S_HDR;
        end
        S_HDR: if (out_ready) begin
          hcnt <= hcnt + 2'd1;
          if (hcnt == 2'd3) state <= S_BODY;
        end
        default: if (out_ready) begin
          if (ci == 2'd1) rd_ptr <= rd_ptr + 1'b1;
          if (bcnt == clen[ci] - 16'd1) begin
            bcnt <= '0;
            if (ci == clast) begin
              state <= S_IDLE;
            end else begin
              // next non-empty chunk
              ci    <= (ci == 2'd0 && clen[1] != 0) ? 2'd1 : 2'd2;
              state <= S_HDR;
            end
          end else begin
            bcnt <= bcnt + 16'd1;
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
