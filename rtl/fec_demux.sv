// fec_demux: distributes encoded packets to the assembly components, one per FEC.
//
// The 4-byte IDF header of each packet is read and removed; the GFP bytes that follow are
// written into the buffer of the packet's FEC, one byte per clock, with the last byte
// marked so the component knows where complete packets end. A packet whose FEC is not
// valid (not assigned to any connection) or that the encoder flagged drop (no buffer
// space) is consumed and discarded; both cases are counted. Space in the target buffer
// has already been checked by the encoder, so the stage never stalls.
// The document places this demultiplexer before the assembly components and says that
// unassigned packets are dropped there; the write port form is this design's choice.
module fec_demux
  import fau_pkg::*;
#(
  parameter int unsigned NF = N_FEC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  beat_t         in_beat,
  output logic [NF-1:0] wr_en,
  output logic [7:0]    wr_data,
  output logic          wr_last,
  output logic [31:0]   dropped_unassigned,
  output logic [31:0]   dropped_overflow
);

  logic [1:0]       hcnt;
  logic             in_body;
  logic             pass;
  logic [FEC_W-1:0] fec;
  idf_flags_t       fl;

  assign in_ready = 1'b1;
  assign fl       = idf_flags_t'(in_beat.data);
  assign wr_data  = in_beat.data;
  assign wr_last  = in_beat.eop;

  always_comb begin
    wr_en = '0;
    if (in_valid && in_body && pass) wr_en[fec] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt    <= '0;
      in_body <= 1'b0;
      pass    <= 1'b0;
      fec     <= '0;
      dropped_unassigned <= '0;
      dropped_overflow   <= '0;
    end else if (in_valid) begin
      if (!in_body) begin
        hcnt <= hcnt + 2'd1;
        if (hcnt == 2'd0) begin
          pass <= fl.fec_valid && !fl.drop;
          if (!fl.fec_valid)  dropped_unassigned <= dropped_unassigned + 32'd1;
          else if (fl.drop)   dropped_overflow   <= dropped_overflow + 32'd1;
        end
        if (hcnt == 2'd1) begin
          fec <= FEC_W'(in_beat.data);
          if (int'(in_beat.data) >= NF) pass <= 1'b0;
        end
        if (hcnt == 2'd3) in_body <= 1'b1;
      end
      if (in_body && in_beat.eop) begin
        in_body <= 1'b0;
        hcnt    <= '0;
      end
    end
  end

endmodule
