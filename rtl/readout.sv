// readout: buffers time tags and streams them to the host link one byte at a time.
//
// The publication sends each measurement live to a PC over a byte-wide parallel USB link
// (Digilent DPTI) and histograms it there. That link is not part of this design. Its
// side is a plain valid/ready byte stream: a byte moves on a clock edge where tx_valid
// and tx_ready are both 1. Each tag leaves as TAG_W/8 bytes, least significant byte
// first. A DEPTH-entry FIFO absorbs triggers that come faster than the link drains
// them. A tag that arrives while the FIFO is full is dropped and counted in dropped,
// which saturates. The FIFO, the byte order and the drop policy are this design's
// choices: the publication says only that the codes are read out live.
// Timing: a tag written in cycle n can appear on tx_data from cycle n+1.
module readout
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned DROP_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tag_valid,
  input  tag_t              tag,
  output logic [7:0]        tx_data,
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [DROP_W-1:0] dropped
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NBYTES = TAG_W / 8;
  localparam int unsigned AW = $clog2(DEPTH);

  tag_t           mem [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [AW:0]    fill;
  localparam int unsigned BW = $clog2(NBYTES);
  localparam logic [BW-1:0] LAST_BYTE = BW'(NBYTES - 1);
  logic [BW-1:0]  byte_idx;
  logic           push, pop;
  logic [TAG_W-1:0] head;

  assign head     = mem[rd_ptr];
  assign tx_valid = (fill != 0);
  assign tx_data  = head[byte_idx*8 +: 8];
  assign push     = tag_valid && (fill != (AW+1)'(DEPTH));
  assign pop      = tx_valid && tx_ready && (byte_idx == LAST_BYTE);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= tag;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      fill     <= '0;
      byte_idx <= '0;
      dropped  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      fill <= fill + (AW+1)'(push) - (AW+1)'(pop);
      if (tx_valid && tx_ready) byte_idx <= (byte_idx == LAST_BYTE) ? '0 : byte_idx + 1'b1;
      if (tag_valid && !push && dropped != '1) dropped <= dropped + 1'b1;
    end
  end

  // Stream rule: once offered, a byte stays until taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

  initial assert (DEPTH == 2**AW && TAG_W % 8 == 0) else $error("DEPTH must be a power of two");
endmodule
