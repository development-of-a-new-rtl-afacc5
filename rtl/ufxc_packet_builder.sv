// ufxc_packet_builder: builds the detector data packets and deals them out
// round robin to the three link FIFOs (200 MHz domain).
//
// Whenever a chip's chunk buffer holds a whole 1024-byte chunk and the next
// link FIFO in turn has room for a whole packet, the builder writes one packet
// into that FIFO, one 16-bit word per cycle: three header words
// {image count}, {mode, counter}, {chip id, frame count}, then the 512 data
// words of the chunk, the last one flagged. A packet thus takes 515 cycles
// plus one idle cycle, i.e. 3.2 Gbit/s at 200 MHz, more than the three
// Gigabit links drain. Packets go to link 0, 1, 2, 0, ... in strict turn; the
// chips are served alternately when both have a chunk ready.
//
// Per chip the builder counts its own frame number, counter (LOW, then HIGH)
// and image number: after chunks_per_counter chunks the counter changes,
// after both counters the image count advances. `acq_begin` clears them.
// `stall_cycles` counts cycles in which a chunk was ready but the link FIFO
// in turn was too full.
//
// The header fields and codes, the 1024-byte chunk and the round-robin dispatch
// to three FIFOs follow the document. The word width, strict link order,
// alternate chip service and whole-packet admission are this design's choices.
module ufxc_packet_builder
  import ufxc_pkg::*;
#(
  parameter int PIXELS  = 65536,
  parameter int FIFO_AW = 10
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              acq_begin,
  input  acq_mode_e                         mode,
  input  logic                              mode_2bit,
  input  logic [N_CHIPS-1:0]                chunk_ready,
  input  logic [N_CHIPS-1:0][WORD_W-1:0]    rx_data,
  output logic [N_CHIPS-1:0]                rx_rd,
  input  logic [N_LINKS-1:0][FIFO_AW:0]     link_free,
  output logic [N_LINKS-1:0]                link_wr,
  output fifo_word_t                        link_data,
  output logic [31:0]                       packets,
  output logic [31:0]                       stall_cycles
);
  logic [N_CHIPS-1:0][15:0] image_cnt;
  logic [N_CHIPS-1:0]       counter_hi;
  logic [N_CHIPS-1:0][7:0]  frame_cnt;

  logic        sending;
  logic [9:0]  wcnt;
  logic        cur_chip, chip_rr;
  logic [1:0]  cur_link;
  pkt_header_t hdr;
  logic        pick_ok, pick_chip;
  logic [7:0]  last_frame;

  assign last_frame = 8'(chunks_per_counter(PIXELS, mode_2bit) - 1);

  // Chip choice: the one whose turn it is, else the other.
  always_comb begin
    pick_chip = chip_rr;
    if (!chunk_ready[chip_rr]) pick_chip = !chip_rr;
    pick_ok = |chunk_ready && (link_free[cur_link] >= (FIFO_AW+1)'(PKT_WORDS));
  end

  always_comb begin
    link_wr         = '0;
    rx_rd           = '0;
    link_data.last  = sending && (wcnt == 10'(PKT_WORDS - 1));
    link_data.data  = rx_data[cur_chip];
    unique case (wcnt)
      10'd0:   link_data.data = hdr.image;
      10'd1:   link_data.data = {hdr.mode, hdr.counter};
      10'd2:   link_data.data = {hdr.chip, hdr.frame};
      default: link_data.data = rx_data[cur_chip];
    endcase
    if (sending) begin
      link_wr[cur_link] = 1'b1;
      if (wcnt >= 10'(HDR_WORDS)) rx_rd[cur_chip] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      image_cnt    <= '0;
      counter_hi   <= '0;
      frame_cnt    <= '0;
      sending      <= 1'b0;
      wcnt         <= '0;
      cur_chip     <= 1'b0;
      chip_rr      <= 1'b0;
      cur_link     <= '0;
      hdr          <= '0;
      packets      <= '0;
      stall_cycles <= '0;
    end else if (acq_begin) begin
      image_cnt  <= '0;
      counter_hi <= '0;
      frame_cnt  <= '0;
      chip_rr    <= 1'b0;
      cur_link   <= '0;
      sending    <= 1'b0;
      wcnt       <= '0;
    end else if (!sending) begin
      if (pick_ok) begin
        sending     <= 1'b1;
        wcnt        <= '0;
        cur_chip    <= pick_chip;
        hdr.image   <= image_cnt[pick_chip];
        hdr.mode    <= mode;
        hdr.counter <= counter_hi[pick_chip] ? COUNTER_HIGH : COUNTER_LOW;
        hdr.chip    <= chip_id(32'(pick_chip));
        hdr.frame   <= frame_cnt[pick_chip];
      end else if (|chunk_ready) begin
        stall_cycles <= stall_cycles + 1'b1;
      end
    end else begin
      wcnt <= wcnt + 1'b1;
      if (wcnt == 10'(PKT_WORDS - 1)) begin
        sending  <= 1'b0;
        packets  <= packets + 1'b1;
        chip_rr  <= !cur_chip;
        cur_link <= (cur_link == 2'(N_LINKS - 1)) ? 2'd0 : cur_link + 1'b1;
        if (frame_cnt[cur_chip] == last_frame) begin
          frame_cnt[cur_chip]  <= '0;
          counter_hi[cur_chip] <= !counter_hi[cur_chip];
          if (counter_hi[cur_chip]) image_cnt[cur_chip] <= image_cnt[cur_chip] + 1'b1;
        end else begin
          frame_cnt[cur_chip] <= frame_cnt[cur_chip] + 1'b1;
        end
      end
    end
  end

  initial assert ((1 << FIFO_AW) >= PKT_WORDS)
    else $error("link FIFOs must hold a whole packet");

  a_one_link: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(link_wr));
  a_data_present: assert property (@(posedge clk) disable iff (!rst_n)
                                   (sending && wcnt == 10'(HDR_WORDS)) |-> chunk_ready[cur_chip]);
endmodule
