// ufxc_readout_rx: detector data retrieval for one UFXC32k chip (200 MHz).
//
// After `rd_start` the receiver reads both counters of every pixel of its
// chip: 2 * PIXELS * bits data bits, bits = 14, or 2 when `mode_2bit` is set.
// The chip drives LANES parallel data lines. Each cycle in which the
// receiver raises `det_strobe` requests the next LANES bits; the chip shows
// them on `det_data` in the following cycle, where they are sampled.
// WORD_W / LANES samples, first in the upper bits, form one 16-bit word,
// which is written into a chunk buffer (sync_fifo of FIFO_WORDS words).
// The strobe is held back while the buffer cannot take the words already
// requested, so the readout is paced by the packet builder downstream:
// one strobe per cycle (LANES bits per cycle) while there is room.
//
// Downstream: `chunk_ready` is high while at least one whole 1024-byte chunk
// (512 words) is buffered; `rd_en` pops the word shown on `rd_data`.
// `busy` is high from the cycle after `rd_start` until the last word is in
// the buffer. Counter LOW of all pixels comes first, then counter HIGH.
//
// Retrieving the detector data in chunks in the 200 MHz domain follows the
// document. The lane count, strobe protocol, one-cycle data latency and
// counter order stand in for the chip's own serial protocol, which the
// document does not give.
module ufxc_readout_rx
  import ufxc_pkg::*;
#(
  parameter int PIXELS     = 65536,
  parameter int LANES      = 8,
  parameter int FIFO_WORDS = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_start,
  input  logic              mode_2bit,
  output logic              det_strobe,
  input  logic [LANES-1:0]  det_data,
  output logic              busy,
  output logic              chunk_ready,
  input  logic              rd_en,
  output logic [WORD_W-1:0] rd_data,
  output logic [$clog2(FIFO_WORDS):0] level
);
  localparam int SPW = WORD_W / LANES;   // strobes per word
  localparam int SW  = 32;
  localparam int FW  = $clog2(FIFO_WORDS) + 1;

  logic [SW-1:0]          strobes_left;        // strobes still to issue
  logic [SW-1:0]          samples_left;        // samples still to receive
  logic                   sample;              // det_data valid this cycle
  logic [WORD_W-LANES-1:0] shreg;             // earlier samples of a word
  logic [$clog2(SPW+1)-1:0] nsamp;
  logic                   push;
  logic [WORD_W-1:0]      push_data;
  logic [FW-1:0]          fifo_count;

  // A strobe is issued only while the buffer has room for every word that
  // can still be on its way (sample in flight, partial word, pending write).
  localparam int MARGIN = 4;
  logic room;
  assign room = (fifo_count < FW'(FIFO_WORDS - MARGIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobes_left <= '0;
      samples_left <= '0;
      det_strobe   <= 1'b0;
      sample       <= 1'b0;
      shreg        <= '0;
      nsamp        <= '0;
      push         <= 1'b0;
      push_data    <= '0;
      busy         <= 1'b0;
    end else begin
      push   <= 1'b0;
      sample <= det_strobe;
      if (rd_start) begin
        strobes_left <= SW'(2 * PIXELS * counter_bits(mode_2bit) / LANES);
        samples_left <= SW'(2 * PIXELS * counter_bits(mode_2bit) / LANES);
        det_strobe   <= 1'b0;
        nsamp        <= '0;
        busy         <= 1'b1;
      end else begin
        det_strobe <= (strobes_left - SW'(det_strobe) != '0) && room;
        if (det_strobe) strobes_left <= strobes_left - 1'b1;
        if (sample) begin
          samples_left <= samples_left - 1'b1;
          shreg <= (WORD_W-LANES)'({shreg, det_data});
          if (nsamp == ($bits(nsamp))'(SPW - 1)) begin
            nsamp     <= '0;
            push      <= 1'b1;
            push_data <= {shreg, det_data};
          end else begin
            nsamp <= nsamp + 1'b1;
          end
        end
        if (busy && samples_left == '0 && !sample && !push) busy <= 1'b0;
      end
    end
  end

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_WORDS)) u_buf (
    .clk, .rst_n,
    .wr_en(push), .wr_data(push_data),
    .rd_en, .rd_data, .count(fifo_count)
  );

  assign level       = fifo_count;
  assign chunk_ready = (fifo_count >= FW'(CHUNK_WORDS));

  initial assert (WORD_W % LANES == 0 && LANES < WORD_W)
    else $error("LANES must divide the word width");
endmodule
