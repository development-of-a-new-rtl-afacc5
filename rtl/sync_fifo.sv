// sync_fifo: single-clock first-word-fall-through FIFO used as the per-chip
// chunk buffer. `rd_data` shows the oldest word whenever `count` is non-zero;
// `rd_en` removes it. A write and a read may happen in the same cycle. Writes
// to a full FIFO and reads from an empty one are ignored (and flagged by an
// assertion). DEPTH must be a power of two.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic do_wr, do_rd;

  assign do_wr = wr_en && (count != DEPTH[AW:0]);
  assign do_rd = rd_en && (count != '0);
  assign count = wptr - rptr;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> count != DEPTH[AW:0]);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> count != '0);
endmodule
