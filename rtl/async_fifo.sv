// async_fifo: dual-clock FIFO between the 200 MHz acquisition domain and the
// 125 MHz Ethernet domain; one per link.
//
// Classic design: binary read and write pointers one bit wider than the
// address, exchanged between the domains as Gray code through two-flip-flop
// synchronisers. The write side sees `full` and `wr_free` (free words, never
// more than really free); the read side sees `empty`, `rd_count` (words
// stored, never more than really stored) and, first-word-fall-through,
// the oldest word on `rd_data`. Each side has its own reset, asserted
// together. A write appears on the read side 3 to 4 read clocks later.
//
// Using a dual-clock FIFO as buffer and clock-domain crossing follows the
// document; its depth (two packets by default) and the Gray-pointer scheme are
// this design's choices.
module async_fifo #(
  parameter int WIDTH = 17,
  parameter int AW    = 10
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic [AW:0]      wr_free,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      rd_count
);
  localparam int DEPTH = 1 << AW;
  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Write domain
  assign rbin_w  = gray2bin(rgray_w2);
  assign wr_free = (AW+1)'(DEPTH) - (wbin - rbin_w);
  assign full    = (wr_free == '0);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // Read domain
  assign wbin_r   = gray2bin(wgray_r2);
  assign rd_count = wbin_r - rbin;
  assign empty    = (rd_count == '0);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow:  assert property (@(posedge wr_clk) disable iff (!wr_rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) rd_en |-> !empty);
endmodule
