// tb_async_fifo: checks the dual-clock FIFO with a 200 MHz writer and a
// 125 MHz reader (AW = 4, 16 words, so it fills often). Writes and reads are
// attempted at random, in phases where the writer or the reader is faster.
// The testbench checks that every word arrives once and in order, that
// `wr_free` never claims more room and `rd_count` never more words than
// there really are, that the FIFO reports full and empty when it is, and
// that a word reaches the read side within 4 read clocks.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int AW = 4, W = 17;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [AW:0] wr_free, rd_count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int written = 0, read_n = 0, full_seen = 0, empty_seen = 0;
  int wr_pct = 50, rd_pct = 50;

  async_fifo #(.WIDTH(W), .AW(AW)) dut (.*);

  always #2.5 wr_clk = ~wr_clk;
  always #4 rd_clk = ~rd_clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge wr_clk) if (wr_rst_n) begin
    chk(int'(wr_free) <= (1 << AW) - model.size(), "wr_free not above real room");
    if (full) full_seen++;
    if (wr_en && !full) begin
      model.push_back(wr_data);
      written++;
    end
  end

  always @(negedge wr_clk) if (wr_rst_n) begin
    wr_en   = !full && ($urandom_range(0, 99) < wr_pct);
    wr_data = W'($urandom);
  end

  always @(posedge rd_clk) if (rd_rst_n) begin
    chk(int'(rd_count) <= model.size(), "rd_count not above real content");
    if (empty) empty_seen++;
    if (rd_en && !empty) begin
      chk(model.size() > 0 && rd_data == model[0], "data order");
      void'(model.pop_front());
      read_n++;
    end
  end

  always @(negedge rd_clk) if (rd_rst_n) rd_en = !empty && ($urandom_range(0, 99) < rd_pct);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    #20 wr_rst_n = 1; rd_rst_n = 1;
    wr_pct = 90; rd_pct = 20; #20000;     // writer faster: fills
    wr_pct = 10; rd_pct = 95; #20000;     // reader faster: empties
    wr_pct = 60; rd_pct = 80; #40000;
    wr_pct = 0;  #2000;
    chk(full_seen > 0, "FIFO became full");
    chk(empty_seen > 0, "FIFO became empty");
    chk(model.size() == 0 && empty, "all words delivered");
    chk(written == read_n && written > 1000, $sformatf("%0d written, %0d read", written, read_n));
    // latency: one word into an empty FIFO
    rd_pct = 0;
    @(negedge wr_clk);
    force wr_en = 1;
    @(negedge wr_clk);
    release wr_en;
    wr_en = 0;
    lat = 0;
    while (empty && lat < 20) begin @(posedge rd_clk); lat++; end
    chk(lat <= 4, $sformatf("write-to-read latency %0d read clocks", lat));
    chk(wr_free == (AW+1)'((1 << AW) - 1), "wr_free with one word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
