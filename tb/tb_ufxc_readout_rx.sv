// tb_ufxc_readout_rx: checks the per-chip readout receiver against the chip
// stand-in, at 4096 pixels per chip to keep runs short. Each readout is
// drained by a consumer that pops one whole chunk when `chunk_ready` is high,
// sometimes after a long pause so the chunk buffer fills. The testbench
// checks every word against the expected chip bytes, the total word count per
// counter depth, that the receiver never strobes past the end of the readout
// and never overflows its buffer, that it reads one byte per cycle while the
// buffer has room (readout time), and that the pauses really stop the strobe.
`timescale 1ns/1ps
module tb_ufxc_readout_rx;
  import ufxc_tb_pkg::*;
  localparam int PIXELS = 4096;
  localparam int FIFO_WORDS = 1024;
  logic        clk = 0, rst_n = 0, clear = 1;
  logic        rd_start = 0, mode_2bit = 0, rd_en = 0;
  logic        det_strobe, busy, chunk_ready;
  logic [7:0]  det_data;
  logic [15:0] rd_data;
  logic [10:0] level;
  int exposures, gate_len, overruns, strobes;
  int checks = 0, failures = 0, stalled_strobe = 0, img = 0;
  time t_busy_end;

  always @(negedge busy) t_busy_end = $time;

  ufxc_readout_rx #(.PIXELS(PIXELS), .LANES(8), .FIFO_WORDS(FIFO_WORDS)) dut (
    .clk, .rst_n, .rd_start, .mode_2bit, .det_strobe, .det_data, .busy,
    .chunk_ready, .rd_en, .rd_data, .level);

  ufxc_chip_model #(.CHIP(1), .PIXELS(PIXELS)) chip (
    .clk, .clear, .gate(1'b0), .mode_2bit, .rd_start, .strobe(det_strobe), .data(det_data),
    .exposures, .last_gate_len(gate_len), .overruns, .strobes);

  always #2.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) chk(level <= 11'(FIFO_WORDS), "buffer level");

  task automatic readout(input bit two_bit, input bit pauses);
    int total_words, k, t0, t1, words, errs;
    total_words = 2 * bytes_per_counter(PIXELS, two_bit) / 2;
    mode_2bit = two_bit;
    @(negedge clk) rd_start = 1;
    t0 = $time;
    @(negedge clk) rd_start = 0;
    k = 0; words = 0; errs = 0;
    while (words < total_words) begin
      if (chunk_ready) begin
        if (pauses && $urandom_range(0, 2) == 0) begin
          int s0;
          repeat (1200) @(negedge clk);          // buffer fills, strobe must stop
          s0 = strobes;
          repeat (20) @(negedge clk);
          if (strobes == s0) stalled_strobe++;
        end
        for (int i = 0; i < 512; i++) begin
          rd_en = 1;
          if (rd_data != {pix_byte(1, img, k), pix_byte(1, img, k + 1)}) errs++;
          k += 2; words++;
          @(negedge clk);
        end
        rd_en = 0;
      end else @(negedge clk);
    end
    chk(errs == 0, $sformatf("%0d word mismatches", errs));
    chk(words == total_words, "word count");
    chk(!chunk_ready && level == 0, "buffer empty after readout");
    repeat (3) @(negedge clk);
    chk(!busy, "busy low after readout");
    chk(strobes == 2 * total_words, $sformatf("strobes %0d", strobes));
    t1 = t_busy_end;
    if (!pauses) begin
      // one byte per cycle while a chunk is drained as soon as it is whole
      chk((t1 - t0) / 5 <= 2 * total_words + 20, $sformatf("readout took %0d cycles for %0d bytes", (t1 - t0) / 5, 2 * total_words));
    end
    img++;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1; clear = 0;
    repeat (2) @(negedge clk);
    readout(0, 0);          // 14-bit, free running
    chip.strobes = 0;
    readout(1, 0);          // 2-bit
    chip.strobes = 0;
    readout(0, 1);          // 14-bit with back-pressure
    chk(stalled_strobe > 0, "back-pressure stopped the strobe");
    chk(overruns == 0, "no strobe beyond the end of a readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
