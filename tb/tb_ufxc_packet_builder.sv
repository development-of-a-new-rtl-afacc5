// tb_ufxc_packet_builder: checks packet building and round-robin dispatch at
// 4096 pixels per chip (7 chunks per counter at 14 bits, 1 at 2 bits).
// Behavioural chunk buffers feed the chip data in random bursts; behavioural
// link FIFOs are drained at a random rate, and sometimes not at all so the
// builder must wait for room. For every packet the testbench checks its length
// (515 words, last flag only on the last), the header (image count, mode,
// counter, chip id, frame count, worked out from its own count of chunks),
// all data words, that packet p goes to link p mod 3, the packet counter, the
// stall counter, and the write rate of one word per cycle inside a packet.
`timescale 1ns/1ps
module tb_ufxc_packet_builder;
  import ufxc_pkg::*;
  import ufxc_tb_pkg::*;
  localparam int PIXELS = 4096;
  localparam int FIFO_AW = 10;
  logic clk = 0, rst_n = 0, acq_begin = 0, mode_2bit = 0;
  acq_mode_e mode = MODE_SOFTWARE;
  logic [1:0] chunk_ready, rx_rd;
  logic [1:0][15:0] rx_data;
  logic [2:0][FIFO_AW:0] link_free;
  logic [2:0] link_wr;
  fifo_word_t link_data;
  logic [31:0] packets, stall_cycles;
  int checks = 0, failures = 0;

  ufxc_packet_builder #(.PIXELS(PIXELS), .FIFO_AW(FIFO_AW)) dut (.*);

  always #2.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [15:0] src [2][$];
  int occ [3];
  bit drain_hold = 0;
  logic [15:0] pkt [$];
  int pkt_link = -1, pkt_no = 0, gaps_in_pkt = 0;
  int exp_img [2], exp_cnt [2], exp_frm [2];
  int cpc;

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      chunk_ready[c] = src[c].size() >= 512;
      rx_data[c] = src[c].size() > 0 ? src[c][0] : 16'h0;
    end
    for (int l = 0; l < 3; l++) link_free[l] = (FIFO_AW+1)'((1 << FIFO_AW) - occ[l]);
  end

  task automatic check_packet(input int l);
    int c, k0;
    chk(pkt.size() == 515, $sformatf("packet length %0d", pkt.size()));
    chk(l == pkt_no % 3, $sformatf("packet %0d on link %0d", pkt_no, l));
    c = (pkt[2][15:8] == 8'h1A) ? 0 : 1;
    chk(pkt[2][15:8] == chip_code(c), "chip id");
    chk(pkt[0] == 16'(exp_img[c]), $sformatf("image %0d expected %0d", pkt[0], exp_img[c]));
    chk(pkt[1] == {8'(mode), 8'(exp_cnt[c])}, "mode/counter");
    chk(pkt[2][7:0] == 8'(exp_frm[c]), "frame count");
    k0 = exp_cnt[c] * bytes_per_counter(PIXELS, mode_2bit) + exp_frm[c] * 1024;
    for (int i = 0; i < 512; i++)
      if (pkt[3 + i] != {pix_byte(c, exp_img[c], k0 + 2*i), pix_byte(c, exp_img[c], k0 + 2*i + 1)}) begin
        chk(0, $sformatf("data word %0d", i));
        break;
      end
    checks++;
    if (++exp_frm[c] == cpc) begin
      exp_frm[c] = 0;
      if (++exp_cnt[c] == 2) begin exp_cnt[c] = 0; exp_img[c]++; end
    end
    pkt_no++;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 2; c++) if (rx_rd[c]) void'(src[c].pop_front());
      for (int l = 0; l < 3; l++) begin
        if (link_wr[l]) begin
          occ[l]++;
          if (pkt.size() == 0) pkt_link = l;
          else if (pkt_link != l) chk(0, "packet split across links");
          pkt.push_back(link_data.data);
          chk(link_data.last == (pkt.size() == 515), "last flag");
          if (link_data.last) begin
            check_packet(l);
            pkt.delete();
          end
        end
        if (!drain_hold && occ[l] > 0 && $urandom_range(0, 99) < 30) occ[l]--;
      end
      if (pkt.size() > 0 && link_wr == 0) gaps_in_pkt++;
    end
  end

  // Pushes one image of both chips into the chunk buffers in random bursts.
  task automatic feed_image(input int img);
    int nbytes, k [2];
    nbytes = 2 * bytes_per_counter(PIXELS, mode_2bit);
    k = '{0, 0};
    while (k[0] < nbytes || k[1] < nbytes) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++)
        if (k[c] < nbytes && src[c].size() < 1000 && $urandom_range(0, 3) != 0) begin
          src[c].push_back({pix_byte(c, img, k[c]), pix_byte(c, img, k[c] + 1)});
          k[c] += 2;
        end
    end
  endtask

  task automatic acquisition(input acq_mode_e m, input int images, input bit hold);
    int p0;
    mode = m; mode_2bit = (m == MODE_PUMP_PROBE);
    cpc = PIXELS * (mode_2bit ? 2 : 14) / 8192;
    exp_img = '{0, 0}; exp_cnt = '{0, 0}; exp_frm = '{0, 0};
    pkt_no = 0;
    p0 = packets;
    @(negedge clk) acq_begin = 1;
    @(negedge clk) acq_begin = 0;
    fork
      for (int i = 0; i < images; i++) feed_image(i);
      if (hold) begin
        repeat (2000) @(negedge clk);
        drain_hold = 1;
        repeat (6000) @(negedge clk);
        drain_hold = 0;
      end
    join
    while (src[0].size() > 0 || src[1].size() > 0) @(negedge clk);
    repeat (600) @(negedge clk);
    chk(pkt_no == images * 2 * 2 * cpc, $sformatf("%0d packets, expected %0d", pkt_no, images * 4 * cpc));
    chk(packets - p0 == 32'(pkt_no), "packet counter");
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    occ = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    acquisition(MODE_SOFTWARE, 2, 0);
    acquisition(MODE_EXT_TRIGGER, 1, 1);
    chk(stall_cycles > 0, "builder waited for a full link FIFO");
    acquisition(MODE_PUMP_PROBE, 4, 0);
    chk(gaps_in_pkt == 0, "one word per cycle inside a packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
