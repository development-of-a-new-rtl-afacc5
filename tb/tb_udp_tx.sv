// tb_udp_tx: checks one UDP transmitter. A behavioural FIFO feeds it packets
// of random content; gmii_monitor checks each frame's preamble, Ethernet,
// IPv4 (with checksum) and UDP headers and FCS, and the testbench compares the
// 1030 payload bytes with the packet that was queued. It also checks that no
// frame starts before a whole packet is queued, that queued packets leave
// back to back every 1096 cycles (12 idle cycles between frames), the
// identification count and the frames_sent counter.
`timescale 1ns/1ps
module tb_udp_tx;
  import ufxc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [47:0] src_mac = 48'h02_00_00_00_00_01, dst_mac = 48'h02_AA_BB_CC_DD_EE;
  logic [31:0] src_ip = 32'hC0A8_0A01, dst_ip = 32'hC0A8_0A65;
  logic [15:0] src_port = 16'd5000, dst_port = 16'd6001;
  logic [10:0] rd_count;
  fifo_word_t  rd_data;
  logic        rd_en, gmii_tx_en;
  logic [7:0]  gmii_txd;
  logic [31:0] frames_sent;
  logic [7:0]  payload [1030];
  logic        frame_done;
  int mframes, mchecks, mfail, min_gap;
  int checks = 0, failures = 0;
  fifo_word_t q [$];
  logic [7:0] expect_q [$][1030];
  int starts [$];
  logic en_q = 0;

  udp_tx dut (.*);
  gmii_monitor #(.LINK(0)) mon (.clk, .txd(gmii_txd), .tx_en(gmii_tx_en), .src_mac, .dst_mac,
    .src_ip, .dst_ip, .src_port, .dst_port, .payload, .frame_done, .frames(mframes),
    .checks(mchecks), .failures(mfail), .min_gap);

  always #4 clk = ~clk;   // 125 MHz

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  assign rd_count = 11'(q.size() > 2047 ? 2047 : q.size());
  assign rd_data  = q.size() > 0 ? q[0] : '0;

  always @(posedge clk) begin
    if (rd_en) begin
      chk(q.size() > 0, "read from empty FIFO");
      void'(q.pop_front());
    end
    if (rst_n && gmii_tx_en && !en_q) starts.push_back(int'($time / 8));
    en_q <= gmii_tx_en;
    if (frame_done) begin
      logic [7:0] e [1030];
      int bad;
      e = expect_q.pop_front();
      bad = 0;
      for (int i = 0; i < 1030; i++) if (payload[i] != e[i]) bad++;
      chk(bad == 0, $sformatf("payload: %0d bytes differ", bad));
    end
  end

  // Queue one packet; all but `hold_last` words go in now.
  task automatic queue_packet(input int hold_last);
    logic [7:0] b [1030];
    for (int i = 0; i < 1030; i++) b[i] = 8'($urandom);
    expect_q.push_back(b);
    for (int i = 0; i < 515 - hold_last; i++) q.push_back('{last: i == 514, data: {b[2*i], b[2*i+1]}});
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // an incomplete packet must wait
    queue_packet(1);
    repeat (200) @(negedge clk);
    chk(!gmii_tx_en && mframes == 0, "no frame before the packet is whole");
    q.push_back('{last: 1'b1, data: {expect_q[0][1028], expect_q[0][1029]}});
    repeat (5) queue_packet(0);
    wait (mframes == 6);
    repeat (50) @(negedge clk);
    chk(starts.size() == 6, "six frames");
    for (int i = 2; i < starts.size(); i++)
      chk(starts[i] - starts[i-1] == 1096, $sformatf("frame period %0d cycles", starts[i] - starts[i-1]));
    chk(min_gap == 12, $sformatf("minimum gap %0d", min_gap));
    // a later, separate packet
    repeat (300) @(negedge clk);
    src_port = 16'd5123; dst_ip = 32'h0A00_0002;
    queue_packet(0);
    wait (mframes == 7);
    repeat (20) @(negedge clk);
    chk(frames_sent == 7, $sformatf("frames_sent %0d", frames_sent));
    chk(q.size() == 0, "FIFO drained");
    checks += mchecks;
    failures += mfail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
