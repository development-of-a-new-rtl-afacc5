// gmii_monitor: receives the frames one link's GMII output produces and checks
// their framing, for simulation only. For each frame it checks the preamble
// and SFD, the MAC addresses and EtherType, every IPv4 header field and the
// header checksum, the UDP ports, length and zero checksum, the frame length
// and the FCS, and that at least 12 idle cycles separate frames. The 1030
// payload bytes of the last frame are on `payload`; `frame_done` pulses for
// one cycle after each frame, and `checks`/`failures` accumulate.
module gmii_monitor #(
  parameter int LINK = 0
) (
  input  logic        clk,
  input  logic [7:0]  txd,
  input  logic        tx_en,
  input  logic [47:0] src_mac,
  input  logic [47:0] dst_mac,
  input  logic [31:0] src_ip,
  input  logic [31:0] dst_ip,
  input  logic [15:0] src_port,
  input  logic [15:0] dst_port,
  output logic [7:0]  payload [1030],
  output logic        frame_done,
  output int          frames,
  output int          checks,
  output int          failures,
  output int          min_gap
);
  logic [7:0] buf_q [$];
  int gap;
  logic en_q;
  bit   seen_idle;   // frames count only after the line was idle once

  initial begin
    frame_done = 0; frames = 0; checks = 0; failures = 0; gap = 1000; en_q = 0; seen_idle = 0;
    min_gap = 1 << 30;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("link %0d frame %0d: %s", LINK, frames, what);
    end
  endtask

  function automatic logic [15:0] w16(input int i);
    return {buf_q[i], buf_q[i+1]};
  endfunction

  task automatic check_frame();
    logic [31:0] crc, fcs;
    int unsigned sum;
    logic [47:0] dm, sm;
    chk(buf_q.size() == 1084, $sformatf("length %0d", buf_q.size()));
    if (buf_q.size() != 1084) return;
    for (int i = 0; i < 7; i++) chk(buf_q[i] == 8'h55, "preamble");
    chk(buf_q[7] == 8'hD5, "SFD");
    for (int i = 0; i < 6; i++) begin
      dm = {dm[39:0], buf_q[8+i]};
      sm = {sm[39:0], buf_q[14+i]};
    end
    chk(dm == dst_mac, "dst MAC");
    chk(sm == src_mac, "src MAC");
    chk(w16(20) == 16'h0800, "EtherType");
    chk(w16(22) == 16'h4500, "IP version/IHL/TOS");
    chk(w16(24) == 16'd1058, "IP total length");
    chk(w16(26) == 16'(frames), "IP identification");
    chk(w16(28) == 16'h4000, "IP flags");
    chk(buf_q[30] == 8'd64 && buf_q[31] == 8'd17, "TTL/protocol");
    chk({w16(34), w16(36)} == src_ip, "src IP");
    chk({w16(38), w16(40)} == dst_ip, "dst IP");
    sum = 0;
    for (int i = 22; i < 42; i += 2) sum += 32'(w16(i));
    while (sum > 32'hFFFF) sum = (sum & 32'hFFFF) + (sum >> 16);
    chk(sum == 32'hFFFF, "IP header checksum");
    chk(w16(42) == src_port, "UDP src port");
    chk(w16(44) == dst_port, "UDP dst port");
    chk(w16(46) == 16'd1038, "UDP length");
    chk(w16(48) == 16'h0000, "UDP checksum");
    crc = '1;
    for (int i = 8; i < 1080; i++) crc = ufxc_tb_pkg::crc_update(crc, buf_q[i]);
    fcs = {buf_q[1083], buf_q[1082], buf_q[1081], buf_q[1080]};
    chk(ufxc_tb_pkg::crc_final(crc) == fcs, "FCS");
    for (int i = 0; i < 1030; i++) payload[i] = buf_q[50 + i];
  endtask

  always @(posedge clk) begin
    frame_done <= 0;
    if (!seen_idle) begin
      seen_idle = !tx_en;
    end else if (tx_en) begin
      if (!en_q && frames > 0) begin
        chk(gap >= 12, $sformatf("inter-frame gap %0d", gap));
        if (gap < min_gap) min_gap = gap;
      end
      buf_q.push_back(txd);
    end else begin
      if (en_q) begin
        check_frame();
        frames++;
        frame_done <= 1;
        buf_q.delete();
        gap = 0;
      end
      gap++;
    end
    en_q = tx_en;
  end
endmodule
