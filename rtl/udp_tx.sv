// udp_tx: one SFP UDP transmitter (125 MHz system clock, GMII byte interface).
//
// When its link FIFO holds a whole packet (515 words, the last one flagged),
// it sends the packet as one Gigabit Ethernet frame, one byte per cycle:
//
//   preamble 55x7, SFD D5                           8 bytes
//   Ethernet: destination MAC, source MAC, 0x0800  14 bytes
//   IPv4: 45 00, total length 1058, identification, flags DF, TTL 64,
//         protocol UDP (17), header checksum, source and destination IP
//                                                   20 bytes
//   UDP: source port, destination port, length 1038, checksum 0
//                                                    8 bytes
//   payload: the 1030-byte packet, high byte of each word first
//   FCS: CRC-32 over MAC header to payload, least significant byte first
//   then 12 idle cycles of inter-frame gap
//
// `gmii_tx_en` marks the 1084 frame bytes. With a full FIFO, frames follow
// each other every 1096 cycles (8.77 us), 940 Mbit/s of payload. The
// identification field counts frames. `rd_en` pops the FIFO word after its
// second byte has been sent. Addresses and ports are configuration inputs,
// held stable while frames are sent. CNT_W is the width of the FIFO's fill
// count, at least 10 bits so a whole packet can be counted.
//
// Sending each packet as one UDP/IPv4 frame over Gigabit Ethernet follows the
// document. The link is point to point, so the destination MAC address is
// configured rather than resolved by ARP; the UDP checksum is left at zero
// (optional in IPv4); both are this design's choices.
module udp_tx
  import ufxc_pkg::*;
#(
  parameter int CNT_W = 11            // width of the FIFO fill count
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] src_mac,
  input  logic [47:0] dst_mac,
  input  logic [31:0] src_ip,
  input  logic [31:0] dst_ip,
  input  logic [15:0] src_port,
  input  logic [15:0] dst_port,
  input  logic [CNT_W-1:0] rd_count,
  input  fifo_word_t  rd_data,
  output logic        rd_en,
  output logic [7:0]  gmii_txd,
  output logic        gmii_tx_en,
  output logic [31:0] frames_sent
);
  localparam int PRE_END  = 8;                    // preamble + SFD
  localparam int HDR_LEN  = 42;                   // Ethernet + IPv4 + UDP
  localparam int PAY_BEG  = PRE_END + HDR_LEN;    // 50
  localparam int FCS_BEG  = PAY_BEG + PKT_BYTES;  // 1080
  localparam int FRM_END  = FCS_BEG + 4;          // 1084
  localparam int PERIOD   = FRM_END + 12;         // 1096
  localparam logic [15:0] IP_LEN  = 16'(20 + 8 + PKT_BYTES);
  localparam logic [15:0] UDP_LEN = 16'(8 + PKT_BYTES);

  logic        active;
  logic [10:0] cnt;
  logic [15:0] ip_id;
  logic [31:0] crc;
  logic [15:0] ip_csum;
  logic [HDR_LEN*8-1:0] hdr;
  logic        avail;
  logic [7:0]  byte_nxt;
  logic        en_nxt;

  // IPv4 header checksum: one's complement of the one's complement sum.
  always_comb begin
    logic [19:0] s;
    s = 20'h4500 + 20'(IP_LEN) + 20'(ip_id) + 20'h4000 + 20'h4011 +
        20'(src_ip[31:16]) + 20'(src_ip[15:0]) + 20'(dst_ip[31:16]) + 20'(dst_ip[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    ip_csum = ~s[15:0];
  end

  assign hdr = {dst_mac, src_mac, 16'h0800,
                16'h4500, IP_LEN, ip_id, 16'h4000, 8'd64, 8'd17, ip_csum, src_ip, dst_ip,
                src_port, dst_port, UDP_LEN, 16'h0000};

  assign avail = (rd_count >= CNT_W'(PKT_WORDS));

  always_comb begin
    en_nxt   = active && (cnt < 11'(FRM_END));
    byte_nxt = 8'h00;
    rd_en    = 1'b0;
    if (!active)                       byte_nxt = 8'h00;
    else if (cnt < 11'(PRE_END - 1))   byte_nxt = 8'h55;
    else if (cnt == 11'(PRE_END - 1))  byte_nxt = 8'hD5;
    else if (cnt < 11'(PAY_BEG))       byte_nxt = hdr[(HDR_LEN - 1 - (int'(cnt) - PRE_END)) * 8 +: 8];
    else if (cnt < 11'(FCS_BEG)) begin
      byte_nxt = cnt[0] ? rd_data.data[7:0] : rd_data.data[15:8];   // PAY_BEG is even
      rd_en    = cnt[0];
    end else if (cnt < 11'(FRM_END)) begin
      byte_nxt = ~crc[(int'(cnt) - FCS_BEG) * 8 +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      cnt         <= '0;
      ip_id       <= '0;
      crc         <= '1;
      gmii_txd    <= '0;
      gmii_tx_en  <= 1'b0;
      frames_sent <= '0;
    end else begin
      gmii_txd   <= byte_nxt;
      gmii_tx_en <= en_nxt;
      if (active && cnt >= 11'(PRE_END) && cnt < 11'(FCS_BEG)) crc <= crc32_byte(crc, byte_nxt);
      if (!active) begin
        if (avail) begin
          active <= 1'b1;
          cnt    <= '0;
          crc    <= '1;
        end
      end else if (cnt == 11'(PERIOD - 1)) begin
        ip_id <= ip_id + 1'b1;
        cnt   <= '0;
        crc   <= '1;
        active <= avail;
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == 11'(FRM_END - 1)) frames_sent <= frames_sent + 1'b1;
      end
    end
  end

  a_last_word: assert property (@(posedge clk) disable iff (!rst_n)
                                (rd_en && cnt == 11'(FCS_BEG - 1)) |-> rd_data.last);
  a_not_last_early: assert property (@(posedge clk) disable iff (!rst_n)
                                     (rd_en && cnt != 11'(FCS_BEG - 1)) |-> !rd_data.last);
endmodule
