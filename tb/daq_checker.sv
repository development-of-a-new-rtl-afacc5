// daq_checker: end-to-end checking environment for ufxc_daq_top, for
// simulation only. It holds the two chip stand-ins that answer the design's
// detector signals, one gmii_monitor per link, and a scoreboard: every frame
// that arrives on any link is decoded (image, mode, counter, chip, frame
// count), its 1024 data bytes are compared with what that chip read out for
// that image, and duplicates or impossible headers are counted as failures.
// `clear` (one fmc cycle, at the start of an acquisition) restarts the chips'
// image count and the scoreboard. It also counts the cycles in which a chip
// readout was paused by back-pressure.
module daq_checker #(
  parameter int PIXELS = 4096
) (
  input  logic             clk_fmc,
  input  logic             clk_sys,
  input  logic             clear,
  input  logic [7:0]       acq_mode,
  input  logic             det_gate,
  input  logic             det_mode_2bit,
  input  logic             det_rd_start,
  input  logic [1:0]       det_strobe,
  output logic [1:0][7:0]  det_data,
  input  logic [2:0][7:0]  gmii_txd,
  input  logic [2:0]       gmii_tx_en,
  input  logic [47:0]      src_mac,
  input  logic [2:0][47:0] dst_mac,
  input  logic [2:0][31:0] src_ip,
  input  logic [2:0][31:0] dst_ip,
  input  logic [15:0]      src_port,
  input  logic [2:0][15:0] dst_port,
  output int               packets_rx,
  output int               link_frames [3],
  output int               exposures,
  output int               last_gate_len,
  output int               paused_cycles,
  output int               checks,
  output int               failures
);
  import ufxc_tb_pkg::*;
  int overruns [2], strobes [2], expo [2], glen [2];
  logic [7:0] payload [3][1030];
  logic [2:0] frame_done;
  int mframes [3], mchecks [3], mfail [3], mgap [3];
  bit seen [string];
  int rd_cnt [2];
  int own_checks = 0, own_fail = 0;

  for (genvar c = 0; c < 2; c++) begin : g_chip
    ufxc_chip_model #(.CHIP(c), .PIXELS(PIXELS)) chip (
      .clk(clk_fmc), .clear, .gate(det_gate), .mode_2bit(det_mode_2bit),
      .rd_start(det_rd_start), .strobe(det_strobe[c]), .data(det_data[c]),
      .exposures(expo[c]), .last_gate_len(glen[c]), .overruns(overruns[c]), .strobes(strobes[c]));
  end

  for (genvar l = 0; l < 3; l++) begin : g_mon
    gmii_monitor #(.LINK(l)) mon (
      .clk(clk_sys), .txd(gmii_txd[l]), .tx_en(gmii_tx_en[l]), .src_mac, .dst_mac(dst_mac[l]),
      .src_ip(src_ip[l]), .dst_ip(dst_ip[l]), .src_port, .dst_port(dst_port[l]),
      .payload(payload[l]), .frame_done(frame_done[l]), .frames(mframes[l]),
      .checks(mchecks[l]), .failures(mfail[l]), .min_gap(mgap[l]));
  end

  assign exposures     = expo[0];
  assign last_gate_len = glen[0];
  always_comb begin
    checks   = own_checks + mchecks[0] + mchecks[1] + mchecks[2];
    failures = own_fail + mfail[0] + mfail[1] + mfail[2] + overruns[0] + overruns[1];
    for (int l = 0; l < 3; l++) link_frames[l] = mframes[l];
  end

  task automatic chk(input bit ok, input string what);
    own_checks++;
    if (!ok) begin own_fail++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Readout pauses: strobe low between the first and the last byte.
  initial begin packets_rx = 0; paused_cycles = 0; rd_cnt = '{0, 0}; end
  always @(posedge clk_fmc) begin
    for (int c = 0; c < 2; c++) begin
      if (det_rd_start) rd_cnt[c] = 0;
      else if (det_strobe[c]) rd_cnt[c]++;
      else if (rd_cnt[c] > 0 && rd_cnt[c] < 2 * bytes_per_counter(PIXELS, det_mode_2bit)) paused_cycles++;
    end
  end

  always @(posedge clk_fmc) if (clear) begin
    seen.delete();
    packets_rx = 0;
  end

  always @(posedge clk_sys) begin
    for (int l = 0; l < 3; l++) if (frame_done[l]) begin
      int img, cnt, chip, frm, cpc, k0, bad;
      string key;
      img  = int'({payload[l][0], payload[l][1]});
      cnt  = payload[l][3];
      chip = payload[l][4] == 8'h1A ? 0 : payload[l][4] == 8'h2B ? 1 : -1;
      frm  = payload[l][5];
      cpc  = PIXELS * (det_mode_2bit ? 2 : 14) / 8192;
      chk(payload[l][2] == acq_mode, $sformatf("mode byte %0h", payload[l][2]));
      chk(chip >= 0 && cnt <= 1 && frm < cpc, $sformatf("header chip %0d counter %0d frame %0d", chip, cnt, frm));
      if (chip >= 0 && cnt <= 1) begin
        key = $sformatf("%0d/%0d/%0d/%0d", img, chip, cnt, frm);
        chk(!seen.exists(key), {"duplicate packet ", key});
        seen[key] = 1;
        k0 = cnt * bytes_per_counter(PIXELS, det_mode_2bit) + frm * 1024;
        bad = 0;
        for (int i = 0; i < 1024; i++) if (payload[l][6 + i] != pix_byte(chip, img, k0 + i)) bad++;
        chk(bad == 0, $sformatf("packet %s: %0d data bytes differ", key, bad));
      end
      packets_rx++;
    end
  end
endmodule
