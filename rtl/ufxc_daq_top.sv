// ufxc_daq_top: FPGA logic of the DAQ Box for the two-chip UFXC32k photon
// counting detector: it controls the exposures, reads out both chips and
// streams every image to the storage server as UDP frames over three
// point-to-point Gigabit Ethernet links.
//
// 200 MHz detector domain (clk_fmc):
//   ttl_trigger          synchronises the TTL inputs, one rising edge = trigger
//   ufxc_sequencer       software / external-trigger / pump&probe acquisitions
//   ufxc_readout_rx x2   per chip: paced readout strobe, lane deserialiser,
//                        chunk buffer
//   ufxc_packet_builder  6-byte header + 1024-byte chunk, round robin to links
// clock-domain crossing:
//   async_fifo x3        one dual-clock FIFO per link (two packets deep)
// 125 MHz Ethernet domain (clk_sys):
//   udp_tx x3            UDP/IPv4/Ethernet framing, GMII byte output
//
// Outside this module: the chips (det_* ports), the Gigabit PCS/transceivers
// behind the GMII ports, the processor that sets the configuration inputs and
// the clock generation. Configuration inputs are quasi-static: they are set
// before `acq_start` and not changed during an acquisition. The link settings
// (addresses, ports) are in the 125 MHz domain, everything else in the 200 MHz
// domain. Each domain has its own active-low reset, released together.
//
// The split into a 200 MHz detector part and a 125 MHz Ethernet part joined by
// three dual-clock FIFOs, the round-robin dispatch and the packet format follow
// the document; the detector-side signalling and the configuration ports are
// this design's own.
module ufxc_daq_top
  import ufxc_pkg::*;
#(
  parameter int PIXELS     = 65536,   // counting pixels per chip (256 x 256)
  parameter int LANES      = 8,       // data lines per chip
  parameter int RX_WORDS   = 1024,    // chunk buffer per chip, 16-bit words
  parameter int FIFO_AW    = 10,      // link FIFO depth 2**FIFO_AW words
  parameter int N_TTL      = 2        // TTL inputs
) (
  // 200 MHz detector domain
  input  logic                              clk_fmc,
  input  logic                              rst_fmc_n,
  input  logic                              acq_start,
  input  logic                              acq_stop,
  input  acq_mode_e                         acq_mode,
  input  logic [15:0]                       n_images,
  input  logic [31:0]                       exposure_cycles,
  input  logic [N_TTL-1:0]                  ttl_in,
  input  logic [$clog2(N_TTL)-1:0]          ttl_sel,
  output logic [N_TTL-1:0]                  ttl_level,
  output logic                              acq_busy,
  output logic                              acq_done,
  output logic [15:0]                       image_idx,
  output logic                              pumped,
  output logic [15:0]                       missed_triggers,
  output logic [31:0]                       packets_built,
  output logic [31:0]                       link_stall_cycles,
  // detector chips
  output logic                              det_gate,
  output logic                              det_mode_2bit,
  output logic                              det_rd_start,
  output logic [N_CHIPS-1:0]                det_strobe,
  input  logic [N_CHIPS-1:0][LANES-1:0]     det_data,
  // 125 MHz Ethernet domain
  input  logic                              clk_sys,
  input  logic                              rst_sys_n,
  input  logic [47:0]                       src_mac,
  input  logic [N_LINKS-1:0][47:0]          dst_mac,
  input  logic [N_LINKS-1:0][31:0]          src_ip,
  input  logic [N_LINKS-1:0][31:0]          dst_ip,
  input  logic [15:0]                       src_port,
  input  logic [N_LINKS-1:0][15:0]          dst_port,
  output logic [N_LINKS-1:0][7:0]           gmii_txd,
  output logic [N_LINKS-1:0]                gmii_tx_en,
  output logic [N_LINKS-1:0][31:0]          frames_sent
);
  logic        trig, acq_begin;
  acq_mode_e   cur_mode;
  logic [N_CHIPS-1:0] rx_busy, chunk_ready, rx_rd;
  logic [N_CHIPS-1:0][WORD_W-1:0] rx_data;
  logic [N_LINKS-1:0][FIFO_AW:0]  link_free, link_count;
  logic [N_LINKS-1:0]             link_wr, link_rd;
  fifo_word_t                     link_wdata;
  fifo_word_t [N_LINKS-1:0]       link_rdata;

  ttl_trigger #(.N_TTL(N_TTL)) u_ttl (
    .clk(clk_fmc), .rst_n(rst_fmc_n), .ttl_in, .sel(ttl_sel),
    .enable(acq_busy && cur_mode != MODE_SOFTWARE), .level(ttl_level), .trig
  );

  ufxc_sequencer u_seq (
    .clk(clk_fmc), .rst_n(rst_fmc_n),
    .start(acq_start), .stop(acq_stop), .mode(acq_mode), .n_images, .exposure_cycles,
    .trig, .readout_busy(|rx_busy),
    .busy(acq_busy), .acq_begin, .acq_mode(cur_mode), .det_gate, .det_mode_2bit,
    .rd_start(det_rd_start), .image_idx, .pumped, .done(acq_done), .missed_triggers
  );

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    logic [$clog2(RX_WORDS):0] level;
    ufxc_readout_rx #(.PIXELS(PIXELS), .LANES(LANES), .FIFO_WORDS(RX_WORDS)) u_rx (
      .clk(clk_fmc), .rst_n(rst_fmc_n),
      .rd_start(det_rd_start), .mode_2bit(det_mode_2bit),
      .det_strobe(det_strobe[c]), .det_data(det_data[c]),
      .busy(rx_busy[c]), .chunk_ready(chunk_ready[c]),
      .rd_en(rx_rd[c]), .rd_data(rx_data[c]), .level
    );
  end

  ufxc_packet_builder #(.PIXELS(PIXELS), .FIFO_AW(FIFO_AW)) u_pkt (
    .clk(clk_fmc), .rst_n(rst_fmc_n),
    .acq_begin, .mode(cur_mode), .mode_2bit(det_mode_2bit),
    .chunk_ready, .rx_data, .rx_rd,
    .link_free, .link_wr, .link_data(link_wdata),
    .packets(packets_built), .stall_cycles(link_stall_cycles)
  );

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    logic full, empty;
    async_fifo #(.WIDTH($bits(fifo_word_t)), .AW(FIFO_AW)) u_fifo (
      .wr_clk(clk_fmc), .wr_rst_n(rst_fmc_n), .wr_en(link_wr[l]), .wr_data(link_wdata),
      .full, .wr_free(link_free[l]),
      .rd_clk(clk_sys), .rd_rst_n(rst_sys_n), .rd_en(link_rd[l]), .rd_data(link_rdata[l]),
      .empty, .rd_count(link_count[l])
    );

    udp_tx #(.CNT_W(FIFO_AW + 1)) u_udp (
      .clk(clk_sys), .rst_n(rst_sys_n),
      .src_mac, .dst_mac(dst_mac[l]), .src_ip(src_ip[l]), .dst_ip(dst_ip[l]),
      .src_port, .dst_port(dst_port[l]),
      .rd_count(link_count[l]), .rd_data(link_rdata[l]), .rd_en(link_rd[l]),
      .gmii_txd(gmii_txd[l]), .gmii_tx_en(gmii_tx_en[l]), .frames_sent(frames_sent[l])
    );
  end
endmodule
