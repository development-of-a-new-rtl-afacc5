// tb_ufxc_daq_top: end-to-end test of the DAQ firmware at 4096 pixels per
// chip (all other parameters at their defaults). It runs, one after the
// other: a software acquisition of 3 images, an external-trigger
// acquisition of 3 images with triggers on TTL input 1 (some arriving during
// a readout), a pump&probe acquisition asked for 3 images (4 are taken), and
// a long external-trigger acquisition ended by `acq_stop`. daq_checker checks
// every UDP frame on the three links against the chip data; this testbench
// checks the packet count of each acquisition, the exposure count and width,
// and that each mechanism of the design happened at least once: every mode,
// both counter depths, all three links, packet-builder stalls on a full link
// FIFO, readout pauses from back-pressure, missed triggers, pumped images and
// the stop.
`timescale 1ns/1ps
module tb_ufxc_daq_top;
  import ufxc_pkg::*;
  localparam int PIXELS = 4096;
  `include "daq_tb_body.svh"

  ufxc_daq_top #(.PIXELS(PIXELS)) dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

  initial begin
    int m_soft = 0, m_ext = 0, m_pp = 0, m_stop = 0, m_pumped = 0;
    int p0;
    bring_up();
    acquire(MODE_SOFTWARE, 3, 100, 3);         m_soft++;
    acquire(MODE_EXT_TRIGGER, 3, 400, 3);      m_ext++;
    acquire(MODE_PUMP_PROBE, 3, 50, 4);        m_pp++;
    m_pumped = pumped_count;
    // long triggered acquisition, stopped after two images
    p0 = packets_rx;
    start_acq(MODE_EXT_TRIGGER, 1000, 200);
    for (int k = 1; k <= 2; k++) begin
      repeat (30) @(negedge clk_fmc);
      ttl_in[1] = 1; repeat (4) @(negedge clk_fmc); ttl_in[1] = 0;
      // readout of image k-1 finished, armed again
      for (int t = 0; t < 200_000 && image_idx != 16'(k); t++) @(negedge clk_fmc);
    end
    repeat (50) @(negedge clk_fmc);
    acq_stop = 1; @(negedge clk_fmc) acq_stop = 0;
    for (int t = 0; t < 200_000 && acq_busy; t++) @(negedge clk_fmc);
    drain();
    chk(n_exposures == 2, $sformatf("%0d exposures before stop", n_exposures));
    chk(packets_rx == 2 * 4 * 7, $sformatf("%0d packets after stop", packets_rx));
    m_stop++;
    // mechanism coverage
    $display("mechanisms: software %0d, external trigger %0d, pump&probe %0d, stop %0d, pumped images %0d",
             m_soft, m_ext, m_pp, m_stop, m_pumped);
    $display("            link stalls %0d cycles, readout pauses %0d cycles, missed triggers %0d, frames per link %0d/%0d/%0d",
             link_stall_cycles, paused_cycles, missed_triggers, link_frames[0], link_frames[1], link_frames[2]);
    chk(m_soft > 0 && m_ext > 0 && m_pp > 0 && m_stop > 0, "all modes and the stop ran");
    chk(m_pumped == 2, "pumped images in pump&probe");
    chk(link_stall_cycles > 0, "packet builder waited for a link FIFO");
    chk(paused_cycles > 0, "readout paused by back-pressure");
    chk(missed_triggers > 0, "trigger during readout counted as missed");
    chk(link_frames[0] > 0 && link_frames[1] > 0 && link_frames[2] > 0, "all three links carried frames");
    $display("simulated %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end
endmodule
