// tb_ufxc_daq_full: ufxc_daq_top with every parameter at its default
// (two chips of 256 x 256 pixels). It takes two software-mode images with both
// 14-bit counters, 448 packets of 1024 data bytes each, and one pump&probe pair
// with 2-bit counters, 128 packets, and checks every UDP frame on the three
// links against the chip data (daq_checker), the packet and exposure counts,
// and that the three links took the packets in turn.
`timescale 1ns/1ps
module tb_ufxc_daq_full;
  import ufxc_pkg::*;
  localparam int PIXELS = 65536;
  `include "daq_tb_body.svh"

  ufxc_daq_top dut (.*);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

  initial begin
    time t0;
    bring_up();
    t0 = $time;
    acquire(MODE_SOFTWARE, 2, 1000, 2);
    $display("two software images: 896 packets out after %0t", $time - t0);
    acquire(MODE_PUMP_PROBE, 2, 500, 2);
    chk(pumped_count == 1, "one pumped image");
    chk(link_frames[0] + link_frames[1] + link_frames[2] == 896 + 128, "frames on the links");
    // round robin restarts at link 0 with each acquisition
    for (int l = 0; l < 3; l++)
      chk(link_frames[l] == (896 - l + 2) / 3 + (128 - l + 2) / 3,
          $sformatf("link %0d carried %0d frames", l, link_frames[l]));
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end
endmodule
