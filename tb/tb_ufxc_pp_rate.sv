// tb_ufxc_pp_rate: pump&probe frame-rate workload on ufxc_daq_top with all
// parameters at their defaults. TTL triggers arrive every 50 us (20 kHz, the
// chip's rated 2-bit frame rate) during an acquisition of 8 images with 5 us
// exposures. The design cannot take an image per trigger: each 2-bit image is
// 64 packets and the three Gigabit links need about 193 us for them, so the
// readout is paced down and the triggers in between are counted as missed.
// The testbench checks every frame against the chip data, the packet and
// exposure counts, that every image starts on a trigger edge (a multiple of
// 50 us after the first), that the image period stays within 4 trigger
// periods (at least 5 kframes/s), and that missed triggers are reported.
`timescale 1ns/1ps
module tb_ufxc_pp_rate;
  import ufxc_pkg::*;
  localparam int PIXELS = 65536;
  localparam int TRIG_PERIOD = 10_000;   // 200 MHz cycles = 50 us
  `include "daq_tb_body.svh"

  ufxc_daq_top dut (.*);

  time gate_rise [$];
  logic gate_q = 0;
  always @(posedge clk_fmc) begin
    gate_q <= det_gate;
    if (det_gate && !gate_q) gate_rise.push_back($time);
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

  initial begin
    int n_trig = 0;
    bring_up();
    start_acq(MODE_PUMP_PROBE, 8, 1000);
    fork
      begin
        for (int t = 0; acq_busy && t < 400; t++) begin
          ttl_in[1] = 1; repeat (20) @(negedge clk_fmc);
          ttl_in[1] = 0; repeat (TRIG_PERIOD - 20) @(negedge clk_fmc);
          n_trig++;
        end
      end
    join
    drain();
    chk(n_exposures == 8, $sformatf("%0d exposures", n_exposures));
    chk(packets_rx == 8 * 64, $sformatf("%0d packets", packets_rx));
    chk(gate_rise.size() == 8, "eight exposures recorded");
    for (int i = 1; i < gate_rise.size(); i++) begin
      int cyc, per;
      cyc = int'((gate_rise[i] - gate_rise[i-1]) / 5);
      per = cyc / TRIG_PERIOD;
      chk(cyc % TRIG_PERIOD == 0, $sformatf("image %0d not on a trigger edge (%0d cycles)", i, cyc));
      chk(per >= 1 && per <= 4, $sformatf("image period %0d trigger periods", per));
    end
    $display("triggers %0d, images 8, missed %0d, mean image period %0.1f us",
             n_trig, missed_triggers, real'(gate_rise[7] - gate_rise[0]) / 7.0 / 1000.0);
    chk(missed_triggers > 0, "missed triggers reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end
endmodule
