// tb_ufxc_sequencer: checks the acquisition controller in all three modes.
// A small model answers each readout start with a busy period of random
// length. The testbench checks the number of exposures and readouts, the
// gate width against the programmed exposure, that the gate never overlaps a
// readout, the counter depth per mode, the image index and pumped flag, that
// triggered modes wait for a trigger and count triggers that come too early,
// the even image count of pump&probe, `stop`, and n = 0.
`timescale 1ns/1ps
module tb_ufxc_sequencer;
  import ufxc_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        start = 0, stop = 0, trig = 0, readout_busy = 0;
  acq_mode_e   mode = MODE_SOFTWARE;
  logic [15:0] n_images = 0;
  logic [31:0] exposure_cycles = 0;
  logic        busy, acq_begin, det_gate, det_mode_2bit, rd_start, pumped, done;
  acq_mode_e   acq_mode;
  logic [15:0] image_idx, missed_triggers;
  int checks = 0, failures = 0;
  int gates = 0, reads = 0, gate_len = 0, last_gate = 0, busy_left = 0, dones = 0;
  int pumped_seen = 0;

  ufxc_sequencer dut (.*);

  always #2.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Readout model and bookkeeping.
  always @(posedge clk) begin
    if (det_gate) gate_len++;
    else if (gate_len != 0) begin last_gate = gate_len; gate_len = 0; end
    if (det_gate && !$past(det_gate)) gates++;
    if (rd_start) begin
      reads++;
      chk(!det_gate, "gate low at readout start");
      chk(last_gate == int'(exposure_cycles), $sformatf("gate width %0d", last_gate));
      chk(pumped == (mode == MODE_PUMP_PROBE && image_idx[0] == 0), "pumped flag");
      if (pumped) pumped_seen++;
      chk(image_idx == 16'(reads - 1), "image index");
      busy_left = $urandom_range(3, 40);
    end
    if (busy_left > 0) begin
      readout_busy <= 1;
      busy_left--;
      chk(!det_gate, "gate low during readout");
    end else readout_busy <= 0;
    if (done) dones++;
  end

  task automatic run(input acq_mode_e m, input int n, input int expo, input int n_expect);
    int t;
    gates = 0; reads = 0; dones = 0;
    mode = m; n_images = 16'(n); exposure_cycles = expo;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(acq_mode == m, "mode latched");
    chk(det_mode_2bit == (m == MODE_PUMP_PROBE), "counter depth");
    t = 0;
    while (busy && t < 20000) begin
      if (m != MODE_SOFTWARE) begin
        repeat ($urandom_range(5, 60)) @(negedge clk);
        trig = 1;
        @(negedge clk) trig = 0;
      end else @(negedge clk);
      t++;
    end
    repeat (3) @(negedge clk);
    chk(gates == n_expect, $sformatf("mode %0d n=%0d: %0d exposures, expected %0d", m, n, gates, n_expect));
    chk(reads == n_expect, $sformatf("%0d readouts, expected %0d", reads, n_expect));
    chk(dones == 1, "one done pulse");
    chk(!busy, "idle at end");
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run(MODE_SOFTWARE, 3, 5, 3);
    run(MODE_SOFTWARE, 1, 1, 1);
    run(MODE_EXT_TRIGGER, 4, 17, 4);
    chk(missed_triggers > 0, "triggers during readout counted as missed");
    run(MODE_PUMP_PROBE, 3, 9, 4);   // rounded up to an even count
    chk(pumped_seen == 2, $sformatf("pumped images %0d", pumped_seen));
    run(MODE_PUMP_PROBE, 6, 4, 6);
    run(MODE_SOFTWARE, 0, 4, 0);
    // stop in the middle of a long acquisition
    gates = 0; dones = 0;
    mode = MODE_EXT_TRIGGER; n_images = 100; exposure_cycles = 10;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (2) begin
      repeat (50) @(negedge clk);
      trig = 1; @(negedge clk) trig = 0;
    end
    repeat (100) @(negedge clk);
    stop = 1; @(negedge clk) stop = 0;
    repeat (5) @(negedge clk);
    chk(!busy && dones == 1, "stop ends the acquisition");
    chk(gates == 2, $sformatf("%0d exposures before stop", gates));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
