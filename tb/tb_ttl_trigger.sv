// tb_ttl_trigger: checks the TTL input block. Pulses of random width and
// phase are applied to both inputs; the testbench checks that exactly one
// trigger follows each rising edge of the selected input, 2 to 3 clock
// cycles after the edge, that the other input and a disabled block give none,
// and that `level` follows the inputs.
`timescale 1ns/1ps
module tb_ttl_trigger;
  logic       clk = 0, rst_n = 0;
  logic [1:0] ttl_in = '0;
  logic [0:0] sel = '0;
  logic       enable = 0;
  logic [1:0] level;
  logic       trig;
  int checks = 0, failures = 0;
  int ntrig = 0;

  ttl_trigger #(.N_TTL(2)) dut (.clk, .rst_n, .ttl_in, .sel, .enable, .level, .trig);

  always #2.5 clk = ~clk;   // 200 MHz
  always @(posedge clk) if (trig) ntrig++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Rising edge on input i, measure cycles to trig (or check none).
  task automatic pulse(input int i, input bit expect_trig);
    int n0, lat;
    n0 = ntrig;
    #($urandom_range(1, 4900) * 1ps);
    ttl_in[i] = 1;
    @(posedge clk);
    lat = 0;
    repeat (6) begin
      @(negedge clk);
      if (ntrig == n0) lat++;
    end
    chk(level[i] == 1, "level high");
    if (expect_trig) begin
      chk(ntrig == n0 + 1, $sformatf("one trigger on input %0d (got %0d)", i, ntrig - n0));
      chk(lat >= 1 && lat <= 3, $sformatf("latency %0d", lat));
    end else begin
      chk(ntrig == n0, $sformatf("no trigger on input %0d", i));
    end
    repeat ($urandom_range(0, 5)) @(posedge clk);
    ttl_in[i] = 0;
    repeat (5) @(posedge clk);
    chk(level[i] == 0, "level low");
    chk(ntrig == n0 + (expect_trig ? 1 : 0), "no trigger on falling edge");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    pulse(0, 0);                // disabled
    enable = 1;
    for (int r = 0; r < 20; r++) begin
      sel = 1'($urandom_range(0, 1));
      pulse(0, sel == 0);
      pulse(1, sel == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
