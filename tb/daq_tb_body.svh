// daq_tb_body.svh: declarations, clocks, checking environment and
// acquisition tasks shared by the end-to-end testbenches of
// ufxc_daq_top. The including module defines PIXELS.
  logic        clk_fmc = 0, rst_fmc_n = 0, clk_sys = 0, rst_sys_n = 0;
  logic        acq_start = 0, acq_stop = 0;
  acq_mode_e   acq_mode = MODE_SOFTWARE;
  logic [15:0] n_images = 0;
  logic [31:0] exposure_cycles = 10;
  logic [1:0]  ttl_in = '0;
  logic [0:0]  ttl_sel = 1'b1;
  logic [1:0]  ttl_level;
  logic        acq_busy, acq_done, pumped;
  logic [15:0] image_idx, missed_triggers;
  logic [31:0] packets_built, link_stall_cycles;
  logic        det_gate, det_mode_2bit, det_rd_start;
  logic [1:0]  det_strobe;
  logic [1:0][7:0] det_data;
  logic [47:0] src_mac = 48'h02_00_5E_00_00_10;
  logic [2:0][47:0] dst_mac = '{48'h02_00_00_00_00_A3, 48'h02_00_00_00_00_A2, 48'h02_00_00_00_00_A1};
  logic [2:0][31:0] src_ip  = '{32'h0A00_0301, 32'h0A00_0201, 32'h0A00_0101};
  logic [2:0][31:0] dst_ip  = '{32'h0A00_0302, 32'h0A00_0202, 32'h0A00_0102};
  logic [15:0] src_port = 16'd4660;
  logic [2:0][15:0] dst_port = '{16'd7003, 16'd7002, 16'd7001};
  logic [2:0][7:0] gmii_txd;
  logic [2:0]  gmii_tx_en;
  logic [2:0][31:0] frames_sent;
  logic        clear = 0;
  int packets_rx, link_frames [3], n_exposures, gate_len, paused_cycles, env_checks, env_failures;
  int checks = 0, failures = 0, pumped_count = 0;

  always #2.5 clk_fmc = ~clk_fmc;   // 200 MHz
  always #4   clk_sys = ~clk_sys;   // 125 MHz

  daq_checker #(.PIXELS(PIXELS)) env (
    .clk_fmc, .clk_sys, .clear, .acq_mode(8'(acq_mode)), .det_gate, .det_mode_2bit, .det_rd_start,
    .det_strobe, .det_data, .gmii_txd, .gmii_tx_en, .src_mac, .dst_mac, .src_ip, .dst_ip,
    .src_port, .dst_port, .packets_rx, .link_frames, .exposures(n_exposures),
    .last_gate_len(gate_len), .paused_cycles, .checks(env_checks), .failures(env_failures));

  always @(posedge clk_fmc) if (det_rd_start && pumped) pumped_count++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic bring_up();
    repeat (4) @(negedge clk_sys);
    rst_fmc_n = 1; rst_sys_n = 1;
    repeat (4) @(negedge clk_fmc);
  endtask

  task automatic start_acq(input acq_mode_e m, input int n, input int expo);
    acq_mode = m; n_images = 16'(n); exposure_cycles = expo;
    @(negedge clk_fmc);
    acq_start = 1; clear = 1;
    @(negedge clk_fmc);
    acq_start = 0; clear = 0;
  endtask

  // Waits until every built packet has left on its link.
  task automatic drain();
    int t = 0;
    while ((frames_sent[0] + frames_sent[1] + frames_sent[2] != packets_built || gmii_tx_en != 0) && t < 1_000_000) begin
      @(negedge clk_sys);
      t++;
    end
    repeat (20) @(negedge clk_sys);
  endtask

  // One acquisition; triggers are given on TTL input 1 in the triggered modes.
  task automatic acquire(input acq_mode_e m, input int n, input int expo, input int n_expect);
    int cpc;
    cpc = PIXELS * (m == MODE_PUMP_PROBE ? 2 : 14) / 8192;
    start_acq(m, n, expo);
    for (int t = 0; acq_busy && t < 2_000_000; t++) begin
      if (m != MODE_SOFTWARE) begin
        int gap = $urandom_range(100, 3000);
        t += gap;
        repeat (gap) @(negedge clk_fmc);
        ttl_in[1] = 1;
        repeat (4) @(negedge clk_fmc);
        ttl_in[1] = 0;
      end else @(negedge clk_fmc);
    end
    drain();
    chk(n_exposures == n_expect, $sformatf("mode %0d: %0d exposures, expected %0d", m, n_exposures, n_expect));
    chk(gate_len == expo, $sformatf("exposure %0d cycles, expected %0d", gate_len, expo));
    chk(packets_rx == n_expect * 2 * 2 * cpc, $sformatf("mode %0d: %0d packets, expected %0d", m, packets_rx, n_expect * 4 * cpc));
  endtask
