// ufxc_chip_model: behavioural stand-in for the readout side of one UFXC32k
// chip, for simulation only. On `rd_start` it restarts at byte 0 and counts
// one more image (the first readout after `clear` is image 0). Each clock
// edge that sees `strobe` high puts the next byte of ufxc_tb_pkg::pix_byte on
// the 8 data lanes. It also counts exposures (rising edges of `gate`), the
// width of the last one, and strobes beyond the end of the readout.
module ufxc_chip_model #(
  parameter int CHIP   = 0,
  parameter int PIXELS = 4096
) (
  input  logic       clk,
  input  logic       clear,
  input  logic       gate,
  input  logic       mode_2bit,
  input  logic       rd_start,
  input  logic       strobe,
  output logic [7:0] data,
  output int         exposures,
  output int         last_gate_len,
  output int         overruns,
  output int         strobes
);
  int k, img, glen;
  logic gate_q;

  initial begin
    data = '0; k = 0; img = -1; exposures = 0; last_gate_len = 0; overruns = 0;
    strobes = 0; glen = 0; gate_q = 0;
  end

  always @(posedge clk) begin
    gate_q <= gate;
    if (clear) begin
      img = -1; exposures = 0; overruns = 0; strobes = 0;
    end else begin
      if (gate && !gate_q) begin
        exposures = exposures + 1;
        glen = 0;
      end
      if (gate) glen = glen + 1;
      if (!gate && gate_q) last_gate_len = glen;
      if (rd_start) begin
        k = 0;
        img = img + 1;
      end else if (strobe) begin
        strobes = strobes + 1;
        if (k >= 2 * ufxc_tb_pkg::bytes_per_counter(PIXELS, mode_2bit)) overruns = overruns + 1;
        data <= ufxc_tb_pkg::pix_byte(CHIP, img, k);
        k = k + 1;
      end
    end
  end
endmodule
