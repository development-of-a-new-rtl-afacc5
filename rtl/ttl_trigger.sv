// ttl_trigger: the TTL input block. It brings asynchronous TTL inputs into the
// 200 MHz acquisition clock domain and turns a rising edge of the selected
// input into a one-cycle trigger that starts an exposure in the
// external-trigger and pump&probe modes.
//
// Each input passes a two-flip-flop synchroniser; a third register keeps the
// previous level for edge detection. The trigger pulse therefore follows the
// input's rising edge by 3 clock cycles (2 to 3 after sampling jitter). Only
// the selected input triggers, and only while `enable` is high. `level` gives
// the synchronised levels of all inputs.
//
// Using TTL inputs to start exposures follows the document; the number of
// inputs, the input select, rising-edge sensitivity and the synchroniser depth
// are this design's own choices.
module ttl_trigger #(
  parameter int N_TTL = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_TTL-1:0]         ttl_in,
  input  logic [$clog2(N_TTL)-1:0] sel,
  input  logic                     enable,
  output logic [N_TTL-1:0]         level,
  output logic                     trig
);
  logic [N_TTL-1:0] meta, sync, prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      sync <= '0;
      prev <= '0;
      trig <= 1'b0;
    end else begin
      meta <= ttl_in;
      sync <= meta;
      prev <= sync;
      trig <= enable && sync[sel] && !prev[sel];
    end
  end

  assign level = sync;
endmodule
