// ufxc_sequencer: acquisition controller of the FMC block (200 MHz domain).
//
// It runs one acquisition of n images in one of three modes:
//   software          n images, each exposure starts at once (14+14 bit counters)
//   external trigger  n images, each exposure starts on a TTL trigger (14+14 bit)
//   pump&probe        an even number of triggered images (2+2 bit counters);
//                     even-numbered images are the pumped ones, odd-numbered
//                     ones the unpumped reference of the same pair
// For each image it holds the detector counting gate `det_gate` high for
// `exposure_cycles` clock cycles, then pulses `rd_start` for one cycle and
// waits until the readout receivers report `readout_busy` low. `det_mode_2bit`
// tells the chips and the receivers which counter depth is read.
//
// Interface: `start` (one cycle) latches mode, image count and exposure time
// and pulses `acq_begin`; `stop` ends the acquisition at the next image
// boundary (a readout in progress is always finished, so no packet is left
// incomplete). Triggers that arrive while no image is armed are counted in
// `missed_triggers`. `done` pulses when the acquisition ends.
// Timing: in software mode the gate rises 2 cycles after `start`; in the
// triggered modes one cycle after `trig`.
//
// The three modes and their counter depths follow the document. The
// gate/readout handshake, the stop rule, rounding the pump&probe image count
// up to an even number and n = 0 meaning "nothing" are this design's choices.
module ufxc_sequencer
  import ufxc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  acq_mode_e   mode,
  input  logic [15:0] n_images,
  input  logic [31:0] exposure_cycles,
  input  logic        trig,
  input  logic        readout_busy,
  output logic        busy,
  output logic        acq_begin,
  output acq_mode_e   acq_mode,
  output logic        det_gate,
  output logic        det_mode_2bit,
  output logic        rd_start,
  output logic [15:0] image_idx,
  output logic        pumped,
  output logic        done,
  output logic [15:0] missed_triggers
);
  typedef enum logic [2:0] {S_IDLE, S_ARM, S_EXPOSE, S_RD_START, S_RD_WAIT} state_e;
  state_e      state;
  logic [15:0] n_total;
  logic [31:0] exp_len, exp_cnt;
  logic        stop_req;

  assign busy   = (state != S_IDLE);
  assign pumped = (acq_mode == MODE_PUMP_PROBE) && !image_idx[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      acq_mode        <= MODE_SOFTWARE;
      n_total         <= '0;
      exp_len         <= '0;
      exp_cnt         <= '0;
      stop_req        <= 1'b0;
      acq_begin       <= 1'b0;
      det_gate        <= 1'b0;
      det_mode_2bit   <= 1'b0;
      rd_start        <= 1'b0;
      image_idx       <= '0;
      done            <= 1'b0;
      missed_triggers <= '0;
    end else begin
      acq_begin <= 1'b0;
      rd_start  <= 1'b0;
      done      <= 1'b0;
      if (trig && state != S_ARM) missed_triggers <= missed_triggers + 1'b1;
      if (stop && state != S_IDLE) stop_req <= 1'b1;
      unique case (state)
        S_IDLE: begin
          stop_req <= 1'b0;
          if (start) begin
            acq_mode      <= mode;
            det_mode_2bit <= (mode == MODE_PUMP_PROBE);
            n_total       <= (mode == MODE_PUMP_PROBE) ? n_images + {15'd0, n_images[0]} : n_images;
            exp_len       <= (exposure_cycles == '0) ? 32'd1 : exposure_cycles;
            image_idx     <= '0;
            acq_begin     <= 1'b1;
            if (n_images == '0) done <= 1'b1;
            else                state <= S_ARM;
          end
        end
        S_ARM: begin
          if (stop || stop_req) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (acq_mode == MODE_SOFTWARE || trig) begin
            det_gate <= 1'b1;
            exp_cnt  <= exp_len;
            state    <= S_EXPOSE;
          end
        end
        S_EXPOSE: begin
          exp_cnt <= exp_cnt - 1'b1;
          if (exp_cnt == 32'd1) begin
            det_gate <= 1'b0;
            rd_start <= 1'b1;
            state    <= S_RD_START;
          end
        end
        S_RD_START: state <= S_RD_WAIT;   // receivers raise busy in this cycle
        S_RD_WAIT: begin
          if (!readout_busy) begin
            if (image_idx + 1'b1 == n_total || stop_req) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_ARM;
            end
            image_idx <= image_idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_gate_not_in_readout: assert property (@(posedge clk) disable iff (!rst_n)
                                          (state == S_RD_WAIT) |-> !det_gate);
endmodule
