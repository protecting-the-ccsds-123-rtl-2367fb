// ccsds_core_model: behavioural stand-in for the CCSDS 123.0-B-2 compressor
// core, for simulation only (not synthesizable intent, not the standard's
// algorithm).
//
// It has the core's interface as seen by the self-check: a configuration
// word, a valid/ready sample stream and a stream of 64-bit frames with an
// end-of-image flag. Like the real compressor it folds every sample into a
// running state, so any corruption travels to the last frame: each sample is
// divided by (max_abs_err + 1), mixed into a 64-bit signature, and the
// signature is emitted every FRAME_SAMPLES samples and after the image's last
// sample. Output follows input by one cycle. With STALL_PERIOD > 0 the model
// drops ready one cycle in STALL_PERIOD.
//
// Emulated configuration upsets (held until the model is reset, as an upset
// persists until reconfiguration):
//   fault_mode 1  input bit fault_arg stuck at 0 (masked for images that
//                 never set that bit);
//   fault_mode 2  output stops after fault_arg frames of an image;
//   fault_mode 3  the end-of-image flag is never raised;
//   fault_mode 4  bit fault_arg of the signature flipped on the last frame;
//   fault_mode 5  bit 0 of output frame fault_arg (counted from 0 within an
//                 image) flipped on its way out, the running state untouched:
//                 an upset after the adaptive part, which does not spread.
module ccsds_core_model
  import selfcheck_pkg::*;
#(
  parameter int unsigned FRAME_SAMPLES = 64,
  parameter int unsigned STALL_PERIOD  = 0
) (
  input  logic        clk,
  input  logic        rst,
  input  core_cfg_t   cfg,
  input  logic        in_valid,
  input  sample_t     in_sample,
  output logic        in_ready,
  output frame_beat_t out,
  input  int unsigned fault_mode,
  input  int unsigned fault_arg
);
  logic [63:0] st;
  int unsigned idx, in_frame, frames_out, total, qstep, cyc;
  logic [15:0] s;
  logic        fin;

  always_comb in_ready = (STALL_PERIOD == 0) || (cyc % STALL_PERIOD != STALL_PERIOD - 1);

  always @(posedge clk) begin
    if (rst) begin
      st         <= tb_ref_pkg::MODEL_SEED;
      idx        <= 0;
      in_frame   <= 0;
      frames_out <= 0;
      out        <= '0;
      cyc        <= 0;
    end else begin
      cyc       <= cyc + 1;
      out.valid <= 1'b0;
      if (in_valid && in_ready) begin
        automatic logic [63:0] nst;
        automatic int unsigned t = (idx == 0) ? int'(cfg.nx) * int'(cfg.ny) * int'(cfg.nz) : total;
        automatic int unsigned q = (idx == 0) ? int'(cfg.max_abs_err) + 1 : qstep;
        total <= t;
        qstep <= q;
        s = in_sample;
        if (fault_mode == 1) s[fault_arg] = 1'b0;
        nst = tb_ref_pkg::model_step(st, s, q, idx);
        fin = (idx + 1 == t);
        if (in_frame + 1 == FRAME_SAMPLES || fin) begin
          if (!(fault_mode == 2 && frames_out >= fault_arg)) begin
            out.valid <= 1'b1;
            out.data  <= nst;
            if (fault_mode == 4 && fin) out.data <= nst ^ (64'd1 << fault_arg);
            if (fault_mode == 5 && frames_out == fault_arg) out.data <= nst ^ 64'd1;
            out.last  <= fin && (fault_mode != 3);
          end
          frames_out <= fin ? 0 : frames_out + 1;
          in_frame   <= 0;
        end else begin
          in_frame <= in_frame + 1;
        end
        if (fin) begin
          st  <= tb_ref_pkg::MODEL_SEED;
          idx <= 0;
        end else begin
          st  <= nst;
          idx <= idx + 1;
        end
      end
    end
  end
endmodule
