// d_generator: the DMPDS "d generator", which adapts the distance d between
// the centre and the four sector start points from frame to frame.
//
// Frames are processed in groups of three trials: the first with d, the
// second with d - delta, the third with d + delta. When the third frame's
// SAD total is known, the trial with the lowest total becomes the new d and
// delta is halved (integer division: 5, 2, 1); once delta is 1 it stays 1,
// so d keeps probing +/-1 until reset. With the defaults the first frames
// use d = 10, 5, 15, as in the document.
//
// Interface: d_next is the d the next frame will use. The feeder pulses
// frame_start when it begins that frame and latches d_next in the same
// cycle. frame_done/frame_sad report each frame's SAD total in frame order.
// A new group can only start once all earlier frames are finished, because
// its d depends on them: d_ready is low while a group's first frame would
// have to wait. Ties keep the earlier trial; d - delta is clamped at 0 and
// d + delta at D_MAX. The trial sequence and start values are the
// document's; the tie rule, the clamping and the handshake are this
// design's choices.
module d_generator #(
  parameter int D_W        = 8,
  parameter int D_INIT     = 10,
  parameter int DELTA_INIT = 5,
  parameter int D_MAX      = 40,
  parameter int FSAD_W     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  output logic              d_ready,
  output logic [D_W-1:0]    d_next,
  input  logic              frame_done,
  input  logic [FSAD_W-1:0] frame_sad,
  output logic [D_W-1:0]    d_base,
  output logic [D_W-1:0]    delta
);

  logic [1:0]        next_trial;   // trial of the next frame to start
  logic [1:0]        res_trial;    // trial of the next frame to finish
  logic [3:0]        open_frames;  // started, not yet finished
  logic [FSAD_W-1:0] sad0, sad1;
  logic [D_W-1:0]    d_lo, d_hi;

  always_comb begin
    d_lo = (d_base > delta) ? d_base - delta : '0;
    d_hi = (int'(d_base) + int'(delta) > D_MAX) ? D_W'(D_MAX) : d_base + delta;
    unique case (next_trial)
      2'd1:    d_next = d_lo;
      2'd2:    d_next = d_hi;
      default: d_next = d_base;
    endcase
    d_ready = (next_trial != 2'd0) || (open_frames == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_base      <= D_W'(D_INIT);
      delta       <= D_W'(DELTA_INIT);
      next_trial  <= '0;
      res_trial   <= '0;
      open_frames <= '0;
      sad0        <= '0;
      sad1        <= '0;
    end else begin
      open_frames <= open_frames + 4'(frame_start) - 4'(frame_done);
      if (frame_start) next_trial <= (next_trial == 2'd2) ? 2'd0 : next_trial + 2'd1;
      if (frame_done) begin
        unique case (res_trial)
          2'd0: begin sad0 <= frame_sad; res_trial <= 2'd1; end
          2'd1: begin sad1 <= frame_sad; res_trial <= 2'd2; end
          default: begin
            // third trial finished: keep the best of the three
            if (sad1 < sad0 && sad1 <= frame_sad)      d_base <= d_lo;
            else if (frame_sad < sad0 && frame_sad < sad1) d_base <= d_hi;
            delta     <= (delta > D_W'(1)) ? delta >> 1 : D_W'(1);
            res_trial <= 2'd0;
          end
        endcase
      end
    end
  end

endmodule
