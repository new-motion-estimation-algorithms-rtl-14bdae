// mpds_feeder: fills the reference and current memories of the five
// diamond-search cores from the external frame memory, one core after the
// other, so that a core searches while the next one is being filled.
//
// For each block it fills core 0 (start point (0,0)), then the sector cores
// A, B, C, D (start points (d,d), (-d,d), (-d,-d), (d,-d)), 34 beats each:
// one 34-sample window row per beat, plus one current-block row on each of
// the first eight beats. The window of a core with start point (sx,sy) has
// its top-left corner at (x+sx-13, y+sy-13). Rows go out in the order
// 11..22 (everything the first large diamond reads), 0..10, 23..33, so a
// core can start searching 12 beats into its fill. A core's fill begins
// only when that core is idle, and the first beat doubles as the core's
// start pulse. With an always-ready memory and idle cores a block takes
// exactly 5 * 34 = 170 cycles and consecutive blocks follow without a gap.
//
// Blocks arrive on a valid/ready port carrying the block position and a
// last-block-of-frame flag. The first block of a frame waits for the d
// generator's d_ready, pulses frame_start and latches d for the whole
// frame. Each block's tag (position, last flag, d) is pushed into the tag
// queue when its fill starts.
//
// TWO_PASS (set for the eleven-iteration version): after core D's first
// fill the feeder visits cores 0..D a second time. It waits while a core is
// still searching; a paused core gets a second 34-row fill with its window
// moved by the core's org_off (no current rows, start on the first beat),
// a finished core is skipped. A block then takes at most 10 * 34 = 340
// cycles. The fill order of the cores and the
// 170-cycle period are the document's; the row order and the handshakes
// are this design's.
module mpds_feeder
  import me_pkg::*;
#(
  parameter bit TWO_PASS = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // block commands
  input  logic               blk_valid,
  output logic               blk_ready,
  input  coord_t             blk_x,
  input  coord_t             blk_y,
  input  logic               blk_last,
  // d generator
  input  logic               d_ready,
  input  dist_t              d_next,
  output logic               frame_start,
  // frame memory
  output logic               fetch_valid,
  input  logic               fetch_ready,
  output fetch_t             fetch,
  input  win_row_t           ref_data,
  input  blk_row_t           cur_data,
  // cores
  input  logic [N_CORES-1:0] core_idle,
  input  logic [N_CORES-1:0] core_searching,
  input  logic [N_CORES-1:0] core_paused,
  input  vec_t               core_off [N_CORES],
  output logic [N_CORES-1:0] core_start,
  output logic [N_CORES-1:0] ref_we,
  output pos_t               ref_row,
  output win_row_t           ref_wdata,
  output logic [N_CORES-1:0] cur_we,
  output logic [2:0]         cur_row,
  output blk_row_t           cur_wdata,
  // tag queue
  output logic               tag_push,
  output blk_tag_t           tag,
  input  logic               tag_full
);

  localparam int BEATS = WIN;

  logic       nb_v;        // next block register
  blk_tag_t   nb;
  logic       new_frame;   // next accepted block starts a frame
  dist_t      d_frame;
  logic       act;         // a block is being fed
  blk_tag_t   cb;
  logic [2:0] k;           // core being filled
  logic [5:0] beat;
  logic       pass;        // 0: first fill, 1: re-centred fill
  logic       xfer;
  logic       skip;        // second pass: this core already finished

  // block intake
  assign blk_ready   = !nb_v && (!new_frame || d_ready);
  assign frame_start = blk_valid && blk_ready && new_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb_v      <= 1'b0;
      nb        <= '0;
      new_frame <= 1'b1;
      d_frame   <= '0;
    end else begin
      if (blk_valid && blk_ready) begin
        nb_v      <= 1'b1;
        nb.x      <= blk_x;
        nb.y      <= blk_y;
        nb.last   <= blk_last;
        nb.d      <= new_frame ? d_next : d_frame;
        if (new_frame) d_frame <= d_next;
        new_frame <= blk_last;
      end else if (nb_v && (!act || ((xfer && beat == 6'(BEATS-1) || skip) &&
                                     k == 3'(N_CORES-1) && (pass || !TWO_PASS)))) begin
        nb_v <= 1'b0;
      end
    end
  end

  // start point of core k for distance d
  function automatic coord_t sx(input logic [2:0] c, input dist_t d);
    unique case (c)
      3'd1, 3'd4: return coord_t'(d);
      3'd2, 3'd3: return -coord_t'(d);
      default:    return '0;
    endcase
  endfunction
  function automatic coord_t sy(input logic [2:0] c, input dist_t d);
    unique case (c)
      3'd1, 3'd2: return coord_t'(d);
      3'd3, 3'd4: return -coord_t'(d);
      default:    return '0;
    endcase
  endfunction

  // fill order: rows of the first large diamond first
  pos_t row_of_beat;
  always_comb begin
    if (beat < 6'd12)      row_of_beat = pos_t'(beat + 6'd11);
    else if (beat < 6'd23) row_of_beat = pos_t'(beat - 6'd12);
    else                   row_of_beat = pos_t'(beat);
  end

  always_comb begin
    if (!pass)
      fetch_valid = act && (beat != '0 || (core_idle[k] && (k != '0 || !tag_full)));
    else
      fetch_valid = act && (beat != '0 || (!core_searching[k] && core_paused[k]));
    skip        = act && pass && beat == '0 && !core_searching[k] && !core_paused[k];
    xfer        = fetch_valid && fetch_ready;
    fetch.ref_x  = cb.x + sx(k, cb.d) - coord_t'(CENTER) + (pass ? coord_t'(core_off[k].x) : '0);
    fetch.ref_y  = cb.y + sy(k, cb.d) - coord_t'(CENTER) + (pass ? coord_t'(core_off[k].y) : '0)
                 + coord_t'(row_of_beat);
    fetch.cur_en = (beat < 6'(BLK)) && !pass;
    fetch.cur_x  = cb.x;
    fetch.cur_y  = cb.y + coord_t'(beat[2:0]);
    ref_row    = row_of_beat;
    ref_wdata  = ref_data;
    cur_row    = beat[2:0];
    cur_wdata  = cur_data;
    core_start = '0;
    ref_we     = '0;
    cur_we     = '0;
    if (xfer) begin
      core_start[k] = (beat == '0);
      ref_we[k]     = 1'b1;
      cur_we[k]     = fetch.cur_en;
    end
    tag_push = xfer && beat == '0 && k == '0 && !pass;
    tag      = cb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act  <= 1'b0;
      cb   <= '0;
      k    <= '0;
      beat <= '0;
      pass <= 1'b0;
    end else begin
      if (!act) begin
        if (nb_v) begin
          act  <= 1'b1;
          cb   <= nb;
          k    <= '0;
          beat <= '0;
          pass <= 1'b0;
        end
      end else if (xfer || skip) begin
        if (xfer && beat != 6'(BEATS-1)) begin
          beat <= beat + 6'd1;
        end else begin
          beat <= '0;
          if (k != 3'(N_CORES-1)) begin
            k <= k + 3'd1;
          end else if (TWO_PASS && !pass) begin
            k    <= '0;           // second round: re-centred windows
            pass <= 1'b1;
          end else if (nb_v) begin
            cb   <= nb;           // next block follows without a gap
            k    <= '0;
            pass <= 1'b0;
          end else begin
            act <= 1'b0;
          end
        end
      end
    end
  end

endmodule
