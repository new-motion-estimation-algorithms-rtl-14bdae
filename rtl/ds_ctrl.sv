// ds_ctrl: control unit and position controllers of one diamond-search
// core.
//
// The search starts on 'start' with the large diamond (LDSP) centred at
// window position (13,13). One diamond step runs as:
//   WAIT_ROWS  wait until every reference row the step reads has arrived
//   RUN        5 cycles: cycles 0..3 copy line pair k of all 13 candidates
//              from the reference memory into the local memories, cycles
//              1..4 feed line pair k-1 to the processing units
//   DRAIN      wait for the processing units' SAD (5-stage pipeline), then
//              take the comparator's decision in the same cycle
// After an LDSP the position controller moves the centre to the best
// candidate. When the best candidate is the centre, the small diamond
// (SDSP) follows at once from MEM A..D, which already hold its candidates,
// with no reload. The search is limited to the first LDSP plus MAX_ITER
// further LDSPs (five in the document); when the limit is reached away from
// the centre, the centre moves to the best candidate, MEM A..D are reloaded
// around it and the SDSP runs there. The SDSP position controller then
// forms the vector (final position minus 13) and the result goes to a
// one-entry output register (res_valid/res_ready); the core becomes idle
// as soon as the register has taken it, so it can be refilled while an
// earlier result still waits. With the default sizes the worst case is
// 6 LDSPs + reload + SDSP and the centre never leaves the 34x34 window.
// With MAX_ITER > 5 (eleven iterations in the document) one window is not
// enough: when the sixth LDSP of a window still moves, the centre moves to
// the winner, its offset from the start point is added to org_off, the
// centre is re-based to (13,13) and the control pauses ('paused'). The next
// 'start' (which also clears the window's row valid bits in the core)
// resumes the search once the re-centred window rows arrive; the final vector is org_off plus the last position minus 13.
// 'searching' is high while a search runs and is not paused.
// The step split, the tie rule (centre first), the reload at the iteration
// limit and the pause every six LDSPs are this design's reading of the
// document.
module ds_ctrl
  import me_pkg::*;
#(
  parameter int MAX_ITER = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  idle,
  output logic                  searching,  // a diamond step is in progress
  output logic                  paused,     // waiting for a re-centred window
  output vec_t                  org_off,    // window origin relative to the start point
  input  logic [WIN-1:0]        row_valid,
  // reference patch address and local-memory load
  output logic signed [POS_W:0] base_x,
  output logic signed [POS_W:0] base_y,
  output logic                  lm_we,
  output logic [1:0]            lm_wpair,
  // processing units
  output logic                  pu_in_valid,
  output logic                  pu_first,
  output logic                  pu_last,
  output logic [1:0]            pu_pair,
  output logic                  sdsp_mode,
  input  logic                  pu_sad_valid,
  // comparators
  input  logic [3:0]            ldsp_best_idx,
  input  sad_t                  ldsp_best_sad,
  input  logic [2:0]            sdsp_best_idx,
  input  sad_t                  sdsp_best_sad,
  output sad_t                  center_sad,
  // result
  output logic                  res_valid,
  input  logic                  res_ready,
  output core_result_t          res
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_ROWS, S_RUN, S_DRAIN, S_PAUSE, S_OUT} state_t;

  // large diamonds one window fill can hold: the first plus five more
  localparam int PASS_LDSP = 6;

  state_t      state;
  logic [2:0]  cnt;
  logic        load;          // RUN copies candidates into the local memories
  logic [3:0]  n_ldsp;        // LDSPs evaluated
  pos_t        cx, cy;        // window position of the current centre
  core_result_t fin;

  function automatic pos_t move(input pos_t p, input logic signed [2:0] d);
    return pos_t'(int'(p) + int'(d));
  endfunction

  assign idle      = (state == S_IDLE);
  assign paused    = (state == S_PAUSE);
  assign searching = (state == S_WAIT_ROWS) || (state == S_RUN) || (state == S_DRAIN);

  pos_t ncx, ncy;   // centre after the move to the LDSP winner
  always_comb begin
    ncx = move(cx, cand_dx(int'(ldsp_best_idx)));
    ncy = move(cy, cand_dy(int'(ldsp_best_idx)));
  end

  // rows read by a step centred at cy: cy-2 .. cy+BLK+1, clamped to the window
  logic rows_ok;
  always_comb begin
    rows_ok = 1'b1;
    for (int r = 0; r < WIN; r++)
      if (r >= int'(cy) - 2 && r <= int'(cy) + BLK + 1 && !row_valid[r]) rows_ok = 1'b0;
  end

  always_comb begin
    base_x      = (POS_W+1)'(int'(cx) - 2);
    base_y      = (POS_W+1)'(int'(cy) - 2 + 2 * int'(cnt[1:0]));
    lm_we       = (state == S_RUN) && load && (cnt < 3'd4);
    lm_wpair    = cnt[1:0];
    pu_in_valid = (state == S_RUN) && (cnt >= 3'd1);
    pu_pair     = 2'(cnt - 3'd1);
    pu_first    = (cnt == 3'd1);
    pu_last     = (cnt == 3'd4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      load       <= 1'b0;
      sdsp_mode  <= 1'b0;
      n_ldsp     <= '0;
      cx         <= pos_t'(CENTER);
      cy         <= pos_t'(CENTER);
      center_sad <= '0;
      fin        <= '0;
      org_off    <= '0;
      res_valid  <= 1'b0;
      res        <= '0;
    end else begin
      if (res_valid && res_ready) res_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cx        <= pos_t'(CENTER);
          cy        <= pos_t'(CENTER);
          n_ldsp    <= '0;
          org_off   <= '0;
          sdsp_mode <= 1'b0;
          load      <= 1'b1;
          state     <= S_WAIT_ROWS;
        end
        S_PAUSE: if (start) begin
          // the re-centred window has started to arrive
          sdsp_mode <= 1'b0;
          load      <= 1'b1;
          state     <= S_WAIT_ROWS;
        end
        S_WAIT_ROWS: if (rows_ok) begin
          cnt   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd4) state <= S_DRAIN;
        end
        S_DRAIN: if (pu_sad_valid) begin
          if (!sdsp_mode) begin
            n_ldsp     <= n_ldsp + 4'd1;
            center_sad <= ldsp_best_sad;
            if (ldsp_best_idx == 4'(LDSP_CTR)) begin
              // best at the centre: small diamond from MEM A..D, no reload
              sdsp_mode <= 1'b1;
              load      <= 1'b0;
              cnt       <= '0;
              state     <= S_RUN;
            end else if (int'(n_ldsp) + 1 < MAX_ITER + 1 &&
                         (int'(n_ldsp) + 1) % PASS_LDSP == 0) begin
              // window used up: wait for one centred on the new position
              org_off.x <= org_off.x + mv_t'(int'(ncx) - CENTER);
              org_off.y <= org_off.y + mv_t'(int'(ncy) - CENTER);
              cx        <= pos_t'(CENTER);
              cy        <= pos_t'(CENTER);
              state     <= S_PAUSE;
            end else begin
              cx    <= ncx;
              cy    <= ncy;
              load  <= 1'b1;
              sdsp_mode <= (int'(n_ldsp) + 1 >= MAX_ITER + 1);
              state <= S_WAIT_ROWS;
            end
          end else begin
            logic signed [2:0] ox, oy;
            ox = (sdsp_best_idx == 3'd0) ? 3'sd0 : cand_dx(N_LDSP - 1 + int'(sdsp_best_idx));
            oy = (sdsp_best_idx == 3'd0) ? 3'sd0 : cand_dy(N_LDSP - 1 + int'(sdsp_best_idx));
            fin.vec.x <= org_off.x + mv_t'(int'(cx) + int'(ox) - CENTER);
            fin.vec.y <= org_off.y + mv_t'(int'(cy) + int'(oy) - CENTER);
            fin.sad   <= sdsp_best_sad;
            fin.ldsp  <= n_ldsp;
            state     <= S_OUT;
          end
        end
        S_OUT: if (!res_valid || res_ready) begin
          res       <= fin;
          res_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
