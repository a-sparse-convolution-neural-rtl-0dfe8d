// top_ctrl: top controller sequencing one layer on one sub-space.
//
// A run consists of up to two phases, selected by run_cm and run_sc:
//   CM  - coordinate management: the coordinate manager builds the rule book;
//         the PE array is switched to DIST mode.
//   CLR - the output accumulator entries 0..n_pts-1 are cleared, one per cycle.
//   SC  - sparse convolution: the SCNN engine streams the rule book through the
//         PE array in MAC mode; then two drain cycles let the accumulator finish.
// Running SC without CM reuses the rule book already in the index memory, as
// consecutive layers that share the same coordinates can. The controller also
// counts the cycles spent in CM and in CLR+SC for runtime accounting.
// Interface: start pulse; busy high until the one-cycle done pulse. cm_start and
// sc_start are one-cycle pulses; cm_done/sc_done are the sub-blocks' done pulses.
// The phase order follows the architecture's processing sequence (coordinate
// management, then sparse convolution); the clear phase, the phase-select bits
// and the drain length are this design's choices.
module top_ctrl
  import scnn_pkg::*;
#(
  parameter int unsigned NPTS = 1024,
  localparam int unsigned AW  = $clog2(NPTS)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          run_cm,
  input  logic          run_sc,
  input  logic [AW:0]   n_pts,
  output logic          cm_start,
  input  logic          cm_done,
  output logic          sc_start,
  input  logic          sc_done,
  output logic          clr_en,
  output logic [AW-1:0] clr_addr,
  output pe_mode_e      arr_mode,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cm_cycles,
  output logic [31:0]   sc_cycles
);

  typedef enum logic [2:0] {S_IDLE, S_CM, S_CLR, S_SC, S_DRAIN, S_DONE} state_e;

  state_e       state;
  logic         cm_go, sc_go, do_sc;
  logic [AW:0]  cnt;

  always_comb begin
    clr_en   = (state == S_CLR) && (cnt < n_pts);
    clr_addr = cnt[AW-1:0];
    arr_mode = (state == S_CM) ? MODE_DIST : MODE_MAC;
    busy     = (state != S_IDLE);
    cm_start = cm_go;
    sc_start = sc_go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cm_go     <= 1'b0;
      sc_go     <= 1'b0;
      do_sc     <= 1'b0;
      cnt       <= '0;
      done      <= 1'b0;
      cm_cycles <= '0;
      sc_cycles <= '0;
    end else begin
      cm_go <= 1'b0;
      sc_go <= 1'b0;
      done  <= 1'b0;
      if (state == S_CM) cm_cycles <= cm_cycles + 1;
      if (state == S_CLR || state == S_SC || state == S_DRAIN) sc_cycles <= sc_cycles + 1;
      unique case (state)
        S_IDLE: if (start) begin
          cm_cycles <= '0;
          sc_cycles <= '0;
          do_sc     <= run_sc;
          cnt       <= '0;
          if (run_cm) begin
            cm_go <= 1'b1;
            state <= S_CM;
          end else if (run_sc) state <= S_CLR;
          else                 state <= S_DONE;
        end
        S_CM: if (cm_done) begin
          cnt   <= '0;
          state <= do_sc ? S_CLR : S_DONE;
        end
        S_CLR: begin
          if (cnt < n_pts) cnt <= cnt + 1;
          else begin
            sc_go <= 1'b1;
            state <= S_SC;
          end
        end
        S_SC: if (sc_done) begin
          cnt   <= '0;
          state <= S_DRAIN;
        end
        S_DRAIN: begin
          cnt <= cnt + 1;
          if (cnt == (AW+1)'(1)) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
