// bist_ctrl: BIST control unit.
//
// Puts the circuits under test in test or normal mode, loads the seed into the
// test pattern generator, runs the generator for L functional clock cycles
// (one primary input vector a(u) per cycle, counted by a modulo-L counter),
// steers the MISRs and the response analyzer, and raises an interrupt when the
// analyzer reports an error. The interrupt stays until irq_clear is pulsed.
//
// Sequence after start (sampled in IDLE while test_mode is high):
//   LOAD  (1 cycle)  tpg_load, misr_clr, tra_clr
//   RUN   (L cycles) tpg_en, misr_en; u counts 0..L-1
//   CHECK (1 cycle)  tra_check
//   DONE  (1 cycle)  done; irq set if error
// so done is high L+2 cycles after the clock edge that took start.
// Dropping test_mode aborts a run and returns to IDLE. cut_test_sel follows
// test_mode (registered) and selects the generator as the CUT input source.
// The tasks of the unit, the interrupt with its clear input and the
// modulo-L counter follow the description; the state sequence, the
// one-cycle LOAD/CHECK/DONE steps and the abort rule are this design's.
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned L   = 64,
  localparam int unsigned UW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_mode,
  input  logic          start,
  input  logic          irq_clear,
  input  logic          error,
  output logic          cut_test_sel,
  output logic          tpg_load,
  output logic          tpg_en,
  output logic          misr_clr,
  output logic          misr_en,
  output logic          tra_clr,
  output logic          tra_check,
  output logic          busy,
  output logic          done,
  output logic          irq,
  output logic [UW-1:0] u,
  output ctrl_state_t   state
);

  ctrl_state_t state_nxt;

  always_comb begin
    state_nxt = state;
    unique case (state)
      ST_IDLE:  if (start && test_mode) state_nxt = ST_LOAD;
      ST_LOAD:  state_nxt = ST_RUN;
      ST_RUN:   if (u == UW'(L - 1)) state_nxt = ST_CHECK;
      ST_CHECK: state_nxt = ST_DONE;
      ST_DONE:  state_nxt = ST_IDLE;
      default:  state_nxt = ST_IDLE;
    endcase
    if (!test_mode) state_nxt = ST_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      u            <= '0;
      irq          <= 1'b0;
      cut_test_sel <= 1'b0;
    end else begin
      state        <= state_nxt;
      cut_test_sel <= test_mode;
      if (state == ST_RUN) u <= (u == UW'(L - 1)) ? '0 : u + 1'b1;
      else                 u <= '0;
      if (state == ST_DONE && error) irq <= 1'b1;
      else if (irq_clear)            irq <= 1'b0;
    end
  end

  always_comb begin
    tpg_load  = (state == ST_LOAD);
    misr_clr  = (state == ST_LOAD);
    tra_clr   = (state == ST_LOAD);
    tpg_en    = (state == ST_RUN);
    misr_en   = (state == ST_RUN);
    tra_check = (state == ST_CHECK);
    done      = (state == ST_DONE);
    busy      = (state != ST_IDLE) && (state != ST_DONE);
  end

  initial assert (L >= 2) else $error("bist_ctrl: L must be at least 2");

endmodule
