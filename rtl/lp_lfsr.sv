// lp_lfsr: low-power LFSR that inserts three intermediate vectors between
// every two successive LFSR vectors.
//
// The register ff1..ffN (N even, halves H = N/2) is shifted one half at a
// time, and an extra "shaded" flop carries ffH across into the second half.
// Between two conventional vectors T(k) and T(k+1) the outputs step through
//   T   : clock ff1..ffH and the shaded flop; output the flops
//   Ta  : no clock; first half from the flops, second half from the injector
//   Tb  : clock ffH+1..ffN (ffH+1 takes the shaded flop); output the flops
//   Tc  : no clock; first half from the injector, second half from the flops
// and then T again. The injector of a half compares each flop with the value
// at its D input: where they agree it passes the flop, where they differ it
// outputs R, the feedback value taken from ffN. So a bit that is going to
// toggle gets an intermediate value, which spreads the input transitions of
// one LFSR step over four vectors and lowers switching in the CUT.
//
// All of this, the feedback ff1 <= ffN xor ff1 and the worked example
// (seed 0100_1011 gives T1 1010_1011, Ta 1010_1111, Tb 1010_0101,
// Tc 1111_0101, T2 0101_0101) follow the description. The TAPS mask
// generalises the feedback to other widths; loading a seed and registering
// the outputs are this design's choices.
//
// Bit order: q[N-1] is ff1 and q[0] is ffN, so a vector written left to
// right as ff1..ffN reads as the usual MSB-first binary number. TAPS uses the
// same order (default: ff1 and ffN).
//
// Timing: load has priority and sets the flops to seed, the shaded flop to 0,
// out to seed and the phase to T. Each clock with en high produces the next
// vector on out (registered), one vector per cycle.
module lp_lfsr
  import bist_pkg::*;
#(
  parameter int unsigned      N    = 8,
  parameter logic [N-1:0]     TAPS = N'((1 << (N - 1)) | 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         en,
  output logic [N-1:0] out,
  output lp_phase_t    phase
);

  localparam int unsigned H = N / 2;

  logic [N-1:0] q, q_next_all, q_nxt;
  logic         shaded, shaded_nxt;
  logic [N-1:0] out_nxt;
  logic         fb, r;
  logic [N-1:0] inj;

  // D-input values of all flops if the half they belong to were clocked now.
  always_comb begin
    fb = ^(q & TAPS);
    r  = q[0];                               // ffN
    q_next_all            = q;
    q_next_all[N-1]       = fb;              // ff1 <= feedback
    q_next_all[N-2:H]     = q[N-1:H+1];      // ff2..ffH shift
    q_next_all[H-1]       = shaded;          // ffH+1 <= shaded
    q_next_all[H-2:0]     = q[H-1:1];        // ffH+2..ffN shift
    for (int i = 0; i < N; i++)
      inj[i] = (q[i] == q_next_all[i]) ? q[i] : r;
  end

  always_comb begin
    q_nxt      = q;
    shaded_nxt = shaded;
    out_nxt    = out;
    unique case (phase)
      PH_T: begin
        q_nxt[N-1:H] = q_next_all[N-1:H];
        shaded_nxt   = q[H];                 // ffH
        out_nxt      = {q_next_all[N-1:H], q[H-1:0]};
      end
      PH_TA:   out_nxt = {q[N-1:H], inj[H-1:0]};
      PH_TB: begin
        q_nxt[H-1:0] = q_next_all[H-1:0];
        out_nxt      = {q[N-1:H], q_next_all[H-1:0]};
      end
      PH_TC:   out_nxt = {inj[N-1:H], q[H-1:0]};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      shaded <= 1'b0;
      out    <= '0;
      phase  <= PH_T;
    end else if (load) begin
      q      <= seed;
      shaded <= 1'b0;
      out    <= seed;
      phase  <= PH_T;
    end else if (en) begin
      q      <= q_nxt;
      shaded <= shaded_nxt;
      out    <= out_nxt;
      phase  <= lp_phase_t'(phase + 2'd1);
    end
  end

  initial assert (N >= 4 && N % 2 == 0) else $error("lp_lfsr: N must be even and >= 4");

endmodule
