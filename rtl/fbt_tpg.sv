// fbt_tpg: test pattern generator shared by a group of logic blocks.
//
// A low-power LFSR of D*N_PI bits (lp_lfsr) supplies the pseudo-random bits.
// Each primary input j owns a distinct slice of D LFSR bits,
// lfsr[j*D +: D]. The primary input cube CUBE gives the preferred value of
// each input: for CUBE_0 an AND gate over MOD of the D bits makes 0 appear
// more often than 1, for CUBE_1 an OR gate over MOD bits makes 1 more
// frequent, and for CUBE_X the input takes the slice's lowest bit directly.
// This avoids repeated synchronization of state variables by an input value.
// So the logic is one LFSR plus at most one gate per primary input, and the
// same logic (and the same seeds) serves every block of the group.
//
// The slice-per-input structure, the AND/OR gates and the cube follow the
// description. Which MOD bits of a slice feed the gate (the lowest ones), which
// bit drives a CUBE_X input, and taking the LFSR to be the low-power LFSR are
// this design's choices.
//
// Interface: load/seed start a new primary input sequence, en advances it by
// one vector. pi is registered through the LFSR output and then combinational
// through the gates: it changes one cycle after each load or enabled clock.
module fbt_tpg
  import bist_pkg::*;
#(
  parameter int unsigned            N_PI = 9,
  parameter int unsigned            D    = 2,
  parameter int unsigned            MOD  = 2,
  parameter logic [2*N_PI-1:0]      CUBE = '0,   // cube_t per input, input j at [2*j +: 2]
  localparam int unsigned           W    = D * N_PI
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [W-1:0]    seed,
  input  logic            en,
  output logic [W-1:0]    lfsr_o,
  output lp_phase_t       phase_o,
  output logic [N_PI-1:0] pi
);

  lp_lfsr #(.N(W)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .seed (seed),
    .en   (en),
    .out  (lfsr_o),
    .phase(phase_o)
  );

  for (genvar j = 0; j < N_PI; j++) begin : g_pi
    localparam cube_t C = cube_t'(CUBE[2*j +: 2]);
    logic [D-1:0] slice;
    assign slice = lfsr_o[j*D +: D];
    if (C == CUBE_0) begin : g_and
      assign pi[j] = &slice[MOD-1:0];
    end else if (C == CUBE_1) begin : g_or
      assign pi[j] = |slice[MOD-1:0];
    end else begin : g_wire
      assign pi[j] = slice[0];
    end
  end

  initial assert (MOD >= 1 && MOD <= D) else $error("fbt_tpg: need 1 <= MOD <= D");

endmodule
