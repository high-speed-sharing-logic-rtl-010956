// sharing_bist_top: logic BIST for a group of G logic blocks that share one
// test generator.
//
// The G blocks (here N-bit ripple carry adders, rca) have tests of the same
// kind, so a single fbt_tpg (one low-power LFSR, one set of AND/OR gates, one
// set of seeds) drives the primary inputs of all of them at once. Each block
// has its own MISR; one response analyzer (tra) compares every block's
// signature with its expected value, and one control unit (bist_ctrl)
// sequences seed load, L generator cycles, signature check and interrupt.
//
// blk_en_i selects the subgroup under test: a disabled block keeps its
// functional inputs, its MISR is not clocked and it cannot fail. This lets a
// smaller subgroup be tested when power limits the number of blocks switching
// together, or skip a block already found faulty.
//
// Primary input vector of a block: pi = {cin, b, a} (N_PI = 2N+1 inputs),
// response word = {cout, sum}. In normal mode (or for a disabled block) the
// adder sees func_*_i; sum_o/cout_o always show the adder outputs.
//
// One test: hold test_mode_i, pulse start_i with seed_i, blk_en_i and golden_i
// stable; done_o pulses L+2 cycles later with fail_o/irq_o valid and the
// signatures on sig_o. irq_o stays until irq_clear_i.
// flt_* inject a stuck-at fault on one carry net of the adders flagged in
// flt_en_i (for demonstrating detection; tie flt_en_i to 0 otherwise).
//
// The sharing of one generator by a group, the subgroup testing, the
// TPG/TRA/control split and the adder as circuit under test follow the
// description; G, D, MOD, L, the MISR and the port set are this design's.
module sharing_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned         N     = 4,
  parameter int unsigned         G     = 4,
  parameter int unsigned         D     = 2,
  parameter int unsigned         MOD   = 2,
  parameter int unsigned         L     = 64,
  parameter int unsigned         SIG_W = 8,
  parameter logic [2*(2*N+1)-1:0] CUBE = '0,
  localparam int unsigned        N_PI  = 2 * N + 1,
  localparam int unsigned        LW    = D * N_PI,
  localparam int unsigned        SW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // BIST control
  input  logic                    test_mode_i,
  input  logic                    start_i,
  input  logic                    irq_clear_i,
  input  logic [LW-1:0]           seed_i,
  input  logic [G-1:0]            blk_en_i,
  input  logic [G-1:0][SIG_W-1:0] golden_i,
  output logic                    busy_o,
  output logic                    done_o,
  output logic                    irq_o,
  output logic [G-1:0]            fail_o,
  output logic [G-1:0][SIG_W-1:0] sig_o,
  output logic [2*N:0]            pattern_o,  // vector a(u) from the shared generator
  // functional ports of the blocks
  input  logic [G-1:0][N-1:0]     func_a_i,
  input  logic [G-1:0][N-1:0]     func_b_i,
  input  logic [G-1:0]            func_cin_i,
  output logic [G-1:0][N-1:0]     sum_o,
  output logic [G-1:0]            cout_o,
  // stuck-at fault injection
  input  logic [G-1:0]            flt_en_i,
  input  logic [SW-1:0]           flt_sel_i,
  input  logic                    flt_val_i
);

  logic        cut_test_sel, tpg_load, tpg_en, misr_clr, misr_en;
  logic        tra_clr, tra_check, error;
  logic [N_PI-1:0] pi;
  ctrl_state_t     state;

  bist_ctrl #(.L(L)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .test_mode   (test_mode_i),
    .start       (start_i),
    .irq_clear   (irq_clear_i),
    .error       (error),
    .cut_test_sel(cut_test_sel),
    .tpg_load    (tpg_load),
    .tpg_en      (tpg_en),
    .misr_clr    (misr_clr),
    .misr_en     (misr_en),
    .tra_clr     (tra_clr),
    .tra_check   (tra_check),
    .busy        (busy_o),
    .done        (done_o),
    .irq         (irq_o),
    .u           (),
    .state       (state)
  );

  fbt_tpg #(.N_PI(N_PI), .D(D), .MOD(MOD), .CUBE(CUBE)) u_tpg (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (tpg_load),
    .seed   (seed_i),
    .en     (tpg_en),
    .lfsr_o (),
    .phase_o(),
    .pi     (pi)
  );

  assign pattern_o = pi;

  for (genvar g = 0; g < G; g++) begin : g_blk
    logic         sel;
    logic [N-1:0] a, b;
    logic         cin;

    assign sel = cut_test_sel && blk_en_i[g];
    assign a   = sel ? pi[N-1:0]   : func_a_i[g];
    assign b   = sel ? pi[2*N-1:N] : func_b_i[g];
    assign cin = sel ? pi[2*N]     : func_cin_i[g];

    rca #(.N(N)) u_cut (
      .flt_en (flt_en_i[g]),
      .flt_sel(flt_sel_i),
      .flt_val(flt_val_i),
      .a      (a),
      .b      (b),
      .cin    (cin),
      .sum    (sum_o[g]),
      .cout   (cout_o[g])
    );

    misr #(.W(SIG_W), .DIN_W(N + 1)) u_misr (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (misr_clr),
      .en   (misr_en && blk_en_i[g]),
      .din  ({cout_o[g], sum_o[g]}),
      .sig  (sig_o[g])
    );
  end

  tra #(.G(G), .W(SIG_W)) u_tra (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (tra_clr),
    .check (tra_check),
    .blk_en(blk_en_i),
    .sig   (sig_o),
    .golden(golden_i),
    .fail  (fail_o),
    .error (error)
  );

  // The generator only advances while the controller runs a test.
  assert property (@(posedge clk) disable iff (!rst_n) tpg_en |-> state == ST_RUN);

endmodule
