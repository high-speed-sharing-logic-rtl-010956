// tra: test response analyzer for a group of G logic blocks.
//
// When check is pulsed, the signature of every enabled block (blk_en) is
// compared with its expected signature (golden), and per-block pass/fail
// results are latched in fail; a disabled block never fails. error is the OR
// of fail and stays until the next check or clr. The description says only
// that the analyzer checks the MISR output and reports error or no error;
// comparing with externally supplied expected signatures, and keeping one
// result per block of the shared group, are this design's choices.
// Timing: fail/error are registered, valid the cycle after check.
module tra #(
  parameter int unsigned G = 4,
  parameter int unsigned W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 check,
  input  logic [G-1:0]         blk_en,
  input  logic [G-1:0][W-1:0]  sig,
  input  logic [G-1:0][W-1:0]  golden,
  output logic [G-1:0]         fail,
  output logic                 error
);

  logic [G-1:0] mismatch;

  always_comb
    for (int g = 0; g < G; g++)
      mismatch[g] = blk_en[g] && (sig[g] != golden[g]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fail <= '0;
    else if (clr)   fail <= '0;
    else if (check) fail <= mismatch;
  end

  assign error = |fail;

endmodule
