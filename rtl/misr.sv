// misr: multiple-input signature register.
//
// Compacts the responses of one circuit under test into a W-bit signature.
// Each enabled clock the register shifts left by one, the bit leaving at the
// top is fed back to the positions set in POLY (a Galois LFSR), and the
// response word din is XORed in:
//   sig <= ({sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : 0)) ^ din
// clr (priority over en) resets the signature to zero before a test.
// The description only names the MISR; its width, polynomial
// (default x^8+x^4+x^3+x^2+1) and Galois form are this design's choices.
// din narrower than W is zero-extended at the low end.
module misr #(
  parameter int unsigned  W      = 8,
  parameter int unsigned  DIN_W  = 5,
  parameter logic [W-1:0] POLY   = W'(8'h1D)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [DIN_W-1:0] din,
  output logic [W-1:0]     sig
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt = {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0);
    nxt = nxt ^ W'(din);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= nxt;
  end

  initial assert (DIN_W <= W) else $error("misr: DIN_W must not exceed W");

endmodule
