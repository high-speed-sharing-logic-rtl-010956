// tb_misr: checks the signature register against a bit-level model of the
// same compaction (shift left, feed the leaving bit back at the polynomial's
// taps, XOR in the response word). Random response words are applied with
// en toggled at random; clr must zero the signature; two streams that differ
// in a single bit must end in different signatures.
module tb_misr;
  localparam int W = 8, DIN_W = 5;
  localparam logic [W-1:0] POLY = 8'h1D;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en;
  logic [DIN_W-1:0] din;
  logic [W-1:0] sig;
  int checks = 0, failures = 0;

  misr #(.W(W), .DIN_W(DIN_W), .POLY(POLY)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_step(logic [W-1:0] s, logic [DIN_W-1:0] d);
    bit top;
    logic [W-1:0] r;
    top = s[W-1];
    for (int i = W - 1; i > 0; i--) r[i] = s[i-1] ^ (top & POLY[i]);
    r[0] = top & POLY[0];
    for (int i = 0; i < DIN_W; i++) r[i] ^= d[i];
    return r;
  endfunction

  logic [W-1:0] m;
  logic [DIN_W-1:0] stream[64];

  initial begin
    clr = 0; en = 0; din = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    checks++; if (sig != 0) begin failures++; $display("FAIL clr"); end
    for (int k = 0; k < 2000; k++) begin
      en = 1'($urandom_range(0, 3) != 0);
      din = DIN_W'($urandom);
      if (en) m = ref_step(m, din);
      @(negedge clk);
      checks++;
      if (sig != m) begin failures++; $display("FAIL step %0d sig %h expected %h", k, sig, m); end
    end
    // single-bit difference must show in the signature
    foreach (stream[i]) stream[i] = DIN_W'($urandom);
    for (int run = 0; run < 2; run++) begin
      logic [W-1:0] first;
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0; en = 1;
      foreach (stream[i]) begin
        din = stream[i];
        if (run == 1 && i == 17) din[2] = ~din[2];
        @(negedge clk);
      end
      en = 0;
      if (run == 0) first = sig;
      else begin
        checks++;
        if (sig == first) begin failures++; $display("FAIL one-bit error not seen"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
