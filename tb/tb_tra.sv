// tb_tra: checks the response analyzer. Random signatures and expected
// signatures (equal or not, per block) and random block enables; after each
// check pulse, fail must flag exactly the enabled blocks whose signatures
// differ, error must be their OR, and the result must hold until the next
// check or clr.
module tb_tra;
  localparam int G = 4, W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, check;
  logic [G-1:0] blk_en, fail;
  logic [G-1:0][W-1:0] sig, golden;
  logic error;
  int checks = 0, failures = 0;

  tra #(.G(G), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [G-1:0] exp_fail;
    clr = 0; check = 0; blk_en = '0; sig = '0; golden = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      blk_en = G'($urandom);
      for (int g = 0; g < G; g++) begin
        golden[g] = W'($urandom);
        sig[g]    = ($urandom_range(0, 1) == 0) ? golden[g] : golden[g] ^ W'(1 << $urandom_range(0, W - 1));
        exp_fail[g] = blk_en[g] && (sig[g] != golden[g]);
      end
      check = 1;
      @(negedge clk);
      check = 0;
      checks++;
      if (fail != exp_fail || error != |exp_fail) begin
        failures++; $display("FAIL fail=%b expected %b error=%b", fail, exp_fail, error);
      end
      // results hold while inputs change
      sig = ~sig;
      @(negedge clk);
      checks++;
      if (fail != exp_fail) begin failures++; $display("FAIL result not held"); end
      if (k % 50 == 49) begin
        clr = 1;
        @(negedge clk);
        clr = 0;
        checks++;
        if (fail != '0 || error) begin failures++; $display("FAIL clr"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
