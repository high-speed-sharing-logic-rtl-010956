// tb_fbt_tpg: checks the shared test pattern generator.
// Configuration: 4 primary inputs, D = 3 LFSR bits per input, MOD = 2, cube
// (x, 0, 1, x). Each cycle the primary input vector is recomputed from the
// LFSR bits: inputs with cube x take bit 0 of their slice, the 0-preferred
// input the AND of bits 0..1, the 1-preferred input their OR. Also checked:
// the LFSR output right after a load is the seed, and over a long run the
// AND-gated input is 1 clearly less than half the time and the OR-gated one
// clearly more.
module tb_fbt_tpg;
  import bist_pkg::*;
  localparam int N_PI = 4, D = 3, MOD = 2, W = N_PI * D;
  localparam logic [2*N_PI-1:0] CUBE = {CUBE_X, CUBE_1, CUBE_0, CUBE_X};

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en;
  logic [W-1:0] seed, lfsr_o;
  lp_phase_t phase_o;
  logic [N_PI-1:0] pi;
  int checks = 0, failures = 0;
  int ones[N_PI];
  int cycles = 0;

  fbt_tpg #(.N_PI(N_PI), .D(D), .MOD(MOD), .CUBE(CUBE)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_PI-1:0] ref_pi(logic [W-1:0] v);
    logic [N_PI-1:0] p;
    for (int j = 0; j < N_PI; j++) begin
      logic b0, b1;
      b0 = v[j*D];
      b1 = v[j*D + 1];
      case (j)
        1:       p[j] = b0 & b1;   // cube 0
        2:       p[j] = b0 | b1;   // cube 1
        default: p[j] = b0;        // cube x
      endcase
    end
    return p;
  endfunction

  initial begin
    load = 0; en = 0; seed = '0;
    foreach (ones[j]) ones[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      @(negedge clk); seed = W'($urandom) | W'(1); load = 1;
      @(negedge clk); load = 0;
      checks++;
      if (lfsr_o != seed) begin failures++; $display("FAIL lfsr after load %h != %h", lfsr_o, seed); end
      en = 1;
      for (int k = 0; k < 500; k++) begin
        @(negedge clk);
        checks++;
        if (pi != ref_pi(lfsr_o)) begin
          failures++;
          $display("FAIL pi=%b expected %b (lfsr %b)", pi, ref_pi(lfsr_o), lfsr_o);
        end
        for (int j = 0; j < N_PI; j++) ones[j] += int'(pi[j]);
        cycles++;
      end
      en = 0;
    end
    checks++;
    if (ones[1] * 100 > cycles * 40) begin
      failures++; $display("FAIL AND-gated input is 1 in %0d of %0d vectors", ones[1], cycles);
    end
    checks++;
    if (ones[2] * 100 < cycles * 60) begin
      failures++; $display("FAIL OR-gated input is 1 in %0d of %0d vectors", ones[2], cycles);
    end
    $display("ones per input: %0d %0d %0d %0d of %0d", ones[0], ones[1], ones[2], ones[3], cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
