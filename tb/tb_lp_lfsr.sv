// tb_lp_lfsr: checks the low-power LFSR.
// 1. The 8-bit worked example: seed 0100_1011 must give T1 1010_1011,
//    Ta 1010_1111, Tb 1010_0101, Tc 1111_0101, T2 0101_0101, one per clock.
// 2. A flop-by-flop reference model (ff1..ffN, shaded flop, injector) run
//    for 400 steps from random seeds, also with en held low at random.
// 3. On an 18-bit instance: over each T(k) -> Ta -> Tb -> Tc -> T(k+1) the
//    output transitions sum to the Hamming distance between T(k) and
//    T(k+1), and no single step flips a bit twice. The intermediate
//    vectors spread the changes; they never add any.
module tb_lp_lfsr;
  import bist_pkg::*;
  localparam int N  = 8;
  localparam int N2 = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, en, load2, en2;
  logic [N-1:0]  seed, out;
  logic [N2-1:0] seed2, out2;
  lp_phase_t phase, phase2;
  int checks = 0, failures = 0;

  lp_lfsr #(.N(N))  dut  (.clk, .rst_n, .load, .seed, .en, .out, .phase);
  lp_lfsr #(.N(N2)) dut2 (.clk, .rst_n, .load(load2), .seed(seed2), .en(en2), .out(out2), .phase(phase2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model, flops numbered 1..N as in the description ----
  bit m_ff[1:N];
  bit m_sh;
  bit m_out[1:N];
  int m_ph;

  function automatic logic [N-1:0] m_vec();
    logic [N-1:0] v;
    for (int i = 1; i <= N; i++) v[N-i] = m_out[i];
    return v;
  endfunction

  task automatic m_load(logic [N-1:0] s);
    for (int i = 1; i <= N; i++) begin m_ff[i] = s[N-i]; m_out[i] = s[N-i]; end
    m_sh = 0; m_ph = 0;
  endtask

  task automatic m_step();
    bit d[1:N];
    bit r;
    int h = N / 2;
    // D inputs of every flop
    d[1] = m_ff[N] ^ m_ff[1];
    for (int i = 2; i <= N; i++) d[i] = (i == h + 1) ? m_sh : m_ff[i-1];
    r = m_ff[N];
    case (m_ph)
      0: begin  // T: clock first half and shaded flop
        m_sh = m_ff[h];
        for (int i = 1; i <= h; i++) m_ff[i] = d[i];
        for (int i = 1; i <= N; i++) m_out[i] = m_ff[i];
      end
      1: begin  // Ta: inject second half
        for (int i = 1; i <= N; i++)
          m_out[i] = (i <= h) ? m_ff[i] : ((m_ff[i] == d[i]) ? m_ff[i] : r);
      end
      2: begin  // Tb: clock second half
        for (int i = h + 1; i <= N; i++) m_ff[i] = d[i];
        for (int i = 1; i <= N; i++) m_out[i] = m_ff[i];
      end
      default: begin  // Tc: inject first half
        for (int i = 1; i <= N; i++)
          m_out[i] = (i > h) ? m_ff[i] : ((m_ff[i] == d[i]) ? m_ff[i] : r);
      end
    endcase
    m_ph = (m_ph + 1) % 4;
  endtask

  task automatic expect_out(logic [N-1:0] exp, string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: got %b_%b expected %b_%b", what, out[7:4], out[3:0], exp[7:4], exp[3:0]);
    end
  endtask

  initial begin
    load = 0; en = 0; seed = '0; load2 = 0; en2 = 0; seed2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. worked example
    @(negedge clk); seed = 8'b0100_1011; load = 1;
    @(negedge clk); load = 0; en = 1;
    expect_out(8'b0100_1011, "seed");
    @(negedge clk); expect_out(8'b1010_1011, "T1");
    checks++; if (phase != PH_TA) begin failures++; $display("FAIL phase after T1"); end
    @(negedge clk); expect_out(8'b1010_1111, "Ta");
    @(negedge clk); expect_out(8'b1010_0101, "Tb");
    @(negedge clk); expect_out(8'b1111_0101, "Tc");
    @(negedge clk); expect_out(8'b0101_0101, "T2");
    en = 0;

    // 2. reference model from random seeds
    for (int s = 0; s < 4; s++) begin
      @(negedge clk); seed = 8'($urandom); load = 1;
      m_load(seed);
      @(negedge clk); load = 0;
      expect_out(m_vec(), "after load");
      for (int k = 0; k < 100; k++) begin
        en = 1'($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (en) m_step();
        expect_out(m_vec(), $sformatf("seed %0d step %0d", s, k));
      end
      en = 0;
    end

    // 3. transition budget on the 18-bit instance
    @(negedge clk); seed2 = 18'($urandom) | 18'h1; load2 = 1;
    @(negedge clk); load2 = 0; en2 = 1;
    @(negedge clk);   // now showing T1
    for (int k = 0; k < 40; k++) begin
      logic [N2-1:0] tk, prev;
      int sum;
      tk = out2; prev = out2; sum = 0;
      for (int st = 0; st < 4; st++) begin
        @(negedge clk);
        sum += $countones(out2 ^ prev);
        prev = out2;
      end
      checks++;
      if (sum != $countones(out2 ^ tk)) begin
        failures++;
        $display("FAIL step %0d: %0d transitions through intermediates, %0d direct", k, sum, $countones(out2 ^ tk));
      end
    end
    en2 = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
