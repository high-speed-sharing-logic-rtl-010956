// tb_full_size: one complete BIST operation of sharing_bist_top at its
// default size (4 adders, 4 bits each, 18-bit low-power LFSR, L = 64 vectors,
// 8-bit MISRs, no preferred input values). A reference model gives every
// vector a(u) and the expected signature; the run must pass with done
// L+2 cycles after start. A second run with a stuck-at-1 carry in block 3
// must fail exactly that block and raise the interrupt.
module tb_full_size;
  import bist_pkg::*;
  localparam int N = 4, G = 4, D = 2, MOD = 2, L = 64, SIG_W = 8;
  localparam int N_PI = 2 * N + 1, LW = D * N_PI;
  localparam logic [2*N_PI-1:0] CUBE = '0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode, start, irq_clear, flt_val, busy, done, irq;
  logic [LW-1:0] seed;
  logic [G-1:0] blk_en, fail, func_cin, cout, flt_en;
  logic [G-1:0][SIG_W-1:0] golden, sig;
  logic [G-1:0][N-1:0] func_a, func_b, sum;
  logic [1:0] flt_sel;
  logic [N_PI-1:0] pattern;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  sharing_bist_top dut (
    .clk, .rst_n,
    .test_mode_i(test_mode), .start_i(start), .irq_clear_i(irq_clear),
    .seed_i(seed), .blk_en_i(blk_en), .golden_i(golden),
    .busy_o(busy), .done_o(done), .irq_o(irq), .fail_o(fail), .sig_o(sig),
    .pattern_o(pattern),
    .func_a_i(func_a), .func_b_i(func_b), .func_cin_i(func_cin),
    .sum_o(sum), .cout_o(cout),
    .flt_en_i(flt_en), .flt_sel_i(flt_sel), .flt_val_i(flt_val)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // ---- reference model of the BIST, written from the algorithm ----
  // Low-power LFSR with flops numbered ff1..ffLW, shaded flop and injector.
  bit m_ff[1:LW];
  bit m_sh;
  bit m_out[1:LW];
  int m_ph;
  int m_injected;   // vectors in which the injector replaced a bit by R

  function automatic logic [LW-1:0] m_vec();
    logic [LW-1:0] v;
    for (int i = 1; i <= LW; i++) v[LW-i] = m_out[i];
    return v;
  endfunction

  task automatic m_load(logic [LW-1:0] s);
    for (int i = 1; i <= LW; i++) begin m_ff[i] = s[LW-i]; m_out[i] = s[LW-i]; end
    m_sh = 0; m_ph = 0;
  endtask

  task automatic m_step();
    bit d[1:LW];
    bit r, inj;
    int h = LW / 2;
    d[1] = m_ff[LW] ^ m_ff[1];
    for (int i = 2; i <= LW; i++) d[i] = (i == h + 1) ? m_sh : m_ff[i-1];
    r = m_ff[LW];
    inj = 0;
    case (m_ph)
      0: begin
        m_sh = m_ff[h];
        for (int i = 1; i <= h; i++) m_ff[i] = d[i];
        for (int i = 1; i <= LW; i++) m_out[i] = m_ff[i];
      end
      1: for (int i = 1; i <= LW; i++)
           if (i <= h || m_ff[i] == d[i]) m_out[i] = m_ff[i];
           else begin m_out[i] = r; inj = 1; end
      2: begin
        for (int i = h + 1; i <= LW; i++) m_ff[i] = d[i];
        for (int i = 1; i <= LW; i++) m_out[i] = m_ff[i];
      end
      default: for (int i = 1; i <= LW; i++)
           if (i > h || m_ff[i] == d[i]) m_out[i] = m_ff[i];
           else begin m_out[i] = r; inj = 1; end
    endcase
    if (inj) m_injected++;
    m_ph = (m_ph + 1) % 4;
  endtask

  int m_and_acted, m_or_acted;   // vectors where a gate overrode bit 0

  function automatic logic [N_PI-1:0] m_shape(logic [LW-1:0] v, bit count);
    logic [N_PI-1:0] p;
    for (int j = 0; j < N_PI; j++) begin
      logic a1, o1;
      a1 = 1; o1 = 0;
      for (int i = 0; i < MOD; i++) begin a1 &= v[j*D + i]; o1 |= v[j*D + i]; end
      case (CUBE[2*j +: 2])
        2'd1: begin p[j] = a1; if (count && a1 != v[j*D]) m_and_acted++; end
        2'd2: begin p[j] = o1; if (count && o1 != v[j*D]) m_or_acted++; end
        default: p[j] = v[j*D];
      endcase
    end
    return p;
  endfunction

  // Adder response {cout, sum} for pattern {cin, b, a}, optional stuck carry.
  function automatic logic [N:0] m_add(logic [N_PI-1:0] p, bit fe, int fs, bit fv);
    logic [N:0] r;
    logic c;
    c = p[2*N];
    for (int k = 0; k < N; k++) begin
      logic x, y;
      x = p[k]; y = p[N + k];
      r[k] = x ^ y ^ c;
      c = (x & y) | (x & c) | (y & c);
      if (fe && fs == k) c = fv;
    end
    r[N] = c;
    return r;
  endfunction

  function automatic logic [SIG_W-1:0] m_misr(logic [SIG_W-1:0] s, logic [N:0] d);
    logic [SIG_W-1:0] r;
    r = {s[SIG_W-2:0], 1'b0};
    if (s[SIG_W-1]) r ^= SIG_W'(8'h1D);
    return r ^ SIG_W'(d);
  endfunction

  logic [N_PI-1:0] m_pat[L];

  // Expected patterns a(0..L-1) and signature of one block for one seed.
  task automatic m_run(logic [LW-1:0] seed, bit fe, int fs, bit fv, bit count,
                       output logic [SIG_W-1:0] sig);
    sig = '0;
    m_load(seed);
    for (int u = 0; u < L; u++) begin
      m_pat[u] = m_shape(m_vec(), count);
      sig = m_misr(sig, m_add(m_pat[u], fe, fs, fv));
      m_step();
    end
  endtask

  int n_pattern_ok, n_normal_ok;

  // One BIST run through the ports. Checks every applied vector against the
  // model, the latency (done L+2 cycles after the edge that takes start) and
  // the per-block result.
  task automatic bist_run(logic [LW-1:0] s, logic [G-1:0] en, logic [G-1:0] exp_fail,
                          bit check_normal);
    int t, u;
    logic [SIG_W-1:0] good;
    m_run(s, 0, 0, 0, 1, good);
    seed = s; blk_en = en;
    for (int g = 0; g < G; g++) golden[g] = good;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 0; u = 0;
    while (!done && t < L + 20) begin
      if (busy && t >= 1 && u < L) begin
        expect_true(pattern == m_pat[u], $sformatf("a(%0d)=%b expected %b", u, pattern, m_pat[u]));
        if (pattern == m_pat[u]) n_pattern_ok++;
        u++;
      end
      if (check_normal) begin
        func_a = {G{N'($urandom)}}; func_b = {G{N'($urandom)}}; func_cin = G'($urandom);
        #1;
        for (int g = 0; g < G; g++)
          if (!en[g]) begin
            expect_true({cout[g], sum[g]} == m_add({func_cin[g], func_b[g], func_a[g]},
                                                   flt_en[g], int'(flt_sel), flt_val),
                        "disabled block keeps functional inputs");
            n_normal_ok++;
          end
      end
      @(negedge clk);
      t++;
    end
    expect_true(done, "done reached");
    expect_true(t == L + 2, $sformatf("latency %0d, expected %0d", t, L + 2));
    expect_true(fail == exp_fail, $sformatf("fail=%b expected %b", fail, exp_fail));
  endtask

  task automatic normal_mode_check(int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      for (int g = 0; g < G; g++) begin
        func_a[g] = N'($urandom); func_b[g] = N'($urandom); func_cin[g] = 1'($urandom);
      end
      #1;
      for (int g = 0; g < G; g++) begin
        expect_true({cout[g], sum[g]} == (N+1)'(int'(func_a[g]) + int'(func_b[g]) + int'(func_cin[g])),
                    "normal mode sum");
        n_normal_ok++;
      end
    end
  endtask

  task automatic init_inputs();
    test_mode = 0; start = 0; irq_clear = 0; flt_val = 0; flt_en = '0; flt_sel = '0;
    seed = '0; blk_en = '1; golden = '0; func_a = '0; func_b = '0; func_cin = '0;
    m_injected = 0; m_and_acted = 0; m_or_acted = 0; n_pattern_ok = 0; n_normal_ok = 0;
  endtask

  initial begin
    logic [LW-1:0] s;
    logic [SIG_W-1:0] good, bad;
    init_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    normal_mode_check(4);
    @(negedge clk); test_mode = 1;
    s = LW'(18'h2_4B6D);
    bist_run(s, '1, '0, 0);
    @(negedge clk);
    expect_true(!irq, "no irq on pass");
    m_run(s, 0, 0, 0, 0, good);
    m_run(s, 1, 2, 1, 0, bad);
    expect_true(good != bad, "model: seed detects the fault");
    flt_en = 4'b1000; flt_sel = 2'd2; flt_val = 1;
    bist_run(s, '1, 4'b1000, 0);
    @(negedge clk);
    expect_true(irq, "irq on detected fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
