// tb_bist_ctrl: checks the BIST control unit with L = 8.
// - start is ignored outside test mode;
// - a run takes LOAD (1 cycle, seed load and clears), RUN (exactly L
//   generator/MISR cycles with u = 0..L-1), CHECK (1 cycle), DONE (1 cycle):
//   done comes L+2 cycles after the edge that took start;
// - an error reported by the analyzer sets irq, which stays through later
//   passing runs and falls only on irq_clear;
// - dropping test mode aborts a run; cut_test_sel follows test mode.
module tb_bist_ctrl;
  import bist_pkg::*;
  localparam int L = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_mode, start, irq_clear, error;
  logic cut_test_sel, tpg_load, tpg_en, misr_clr, misr_en, tra_clr, tra_check;
  logic busy, done, irq;
  logic [2:0] u;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  bist_ctrl #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // One run; returns the number of cycles from start to done and counts.
  task automatic run(bit err, output int lat, output int n_en, output int n_load,
                     output int n_chk);
    int t;
    lat = 0; n_en = 0; n_load = 0; n_chk = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t = 0;  // edges since the one that took start
    while (!done && t < 100) begin
      if (tpg_en) begin
        expect_true(misr_en, "misr_en with tpg_en");
        expect_true(u == 3'(n_en), $sformatf("u=%0d at run cycle %0d", u, n_en));
        n_en++;
      end
      if (tpg_load) begin n_load++; expect_true(misr_clr && tra_clr, "clears with load"); end
      if (tra_check) n_chk++;
      // analyzer result is valid from the cycle after check
      if (state == ST_CHECK) error = err;
      @(negedge clk);
      t++;
    end
    lat = t;
  endtask

  initial begin
    int lat, n_en, n_load, n_chk;
    test_mode = 0; start = 0; irq_clear = 0; error = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // start outside test mode does nothing
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    expect_true(state == ST_IDLE && !busy && !cut_test_sel, "start ignored in normal mode");

    @(negedge clk); test_mode = 1;
    @(negedge clk);
    expect_true(cut_test_sel, "cut_test_sel in test mode");

    // passing run
    run(0, lat, n_en, n_load, n_chk);
    expect_true(lat == L + 2, $sformatf("latency %0d, expected %0d", lat, L + 2));
    expect_true(n_en == L, $sformatf("%0d generator cycles, expected %0d", n_en, L));
    expect_true(n_load == 1 && n_chk == 1, "one load and one check");
    @(negedge clk);
    expect_true(!irq && state == ST_IDLE, "no irq after pass");

    // failing run raises irq
    run(1, lat, n_en, n_load, n_chk);
    @(negedge clk); error = 0;
    expect_true(irq, "irq after error");
    // irq persists through a passing run
    run(0, lat, n_en, n_load, n_chk);
    @(negedge clk);
    expect_true(irq, "irq held until cleared");
    irq_clear = 1;
    @(negedge clk); irq_clear = 0;
    expect_true(!irq, "irq cleared");

    // abort by leaving test mode
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    expect_true(state == ST_RUN, "running");
    test_mode = 0;
    @(negedge clk);
    expect_true(state == ST_IDLE && !tpg_en, "abort on test mode drop");
    @(negedge clk);
    expect_true(!cut_test_sel, "cut back in normal mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
