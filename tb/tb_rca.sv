// tb_rca: checks the 4-bit ripple carry adder.
// Fault-free: all 512 combinations of a, b, cin against integer addition.
// Faulty: for every carry net and stuck value, random operands against a
// bit-serial reference that forces that carry; the fault must also change the
// result for at least one input (it is detectable).
module tb_rca;
  localparam int N = 4;
  logic [N-1:0] a, b, sum;
  logic cin, cout, flt_en, flt_val;
  logic [1:0] flt_sel;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  rca #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N:0] ref_add(logic [N-1:0] x, logic [N-1:0] y, logic c0,
                                          bit fe, int fs, bit fv);
    logic [N:0] r;
    logic c;
    c = c0;
    for (int k = 0; k < N; k++) begin
      r[k] = x[k] ^ y[k] ^ c;
      c    = (x[k] + y[k] + c) >= 2;
      if (fe && fs == k) c = fv;
    end
    r[N] = c;
    return r;
  endfunction

  initial begin
    flt_en = 0; flt_sel = 0; flt_val = 0;
    for (int v = 0; v < 512; v++) begin
      {cin, b, a} = 9'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} != (N+1)'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d gave %0d", a, b, cin, {cout, sum});
      end
    end
    for (int fs = 0; fs < N; fs++)
      for (int fv = 0; fv < 2; fv++) begin
        int differs = 0;
        flt_en = 1; flt_sel = 2'(fs); flt_val = 1'(fv);
        for (int i = 0; i < 64; i++) begin
          {cin, b, a} = 9'($urandom);
          @(posedge clk);
          checks++;
          if ({cout, sum} != ref_add(a, b, cin, 1, fs, 1'(fv))) begin
            failures++;
            $display("FAIL fault c%0d/%0d: %0d+%0d+%0d gave %0d", fs, fv, a, b, cin, {cout, sum});
          end
          if ({cout, sum} != (N+1)'(int'(a) + int'(b) + int'(cin))) differs++;
        end
        checks++;
        if (differs == 0) begin
          failures++;
          $display("FAIL fault c%0d/%0d never changed the sum", fs, fv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
