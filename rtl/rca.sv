// rca: N-bit ripple carry adder, the circuit under test (CUT) of the BIST.
//
// N full adders are chained: the carry out of stage k is the carry in of stage
// k+1, so the worst-case delay grows linearly with N, approximately
// (N-1)*t_carry + t_sum. Combinational: sum and cout follow a, b and cin
// with no clock.
//
// Fault injection (a choice of this design, used to show that the BIST catches
// stuck-at faults): when flt_en is high, the carry leaving stage flt_sel is
// forced to flt_val, a stuck-at-0 or stuck-at-1 fault on that net. Tie flt_en
// low for normal use. Stage N-1's carry is cout.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic                 flt_en,
  input  logic [$clog2(N)-1:0] flt_sel,
  input  logic                 flt_val,
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic                 cin,
  output logic [N-1:0]         sum,
  output logic                 cout
);

  logic [N:0] c;      // carry into each stage (c[0] = cin)
  logic [N-1:0] co;   // raw carry out of each full adder

  assign c[0] = cin;

  for (genvar k = 0; k < N; k++) begin : g_stage
    full_adder u_fa (
      .a (a[k]),
      .b (b[k]),
      .ci(c[k]),
      .s (sum[k]),
      .co(co[k])
    );
    assign c[k+1] = (flt_en && flt_sel == $bits(flt_sel)'(k)) ? flt_val : co[k];
  end

  assign cout = c[N];

endmodule
