// tb_trig_unit: random and special angles (zero, multiples of pi/2, angles
// of many turns, both signs) into trig_unit; sine and cosine are compared
// with the simulator's double-precision $sin/$cos of the same single-precision
// angle to an absolute tolerance of 1e-6, and the latency with ITER + 2.
module tb_trig_unit;
  import mbfp_pkg::*;
  import mbtb_pkg::*;

  localparam int ITER = 30;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp32_t angle = 0, sin_o, cos_o;
  int checks = 0, failures = 0;

  trig_unit #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(real a);
    real ar, es, ec;
    int cyc;
    angle = r2f(a);
    ar = f2r(angle);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    es = $sin(ar); ec = $cos(ar);
    checks += 3;
    if (cyc != ITER + 2) begin failures++; $display("FAIL latency %0d", cyc); end
    if (!near(sin_o, es, 1e-6, 1.0)) begin failures++; $display("FAIL sin(%f) got %f exp %f", ar, f2r(sin_o), es); end
    if (!near(cos_o, ec, 1e-6, 1.0)) begin failures++; $display("FAIL cos(%f) got %f exp %f", ar, f2r(cos_o), ec); end
  endtask

  initial begin
    real pi = 3.14159265358979;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(0.0); one(pi / 2); one(-pi / 2); one(pi); one(-pi); one(1e-5); one(2.5); one(-2.5);
    one(100.0); one(-77.7); one(3 * pi / 4);
    for (int t = 0; t < 300; t++)
      one((real'($urandom % 2000000) / 1000000.0 - 1.0) * ((t % 3 == 0) ? 60.0 : 3.5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
