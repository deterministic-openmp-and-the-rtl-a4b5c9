// tb_lbp_matmul: the integer matrix multiplication workload (X: h x h/2, Y: h/2 x h,
// h = number of harts): the "base" version on a 4-core (h = 16) and a 16-core (h = 64)
// LBP, and the "copy" and "distributed" versions on a 16-core LBP, side by side. Each machine is driven by lbp_matmul_run, which checks every element of Z.
// The 64-core size (h = 256, about 59 million instructions) is beyond a simulation run of
// a few minutes and is not included. Watchdog: 2 000 000 cycles.
module tb_lbp_matmul;
  logic clk = 1'b0;
  logic done4, done16, done16c, done16d;
  int checks4, failures4, cycles4, checks16, failures16, cycles16, checks16c, failures16c, cycles16c;
  int checks16d, failures16d, cycles16d;

  always #5 clk = ~clk;

  lbp_matmul_run #(.NC(4))  u_run4  (.clk, .done(done4),  .checks(checks4),  .failures(failures4),  .cycles(cycles4));
  lbp_matmul_run #(.NC(16)) u_run16 (.clk, .done(done16), .checks(checks16), .failures(failures16), .cycles(cycles16));
  lbp_matmul_run #(.NC(16), .VERSION(1)) u_run16c (.clk, .done(done16c), .checks(checks16c), .failures(failures16c),
                                                   .cycles(cycles16c));
  lbp_matmul_run #(.NC(16), .VERSION(2)) u_run16d (.clk, .done(done16d), .checks(checks16d), .failures(failures16d),
                                                   .cycles(cycles16d));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks16 + checks16c + checks16d, failures4 + failures16 + failures16c + failures16d + 1);
    $finish;
  end

  initial begin
    wait (done4 && done16 && done16c && done16d);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks16 + checks16c + checks16d, failures4 + failures16 + failures16c + failures16d);
    $finish;
  end
endmodule
