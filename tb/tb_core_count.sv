// tb_core_count: the system built with one and with two Evaluator cores.
//
// The default top has three Evaluators. The smaller configurations differ
// only in N_EVAL, which also sizes the control-bus decoder. Two copies of the
// system, with N_EVAL = 1 and N_EVAL = 2, stand side by side (core_count_env),
// each with its own memories and processor driver. Each classifies 30
// windows of a noise and gradient image, checked against the reference
// cascade, with every core taking part.
module tb_core_count;
  import fd_pkg::*;
  import fd_ref_pkg::*;

  localparam int unsigned IW = 64, IH = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [7:0] img [IH][IW];
  int  checks1, failures1, checks2, failures2;
  bit  done1, done2;

  core_count_env #(.NE(1), .IW(IW), .IH(IH)) u_one (.clk, .rst_n, .img, .checks(checks1),
                                                   .failures(failures1), .done(done1));
  core_count_env #(.NE(2), .IW(IW), .IH(IH)) u_two (.clk, .rst_n, .img, .checks(checks2),
                                                   .failures(failures2), .done(done2));

  initial begin
    repeat (1000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2, failures1 + failures2 + 1);
    $finish;
  end

  initial begin
    ref_init();
    for (int y = 0; y < int'(IH); y++)
      for (int x = 0; x < int'(IW); x++)
        img[y][x] = ((x / 10 + y / 10) % 2 == 0) ? 8'($urandom()) : clamp8(3 * x + 2 * y);
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (done1 && done2);
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2, failures1 + failures2);
    $finish;
  end

endmodule
