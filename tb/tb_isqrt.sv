// tb_isqrt: checks the square-root unit on edge values and random inputs.
// The expected value r satisfies r*r <= v < (r+1)*(r+1), checked directly;
// the result must be valid in the 17th cycle (IN_W/2 + 1) after the cycle
// with in_valid, which this testbench samples 18 clock edges after driving it.
module tb_isqrt;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        in_valid = 0, busy, out_valid;
  logic [31:0] in_data = 0;
  logic [15:0] out_data;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(32)) dut (.clk, .rst_n, .in_valid, .in_data, .busy, .out_valid, .out_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] v);
    longint unsigned r;
    int lat;
    @(posedge clk);
    in_valid <= 1; in_data <= v;
    @(posedge clk);
    in_valid <= 0;
    lat = 1;
    while (!out_valid) begin @(posedge clk); lat++; end
    r = longint'(out_data);
    checks++;
    if (!(r * r <= longint'(v) && (r + 1) * (r + 1) > longint'(v))) begin
      failures++; $display("FAIL: sqrt(%0d) gave %0d", v, out_data);
    end
    checks++;
    if (lat != 18) begin failures++; $display("FAIL: latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2); run(3); run(4); run(15); run(16); run(17);
    run(32'hFFFF_FFFF); run(32'hFFFE_0001); run(32'hFFFE_0000); run(2580640000);
    for (int i = 0; i < 300; i++) run($urandom());
    for (int i = 0; i < 100; i++) begin
      logic [31:0] s;
      s = $urandom_range(0, 65535);
      run(s * s); run(s * s - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
