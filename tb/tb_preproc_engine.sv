// tb_preproc_engine: loads windows at every byte alignment, some straddling a
// 4 KB boundary, from a memory with random back-pressure. Every write to the
// integral image is captured; afterwards all 441 entries must equal the
// integral image worked out by direct summation of the 7-bit pixels (zero row
// and column included), and INF must equal N*sum(p^2) - (sum p)^2. Also
// checked: the engine issues 22 rows of 24 bytes, splits bursts only at 4 KB
// boundaries, and done comes with inf_valid.
module tb_preproc_engine;
  import fd_pkg::*;
  localparam int unsigned STRIDE = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        start = 0, busy, done, inf_valid, wr_en;
  logic [31:0] base_addr = 0, stride = STRIDE, inf;
  ii_addr_t    wr_addr;
  ii_t         wr_data;
  axi_rd_req_t rd_req;
  axi_rd_rsp_t rd_rsp;
  axi_wr_req_t wr_req;
  axi_wr_rsp_t wr_rsp;
  int checks = 0, failures = 0;
  ii_t got [II_DEPTH];
  int  beats = 0, splits = 0;

  preproc_engine dut (.clk, .rst_n, .start, .base_addr, .stride, .busy, .done, .inf_valid, .inf,
                      .wr_en, .wr_addr, .wr_data, .axi_req(rd_req), .axi_rsp(rd_rsp));
  axi_mem_model #(.MEM_BYTES(32768)) u_mem (.clk, .rst_n, .rd_req, .rd_rsp, .wr_req, .wr_rsp);
  assign wr_req = '0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (wr_en) got[wr_addr] <= wr_data;
    if (rd_req.arvalid && rd_rsp.arready && rd_req.arlen != 8'd5) splits++;
    if (rd_rsp.rvalid && rd_req.rready) beats++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int a = 0; a < 32768; a++) u_mem.mem[a] = 8'($urandom());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 24; w++) begin
      int unsigned a;
      int ii [21][21];
      longint s, sq;
      if (w % 4 == 3) a = 32'h1000 * $urandom_range(1, 4) - $urandom_range(1, 23);
      else a = $urandom_range(0, 32768 - 23 * STRIDE);
      foreach (got[i]) got[i] = ii_t'($urandom());
      beats = 0;
      @(posedge clk);
      base_addr <= a; start <= 1;
      @(posedge clk);
      start <= 0;
      while (!done) begin
        @(posedge clk);
        check(done == inf_valid, "done without inf_valid");
      end
      @(posedge clk);
      s = 0; sq = 0;
      for (int y = 0; y <= 20; y++)
        for (int x = 0; x <= 20; x++) begin
          int p;
          if (y == 0 || x == 0) ii[y][x] = 0;
          else begin
            p = int'(u_mem.mem[a + (y - 1) * STRIDE + (x - 1)] >> 1);
            ii[y][x] = p + ii[y-1][x] + ii[y][x-1] - ii[y-1][x-1];
            s += p; sq += p * p;
          end
          check(int'(got[y * 21 + x]) == ii[y][x],
                $sformatf("window %0d @%h ii(%0d,%0d) = %0d expected %0d", w, a, y, x, got[y*21+x], ii[y][x]));
        end
      check(longint'(inf) == 400 * sq - s * s, $sformatf("INF %0d expected %0d", inf, 400 * sq - s * s));
      check(beats == 22 * 6, $sformatf("%0d beats read", beats));
    end
    check(splits > 0, "no burst split at a 4 KB boundary");
    check(u_mem.protocol_errors == 0, "AXI protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
