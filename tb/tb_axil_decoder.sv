// tb_axil_decoder: four register slaves (axil_slave front ends with a small
// register file each) behind the decoder. Random writes and reads at random
// slaves and offsets must reach exactly the addressed slave: read-back data
// must match a model of all four register files, and a slave must never see
// a strobe meant for another. Addresses above the last slave's window go to
// the last slave.
module tb_axil_decoder;
  import fd_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  axil_req_t s_req, m_req [N];
  axil_rsp_t s_rsp, m_rsp [N];
  int checks = 0, failures = 0;
  logic [31:0] regs  [N][64];
  logic [31:0] model [N][64];
  int hits [N];

  axil_decoder #(.N_SLAVES(N)) dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);
  axil_bfm u_cpu (.clk, .req(s_req), .rsp(s_rsp));

  for (genvar k = 0; k < N; k++) begin : g_slv
    logic        wr_en, rd_en;
    logic [7:0]  wr_addr, rd_addr;
    logic [31:0] wr_data, rd_data;
    axil_slave u_s (.clk, .rst_n, .req(m_req[k]), .rsp(m_rsp[k]), .wr_en, .wr_addr, .wr_data,
                    .rd_en, .rd_addr, .rd_data);
    assign rd_data = regs[k][rd_addr[7:2]];
    always @(posedge clk) begin
      if (wr_en) begin regs[k][wr_addr[7:2]] <= wr_data; hits[k]++; end
      if (rd_en) hits[k]++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int k = 0; k < int'(N); k++) begin
      hits[k] = 0;
      for (int r = 0; r < 64; r++) begin regs[k][r] = 0; model[k][r] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      int k, r, prev [N];
      logic [31:0] a, v;
      k = $urandom_range(0, 5);           // 4 and 5 fall beyond the last window
      r = $urandom_range(0, 63);
      a = 32'(k) * 32'h100 + 32'(r * 4);
      if (k >= int'(N)) k = N - 1;
      foreach (hits[j]) prev[j] = hits[j];
      if ($urandom_range(0, 1)) begin
        v = $urandom();
        u_cpu.write(a, v);
        model[k][r] = v;
      end else begin
        u_cpu.read(a, d);
        checks++;
        if (d !== model[k][r]) begin
          failures++;
          if (failures < 10) $display("FAIL: read %h got %h expected %h", a, d, model[k][r]);
        end
      end
      @(posedge clk);
      for (int j = 0; j < int'(N); j++) begin
        checks++;
        if (hits[j] != prev[j] + ((j == k) ? 1 : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL: slave %0d strobed for address %h", j, a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
