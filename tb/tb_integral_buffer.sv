// tb_integral_buffer: loads random contents into the write-side buffer,
// swaps with buffer select and reads sixteen random addresses per cycle,
// comparing every port with a model of both buffers. While one buffer is
// read the other is rewritten, and the reads must not see those writes
// (double buffering). Read data must arrive exactly one cycle after the
// address.
module tb_integral_buffer;
  import fd_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;

  logic     buf_sel = 0, wr_en = 0;
  ii_addr_t rd_addr [N_RD];
  ii_t      rd_data [N_RD];
  ii_addr_t wr_addr = 0;
  ii_t      wr_data = 0;
  ii_t      model [2][II_DEPTH];
  int checks = 0, failures = 0;

  integral_buffer dut (.clk, .buf_sel, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ii_t      exp_d [N_RD];
    logic     have = 0;
    foreach (rd_addr[i]) rd_addr[i] = '0;
    for (int round = 0; round < 6; round++) begin
      // write side: buffer !buf_sel, reads from buf_sel continue
      for (int a = 0; a < int'(II_DEPTH); a++) begin
        @(posedge clk);
        #1;
        if (have) begin
          for (int i = 0; i < int'(N_RD); i++) begin
            checks++;
            if (rd_data[i] !== exp_d[i]) begin
              failures++;
              if (failures < 10) $display("FAIL: round %0d port %0d got %h expected %h", round, i, rd_data[i], exp_d[i]);
            end
          end
        end
        wr_en   = 1;
        wr_addr = ii_addr_t'(a);
        wr_data = ii_t'($urandom());
        for (int i = 0; i < int'(N_RD); i++) begin
          rd_addr[i] = ii_addr_t'($urandom_range(0, II_DEPTH - 1));
          exp_d[i]   = model[buf_sel][rd_addr[i]];
        end
        have = (round > 0);
        model[!buf_sel][a] = wr_data;
      end
      @(posedge clk);
      #1;
      wr_en = 0;
      have = 0;
      buf_sel = !buf_sel;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
