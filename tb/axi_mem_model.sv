// axi_mem_model: behavioural AXI slave memory for the testbenches.
//
// A byte array of MEM_BYTES bytes standing in for the shared DDR memory.
// Read and write channels are independent. Read bursts are queued (up to 8
// outstanding) and answered beat by beat in order; write bursts take their
// data after the address. With STALL set, arready, awready, wready and rvalid
// are dropped at random to exercise back-pressure. It counts protocol
// violations seen on the bus: a burst longer than 16 beats, a burst that
// crosses a 4 KB boundary, a transfer size other than 4 bytes, an access
// outside the array. Testbenches fill and inspect mem[] directly.
module axi_mem_model
  import fd_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536,
  parameter bit          STALL     = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axi_rd_req_t  rd_req,
  output axi_rd_rsp_t  rd_rsp,
  input  axi_wr_req_t  wr_req,
  output axi_wr_rsp_t  wr_rsp
);

  logic [7:0] mem [MEM_BYTES];
  int unsigned protocol_errors = 0;
  int unsigned rd_bursts = 0, wr_bursts = 0;

  // read side
  logic [31:0] q_addr [$];
  int unsigned q_len  [$];
  logic [31:0] cur_addr;
  int unsigned cur_left;
  logic        cur_busy;
  logic        ar_rdy, r_go;

  function automatic void check_burst(input logic [31:0] a, input logic [7:0] len,
                                      input logic [2:0] size);
    if (len > 8'(AXI_MAX_BEATS - 1)) protocol_errors++;
    if (size != 3'd2) protocol_errors++;
    if ((a >> 12) != ((a + 32'(len) * 4 + 3) >> 12)) protocol_errors++;
    if (a + 32'(len) * 4 + 3 >= MEM_BYTES) protocol_errors++;
  endfunction

  function automatic logic [31:0] rd_word(input logic [31:0] a);
    logic [31:0] w;
    for (int b = 0; b < 4; b++)
      w[8*b +: 8] = (a + 32'(b) < MEM_BYTES) ? mem[a + 32'(b)] : 8'h00;
    return w;
  endfunction

  always_ff @(posedge clk) begin
    ar_rdy <= !STALL || ($urandom_range(0, 3) != 0);
    r_go   <= !STALL || ($urandom_range(0, 4) != 0);
  end

  always_comb begin
    rd_rsp         = '0;
    rd_rsp.arready = ar_rdy && (q_addr.size() < 8);
    rd_rsp.rvalid  = cur_busy && r_go;
    rd_rsp.rdata   = cur_busy ? rd_word(cur_addr) : 32'h0;
    rd_rsp.rlast   = cur_busy && (cur_left == 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_busy <= 1'b0;
      cur_left <= 0;
      cur_addr <= '0;
      q_addr.delete();
      q_len.delete();
    end else begin
      if (rd_req.arvalid && rd_rsp.arready) begin
        check_burst(rd_req.araddr, rd_req.arlen, rd_req.arsize);
        q_addr.push_back(rd_req.araddr);
        q_len.push_back(int'(rd_req.arlen) + 1);
        rd_bursts++;
      end
      if (cur_busy && rd_rsp.rvalid && rd_req.rready) begin
        cur_addr <= cur_addr + 4;
        cur_left <= cur_left - 1;
        if (cur_left == 1) cur_busy <= 1'b0;
      end else if (!cur_busy && q_addr.size() > 0) begin
        cur_addr <= q_addr.pop_front();
        cur_left <= q_len.pop_front();
        cur_busy <= 1'b1;
      end
    end
  end

  // write side
  logic        w_busy, b_pend;
  logic [31:0] w_addr;
  int unsigned w_left;
  logic        aw_rdy, w_rdy;

  always_ff @(posedge clk) begin
    aw_rdy <= !STALL || ($urandom_range(0, 3) != 0);
    w_rdy  <= !STALL || ($urandom_range(0, 3) != 0);
  end

  always_comb begin
    wr_rsp         = '0;
    wr_rsp.awready = aw_rdy && !w_busy && !b_pend;
    wr_rsp.wready  = w_rdy && w_busy;
    wr_rsp.bvalid  = b_pend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy <= 1'b0;
      b_pend <= 1'b0;
      w_addr <= '0;
      w_left <= 0;
    end else begin
      if (wr_req.awvalid && wr_rsp.awready) begin
        check_burst(wr_req.awaddr, wr_req.awlen, wr_req.awsize);
        w_addr <= wr_req.awaddr;
        w_left <= int'(wr_req.awlen) + 1;
        w_busy <= 1'b1;
        wr_bursts++;
      end
      if (w_busy && wr_req.wvalid && wr_rsp.wready) begin
        for (int b = 0; b < 4; b++)
          if (wr_req.wstrb[b] && (w_addr + 32'(b) < MEM_BYTES)) mem[w_addr + 32'(b)] <= wr_req.wdata[8*b +: 8];
        if (wr_req.wlast != (w_left == 1)) protocol_errors++;
        w_addr <= w_addr + 4;
        w_left <= w_left - 1;
        if (w_left == 1) begin
          w_busy <= 1'b0;
          b_pend <= 1'b1;
        end
      end
      if (b_pend && wr_req.bready) b_pend <= 1'b0;
    end
  end

endmodule
