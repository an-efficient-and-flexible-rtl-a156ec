// axil_slave: AXI4-Lite slave front end for a small register file.
//
// Turns AXI4-Lite transactions into single-cycle register strobes. A write is
// taken when address and data are both valid and no response is pending
// (awready = wready = that condition); it produces wr_en for one cycle and an
// OKAY response that is held until bready. A read is taken when no read data
// is pending; it produces rd_en for one cycle, samples the parent's
// combinational rd_data in that same cycle and holds it on R until rready.
// rd_en lets a register have a read side effect (pop). Only the low 8 address
// bits are decoded. The handshake rules below are checked by assertions.
module axil_slave
  import fd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output logic        wr_en,
  output logic [7:0]  wr_addr,
  output logic [31:0] wr_data,
  output logic        rd_en,
  output logic [7:0]  rd_addr,
  input  logic [31:0] rd_data
);

  logic        bvalid, rvalid;
  logic [31:0] rdata;

  assign wr_en   = req.awvalid && req.wvalid && !bvalid;
  assign wr_addr = req.awaddr[7:0];
  assign wr_data = req.wdata;
  assign rd_en   = req.arvalid && !rvalid;
  assign rd_addr = req.araddr[7:0];

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_en;
    rsp.wready  = wr_en;
    rsp.bvalid  = bvalid;
    rsp.bresp   = 2'b00;
    rsp.arready = !rvalid;
    rsp.rvalid  = rvalid;
    rsp.rdata   = rdata;
    rsp.rresp   = 2'b00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid <= 1'b0;
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (wr_en)                    bvalid <= 1'b1;
      else if (bvalid && req.bready) bvalid <= 1'b0;
      if (rd_en) begin
        rvalid <= 1'b1;
        rdata  <= rd_data;
      end else if (rvalid && req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // a response stays valid, with the same data, until it is taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             rsp.bvalid && !req.bready |=> rsp.bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             rsp.rvalid && !req.rready |=> rsp.rvalid && $stable(rsp.rdata));

endmodule
