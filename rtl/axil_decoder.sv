// axil_decoder: splits the CPU's AXI4-Lite control bus over N_SLAVES slaves.
//
// Each slave owns a 256-byte window: slave k answers addresses k*256 to
// k*256 + 255; all addresses above go to the last slave. One
// transaction is in flight per direction. A write is routed when address and
// data are both valid and forwarded until the slave's response is taken; a
// read likewise. The description only shows the modules hanging off one AXI
// bus from the processor; this decoder is the simplest structure for that.
module axil_decoder
  import fd_pkg::*;
#(
  parameter int unsigned N_SLAVES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_req,
  output axil_rsp_t  s_rsp,
  output axil_req_t  m_req [N_SLAVES],
  input  axil_rsp_t  m_rsp [N_SLAVES]
);

  localparam int unsigned SEL_W = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1;

  logic             w_busy, r_busy;
  logic [SEL_W-1:0] w_sel, r_sel, w_dec, r_dec;

  function automatic logic [SEL_W-1:0] decode(input logic [31:0] a);
    return (32'(a[31:8]) < N_SLAVES) ? a[8 +: SEL_W] : SEL_W'(N_SLAVES - 1);
  endfunction

  assign w_dec = w_busy ? w_sel : decode(s_req.awaddr);
  assign r_dec = r_busy ? r_sel : decode(s_req.araddr);

  always_comb begin
    s_rsp = '0;
    for (int k = 0; k < int'(N_SLAVES); k++) begin
      m_req[k] = '0;
      m_req[k].awaddr = {24'd0, s_req.awaddr[7:0]};
      m_req[k].wdata  = s_req.wdata;
      m_req[k].wstrb  = s_req.wstrb;
      m_req[k].araddr = {24'd0, s_req.araddr[7:0]};
      if (w_dec == SEL_W'(k)) begin
        m_req[k].awvalid = s_req.awvalid && !w_busy;
        m_req[k].wvalid  = s_req.wvalid && !w_busy;
        m_req[k].bready  = s_req.bready;
        s_rsp.awready = m_rsp[k].awready && !w_busy;
        s_rsp.wready  = m_rsp[k].wready && !w_busy;
        s_rsp.bvalid  = m_rsp[k].bvalid;
        s_rsp.bresp   = m_rsp[k].bresp;
      end
      if (r_dec == SEL_W'(k)) begin
        m_req[k].arvalid = s_req.arvalid && !r_busy;
        m_req[k].rready  = s_req.rready;
        s_rsp.arready = m_rsp[k].arready && !r_busy;
        s_rsp.rvalid  = m_rsp[k].rvalid;
        s_rsp.rdata   = m_rsp[k].rdata;
        s_rsp.rresp   = m_rsp[k].rresp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_busy <= 1'b0; r_busy <= 1'b0; w_sel <= '0; r_sel <= '0;
    end else begin
      if (!w_busy && s_req.awvalid && s_req.wvalid && s_rsp.awready) begin
        w_busy <= 1'b1;
        w_sel  <= w_dec;
      end else if (w_busy && s_rsp.bvalid && s_req.bready) begin
        w_busy <= 1'b0;
      end
      if (!r_busy && s_req.arvalid && s_rsp.arready) begin
        r_busy <= 1'b1;
        r_sel  <= r_dec;
      end else if (r_busy && s_rsp.rvalid && s_req.rready) begin
        r_busy <= 1'b0;
      end
    end
  end

endmodule
