// face_detect_top: programmable-logic part of the face-detection system.
//
// The processor stores each frame in shared DDR memory, has the Downscaler
// build the image pyramid (factor 1.2 per level) and hands 20x20 sub-windows
// of every level to N_EVAL Evaluator cores, which classify them in parallel
// with the Haar cascade. This module holds the Downscaler and the Evaluators
// and the AXI4-Lite decoder that puts them on the processor's control bus,
// as in the description's system overview (three Evaluators, one memory port
// per module). The processor, its interconnects, the DDR controller and the
// Ethernet MAC are outside: their side of every bus is a port here.
//
// Ports: s_axil_* is the control bus (Downscaler at 0x000, Evaluator k at
// 0x100*(k+1)); m_axi_rd_*[0] and m_axi_wr_* are the Downscaler's memory
// port, m_axi_rd_*[k+1] Evaluator k's (read only). All AXI ports are 32 bit.
// One clock, active-low asynchronous reset.
module face_detect_top
  import fd_pkg::*;
#(
  parameter int unsigned N_EVAL = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    s_axil_req,
  output axil_rsp_t    s_axil_rsp,
  output axi_rd_req_t  m_axi_rd_req [N_EVAL+1],
  input  axi_rd_rsp_t  m_axi_rd_rsp [N_EVAL+1],
  output axi_wr_req_t  m_axi_wr_req,
  input  axi_wr_rsp_t  m_axi_wr_rsp
);

  axil_req_t ctl_req [N_EVAL+1];
  axil_rsp_t ctl_rsp [N_EVAL+1];

  axil_decoder #(.N_SLAVES(N_EVAL + 1)) u_dec (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .m_req(ctl_req), .m_rsp(ctl_rsp)
  );

  downscaler u_downscaler (
    .clk, .rst_n,
    .s_axil_req(ctl_req[0]), .s_axil_rsp(ctl_rsp[0]),
    .m_axi_rd_req(m_axi_rd_req[0]), .m_axi_rd_rsp(m_axi_rd_rsp[0]),
    .m_axi_wr_req, .m_axi_wr_rsp
  );

  for (genvar k = 0; k < N_EVAL; k++) begin : g_eval
    evaluator u_eval (
      .clk, .rst_n,
      .s_axil_req(ctl_req[k+1]), .s_axil_rsp(ctl_rsp[k+1]),
      .m_axi_rd_req(m_axi_rd_req[k+1]), .m_axi_rd_rsp(m_axi_rd_rsp[k+1])
    );
  end

endmodule
