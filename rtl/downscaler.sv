// downscaler: shrinks a grey image in memory by 1.2 with nearest-neighbour
// sampling, producing the next level of the detection pyramid.
//
// The output is floor(W*5/6) x floor(H*5/6) pixels; output pixel (x, y) is
// source pixel (floor(1.2*x), floor(1.2*y)). The scale factor and the
// nearest-neighbour rule follow the description; the row-by-row method is
// this design's. For every output row the unit reads the selected source row
// into a MAX_W-byte line buffer over its AXI read master, then builds output
// words of four pixels from the buffer and writes them over its AXI write
// master (the last word of a row is masked with wstrb). Source and target
// columns/rows are tracked with a remainder counter (step 1 + 1/5), so no
// multiplier or divider is needed per pixel. Bursts have at most 16 beats and
// never cross a 4 KB boundary; one burst is in flight at a time.
//
// Interface: AXI4-Lite slave with the DS_* register map of fd_pkg. Write the
// source and target addresses, the source size and both strides (addresses
// and strides multiples of 4, source width <= MAX_W), then CTRL.start;
// STATUS.done becomes 1 when the last write response has arrived, and
// DS_DST_W / DS_DST_H give the output size.
module downscaler
  import fd_pkg::*;
#(
  parameter int unsigned MAX_W     = 640,
  parameter int unsigned SCALE_NUM = 6,    // scale factor NUM/DEN = 1.2
  parameter int unsigned SCALE_DEN = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    s_axil_req,
  output axil_rsp_t    s_axil_rsp,
  output axi_rd_req_t  m_axi_rd_req,
  input  axi_rd_rsp_t  m_axi_rd_rsp,
  output axi_wr_req_t  m_axi_wr_req,
  input  axi_wr_rsp_t  m_axi_wr_rsp
);

  localparam int unsigned XW = $clog2(MAX_W + 1);
  localparam int unsigned MAXWORDS = (MAX_W + 3) / 4;

  // ---------------------------------------------------------------- registers
  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [31:0] r_src, r_dst, r_src_str, r_dst_str;
  logic [15:0] r_src_w, r_src_h;
  logic [15:0] dst_w, dst_h;
  logic        busy, done_flag;
  logic        start;

  axil_slave u_axil (
    .clk, .rst_n, .req(s_axil_req), .rsp(s_axil_rsp),
    .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data
  );

  always_comb begin
    case (rd_addr)
      DS_STATUS:  rd_data = {30'd0, done_flag, busy};
      DS_SRC:     rd_data = r_src;
      DS_DST:     rd_data = r_dst;
      DS_SRC_W:   rd_data = {16'd0, r_src_w};
      DS_SRC_H:   rd_data = {16'd0, r_src_h};
      DS_SRC_STR: rd_data = r_src_str;
      DS_DST_STR: rd_data = r_dst_str;
      DS_DST_W:   rd_data = {16'd0, dst_w};
      DS_DST_H:   rd_data = {16'd0, dst_h};
      default:    rd_data = '0;
    endcase
  end

  assign start = wr_en && (wr_addr == DS_CTRL) && wr_data[0] && !busy;

  // ---------------------------------------------------------------- datapath
  typedef enum logic [2:0] {S_IDLE, S_ROW, S_AR, S_R, S_AW, S_W, S_B} state_t;
  state_t state;

  logic [7:0]  lbuf [MAXWORDS*4];

  logic [15:0] oy;            // output row
  logic [15:0] sy;            // its source row
  logic [3:0]  sy_rem;
  logic [15:0] sy_next;
  logic [3:0]  sy_rem_next;
  logic [31:0] src_row, dst_row;

  logic [15:0] src_words, dst_words;   // words per source / output row
  logic [15:0] word_i;                  // word of the current row
  logic [4:0]  beats_left;              // of the current burst
  logic [31:0] bus_addr;
  logic [4:0]  blen;

  // column tracking for the output word being written
  logic [15:0] ox;                      // first output pixel of the word
  logic [15:0] sx;                      // its source column
  logic [3:0]  sx_rem;
  logic [15:0] sxs  [4];
  logic [3:0]  srem [4];
  logic [15:0] sx_next;
  logic [3:0]  sx_rem_next;
  logic [31:0] wword;
  logic [3:0]  wstrb;

  function automatic void step(input logic [15:0] s, input logic [3:0] r,
                               output logic [15:0] s_o, output logic [3:0] r_o);
    logic [4:0] rr;
    rr  = 5'(r) + 5'(SCALE_NUM % SCALE_DEN);
    s_o = s + 16'(SCALE_NUM / SCALE_DEN);
    r_o = 4'(rr);
    if (rr >= 5'(SCALE_DEN)) begin
      s_o = s_o + 1'b1;
      r_o = 4'(rr - 5'(SCALE_DEN));
    end
  endfunction

  always_comb begin
    sxs[0] = sx; srem[0] = sx_rem;
    for (int b = 1; b < 4; b++) step(sxs[b-1], srem[b-1], sxs[b], srem[b]);
    step(sxs[3], srem[3], sx_next, sx_rem_next);
    step(sy, sy_rem, sy_next, sy_rem_next);
    for (int b = 0; b < 4; b++) begin
      wword[8*b +: 8] = lbuf[XW'(sxs[b])];
      wstrb[b]        = (ox + 16'(b)) < dst_w;
    end
  end

  // burst length: at most 16 beats, the words left, and no 4 KB crossing
  function automatic logic [4:0] burst_len(input logic [31:0] a, input logic [15:0] left);
    logic [10:0] to_4k;
    logic [15:0] n;
    to_4k = 11'((13'h1000 - {1'b0, a[11:0]}) >> 2);
    n = left;
    if (n > 16'(AXI_MAX_BEATS)) n = 16'(AXI_MAX_BEATS);
    if (n > 16'(to_4k)) n = 16'(to_4k);
    return 5'(n);
  endfunction

  assign blen = burst_len(bus_addr, (state == S_AR) ? src_words - word_i : dst_words - word_i);

  always_comb begin
    m_axi_rd_req         = '0;
    m_axi_rd_req.arvalid = (state == S_AR);
    m_axi_rd_req.araddr  = bus_addr;
    m_axi_rd_req.arlen   = 8'(blen - 5'd1);
    m_axi_rd_req.arsize  = 3'd2;
    m_axi_rd_req.arburst = AXI_BURST_INCR;
    m_axi_rd_req.rready  = (state == S_R);
    m_axi_wr_req         = '0;
    m_axi_wr_req.awvalid = (state == S_AW);
    m_axi_wr_req.awaddr  = bus_addr;
    m_axi_wr_req.awlen   = 8'(blen - 5'd1);
    m_axi_wr_req.awsize  = 3'd2;
    m_axi_wr_req.awburst = AXI_BURST_INCR;
    m_axi_wr_req.wvalid  = (state == S_W);
    m_axi_wr_req.wdata   = wword;
    m_axi_wr_req.wstrb   = wstrb;
    m_axi_wr_req.wlast   = (state == S_W) && (beats_left == 5'd1);
    m_axi_wr_req.bready  = (state == S_B);
  end

  assign busy = (state != S_IDLE);

  // line buffer: one source row
  always_ff @(posedge clk) begin
    if (state == S_R && m_axi_rd_rsp.rvalid)
      for (int b = 0; b < 4; b++) lbuf[XW'({word_i, 2'b00} + 18'(b))] <= m_axi_rd_rsp.rdata[8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_src <= '0; r_dst <= '0; r_src_str <= '0; r_dst_str <= '0;
      r_src_w <= '0; r_src_h <= '0; dst_w <= '0; dst_h <= '0;
      done_flag <= 1'b0;
      state <= S_IDLE;
      oy <= '0; sy <= '0; sy_rem <= '0; src_row <= '0; dst_row <= '0;
      src_words <= '0; dst_words <= '0; word_i <= '0; beats_left <= '0;
      bus_addr <= '0; ox <= '0; sx <= '0; sx_rem <= '0;
    end else begin
      if (wr_en && !busy) begin
        case (wr_addr)
          DS_SRC:     r_src     <= wr_data;
          DS_DST:     r_dst     <= wr_data;
          DS_SRC_W:   r_src_w   <= wr_data[15:0];
          DS_SRC_H:   r_src_h   <= wr_data[15:0];
          DS_SRC_STR: r_src_str <= wr_data;
          DS_DST_STR: r_dst_str <= wr_data;
          default: ;
        endcase
      end
      case (state)
        S_IDLE: if (start) begin
          done_flag <= 1'b0;
          dst_w     <= 16'((32'(r_src_w) * SCALE_DEN) / SCALE_NUM);
          dst_h     <= 16'((32'(r_src_h) * SCALE_DEN) / SCALE_NUM);
          src_words <= (r_src_w + 16'd3) >> 2;
          dst_words <= 16'((((32'(r_src_w) * SCALE_DEN) / SCALE_NUM) + 3) >> 2);
          oy <= '0; sy <= '0; sy_rem <= '0;
          src_row <= r_src; dst_row <= r_dst;
          state <= S_ROW;
        end

        S_ROW: begin
          if (oy == dst_h) begin
            state     <= S_IDLE;
            done_flag <= 1'b1;
          end else begin
            word_i   <= '0;
            bus_addr <= src_row;
            state    <= S_AR;
          end
        end

        S_AR: if (m_axi_rd_rsp.arready) begin
          beats_left <= blen;
          state      <= S_R;
        end

        S_R: if (m_axi_rd_rsp.rvalid) begin
          word_i     <= word_i + 1'b1;
          bus_addr   <= bus_addr + 4;
          beats_left <= beats_left - 1'b1;
          if (beats_left == 5'd1) begin
            if (word_i + 1'b1 == src_words) begin
              word_i   <= '0;
              bus_addr <= dst_row;
              ox <= '0; sx <= '0; sx_rem <= '0;
              state    <= S_AW;
            end else begin
              state <= S_AR;
            end
          end
        end

        S_AW: if (m_axi_wr_rsp.awready) begin
          beats_left <= blen;
          state      <= S_W;
        end

        S_W: if (m_axi_wr_rsp.wready) begin
          word_i     <= word_i + 1'b1;
          bus_addr   <= bus_addr + 4;
          beats_left <= beats_left - 1'b1;
          ox     <= ox + 16'd4;
          sx     <= sx_next;
          sx_rem <= sx_rem_next;
          if (beats_left == 5'd1) state <= S_B;
        end

        S_B: if (m_axi_wr_rsp.bvalid) begin
          if (word_i == dst_words) begin
            // next output row and its source row
            oy      <= oy + 1'b1;
            sy      <= sy_next;
            sy_rem  <= sy_rem_next;
            src_row <= r_src + 32'(sy_next) * r_src_str;
            dst_row <= dst_row + r_dst_str;
            state   <= S_ROW;
          end else begin
            state <= S_AW;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_src_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               start |-> 32'(r_src_w) <= MAX_W);

endmodule
