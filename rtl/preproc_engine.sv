// preproc_engine: fetches a window from memory and builds its integral image.
//
// On start the engine first clears the zero row and zero column of the
// integral image (41 writes), then reads a CACHE_W x CACHE_H (24 x 22) byte
// region over its AXI read master: one burst of six 32-bit beats per row,
// starting at the word that holds the window's top-left pixel. Twenty-four
// bytes cover the 20 window pixels of a row for any byte offset 0..3; bursts
// that would cross a 4 KB boundary are split. The region size follows the
// description, which does not say what the two rows below the window are for;
// they are fetched and not used.
//
// The R data are consumed one byte per cycle. Each window pixel is cut to its
// upper 7 bits (as the description states) and goes into
//   ii(y+1, x+1) = ii(y, x+1) + rowsum(y, x)
// with the previous row kept in a 20-entry line register; each result is
// written once to the integral-image buffer at (y+1)*21 + (x+1). The sums of
// the pixels and of their squares give the intermediate normalisation factor
//   INF = N * sum(i^2) - (sum i)^2,    N = 400,
// which is the window variance times N^2 and is handed to the square-root
// unit. The description's formula lost the square of the second term in this
// copy; the squared form is the one that makes NF = sqrt(INF) the scaled
// standard deviation used by the cascade.
//
// Interface: start (with base_addr, stride) while !busy; wr_en/wr_addr/wr_data
// to the buffer; done pulses together with inf_valid/inf one cycle after the
// last write. base_addr is a byte address; stride is bytes per image row and
// must be a multiple of 4.
module preproc_engine
  import fd_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   base_addr,
  input  logic [31:0]   stride,
  output logic          busy,
  output logic          done,
  output logic          inf_valid,
  output logic [31:0]   inf,
  output logic          wr_en,
  output ii_addr_t      wr_addr,
  output ii_t           wr_data,
  output axi_rd_req_t   axi_req,
  input  axi_rd_rsp_t   axi_rsp
);

  localparam int unsigned BEATS = CACHE_W / 4;      // 6 beats per row

  typedef enum logic [1:0] {S_IDLE, S_ZERO, S_FETCH, S_FIN} state_t;
  state_t state;

  logic [31:0] stride_q;
  logic [1:0]  off;

  // AR channel
  logic        ar_active;
  logic [4:0]  ar_row;
  logic [2:0]  ar_beat;
  logic [31:0] ar_row_addr;
  logic [31:0] ar_addr;
  logic [10:0] to_4k;
  logic [2:0]  ar_n;

  // R side
  logic [31:0] rbuf;
  logic        rbuf_v;
  logic [1:0]  rk;
  logic [4:0]  r_row;
  logic [4:0]  r_byte;
  logic [8:0]  row_wbase;   // (r_row+1)*21 + 1
  logic [5:0]  zcnt;
  logic        take_beat;

  ii_t                line [WIN];
  ii_t                rowsum;
  logic [15:0]        psum;
  logic [22:0]        sqsum;

  // current byte
  logic [7:0]         byte_v;
  logic [PIX_BITS-1:0] pix;
  logic [5:0]         col_i;
  logic               in_win;
  logic               last_byte;

  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- AR
  assign ar_addr = ar_row_addr + {27'd0, ar_beat, 2'b00};
  assign to_4k   = 11'((13'h1000 - {1'b0, ar_addr[11:0]}) >> 2);
  assign ar_n    = (to_4k < 11'(BEATS - ar_beat)) ? 3'(to_4k) : 3'(BEATS - ar_beat);

  assign axi_req.arvalid = ar_active;
  assign axi_req.araddr  = ar_addr;
  assign axi_req.arlen   = 8'(ar_n - 3'd1);
  assign axi_req.arsize  = 3'd2;
  assign axi_req.arburst = AXI_BURST_INCR;

  // ---------------------------------------------------------------- R
  assign take_beat      = (state == S_FETCH) && (!rbuf_v || rk == 2'd3);
  assign axi_req.rready = take_beat;

  always_comb begin
    byte_v    = rbuf[8*rk +: 8];
    pix       = byte_v[7:8-PIX_BITS];
    col_i     = 6'(r_byte) - 6'(off);
    in_win    = (r_row < 5'(WIN)) && (r_byte >= 5'(off)) && (col_i < 6'(WIN));
    last_byte = (r_row == 5'(CACHE_H - 1)) && (r_byte == 5'(CACHE_W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      stride_q    <= '0;
      off         <= '0;
      ar_active   <= 1'b0;
      ar_row      <= '0;
      ar_beat     <= '0;
      ar_row_addr <= '0;
      rbuf        <= '0;
      rbuf_v      <= 1'b0;
      rk          <= '0;
      r_row       <= '0;
      r_byte      <= '0;
      row_wbase   <= '0;
      zcnt        <= '0;
      rowsum      <= '0;
      psum        <= '0;
      sqsum       <= '0;
      wr_en       <= 1'b0;
      wr_addr     <= '0;
      wr_data     <= '0;
      done        <= 1'b0;
      inf_valid   <= 1'b0;
      inf         <= '0;
      for (int i = 0; i < int'(WIN); i++) line[i] <= '0;
    end else begin
      wr_en     <= 1'b0;
      done      <= 1'b0;
      inf_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_ZERO;
          stride_q    <= stride;
          off         <= base_addr[1:0];
          ar_row_addr <= {base_addr[31:2], 2'b00};
          ar_row      <= '0;
          ar_beat     <= '0;
          zcnt        <= '0;
          r_row       <= '0;
          r_byte      <= '0;
          rk          <= '0;
          rbuf_v      <= 1'b0;
          row_wbase   <= 9'(II_DIM + 1);
          rowsum      <= '0;
          psum        <= '0;
          sqsum       <= '0;
          for (int i = 0; i < int'(WIN); i++) line[i] <= '0;
        end

        S_ZERO: begin
          wr_en   <= 1'b1;
          wr_data <= '0;
          wr_addr <= (zcnt < 6'(II_DIM)) ? II_AW'(zcnt)
                                          : II_AW'(32'(zcnt - 6'(II_DIM - 1)) * II_DIM);
          zcnt    <= zcnt + 1'b1;
          if (zcnt == 6'(2 * II_DIM - 2)) begin
            state     <= S_FETCH;
            ar_active <= 1'b1;
          end
        end

        S_FETCH: begin
          // address channel
          if (ar_active && axi_rsp.arready) begin
            if (ar_beat + ar_n == 3'(BEATS)) begin
              ar_beat     <= '0;
              ar_row_addr <= ar_row_addr + stride_q;
              ar_row      <= ar_row + 1'b1;
              if (ar_row == 5'(CACHE_H - 1)) ar_active <= 1'b0;
            end else begin
              ar_beat <= ar_beat + ar_n;
            end
          end
          // data channel: one byte per cycle
          if (rbuf_v) begin
            rk <= rk + 1'b1;
            if (rk == 2'd3) rbuf_v <= 1'b0;
            if (in_win) begin
              wr_en   <= 1'b1;
              wr_addr <= row_wbase + II_AW'(col_i);
              wr_data <= line[col_i[4:0]] + rowsum + ii_t'(pix);
              line[col_i[4:0]] <= line[col_i[4:0]] + rowsum + ii_t'(pix);
              rowsum  <= rowsum + ii_t'(pix);
              psum    <= psum + 16'(pix);
              sqsum   <= sqsum + 23'(pix) * 23'(pix);
            end
            if (r_byte == 5'(CACHE_W - 1)) begin
              r_byte    <= '0;
              r_row     <= r_row + 1'b1;
              rowsum    <= '0;
              row_wbase <= row_wbase + 9'(II_DIM);
            end else begin
              r_byte <= r_byte + 1'b1;
            end
            if (last_byte) state <= S_FIN;
          end
          if (take_beat && axi_rsp.rvalid) begin
            rbuf   <= axi_rsp.rdata;
            rbuf_v <= 1'b1;
            rk     <= '0;
          end
        end

        S_FIN: begin
          inf       <= 32'(N_PIX) * 32'(sqsum) - 32'(psum) * 32'(psum);
          inf_valid <= 1'b1;
          done      <= 1'b1;
          state     <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
