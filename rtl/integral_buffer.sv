// integral_buffer: double-buffered integral image with sixteen read ports.
//
// One decision tree per cycle needs four rectangles, each read at its four
// corners: sixteen integral-image values per cycle. Dual-port block RAM gives
// two reads, so each buffer keeps N_COPIES = 8 identical copies and every
// write goes to all eight. There are two such buffers. buf_sel picks the one
// the core reads (0: buffer 1, 1: buffer 2); the other takes the writes of the
// preprocessing engine, so that the next window is loaded while the current
// one is classified. The switch in front of the buffers routes read addresses
// to the read buffer and the write port to the other; the multiplexer behind
// them returns the read buffer's data. Both follow the description; the
// mapping of read port 2k / 2k+1 to ports A / B of copy k is this design's.
//
// Timing: rd_data[i] is the value at rd_addr[i] of the previous cycle, read
// from the buffer buf_sel selected in that cycle. A write is visible to reads
// of that buffer from the next cycle on.
module integral_buffer
  import fd_pkg::*;
#(
  parameter int unsigned N_COPIES = 8,
  parameter int unsigned DEPTH    = II_DEPTH
) (
  input  logic                 clk,
  input  logic                 buf_sel,
  input  ii_addr_t             rd_addr [2*N_COPIES],
  output ii_t                  rd_data [2*N_COPIES],
  input  logic                 wr_en,
  input  ii_addr_t             wr_addr,
  input  ii_t                  wr_data
);

  ii_addr_t addr_a [2][N_COPIES];
  ii_addr_t addr_b [2][N_COPIES];
  logic     we     [2];
  ii_t      dout_a [2][N_COPIES];
  ii_t      dout_b [2][N_COPIES];
  logic     sel_q;

  // switch
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      we[b] = wr_en && (buf_sel != 1'(b));
      for (int k = 0; k < int'(N_COPIES); k++) begin
        if (buf_sel == 1'(b)) begin
          addr_a[b][k] = rd_addr[2*k];
          addr_b[b][k] = rd_addr[2*k+1];
        end else begin
          addr_a[b][k] = wr_addr;
          addr_b[b][k] = wr_addr;
        end
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_buf
    for (genvar k = 0; k < N_COPIES; k++) begin : g_copy
      ii_bank #(.DEPTH(DEPTH), .AW(II_AW), .DW(II_W)) u_bank (
        .clk    (clk),
        .we_a   (we[b]),
        .addr_a (addr_a[b][k]),
        .din_a  (wr_data),
        .dout_a (dout_a[b][k]),
        .addr_b (addr_b[b][k]),
        .dout_b (dout_b[b][k])
      );
    end
  end

  always_ff @(posedge clk) sel_q <= buf_sel;

  // output multiplexer
  always_comb begin
    for (int k = 0; k < int'(N_COPIES); k++) begin
      rd_data[2*k]   = sel_q ? dout_a[1][k] : dout_a[0][k];
      rd_data[2*k+1] = sel_q ? dout_b[1][k] : dout_b[0][k];
    end
  end

endmodule
