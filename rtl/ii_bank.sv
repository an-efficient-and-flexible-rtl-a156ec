// ii_bank: one dual-port block RAM holding a copy of the integral image.
//
// Port A reads or writes, port B only reads. Both reads are synchronous: the
// data of an address presented in one cycle appears the next cycle. A write
// on port A returns the old contents on dout_a (read-first), as block RAM in
// that mode does. The integral-image buffer builds each of its two buffers
// from eight of these, so that sixteen values can be read per cycle.
module ii_bank #(
  parameter int unsigned DEPTH = 441,
  parameter int unsigned AW    = 9,
  parameter int unsigned DW    = 16
) (
  input  logic          clk,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] din_a,
  output logic [DW-1:0] dout_a,
  input  logic [AW-1:0] addr_b,
  output logic [DW-1:0] dout_b
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_a && (32'(addr_a) < DEPTH)) mem[addr_a] <= din_a;
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
  end

endmodule
