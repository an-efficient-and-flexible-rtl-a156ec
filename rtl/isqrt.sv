// isqrt: integer square root, NF = floor(sqrt(INF)).
//
// The Evaluator needs NF = sqrt(INF) to scale every node threshold of the
// window being classified. This unit uses the bit-serial restoring method:
// one result bit per cycle, so a 32-bit INF takes 16 cycles and needs only a
// subtractor. The algorithm is this design's choice; the description names
// only a square-root unit between the preprocessing engine and the core.
//
// Interface: in_valid with in_data starts a computation (ignored while busy);
// out_valid pulses for one cycle with out_data = floor(sqrt(in_data)),
// IN_W/2 + 1 cycles after in_valid.
module isqrt #(
  parameter int unsigned IN_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [IN_W-1:0]     in_data,
  output logic                busy,
  output logic                out_valid,
  output logic [IN_W/2-1:0]   out_data
);

  localparam int unsigned STEPS = IN_W / 2;
  localparam int unsigned OUT_W = IN_W / 2;

  logic [IN_W-1:0] op, res, one;
  logic [$clog2(STEPS+1)-1:0] cnt;
  logic [IN_W-1:0] trial;

  assign trial = res + one;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      op        <= '0;
      res       <= '0;
      one       <= '0;
      cnt       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          op   <= in_data;
          res  <= '0;
          one  <= IN_W'(1) << (IN_W - 2);
          cnt  <= '0;
        end
      end else begin
        if (op >= trial) begin
          op  <= op - trial;
          res <= (res >> 1) + one;
        end else begin
          res <= res >> 1;
        end
        one <= one >> 2;
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(STEPS+1))'(STEPS - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= (op >= trial) ? OUT_W'((res >> 1) + one) : OUT_W'(res >> 1);
        end
      end
    end
  end

endmodule
