// haar_node: one node of a decision tree, a Haar feature against a threshold.
//
// The node receives the corner values a, b, c, d of three rectangles read from
// the integral image (a top-left, b top-right, c bottom-left, d bottom-right,
// so a rectangle's pixel sum is a-b-c+d), the weight of the second rectangle,
// a threshold already multiplied by the window's normalisation factor, and
// the comparison type. As in the description's node diagram it forms
//   lhs = S1 + threshold      rhs = S2 * weight + S3 * 2
// and compares them; the comparison type selects the result or its inverse.
// lhs > rhs is the feature test  -S1 + w*S2 + 2*S3 < threshold  of the
// cascade. Which operand sits on which side of the comparator and the
// polarity of the final selection are this design's reading of the diagram.
// An absent third rectangle is given as four zero corners.
//
// Timing: active is registered, one cycle after the inputs.
module haar_node
  import fd_pkg::*;
(
  input  logic     clk,
  input  node_in_t n,
  output logic     active
);

  localparam int unsigned SW = II_W + 2;   // signed rectangle sum
  localparam int unsigned CW = NTHR_W + 2; // comparator width

  function automatic logic signed [SW-1:0] rect_sum(input corners_t r);
    return signed'({2'b00, r.a}) - signed'({2'b00, r.b})
         - signed'({2'b00, r.c}) + signed'({2'b00, r.d});
  endfunction

  logic signed [SW-1:0] s1, s2, s3;
  logic signed [CW-1:0] lhs, rhs;
  logic                 gt;

  always_comb begin
    s1  = rect_sum(n.r1);
    s2  = rect_sum(n.r2);
    s3  = rect_sum(n.r3);
    lhs = CW'(s1) + CW'(n.thr);
    rhs = CW'(s2) * signed'({1'b0, n.weight}) + CW'(s3) * 2;
    gt  = lhs > rhs;
  end

  always_ff @(posedge clk) active <= n.pol ? !gt : gt;

endmodule
