// Recursive approximate multiplier (top level).
//
// A 2a x 2a multiplication is split into four a x a multiplications of the
// operand halves,
//   A * B = (AH*BH << 2a) + ((AH*BL + AL*BH) << a) + AL*BL,
// and the four partial results are added. The split is applied again to each
// half until the halves are four bits wide; the four-bit products come from
// the approximate 4x4 multiplier, so all of the approximation sits in those
// leaves and every addition above them is exact. With the default WIDTH = 8
// this is the published 8x8 design: four 4x4 approximate multipliers and one
// adder. Wider operands (16, 32, ...) are built by the same rule, one more
// level of recursion per doubling.
//
// The product output is 2*WIDTH bits, as in the published 8x8 design (16
// output pins). Because a 4x4 leaf can overestimate (15 x 15 gives 231), the
// sum of the four partial results can exceed 2^(2*WIDTH) - 1 when both
// operands are close to all ones; the adder then wraps modulo 2^(2*WIDTH).
// The source gives no rule for this case; keeping the 2*WIDTH-bit output and
// letting it wrap is this design's choice.
//
// The recursion is unrolled into levels rather than written as a module that
// instantiates itself. Level 0 holds one 4x4 leaf for every pair of 4-bit
// digits (a digit i of a, digit j of b). Level l holds the products of all
// pairs of (4 << l)-bit slices, each formed from the four products of its
// half-width slices one level down. The top level has a single entry, the
// full product. The circuit is the same tree of multipliers and adders as the
// recursive description.
//
// Interface: a and b are unsigned WIDTH-bit operands, p is the 2*WIDTH-bit
// approximate product. WIDTH must be 4 times a power of two. Purely
// combinational, no clock and no latency.
module recursive_approx_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);
  localparam int unsigned DIGITS = WIDTH / 4;          // 4-bit slices per operand
  localparam int unsigned LEVELS = $clog2(DIGITS);     // recursion depth

  initial begin
    assert (WIDTH >= 4 && (WIDTH & (WIDTH - 1)) == 0)
      else $error("recursive_approx_mult: WIDTH must be 4, 8, 16, ...");
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned W  = 4 << l;      // slice width at this level
    localparam int unsigned HW = W / 2;       // slice width one level down
    localparam int unsigned NS = DIGITS >> l; // slices per operand

    // prod[i][j] = (slice i of a) x (slice j of b), 2*W bits
    logic [2*W-1:0] prod [NS][NS];

    for (genvar i = 0; i < NS; i++) begin : g_i
      for (genvar j = 0; j < NS; j++) begin : g_j
        if (l == 0) begin : g_leaf
          approx_mult_4x4 u_leaf (
            .a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(prod[i][j])
          );
        end else begin : g_add
          // AH*BH << W, (AH*BL + AL*BH) << W/2, AL*BL, truncated to 2*W bits
          assign prod[i][j] =
              ({g_lvl[l-1].prod[2*i+1][2*j+1], {W{1'b0}}})
            + ({{HW{1'b0}}, g_lvl[l-1].prod[2*i+1][2*j], {HW{1'b0}}})
            + ({{HW{1'b0}}, g_lvl[l-1].prod[2*i][2*j+1], {HW{1'b0}}})
            + ({{W{1'b0}}, g_lvl[l-1].prod[2*i][2*j]});
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];
endmodule
