// ram_pp_layer -- first layer of the redundant adaptive multiplier.
//
// One AND gate per pair of operand bits: pp[i][j] = a[j] & b[i]. Row i of pp
// is the multiplicand gated by multiplier bit i; its bit j has weight 2^(i+j)
// and belongs to part (column) i+j of the product.
//
// Interface: a, b (WIDTH bits each) -> pp (WIDTH rows of WIDTH bits).
// Timing: purely combinational.
// The first layer of AND gates follows the design; WIDTH defaults to the
// 32-bit operands of the top level.
module ram_pp_layer #(
    parameter int unsigned WIDTH = 32
) (
    input  logic [WIDTH-1:0]             a,
    input  logic [WIDTH-1:0]             b,
    output logic [WIDTH-1:0][WIDTH-1:0]  pp
);
    always_comb begin
        for (int i = 0; i < WIDTH; i++) begin
            pp[i] = a & {WIDTH{b[i]}};
        end
    end
endmodule
