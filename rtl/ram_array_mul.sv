// ram_array_mul -- WIDTH x WIDTH redundant adaptive multiplier (combinational).
//
// The 2x2 architecture extended to any width. The first layer forms all
// WIDTH*WIDTH partial-product bits with AND gates. The product has 2*WIDTH-1
// parts (columns 0 .. 2*WIDTH-2) plus the final carry: 3 parts at 2 bits,
// 5 at 3 bits, 7 at 4 bits. The partial products are summed row by row:
// row i (multiplier bit i) is added to the running sum by a chain of
// third-layer cells (ram_pref_cell: XOR/AND unit, XOR/AND unit, OR), the
// carry of each cell going to the next part. The first cell of every row has
// its carry input tied to 0, exactly as the part-1 cell of the 2x2 design.
// After row i the lowest bit of the running sum is final and leaves as
// product bit i; after the last row the remaining WIDTH bits form the top
// half of the product.
//
// For WIDTH == 2 the dedicated 2x2 block (ram_mul2x2) is used as is.
//
// Interface: a, b (WIDTH bits, unsigned) -> p = a * b (2*WIDTH bits).
// Timing: purely combinational; the longest path ripples through about
// 2*WIDTH cells.
// The three-layer cells, the AND first layer, the part count and the 2x2
// block follow the design. How rows are arranged beyond 2 bits (a ripple
// array, one row of cells per multiplier bit) is this RTL's own choice; the
// design gives only the 2x2 wiring and the part counts.
module ram_array_mul #(
    parameter int unsigned WIDTH = 32
) (
    input  logic [WIDTH-1:0]   a,
    input  logic [WIDTH-1:0]   b,
    output logic [2*WIDTH-1:0] p
);
    if (WIDTH == 1) begin : g_w1
        logic [0:0][0:0] pp;
        ram_pp_layer #(.WIDTH(1)) u_layer1 (.a(a), .b(b), .pp(pp));
        always_comb p = {1'b0, pp[0][0]};
    end else if (WIDTH == 2) begin : g_w2
        ram_mul2x2 u_mul2x2 (.a(a), .b(b), .p(p));
    end else begin : g_array
        logic [WIDTH-1:0][WIDTH-1:0] pp;   // pp[i][j] = a[j] & b[i]
        logic [WIDTH-1:0][WIDTH:0]   acc;  // running sum after row i
        logic [WIDTH-1:1][WIDTH:0]   cy;   // carries between parts of row i

        ram_pp_layer #(.WIDTH(WIDTH)) u_layer1 (.a(a), .b(b), .pp(pp));

        // Row 0 is partial-product row 0 itself.
        assign acc[0] = {1'b0, pp[0]};

        for (genvar i = 1; i < WIDTH; i++) begin : g_row
            assign cy[i][0] = 1'b0;
            for (genvar j = 0; j < WIDTH; j++) begin : g_part
                ram_pref_cell u_cell (
                    .in0 (pp[i][j]),
                    .in1 (acc[i-1][j+1]),
                    .cin (cy[i][j]),
                    .s   (acc[i][j]),
                    .cout(cy[i][j+1])
                );
            end
            assign acc[i][WIDTH] = cy[i][WIDTH];
        end

        for (genvar i = 0; i < WIDTH; i++) begin : g_low
            assign p[i] = acc[i][0];
        end
        assign p[2*WIDTH-1:WIDTH] = acc[WIDTH-1][WIDTH:1];
    end
endmodule
