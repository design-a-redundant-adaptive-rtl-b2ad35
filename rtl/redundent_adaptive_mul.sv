// redundent_adaptive_mul -- 32 x 32 redundant adaptive multiplier, top level.
//
// Multiplies two unsigned WIDTH-bit operands with the three-layer array of
// ram_array_mul (AND first layer, XOR/AND second layer, XOR/AND/OR third
// layer) and registers the 2*WIDTH-bit product.
//
// Interface (the port names and widths of the synthesized top):
//   clk         clock; no reset port exists, the output register simply
//               follows the inputs.
//   a, b        operands, WIDTH bits, unsigned.
//   c           product a*b, registered: the product of the operands present
//               at a rising clock edge appears on c right after that edge
//               (latency 1 cycle, one product per cycle).
//   outputcout  a 2*WIDTH-bit port that the published design brings out but
//               never drives; it carries no function and is tied to zero
//               here, since a two-state netlist has no high-impedance value.
// The port list, widths and name follow the design. Registering c on clk
// (rather than leaving the multiplier purely combinational) is this RTL's
// reading of the clock port; the design does not say where the register is.
module redundent_adaptive_mul #(
    parameter int unsigned WIDTH = 32
) (
    input  logic               clk,
    input  logic [WIDTH-1:0]   a,
    input  logic [WIDTH-1:0]   b,
    output logic [2*WIDTH-1:0] c,
    output logic [2*WIDTH-1:0] outputcout
);
    logic [2*WIDTH-1:0] product;

    ram_array_mul #(.WIDTH(WIDTH)) u_mul (.a(a), .b(b), .p(product));

    always_ff @(posedge clk) c <= product;

    assign outputcout = '0;
endmodule
