// ram_mul2x2 -- 2 x 2 redundant adaptive multiplier.
//
// Three layers, three parts (product columns):
//   part 0: first-layer AND a0&b0 goes straight down as P0.
//   part 1: first-layer ANDs a0&b1 and a1&b0 feed the second-layer XOR/AND
//           unit; its XOR enters the third-layer unit whose other input is
//           the constant 0 ("1st preference"). That unit's XOR is P1. Its AND
//           and the second-layer AND are ORed into the carry for part 2.
//   part 2: first-layer AND a1&b1 and the ORed carry feed a last XOR/AND
//           unit; its XOR is P2 and its AND is P3.
// p = a * b for 2-bit unsigned a and b.
//
// Interface: a[1:0], b[1:0] -> p[3:0] = {P3, P2, P1, P0}.
// Timing: purely combinational.
// Every connection follows the 2x2 architecture; only the port packing into
// 2- and 4-bit vectors is this RTL's own.
module ram_mul2x2 (
    input  logic [1:0] a,
    input  logic [1:0] b,
    output logic [3:0] p
);
    logic [1:0][1:0] pp;    // pp[i][j] = a[j] & b[i]
    logic            carry; // OR of the part-1 AND outputs

    ram_pp_layer #(.WIDTH(2)) u_layer1 (.a(a), .b(b), .pp(pp));

    // part 0
    always_comb p[0] = pp[0][0];

    // part 1: second-layer unit, third-layer unit with 0, OR
    ram_pref_cell u_part1 (
        .in0 (pp[1][0]),   // a0 & b1
        .in1 (pp[0][1]),   // a1 & b0
        .cin (1'b0),
        .s   (p[1]),
        .cout(carry)
    );

    // part 2: a1 & b1 with the carry
    ram_xa_unit u_part2 (.in0(pp[1][1]), .in1(carry), .x(p[2]), .a(p[3]));
endmodule
