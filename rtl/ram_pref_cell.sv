// ram_pref_cell -- third-layer cell of the redundant adaptive multiplier.
//
// A second-layer XOR/AND unit combines two column bits (in0, in1). Its XOR
// goes on to a third-layer XOR/AND unit together with the incoming bit cin;
// that unit's XOR is the result bit s. The two AND outputs (second and third
// layer) are merged by an OR gate into the carry cout for the next part
// (column). At most one of the two AND outputs can be 1, so the OR gives the
// exact carry: the cell is a full adder, s + 2*cout = in0 + in1 + cin.
//
// Interface: in0, in1, cin -> s, cout.
// Timing: purely combinational. The carry path (AND, then OR) is the short
// "first preference" path; the sum path goes through two XORs.
// The structure (two XOR/AND units and one OR) follows the 2x2 architecture;
// exposing the third-layer input as cin, tied to 0 in the 2x2 case, is this
// RTL's choice so the cell can be chained in wider multipliers.
module ram_pref_cell (
    input  logic in0,
    input  logic in1,
    input  logic cin,
    output logic s,
    output logic cout
);
    logic x2, a2;  // second-layer unit
    logic a3;      // AND output of the third-layer unit

    ram_xa_unit u_layer2 (.in0(in0), .in1(in1), .x(x2), .a(a2));
    ram_xa_unit u_layer3 (.in0(x2),  .in1(cin), .x(s),  .a(a3));

    always_comb cout = a3 | a2;
endmodule
