// ram_xa_unit -- XOR/AND two-output unit of the redundant adaptive multiplier.
//
// The second and third layers of the multiplier are made of this unit. It
// takes two bits and delivers both their XOR (x, the sum) and their AND
// (a, the carry) at the same time: a half adder. The AND result is one gate
// deep and settles before the XOR, which is why the architecture lets the
// AND output be consumed first ("first preference") and the XOR second.
//
// Interface: in0, in1 -> x = in0 ^ in1, a = in0 & in1.
// Timing: purely combinational, no clock.
// The two-output unit with XOR and AND outputs follows the design; calling it
// a unit rather than a multiplexer (nothing is selected) is this RTL's reading.
module ram_xa_unit (
    input  logic in0,
    input  logic in1,
    output logic x,
    output logic a
);
    always_comb begin
        a = in0 & in1;
        x = in0 ^ in1;
    end
endmodule
