// ram_xa_unit_tb -- exhaustive check of the XOR/AND two-output unit.
// All four input pairs are applied; x must equal the low bit and a the high
// bit of the arithmetic sum in0 + in1.
module ram_xa_unit_tb;
    logic in0, in1, x, a;
    int   checks = 0, failures = 0;

    ram_xa_unit dut (.in0(in0), .in1(in1), .x(x), .a(a));

    initial begin : watchdog
        #1000;
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int v = 0; v < 4; v++) begin
            int sum;
            {in1, in0} = 2'(v);
            sum = int'(in0) + int'(in1);
            #1;
            checks++;
            if ({a, x} != 2'(sum)) begin
                failures++;
                $display("FAIL in0=%0b in1=%0b -> a=%0b x=%0b", in0, in1, a, x);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
