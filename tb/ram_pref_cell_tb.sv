// ram_pref_cell_tb -- exhaustive check of the third-layer cell.
// All eight input combinations are applied; {cout, s} must equal the
// arithmetic sum in0 + in1 + cin, which also shows that the OR of the two
// carries never loses a carry.
module ram_pref_cell_tb;
    logic in0, in1, cin, s, cout;
    int   checks = 0, failures = 0;

    ram_pref_cell dut (.in0(in0), .in1(in1), .cin(cin), .s(s), .cout(cout));

    initial begin : watchdog
        #1000;
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int v = 0; v < 8; v++) begin
            int sum;
            {cin, in1, in0} = 3'(v);
            sum = int'(in0) + int'(in1) + int'(cin);
            #1;
            checks++;
            if ({cout, s} != 2'(sum)) begin
                failures++;
                $display("FAIL in0=%0b in1=%0b cin=%0b -> cout=%0b s=%0b",
                         in0, in1, cin, cout, s);
            end
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
