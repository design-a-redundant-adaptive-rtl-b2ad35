// ram_mul2x2_tb -- exhaustive check of the 2 x 2 multiplier.
// All sixteen operand pairs are applied and p is compared with a*b. It also
// counts the cases that use the part-1 carry (a0b1 and a1b0 both 1, the OR
// path into part 2) and the cases that set P3, and fails if either never
// occurred.
module ram_mul2x2_tb;
    logic [1:0] a, b;
    logic [3:0] p;
    int checks = 0, failures = 0;
    int n_carry = 0, n_p3 = 0;

    ram_mul2x2 dut (.a(a), .b(b), .p(p));

    initial begin : watchdog
        #1000;
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    initial begin
        for (int i = 0; i < 4; i++) begin
            for (int j = 0; j < 4; j++) begin
                a = 2'(i);
                b = 2'(j);
                #1;
                checks++;
                if (p != 4'(i * j)) begin
                    failures++;
                    $display("FAIL %0d * %0d -> %0d", i, j, p);
                end
                if (a[0] & b[1] & a[1] & b[0]) n_carry++;
                if (p[3]) n_p3++;
            end
        end
        checks++;
        if (n_carry == 0 || n_p3 == 0) begin
            failures++;
            $display("FAIL carry path not exercised");
        end
        $display("part-1 carry cases=%0d  P3 set=%0d", n_carry, n_p3);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
