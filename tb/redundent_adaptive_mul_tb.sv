// redundent_adaptive_mul_tb -- end-to-end test of the 32 x 32 multiplier.
// Runs the top level with its default parameters. Operands are changed on
// the falling clock edge; half a cycle later, still before the next rising
// edge, c must hold the previous product (the output is registered), and
// right after the rising edge c must equal the new a*b (latency one cycle,
// one product per cycle). The operand pair 3 x 2 = 6 is applied first, then
// corner cases and random operands. The testbench counts how often the
// carry paths of the array were used: the part-1 carry of the low 2x2
// corner (a0b1 and a1b0 both 1, merged by the OR gate), products that reach
// the most significant bit, and zero products; each must occur at least once.
module redundent_adaptive_mul_tb;
    localparam int W = 32;
    localparam int NRAND = 3000;

    logic           clk = 1'b0;
    logic [W-1:0]   a, b;
    logic [2*W-1:0] c, outputcout;
    int checks = 0, failures = 0;
    int n_part1_carry = 0, n_msb = 0, n_zero = 0, n_ops = 0;

    redundent_adaptive_mul dut (.clk(clk), .a(a), .b(b), .c(c), .outputcout(outputcout));

    always #5 clk = ~clk;

    initial begin : watchdog
        repeat (NRAND + 100) @(posedge clk);
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    logic [2*W-1:0] prev;

    task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
        logic [2*W-1:0] expect_c;
        @(negedge clk);
        a = x;
        b = y;
        expect_c = 64'(x) * 64'(y);
        #1;
        // registered: no change before the clock edge
        checks++;
        if (c != prev) begin
            failures++;
            $display("FAIL c changed before the clock edge: %h (held %h)", c, prev);
        end
        @(posedge clk);
        #1;
        checks++;
        if (c != expect_c) begin
            failures++;
            $display("FAIL %h * %h -> %h, expected %h", x, y, c, expect_c);
        end
        checks++;
        if (outputcout != '0) begin
            failures++;
            $display("FAIL outputcout=%h", outputcout);
        end
        n_ops++;
        if (x[0] & y[1] & x[1] & y[0]) n_part1_carry++;
        if (expect_c[2*W-1]) n_msb++;
        if (expect_c == '0) n_zero++;
        prev = expect_c;
    endtask

    initial begin
        a = '0;
        b = '0;
        @(posedge clk);
        #1;
        prev = c;   // product of 0 x 0 now registered
        checks++;
        if (c != '0) begin
            failures++;
            $display("FAIL initial product %h", c);
        end

        apply(32'd3, 32'd2);
        apply('1, '1);
        apply(32'h8000_0000, 32'h8000_0000);
        apply('0, '1);
        apply('1, 32'd1);
        apply(32'hFFFF, 32'h10001);
        for (int n = 0; n < NRAND; n++) apply($urandom, $urandom);

        checks++;
        if (n_part1_carry == 0 || n_msb == 0 || n_zero == 0) begin
            failures++;
            $display("FAIL a carry path was never exercised");
        end
        $display("operations=%0d part-1 carries=%0d msb set=%0d zero products=%0d",
                 n_ops, n_part1_carry, n_msb, n_zero);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
