// ram_array_mul_tb -- checks the array multiplier at several widths.
// Widths 1, 2 (the dedicated 2x2 block), 3 and 4 are checked exhaustively,
// width 8 with random operands and width 32 (the default) with corner and
// random operands. Every product is compared with the * operator on 64-bit
// integers.
module ram_array_mul_tb;
    int checks = 0, failures = 0;

    logic [0:0]  a1, b1;  logic [1:0]  p1;
    logic [1:0]  a2, b2;  logic [3:0]  p2;
    logic [2:0]  a3, b3;  logic [5:0]  p3;
    logic [3:0]  a4, b4;  logic [7:0]  p4;
    logic [7:0]  a8, b8;  logic [15:0] p8;
    logic [31:0] a32, b32; logic [63:0] p32;

    ram_array_mul #(.WIDTH(1)) dut1 (.a(a1), .b(b1), .p(p1));
    ram_array_mul #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .p(p2));
    ram_array_mul #(.WIDTH(3)) dut3 (.a(a3), .b(b3), .p(p3));
    ram_array_mul #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .p(p4));
    ram_array_mul #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .p(p8));
    ram_array_mul              dut32 (.a(a32), .b(b32), .p(p32));

    initial begin : watchdog
        #1000000;
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    function automatic void expect64(string tag, longint unsigned x, longint unsigned y,
                                     longint unsigned got);
        checks++;
        if (got != x * y) begin
            failures++;
            $display("FAIL %s: %0d * %0d -> %0d", tag, x, y, got);
        end
    endfunction

    initial begin
        for (int i = 0; i < 16; i++) begin
            for (int j = 0; j < 16; j++) begin
                a1 = 1'(i); b1 = 1'(j);
                a2 = 2'(i); b2 = 2'(j);
                a3 = 3'(i); b3 = 3'(j);
                a4 = 4'(i); b4 = 4'(j);
                #1;
                if (i < 2 && j < 2) expect64("w1", 64'(a1), 64'(b1), 64'(p1));
                if (i < 4 && j < 4) expect64("w2", 64'(a2), 64'(b2), 64'(p2));
                if (i < 8 && j < 8) expect64("w3", 64'(a3), 64'(b3), 64'(p3));
                expect64("w4", 64'(a4), 64'(b4), 64'(p4));
            end
        end
        for (int n = 0; n < 500; n++) begin
            a8 = 8'($urandom); b8 = 8'($urandom);
            #1;
            expect64("w8", 64'(a8), 64'(b8), 64'(p8));
        end
        a32 = '1; b32 = '1; #1; expect64("w32", 64'(a32), 64'(b32), 64'(p32));
        a32 = 32'd3; b32 = 32'd2; #1; expect64("w32", 64'(a32), 64'(b32), 64'(p32));
        a32 = 32'h8000_0000; b32 = 32'h8000_0000; #1; expect64("w32", 64'(a32), 64'(b32), 64'(p32));
        a32 = '0; b32 = '1; #1; expect64("w32", 64'(a32), 64'(b32), 64'(p32));
        for (int n = 0; n < 2000; n++) begin
            a32 = $urandom; b32 = $urandom;
            #1;
            expect64("w32", 64'(a32), 64'(b32), 64'(p32));
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
