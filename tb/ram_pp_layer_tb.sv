// ram_pp_layer_tb -- checks the first (AND) layer at its default width.
// Random and corner operands are applied; every partial-product bit is
// compared with a[j] & b[i] computed bit by bit here, and the weighted sum of
// all partial products is compared with the product a*b.
module ram_pp_layer_tb;
    localparam int W = 32;
    logic [W-1:0]        a, b;
    logic [W-1:0][W-1:0] pp;
    int checks = 0, failures = 0;

    ram_pp_layer dut (.a(a), .b(b), .pp(pp));

    initial begin : watchdog
        #100000;
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end

    task automatic check_one();
        longint unsigned wsum = 0;
        #1;
        for (int i = 0; i < W; i++) begin
            for (int j = 0; j < W; j++) begin
                checks++;
                if (pp[i][j] != (a[j] && b[i])) begin
                    failures++;
                    $display("FAIL a=%h b=%h pp[%0d][%0d]=%0b", a, b, i, j, pp[i][j]);
                end
                if (pp[i][j]) wsum += 64'd1 << (i + j);
            end
        end
        checks++;
        if (wsum != 64'(a) * 64'(b)) begin
            failures++;
            $display("FAIL a=%h b=%h weighted sum %h", a, b, wsum);
        end
    endtask

    initial begin
        a = '0;        b = '0;        check_one();
        a = '1;        b = '1;        check_one();
        a = 32'd3;     b = 32'd2;     check_one();
        a = '1;        b = 32'h1;     check_one();
        for (int n = 0; n < 200; n++) begin
            a = $urandom;
            b = $urandom;
            check_one();
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
    end
endmodule
