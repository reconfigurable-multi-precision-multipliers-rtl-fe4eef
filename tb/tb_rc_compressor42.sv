// tb_rc_compressor42: exhaustive check of the reconfigurable 4-2 compressor.
// Enabled: x0+x1+x2+x3+cin == sum + 2*(carry+cout), and cout must not depend
// on cin. Disabled: all three outputs must be 0 for every input.
module tb_rc_compressor42;
  logic [3:0] x;
  logic       cin, en;
  logic       sum, carry, cout;
  int checks = 0, failures = 0;

  rc_compressor42 dut (.x(x), .cin(cin), .en(en), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 16; v++) begin
        logic cout_c0;
        for (int c = 0; c < 2; c++) begin
          int total;
          en = 1'(e); x = 4'(v); cin = 1'(c);
          #1;
          total = int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(cin);
          checks++;
          if (en) begin
            if (int'(sum) + 2 * (int'(carry) + int'(cout)) != total) begin
              failures++;
              $display("FAIL x=%b cin=%b -> s=%b c=%b co=%b", x, cin, sum, carry, cout);
            end
            if (c == 0) cout_c0 = cout;
            else begin
              checks++;
              if (cout != cout_c0) begin
                failures++;
                $display("FAIL x=%b cout depends on cin", x);
              end
            end
          end else if ({sum, carry, cout} != 3'b000) begin
            failures++;
            $display("FAIL disabled x=%b cin=%b outputs %b%b%b", x, cin, sum, carry, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
