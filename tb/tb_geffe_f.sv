// tb_geffe_f: exhaustive test of the lp-Geffe combining function against
// its published truth table (inputs x1 x2 x3 = 000 ... 111 give
// y = 0 1 0 0 0 1 1 1), plus the agreement counts 6/8, 4/8, 6/8 between y
// and x1, x2, x3.
module tb_geffe_f;
  logic x1, x2, x3, y;
  int checks = 0, failures = 0;
  localparam bit [7:0] TRUTH = 8'b1110_0010;  // bit v = y for {x1,x2,x3} = v

  geffe_f dut (.x1(x1), .x2(x2), .x3(x3), .y(y));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int agree1 = 0, agree2 = 0, agree3 = 0;
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      check(y == TRUTH[v], $sformatf("f(%0b%0b%0b)", x1, x2, x3));
      agree1 += int'(x1 == y);
      agree2 += int'(x2 == y);
      agree3 += int'(x3 == y);
    end
    check(agree1 == 6, "P[x1=y]=3/4");
    check(agree2 == 4, "P[x2=y]=1/2");
    check(agree3 == 6, "P[x3=y]=3/4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
