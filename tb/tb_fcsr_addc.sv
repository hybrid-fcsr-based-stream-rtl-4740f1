// tb_fcsr_addc: self-checking test of the adder-with-carry cell.
// Walks all eight (a, b, carry) combinations, checks the combinational sum
// and the carry written on the next edge against a + b + c computed as an
// integer, and checks that en = 0 holds the carry and clr clears it.
module tb_fcsr_addc;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, a = 1'b0, b = 1'b0;
  logic s, c;
  int checks = 0, failures = 0;

  fcsr_addc dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b), .s(s), .c(c));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        int sum;
        // Set the carry first: clear it, or set it with a = b = 1.
        @(negedge clk); en = 1'b1; clr = (v[2] == 1'b0); a = 1'b1; b = 1'b1;
        @(negedge clk); clr = 1'b0;
        check(c == v[2], "carry preset");
        a = v[0]; b = v[1]; en = 1'b1;
        #1;
        sum = int'(a) + int'(b) + int'(c);
        check(s == sum[0], $sformatf("sum a=%0b b=%0b c=%0b", a, b, c));
        @(negedge clk);
        check(c == sum[1], $sformatf("carry a=%0b b=%0b", v[0], v[1]));
        // Hold with en = 0.
        en = 1'b0; a = ~a; b = ~b;
        @(negedge clk);
        check(c == sum[1], "carry held with en=0");
      end
    end
    // clr wins over en.
    @(negedge clk); en = 1'b1; a = 1'b1; b = 1'b1; clr = 1'b0;
    @(negedge clk); check(c == 1'b1, "carry set");
    clr = 1'b1;
    @(negedge clk); check(c == 1'b0, "clr wins over en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
