// tb_dsg: test of the summation-generator stage. Checks every row of the
// published table (y, x4, w(j-1) -> w(j), z), then 2000 random steps
// against a reference that takes the next carry from the table, the carry
// clear on key load and the hold with en = 0. Also checks the published 1/2
// agreement of z with y, x4, w(j-1) and w(j) over the table.
module tb_dsg;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, y = 1'b0, x4 = 1'b0;
  logic z, w;
  int checks = 0, failures = 0;
  // Row v = {y, x4, w(j-1)}: next carry and output, as tabulated.
  localparam bit [7:0] W_NEXT = 8'b1110_0100;
  localparam bit [7:0] Z_OUT  = 8'b1001_0110;

  dsg dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .y(y), .x4(x4), .z(z), .w(w));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit wm;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Table rows.
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      // Preset w: clear, then hold it or load 1 through (y=0, x4=1).
      clr = 1'b1; en = 1'b1;
      @(negedge clk); clr = 1'b0;
      if (v[0]) begin y = 1'b0; x4 = 1'b1; end
      else en = 1'b0;
      @(negedge clk);
      check(w == v[0], "carry preset");
      en = 1'b1;
      {y, x4} = 2'(v >> 1);
      #1;
      check(z == Z_OUT[v], $sformatf("z row %0d", v));
      @(negedge clk);
      check(w == W_NEXT[v], $sformatf("w row %0d", v));
    end
    // Published correlations: z agrees with y, x4, w(j-1) and w(j) in half
    // of the eight rows each.
    begin
      int ay = 0, ax = 0, aw = 0, an = 0;
      for (int v = 0; v < 8; v++) begin
        ay += int'(Z_OUT[v] == v[2]);
        ax += int'(Z_OUT[v] == v[1]);
        aw += int'(Z_OUT[v] == v[0]);
        an += int'(Z_OUT[v] == W_NEXT[v]);
      end
      check(ay == 4 && ax == 4 && aw == 4 && an == 4, "correlations 1/2");
    end
    // Random run against the table.
    @(negedge clk); clr = 1'b1; en = 1'b1;
    @(negedge clk); clr = 1'b0;
    wm = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      int row;
      y = 1'($urandom); x4 = 1'($urandom); en = ($urandom % 4) != 0;
      row = {y, x4, wm};
      #1;
      check(z == Z_OUT[row], "random z");
      @(negedge clk);
      if (en) wm = W_NEXT[row];
      check(w == wm, "random w");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
