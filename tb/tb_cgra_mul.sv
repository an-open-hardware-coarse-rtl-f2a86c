// tb_cgra_mul: checks the three-cycle multiplier. For random operands it
// holds start for three cycles, checks that done is low in the first two and
// high in the third with the low 32 bits of the product, holds the result while
// the commit is delayed, and checks that clear restarts the sequence.
module tb_cgra_mul;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, clear;
  logic [31:0] a, b, p;
  logic done;
  int checks = 0, failures = 0;

  cgra_mul dut (.clk, .rst_n, .start_i(start), .clear_i(clear), .a_i(a), .b_i(b),
                .product_o(p), .done_o(done));

  task automatic check(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; clear = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [63:0] full;
      int cyc;
      @(negedge clk);
      a = $urandom; b = $urandom;
      if (n % 10 == 0) b = 32'hFFFF_FFFF;
      full = 64'(a) * 64'(b);
      start = 1;
      cyc = 1;
      while (!done) begin
        check(cyc <= 2, "done before the third cycle is not allowed");
        @(negedge clk);
        a = $urandom; b = $urandom;   // operands may change after the first cycle
        cyc++;
      end
      check(cyc == 3, $sformatf("multiply took %0d cycles", cyc));
      check(p == full[31:0], $sformatf("product %h * %h", a, b));
      // commit delayed by a stall elsewhere: result stays
      if (n % 3 == 0) begin
        @(negedge clk);
        check(done && p == full[31:0], "result held while waiting for commit");
      end
      clear = 1;
      @(negedge clk);
      clear = 0; start = 0;
      check(!done, "clear ends the multiply");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
