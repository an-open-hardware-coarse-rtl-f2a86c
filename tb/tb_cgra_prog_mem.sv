// tb_cgra_prog_mem: checks the RC program memory. After reset every word reads
// zero; random words are written to every address and read back
// combinationally in a shuffled order, and a write does not disturb the
// other words.
module tb_cgra_prog_mem;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we;
  logic [4:0] wa, ra;
  logic [31:0] wd, rdat;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  cgra_prog_mem #(.DEPTH(32)) dut (.clk, .rst_n, .we_i(we), .waddr_i(wa), .wdata_i(wd),
                                   .raddr_i(ra), .rdata_o(rdat));

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
    we = 0; wa = 0; wd = 0; ra = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); #1;
      check(rdat == 0, "reset value");
      model[i] = 0;
    end
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        we = ($urandom % 4) != 0; wa = 5'(i); wd = $urandom;
        if (we) model[i] = wd;
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 32; i++) begin
        ra = 5'((i * 7 + round) % 32); #1;
        check(rdat == model[ra], $sformatf("word %0d", ra));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
