// tb_cgra_kmem: checks the kernel configuration memory. After reset all 16
// entries read zero; descriptors written over the bus to IDs 1..15 are read
// back over the bus and through the synchronizer's lookup port; writes to ID
// 0 are ignored so that entry stays empty.
module tb_cgra_kmem;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [3:0] kid;
  kdesc_t desc;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  cgra_kmem #(.N_KERNELS(15)) dut (.clk, .rst_n, .bus_req_i(req), .bus_rsp_o(rsp), .kid_i(kid), .desc_o(desc));

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
    req = '0; kid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) begin kid = 4'(k); #1 check(desc == 0, "reset"); model[k] = 0; end
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      req = '0; req.req = 1; req.we = 1; req.be = 4'hF; req.addr = 4 * k; req.wdata = $urandom;
      if (k != 0) model[k] = req.wdata;
      #4 check(rsp.gnt, "grant");
    end
    @(negedge clk); req = '0;
    for (int k = 15; k >= 0; k--) begin
      kid = 4'(k); #1 check(32'(desc) == model[k], $sformatf("lookup %0d", k));
      @(negedge clk);
      req = '0; req.req = 1; req.addr = 4 * k;
      @(negedge clk);
      req = '0;
      check(rsp.rvalid && rsp.rdata == model[k], $sformatf("bus read %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
