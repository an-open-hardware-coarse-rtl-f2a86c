// tb_cgra_ctx_mem: checks the context memory at its full 512-word size.
// Every word is written over the bus, partly with byte enables, and read back
// both over the bus (rvalid one cycle after the grant) and through the
// synchronizer's read port (data one cycle after rd_en), against a model.
module tb_cgra_ctx_mem;
  import cgra_pkg::*;
  localparam int W = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  bus_req_t req;
  bus_rsp_t rsp;
  logic rd_en;
  logic [8:0] rd_addr;
  logic [31:0] rd_data;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  cgra_ctx_mem #(.WORDS(W)) dut (.clk, .rst_n, .bus_req_i(req), .bus_rsp_o(rsp),
                                 .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  task automatic check(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; rd_en = 0; rd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // full-word writes
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      req = '0; req.req = 1; req.we = 1; req.be = 4'hF; req.addr = 32'h2000_0000 + 4 * i;
      req.wdata = $urandom; model[i] = req.wdata;
      #4 check(rsp.gnt, "grant");
    end
    // partial writes
    for (int i = 0; i < W; i += 3) begin
      @(negedge clk);
      req.addr = 4 * i; req.be = 4'($urandom); req.wdata = $urandom;
      for (int b = 0; b < 4; b++) if (req.be[b]) model[i][8*b +: 8] = req.wdata[8*b +: 8];
    end
    @(negedge clk); req = '0;
    // bus reads
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      req = '0; req.req = 1; req.addr = 4 * i;
      @(negedge clk);
      req = '0;
      check(rsp.rvalid && rsp.rdata == model[i], $sformatf("bus read %0d", i));
    end
    // synchronizer port reads
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 9'((i * 37) % W);
      @(negedge clk);
      rd_en = 0;
      check(rd_data == model[(i * 37) % W], $sformatf("port read %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
