// tb_cgra_dma: checks one column's DMA channel against a small memory model.
//
// Random load/store requests (direct and indirect) are raised by the four
// cells of a column, several in the same cycle. The bus model grants in
// random cycles and answers 0-2 cycles later. The test checks that requests
// are served lowest row first, one at a time; that direct reads and writes
// use the read/write pointers loaded at start and advance by 4 bytes each;
// that indirect accesses use the cell's address; that store data lands in
// memory and load data comes back to the right cell; and that the bus request
// stays stable until granted.
module tb_cgra_dma;
  import cgra_pkg::*;
  localparam int NR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ptr_load;
  logic [31:0] rd_ptr, wr_ptr, rdata, cur_rd, cur_wr;
  logic        req [NR], we [NR], ind [NR], done [NR];
  logic [31:0] addr [NR], wdata [NR];
  bus_req_t    breq;
  bus_rsp_t    brsp;
  int checks = 0, failures = 0;

  cgra_dma #(.N_ROWS(NR)) dut (
    .clk, .rst_n, .ptr_load_i(ptr_load), .rd_ptr_i(rd_ptr), .wr_ptr_i(wr_ptr),
    .req_i(req), .we_i(we), .ind_i(ind), .addr_i(addr), .wdata_i(wdata),
    .done_o(done), .rdata_o(rdata), .bus_req_o(breq), .bus_rsp_i(brsp),
    .rd_ptr_o(cur_rd), .wr_ptr_o(cur_wr)
  );

  bus_req_t mreq [1];
  bus_rsp_t mrsp [1];
  assign mreq[0] = breq;
  assign brsp = mrsp[0];
  tb_bus_mem #(.N_PORTS(1), .WORDS(1024), .GNT_PCT(50)) u_mem (.clk, .rst_n, .req_i(mreq), .rsp_o(mrsp));

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
    logic [31:0] exp_rd, exp_wr;
    logic [31:0] ref_mem [1024];
    ptr_load = 0; rd_ptr = 0; wr_ptr = 0;
    for (int r = 0; r < NR; r++) begin req[r] = 0; we[r] = 0; ind[r] = 0; addr[r] = 0; wdata[r] = 0; end
    for (int i = 0; i < 1024; i++) ref_mem[i] = 32'hDEAD_0000 + i;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ptr_load = 1; rd_ptr = 'h100; wr_ptr = 'h800; exp_rd = 'h100; exp_wr = 'h800;
    @(negedge clk);
    ptr_load = 0;
    check(cur_rd == 'h100 && cur_wr == 'h800, "pointers loaded");
    for (int round = 0; round < 150; round++) begin
      logic pend [NR];
      int   order [$];
      // new set of requests, held until served (like stalled cells)
      for (int r = 0; r < NR; r++) begin
        req[r] = ($urandom % 3) != 0; we[r] = 1'($urandom % 2); ind[r] = ($urandom % 3) == 0;
        addr[r] = 32'h400 + 4 * ($urandom % 64); wdata[r] = $urandom;
        pend[r] = req[r];
      end
      while (pend[0] || pend[1] || pend[2] || pend[3]) begin
        #2;
        if (breq.req && brsp.gnt) begin
          // the granted row must be the lowest pending one
          int low;
          logic [31:0] ea;
          low = -1;
          for (int r = NR - 1; r >= 0; r--) if (pend[r]) low = r;
          ea = ind[low] ? addr[low] : (we[low] ? exp_wr : exp_rd);
          check(breq.addr == ea && breq.we == we[low], $sformatf("row %0d address %h/%h", low, breq.addr, ea));
          if (we[low]) begin
            check(breq.wdata == wdata[low], "store data");
            ref_mem[ea[11:2]] = wdata[low];
          end
          if (!ind[low]) begin
            if (we[low]) exp_wr += 4; else exp_rd += 4;
          end
          order.push_back(low);
        end
        @(negedge clk);
        for (int r = 0; r < NR; r++) if (done[r]) begin
          check(order.size() > 0 && order[0] == r, "done for the served row");
          if (!we[r]) begin
            logic [31:0] ea;
            ea = ind[r] ? addr[r] : exp_rd - 4;
            check(rdata == ref_mem[ea[11:2]], $sformatf("load data row %0d", r));
          end
          void'(order.pop_front());
          pend[r] = 0; req[r] = 0;
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < 1024; i++) if (u_mem.mem[i] != ref_mem[i]) begin
      check(0, $sformatf("memory word %0d", i));
    end
    check(cur_rd == exp_rd && cur_wr == exp_wr, "final pointers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
