// tb_cgra_top: end-to-end test of the CGRA at its default size (4x4 cells,
// 32-word program memories, 512-word context memory, 15 kernels).
//
// Acting as the CPU, it writes three kernels into the context memory and their
// descriptors into the kernel configuration memory, then requests four kernel
// runs on a 4-column array:
//   kernel 1  vector add c[i] = a[i] + b[i] (1 column, direct loads/stores,
//             two loads per cycle served one after the other, loop by BNE)
//   kernel 2  dot product with indirect loads, the 3-cycle multiply and an
//             indirect store (1 column), requested twice so two copies run
//   kernel 3  y[i] = 3*x[i] over 2 columns (horizontal neighbour operand,
//             BZF on the neighbour's value, lock-step stalls)
// Kernel 3 arrives when only one column is free, waits, and is then placed
// on columns 3 and 0 (torus wrap). A request for an empty descriptor must be
// dropped with the error bit. Memory results are compared with values
// computed here; the performance counters and the launch latency are checked,
// transfers on several column master ports in the same cycle are counted,
// and each mechanism is counted and must occur at least once.
module tb_cgra_top;
  import cgra_pkg::*;

  localparam int unsigned NC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t sync_req, kmem_req, ctx_req;
  bus_rsp_t sync_rsp, kmem_rsp, ctx_rsp;
  bus_req_t dma_req [NC];
  bus_rsp_t dma_rsp [NC];

  cgra_top dut (
    .clk, .rst_n,
    .sync_req_i(sync_req), .sync_rsp_o(sync_rsp),
    .kmem_req_i(kmem_req), .kmem_rsp_o(kmem_rsp),
    .ctx_req_i(ctx_req), .ctx_rsp_o(ctx_rsp),
    .dma_req_o(dma_req), .dma_rsp_i(dma_rsp)
  );

  tb_bus_mem #(.N_PORTS(NC), .WORDS(4096), .GNT_PCT(60)) u_mem (
    .clk, .rst_n, .req_i(dma_req), .rsp_o(dma_rsp)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- CPU bus access ----------------
  localparam int P_SYNC = 0, P_KMEM = 1, P_CTX = 2;

  function automatic bus_rsp_t rsp_of(input int p);
    return (p == P_SYNC) ? sync_rsp : (p == P_KMEM) ? kmem_rsp : ctx_rsp;
  endfunction

  task automatic drive(input int p, input bus_req_t r);
    if (p == P_SYNC) sync_req = r; else if (p == P_KMEM) kmem_req = r; else ctx_req = r;
  endtask

  int last_gnt_cyc;
  task automatic access(input int p, input logic we, input logic [31:0] addr,
                        input logic [31:0] wdata, output logic [31:0] rdata);
    bus_req_t r;
    r = '0; r.req = 1; r.we = we; r.be = 4'hF; r.addr = addr; r.wdata = wdata;
    @(negedge clk);
    drive(p, r);
    forever begin
      #4;
      if (rsp_of(p).gnt) begin
        last_gnt_cyc = cyc;
        @(posedge clk);
        break;
      end
      @(posedge clk);
    end
    @(negedge clk);
    drive(p, '0);
    while (!rsp_of(p).rvalid) @(negedge clk);
    rdata = rsp_of(p).rdata;
  endtask

  task automatic wr(input int p, input logic [31:0] addr, input logic [31:0] d);
    logic [31:0] dummy;
    access(p, 1'b1, addr, d, dummy);
  endtask

  task automatic rd(input int p, input logic [31:0] addr, output logic [31:0] d);
    access(p, 1'b0, addr, '0, d);
  endtask

  // ---------------- instruction encoding ----------------
  function automatic logic [31:0] ins(input src_sel_e a, input src_sel_e b, input alu_op_e op,
                                      input int imm = 0, input int rf = 0, input bit we = 0,
                                      input flag_sel_e f = FLG_SELF);
    instr_t i;
    i.mux_a = a; i.mux_b = b; i.alu_op = op; i.rf_sel = 2'(rf); i.rf_we = we;
    i.mux_f = f; i.imm = 12'(imm);
    return 32'(i);
  endfunction

  localparam logic [31:0] NOP = 32'h0;

  // program images: [column][row][instruction]
  logic [31:0] prog [2][4][8];

  task automatic clear_prog();
    for (int c = 0; c < 2; c++) for (int r = 0; r < 4; r++) for (int i = 0; i < 8; i++)
      prog[c][r][i] = NOP;
  endtask

  // write kernel (ncols, ninstr) to the context memory at word 'start' and its descriptor
  task automatic load_kernel(input int kid, input int ncols, input int ninstr, input int start);
    kdesc_t d;
    for (int c = 0; c < ncols; c++) for (int i = 0; i < ninstr; i++) for (int r = 0; r < 4; r++)
      wr(P_CTX, 4 * (start + (c * ninstr + i) * 4 + r), prog[c][r][i]);
    d = '0; d.n_cols = 3'(ncols); d.n_instr = 6'(ninstr); d.start = 9'(start);
    wr(P_KMEM, 4 * kid, 32'(d));
  endtask

  // ---------------- data and expected results ----------------
  localparam int N1 = 12, N2 = 24, N3 = 5;
  localparam int PA = 'h300, PB = 'h380, SWI_ADDR = 'h7F0;
  logic [31:0] a1 [N1], b1 [N1], a2 [N2], b2 [N2], x3 [N3];
  logic [31:0] dot;

  // ---------------- mechanism counters ----------------
  int n_mul_busy, n_mem_busy, n_group_stall, n_dma_serial, n_branch, n_exit,
      n_concurrent, n_indirect, n_req_blocked, n_wrap_rd, n_wrap_wr, n_lockstep,
      n_par_xfer;
  int start_cyc [NC];

  for (genvar c = 0; c < NC; c++) begin : g_probe
    for (genvar r = 0; r < 4; r++) begin : g_r
      always @(posedge clk) if (rst_n) begin
        if (dut.u_array.g_col[c].g_row[r].u_rc.is_mul && dut.u_array.g_col[c].g_row[r].u_rc.busy_o)
          n_mul_busy++;
        if (dut.u_array.g_col[c].g_row[r].u_rc.is_mem && dut.u_array.g_col[c].g_row[r].u_rc.busy_o)
          n_mem_busy++;
        if (dut.mem_req[c][r] && dut.mem_ind[c][r]) n_indirect++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    int nreq, ngrp;
    logic [NC-1:0] grp_seen;
    grp_seen = '0;
    for (int c = 0; c < NC; c++) begin
      if (dut.stall[c] && !dut.busy[c]) n_group_stall++;
      if (dut.advance[c] && dut.branch[c] && !dut.exit_c[c]) n_branch++;
      if (dut.done[c]) n_exit++;
      if (dut.start[c] && start_cyc[c] < 0) start_cyc[c] = cyc;
      nreq = 0;
      for (int r = 0; r < 4; r++) nreq += int'(dut.mem_req[c][r]);
      if (nreq >= 2) n_dma_serial++;
      if (dut.active[c]) grp_seen[dut.group[c]] = 1'b1;
    end
    ngrp = $countones(grp_seen);
    if (ngrp >= 2) n_concurrent++;
    // several column master ports granted in the same cycle
    nreq = 0;
    for (int c = 0; c < NC; c++) nreq += int'(dma_req[c].req && dma_rsp[c].gnt);
    if (nreq >= 2) n_par_xfer++;
    // kernel 3 placed on columns 3 (reads x) and 0 (writes y): wrap around the torus
    if (dma_req[3].req && !dma_req[3].we && dma_req[3].addr >= 'h200 && dma_req[3].addr < 'h200 + 4*N3)
      n_wrap_rd++;
    if (dma_req[0].req && dma_req[0].we && dma_req[0].addr >= 'h700 && dma_req[0].addr < 'h700 + 4*N3)
      n_wrap_wr++;
    if (dut.active[3] && dut.active[0] && dut.group[3] == dut.group[0] && dut.pc[3] != dut.pc[0])
      n_lockstep++;   // columns of one kernel must share their PC
    if (sync_req.req && !sync_rsp.gnt) n_req_blocked++;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test ----------------
  initial begin
    logic [31:0] v;
    int t_req1;
    sync_req = '0; kmem_req = '0; ctx_req = '0;
    for (int c = 0; c < NC; c++) start_cyc[c] = -1;
    n_mul_busy = 0; n_mem_busy = 0; n_group_stall = 0; n_dma_serial = 0; n_branch = 0;
    n_exit = 0; n_concurrent = 0; n_indirect = 0; n_req_blocked = 0; n_wrap_rd = 0;
    n_wrap_wr = 0; n_lockstep = 0; n_par_xfer = 0;

    // input data in main memory
    for (int i = 0; i < N1; i++) begin
      a1[i] = $urandom; b1[i] = $urandom;
      u_mem.mem[('h100 >> 2) + 2*i]     = a1[i];
      u_mem.mem[('h100 >> 2) + 2*i + 1] = b1[i];
    end
    dot = 0;
    for (int i = 0; i < N2; i++) begin
      a2[i] = $urandom % 1000 - 500; b2[i] = $urandom % 1000;
      u_mem.mem[(PA >> 2) + i] = a2[i];
      u_mem.mem[(PB >> 2) + i] = b2[i];
      dot += a2[i] * b2[i];
    end
    for (int i = 0; i < N3; i++) begin
      x3[i] = $urandom;
      u_mem.mem[('h200 >> 2) + i] = x3[i];
    end

    repeat (3) @(posedge clk);
    rst_n = 1;

    // kernel 1: vector add, one column
    clear_prog();
    prog[0][3][0] = ins(SRC_IMM, SRC_ZERO, OP_SADD, N1);
    prog[0][0][1] = ins(SRC_ZERO, SRC_ZERO, OP_LWD);
    prog[0][1][1] = ins(SRC_ZERO, SRC_ZERO, OP_LWD);
    prog[0][3][1] = ins(SRC_SELF, SRC_IMM, OP_SSUB, 1);
    prog[0][1][2] = ins(SRC_TOP, SRC_SELF, OP_SADD);
    prog[0][1][3] = ins(SRC_SELF, SRC_ZERO, OP_SWD);
    prog[0][3][3] = ins(SRC_SELF, SRC_ZERO, OP_BNE, 1);
    prog[0][0][4] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    load_kernel(1, 1, 5, 0);

    // kernel 2: dot product with indirect loads and the multiplier
    clear_prog();
    prog[0][0][0] = ins(SRC_IMM, SRC_ZERO, OP_SADD, PA, 0, 1);
    prog[0][1][0] = ins(SRC_IMM, SRC_ZERO, OP_SADD, PB, 0, 1);
    prog[0][2][0] = ins(SRC_ZERO, SRC_ZERO, OP_SADD);
    prog[0][3][0] = ins(SRC_IMM, SRC_ZERO, OP_SADD, N2);
    prog[0][0][1] = ins(SRC_RF0, SRC_ZERO, OP_LWI);
    prog[0][1][1] = ins(SRC_RF0, SRC_ZERO, OP_LWI);
    prog[0][3][1] = ins(SRC_SELF, SRC_IMM, OP_SSUB, 1);
    prog[0][1][2] = ins(SRC_TOP, SRC_SELF, OP_SMUL);
    prog[0][2][3] = ins(SRC_SELF, SRC_TOP, OP_SADD);
    prog[0][0][3] = ins(SRC_RF0, SRC_IMM, OP_SADD, 4, 0, 1);
    prog[0][1][3] = ins(SRC_RF0, SRC_IMM, OP_SADD, 4, 0, 1);
    prog[0][3][4] = ins(SRC_SELF, SRC_ZERO, OP_BNE, 1);
    prog[0][2][5] = ins(SRC_SELF, SRC_ZERO, OP_SWD);
    prog[0][1][5] = ins(SRC_IMM, SRC_BOTTOM, OP_SWI, SWI_ADDR);
    prog[0][0][6] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    load_kernel(2, 1, 7, 20);

    // kernel 3: two columns, y = 3*x
    clear_prog();
    prog[0][3][0] = ins(SRC_IMM, SRC_ZERO, OP_SADD, N3);
    prog[0][0][1] = ins(SRC_ZERO, SRC_ZERO, OP_LWD);
    prog[0][3][1] = ins(SRC_SELF, SRC_IMM, OP_SSUB, 1);
    prog[0][3][3] = ins(SRC_ZERO, SRC_ZERO, OP_BZF, 5, 0, 0, FLG_SELF);
    prog[0][3][4] = ins(SRC_ZERO, SRC_ZERO, OP_JUMP, 1);
    prog[0][0][5] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    prog[1][0][2] = ins(SRC_LEFT, SRC_IMM, OP_SMUL, 3);
    prog[1][0][3] = ins(SRC_SELF, SRC_ZERO, OP_SWD);
    prog[1][3][3] = ins(SRC_ZERO, SRC_ZERO, OP_BZF, 5, 0, 0, FLG_LEFT);
    prog[1][3][4] = ins(SRC_ZERO, SRC_ZERO, OP_JUMP, 1);
    prog[1][0][5] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    load_kernel(3, 2, 6, 48);

    // read back a descriptor and a context word
    rd(P_KMEM, 4 * 3, v);
    check(v[2:0] == 3'd2 && v[12:4] == 9'd48 && v[21:16] == 6'd6, "kernel descriptor read-back");
    rd(P_CTX, 4 * 20, v);
    check(v == ins(SRC_IMM, SRC_ZERO, OP_SADD, PA, 0, 1), "context memory read-back");

    // launch kernel 1 on an idle array and check the copy latency
    wr(P_SYNC, 4 * REG_RD_PTR, 'h100);
    wr(P_SYNC, 4 * REG_WR_PTR, 'h400);
    wr(P_SYNC, 4 * REG_REQ, 1);
    t_req1 = last_gnt_cyc;
    // two copies of kernel 2 (different output pointers)
    wr(P_SYNC, 4 * REG_WR_PTR, 'h500);
    wr(P_SYNC, 4 * REG_REQ, 2);
    wr(P_SYNC, 4 * REG_WR_PTR, 'h600);
    wr(P_SYNC, 4 * REG_REQ, 2);
    // kernel 3: needs two adjacent columns, only column 3 is free now
    wr(P_SYNC, 4 * REG_RD_PTR, 'h200);
    wr(P_SYNC, 4 * (REG_WR_PTR + 1), 'h700);
    wr(P_SYNC, 4 * REG_REQ, 3);
    rd(P_SYNC, 4 * REG_STATUS, v);
    check(v[0] == 1'b1, "kernel 3 waits for free columns");
    // empty descriptor: request is dropped and flagged
    wr(P_SYNC, 4 * REG_REQ, 9);

    // wait for all kernels
    do begin
      rd(P_SYNC, 4 * REG_STATUS, v);
    end while (v[0] || v[7:4] != 4'b0);
    rd(P_SYNC, 4 * REG_DONE, v);
    check(v[3:1] == 3'b111 && v[9] == 1'b0, "done bits of kernels 1-3");
    repeat (5) @(posedge clk);

    check(start_cyc[0] - t_req1 == 1 + 5 * 4 + 2, $sformatf("copy latency %0d", start_cyc[0] - t_req1));
    for (int i = 0; i < N1; i++)
      check(u_mem.mem[('h400 >> 2) + i] == a1[i] + b1[i], $sformatf("vadd c[%0d]", i));
    check(u_mem.mem['h500 >> 2] == dot, "dot product copy 1");
    check(u_mem.mem['h600 >> 2] == dot, "dot product copy 2");
    check(u_mem.mem[SWI_ADDR >> 2] == dot, "indirect store");
    for (int i = 0; i < N3; i++)
      check(u_mem.mem[('h700 >> 2) + i] == 3 * x3[i], $sformatf("scale y[%0d]", i));
    check(u_mem.mem[('h400 >> 2) + N1] == 32'hDEAD_0000 + ('h400 >> 2) + N1, "no write past c[]");

    rd(P_SYNC, 4 * REG_STATUS, v);
    check(v[1] == 1'b1, "empty-descriptor request flagged");
    check(v[0] == 1'b0 && v[7:4] == 4'b0, "all columns released");
    rd(P_SYNC, 4 * REG_KCOUNT, v);
    check(v == 4, $sformatf("kernel count %0d", v));
    rd(P_SYNC, 4 * REG_WAIT, v);
    check(v > 0, "request wait counter");
    rd(P_SYNC, 4 * REG_CYCLES, v);
    check(v > 0, "busy cycle counter");
    rd(P_SYNC, 4 * (REG_COL_STALL + 1), v);
    check(v > 0, "column stall counter");
    rd(P_SYNC, 4 * (REG_COL_ACT + 1), v);
    check(v > 0, "column active counter");
    wr(P_SYNC, 4 * REG_DONE, 32'hFFFF);
    rd(P_SYNC, 4 * REG_DONE, v);
    check(v == 0, "done bits cleared");
    wr(P_SYNC, 4 * REG_PERF_CTRL, 1);
    rd(P_SYNC, 4 * REG_CYCLES, v);
    check(v == 0, "perf counters cleared");

    // every mechanism must have happened
    check(n_mul_busy > 0,    "multiply stall occurred");
    check(n_mem_busy > 0,    "memory stall occurred");
    check(n_group_stall > 0, "column stalled by another column of its kernel");
    check(n_dma_serial > 0,  "two accesses of one column serialized");
    check(n_branch > 0,      "jump taken");
    check(n_exit == 5,       $sformatf("column exits %0d", n_exit));
    check(n_concurrent > 0,  "kernels running concurrently");
    check(n_indirect > 0,    "indirect access");
    check(n_req_blocked > 0, "request write held while another waits");
    check(n_wrap_rd > 0 && n_wrap_wr > 0, "kernel placed across the torus wrap");
    check(n_lockstep == 0,   "columns of a kernel stay in lock-step");
    check(n_par_xfer > 0,    "master ports of several columns transfer in the same cycle");
    check(u_mem.n_wait[0] + u_mem.n_wait[1] > 0, "bus wait states");
    $display("start cycles %0d %0d %0d %0d", start_cyc[0], start_cyc[1], start_cyc[2], start_cyc[3]);
    $display("mechanisms: mul=%0d mem=%0d grpstall=%0d serial=%0d branch=%0d exit=%0d conc=%0d ind=%0d blocked=%0d wrap=%0d/%0d par=%0d",
             n_mul_busy, n_mem_busy, n_group_stall, n_dma_serial, n_branch, n_exit,
             n_concurrent, n_indirect, n_req_blocked, n_wrap_rd, n_wrap_wr, n_par_xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
