// tb_cgra_branch: if/else kernels on the full-size accelerator (default
// parameters), run on two columns at once.
//
//   kernel 1  y[i] = |x[i]|           BSF on the cell's own value skips to the
//                                      negate, JUMP skips over it otherwise
//   kernel 2  y[i] = min(x[i], 100)   BLT against an immediate, JUMP over the
//                                      "then" part
// Both loop N times with a register-file counter and BNE, use direct loads
// and stores, and only row 0 does work (the other rows run NOPs). The data
// contain negative, zero, positive, equal-to-limit and above-limit values,
// so every branch is both taken and not taken. Results are compared with
// values computed here, and each column's taken jumps are counted against
// the number the data imply (one per element for the if/else plus N-1 loop
// jumps).
module tb_cgra_branch;
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


  localparam int N = 16;
  localparam int K1 = 9, K2 = 11;
  localparam logic [31:0] X = 'h1000, Y1 = 'h1400, Y2 = 'h1800;
  logic [31:0] p1 [K1], p2 [K2];
  int n_taken [NC];

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NC; c++)
      if (dut.advance[c] && dut.branch[c] && !dut.exit_c[c]) n_taken[c] <= n_taken[c] + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, x;
    int n_neg, n_big;
    sync_req = '0; kmem_req = '0; ctx_req = '0;
    for (int c = 0; c < NC; c++) n_taken[c] = 0;
    // data: fixed corner values, then random ones in -300..300
    for (int i = 0; i < N; i++) begin
      case (i)
        0: x = 0;
        1: x = 100;
        2: x = 32'hFFFF_FFFF;
        3: x = 101;
        default: x = 32'($urandom_range(0, 600)) - 300;
      endcase
      u_mem.mem[(X >> 2) + i] = x;
    end
    // kernel 1 (row 0): |x|
    p1[0] = ins(SRC_ZERO, SRC_IMM,  OP_SADD, N, 0, 1);       // RF0 = N
    p1[1] = ins(SRC_ZERO, SRC_ZERO, OP_LWD);                  // out = x
    p1[2] = ins(SRC_ZERO, SRC_ZERO, OP_BSF, 4, 0, 0, FLG_SELF); // x < 0: to 4
    p1[3] = ins(SRC_ZERO, SRC_ZERO, OP_JUMP, 5);
    p1[4] = ins(SRC_ZERO, SRC_SELF, OP_SSUB);                 // out = -x
    p1[5] = ins(SRC_SELF, SRC_ZERO, OP_SWD);
    p1[6] = ins(SRC_RF0,  SRC_IMM,  OP_SADD, -1, 0, 1);      // RF0 = out = RF0 - 1
    p1[7] = ins(SRC_SELF, SRC_ZERO, OP_BNE, 1);
    p1[8] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    // kernel 2 (row 0): min(x, 100); the limit sits in RF1 because the
    // immediate field of a conditional jump holds its target
    p2[0]  = ins(SRC_ZERO, SRC_IMM,  OP_SADD, N, 0, 1);       // RF0 = N
    p2[1]  = ins(SRC_ZERO, SRC_IMM,  OP_SADD, 100, 1, 1);     // RF1 = 100
    p2[2]  = ins(SRC_ZERO, SRC_ZERO, OP_LWD);
    p2[3]  = ins(SRC_SELF, SRC_RF1,  OP_BLT, 6);              // x < 100: to 6
    p2[4]  = ins(SRC_RF1,  SRC_ZERO, OP_SADD);                // out = 100
    p2[5]  = ins(SRC_ZERO, SRC_ZERO, OP_JUMP, 7);
    p2[6]  = ins(SRC_SELF, SRC_ZERO, OP_SADD);                // out = x
    p2[7]  = ins(SRC_SELF, SRC_ZERO, OP_SWD);
    p2[8]  = ins(SRC_RF0,  SRC_IMM,  OP_SADD, -1, 0, 1);
    p2[9]  = ins(SRC_SELF, SRC_ZERO, OP_BNE, 2);
    p2[10] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);

    repeat (3) @(posedge clk);
    rst_n = 1;
    // kernel 1 at word 0, kernel 2 at word 4*K1; rows 1..3 hold NOPs (0)
    for (int i = 0; i < K1; i++) for (int r = 0; r < 4; r++)
      wr(P_CTX, 4 * (i * 4 + r), r == 0 ? p1[i] : 32'h0);
    for (int i = 0; i < K2; i++) for (int r = 0; r < 4; r++)
      wr(P_CTX, 4 * (4 * K1 + i * 4 + r), r == 0 ? p2[i] : 32'h0);
    begin
      kdesc_t d;
      d = '0; d.n_cols = 3'd1; d.n_instr = 6'(K1); d.start = 9'd0;
      wr(P_KMEM, 4 * 1, 32'(d));
      d.n_instr = 6'(K2); d.start = 9'(4 * K1);
      wr(P_KMEM, 4 * 2, 32'(d));
    end
    wr(P_SYNC, 4 * REG_RD_PTR, X);
    wr(P_SYNC, 4 * REG_WR_PTR, Y1);
    wr(P_SYNC, 4 * REG_REQ, 1);
    wr(P_SYNC, 4 * REG_WR_PTR, Y2);
    wr(P_SYNC, 4 * REG_REQ, 2);
    do rd(P_SYNC, 4 * REG_DONE, v); while (v[2:1] != 2'b11);
    n_neg = 0; n_big = 0;
    for (int i = 0; i < N; i++) begin
      logic signed [31:0] xs;
      logic [31:0] e1, e2;
      xs = u_mem.mem[(X >> 2) + i];
      e1 = (xs < 0) ? 32'(-xs) : 32'(xs);
      e2 = (xs < 100) ? 32'(xs) : 32'd100;
      if (xs < 0) n_neg++;
      if (xs >= 100) n_big++;
      check(u_mem.mem[(Y1 >> 2) + i] == e1, $sformatf("abs x[%0d]=%0d", i, xs));
      check(u_mem.mem[(Y2 >> 2) + i] == e2, $sformatf("min x[%0d]=%0d", i, xs));
    end
    check(n_neg > 0 && n_neg < N && n_big > 0 && n_big < N, "both ways of each branch occur");
    check(n_taken[0] == N + N - 1, $sformatf("column 0 taken jumps %0d", n_taken[0]));
    check(n_taken[1] == N + N - 1, $sformatf("column 1 taken jumps %0d", n_taken[1]));
    check(u_mem.mem[(Y1 >> 2) + N] == 32'hDEAD0000 + (Y1 >> 2) + N &&
          u_mem.mem[(Y2 >> 2) + N] == 32'hDEAD0000 + (Y2 >> 2) + N, "no store past the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
