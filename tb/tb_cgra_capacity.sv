// tb_cgra_capacity: fills the context memory to its limit and runs it.
//
// One kernel uses all 4 columns with 32 instructions per cell, i.e. all 512
// words of the context memory and all 32 words of every program memory (the
// largest kernel the default configuration can hold). Every cell loads one
// word through its column's read pointer, runs 29 instructions that mix its
// value with its torus neighbours, its register file, an immediate shift and
// one 3-cycle multiply, stores its value through the write pointer and exits.
// A cycle-level model of the array written here (all cells update together
// from the previous cycle's outputs) gives the expected memory contents; the
// launch latency (512 + 2 cycles after acceptance) is checked too.
module tb_cgra_capacity;
  import cgra_pkg::*;

  localparam int unsigned NC = 4;
  localparam int unsigned NR = 4;

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


  localparam int K = 32;
  logic [31:0] prog4 [NC][NR][K];
  logic [31:0] m_out [NC][NR], m_rf [NC][NR][4], nxt [NC][NR];

  function automatic logic [31:0] srcval(input int c, input int r, input src_sel_e s, input int imm);
    case (s)
      SRC_SELF:   return m_out[c][r];
      SRC_RF0:    return m_rf[c][r][0];
      SRC_RF1:    return m_rf[c][r][1];
      SRC_RF2:    return m_rf[c][r][2];
      SRC_RF3:    return m_rf[c][r][3];
      SRC_TOP:    return m_out[c][(r + NR - 1) % NR];
      SRC_LEFT:   return m_out[(c + NC - 1) % NC][r];
      SRC_BOTTOM: return m_out[c][(r + 1) % NR];
      SRC_RIGHT:  return m_out[(c + 1) % NC][r];
      SRC_IMM:    return {{20{imm[11]}}, imm[11:0]};
      default:    return 0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int t_req, t_start;
    src_sel_e sa [K], sb [K];
    alu_op_e  op [K];
    int       imm [K], rfs [K];
    bit       rwe [K];
    sync_req = '0; kmem_req = '0; ctx_req = '0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
      u_mem.mem[('h100 >> 2) + 4 * c + r] = $urandom;
    // the kernel, the same in every cell
    for (int i = 0; i < K; i++) begin
      sa[i] = SRC_SELF; sb[i] = SRC_ZERO; op[i] = OP_NOP; imm[i] = 0; rfs[i] = i % 4; rwe[i] = 0;
      case (i % 6)
        0: begin op[i] = OP_SADD; sb[i] = SRC_LEFT; end
        1: begin op[i] = OP_LXOR; sb[i] = SRC_TOP; rwe[i] = 1; end
        2: begin op[i] = OP_SSUB; sb[i] = SRC_RIGHT; end
        3: begin op[i] = OP_SADD; sb[i] = SRC_BOTTOM; rwe[i] = 1; end
        4: begin op[i] = OP_SRA; sb[i] = SRC_IMM; imm[i] = 1 + i % 5; end
        default: begin op[i] = OP_SADD; sb[i] = src_sel_e'(4'(SRC_RF0) + 4'((i / 6) % 4)); end
      endcase
    end
    op[0] = OP_LWD; sa[0] = SRC_ZERO; rwe[0] = 0;
    op[K/2 - 1] = OP_SMUL; sb[K/2 - 1] = SRC_IMM; imm[K/2 - 1] = 3; rwe[K/2 - 1] = 0;
    op[K-2] = OP_SWD; sa[K-2] = SRC_SELF; rwe[K-2] = 0;
    op[K-1] = OP_EXIT; rwe[K-1] = 0;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) for (int i = 0; i < K; i++)
      prog4[c][r][i] = ins(sa[i], sb[i], op[i], imm[i], rfs[i], rwe[i]);

    // reference model
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) begin
      m_out[c][r] = 0;
      for (int e = 0; e < 4; e++) m_rf[c][r][e] = 0;
    end
    for (int i = 0; i < K - 2; i++) begin
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) begin
        logic [31:0] a, b;
        a = srcval(c, r, sa[i], imm[i]);
        b = srcval(c, r, sb[i], imm[i]);
        case (op[i])
          OP_LWD:  nxt[c][r] = u_mem.mem[('h100 >> 2) + 4 * c + r];
          OP_SADD: nxt[c][r] = a + b;
          OP_SSUB: nxt[c][r] = a - b;
          OP_LXOR: nxt[c][r] = a ^ b;
          OP_SRA:  nxt[c][r] = $unsigned($signed(a) >>> b[4:0]);
          OP_SMUL: nxt[c][r] = a * b;
          default: nxt[c][r] = m_out[c][r];
        endcase
      end
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) begin
        m_out[c][r] = nxt[c][r];
        if (rwe[i]) m_rf[c][r][rfs[i]] = nxt[c][r];
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) for (int i = 0; i < K; i++) for (int r = 0; r < NR; r++)
      wr(P_CTX, 4 * ((c * K + i) * NR + r), prog4[c][r][i]);
    begin
      kdesc_t d;
      d = '0; d.n_cols = 3'(NC); d.n_instr = 6'(K); d.start = 9'd0;
      wr(P_KMEM, 4 * 1, 32'(d));
    end
    for (int c = 0; c < NC; c++) begin
      wr(P_SYNC, 4 * (REG_RD_PTR + c), 'h100 + 16 * c);
      wr(P_SYNC, 4 * (REG_WR_PTR + c), 'h800 + 16 * c);
    end
    wr(P_SYNC, 4 * REG_REQ, 1);
    t_req = last_gnt_cyc;
    while (!dut.start[0]) @(posedge clk);
    t_start = cyc;
    check(t_start - t_req == 1 + NC * K * NR + 2, $sformatf("copy latency %0d", t_start - t_req));
    for (int c = 1; c < NC; c++) check(dut.start[c], "all columns start together");
    do rd(P_SYNC, 4 * REG_DONE, v); while (!v[1]);
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
      check(u_mem.mem[('h800 >> 2) + 4 * c + r] == m_out[c][r], $sformatf("cell c%0d r%0d result", c, r));
    rd(P_SYNC, 4 * REG_STATUS, v);
    check(v[7:4] == 0 && v[1:0] == 0, "array released, no error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
