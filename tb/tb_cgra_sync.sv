// tb_cgra_sync: checks the synchronizer with models of the kernel
// configuration memory, the context memory and the array columns.
//
// Four kernels are requested through the register port: A (1 column) and B
// (2 columns) start at once on columns 0 and 1-2, C (1 column) on column 3;
// D (2 columns) must wait until A and C end and is then placed on columns 3
// and 0 across the torus wrap. The test checks the columns chosen, the
// program-memory words copied (address, row, column and data), the copy
// latency (words + 2 cycles from acceptance to start), the pointer values
// loaded per kernel-relative column, the group tags, that a second request
// write is held while one waits, the DONE bits, the error bit for an empty
// descriptor and for one whose words run past the end of the context memory,
// and the performance counters.
module tb_cgra_sync;
  import cgra_pkg::*;
  localparam int NR = 4, NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t req;
  bus_rsp_t rsp;
  logic [3:0]  kid;
  kdesc_t      desc;
  logic        ctx_en;
  logic [8:0]  ctx_addr;
  logic [31:0] ctx_data;
  logic        pm_we [NC][NR];
  logic [4:0]  pm_wa;
  logic [31:0] pm_wd;
  logic        start [NC], ptr_load [NC];
  logic [1:0]  group [NC];
  logic [31:0] rd_ptr [NC], wr_ptr [NC];
  logic        col_active [NC], col_stall [NC], col_done [NC];
  int checks = 0, failures = 0;

  cgra_sync #(.N_ROWS(NR), .N_COLS(NC), .PM_DEPTH(32), .CTX_WORDS(512), .N_KERNELS(15)) dut (
    .clk, .rst_n, .bus_req_i(req), .bus_rsp_o(rsp), .kid_o(kid), .desc_i(desc),
    .ctx_rd_en_o(ctx_en), .ctx_rd_addr_o(ctx_addr), .ctx_rd_data_i(ctx_data),
    .pm_we_o(pm_we), .pm_waddr_o(pm_wa), .pm_wdata_o(pm_wd),
    .start_o(start), .group_o(group), .ptr_load_o(ptr_load), .rd_ptr_o(rd_ptr), .wr_ptr_o(wr_ptr),
    .col_active_i(col_active), .col_stall_i(col_stall), .col_done_i(col_done)
  );

  task automatic check(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---- kernel table and context memory models ----
  int k_cols [16], k_instr [16], k_start [16], k_len [16];
  logic [31:0] ctx [512];
  always_comb begin
    desc = '0;
    if (k_cols[kid] != 0) begin
      desc.n_cols = 3'(k_cols[kid]); desc.n_instr = 6'(k_instr[kid]); desc.start = 9'(k_start[kid]);
    end
  end
  always_ff @(posedge clk) if (ctx_en) ctx_data <= ctx[ctx_addr];

  // ---- program memories written ----
  logic [31:0] pm [NC][NR][32];
  int n_pm_writes = 0;
  always @(posedge clk) if (rst_n) for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
    if (pm_we[c][r]) begin pm[c][r][pm_wa] = pm_wd; n_pm_writes++; end

  // ---- column model and launch checks ----
  typedef struct { int kid; int base; int accept_cyc; } launch_t;
  launch_t expect_q [$];
  int remaining [NC];
  int cyc = 0, accept_cyc = -1, n_done_pulses = 0;
  logic [31:0] snap_rd [16][NC], snap_wr [16][NC];
  always @(posedge clk) cyc++;
  // acceptance: the waiting request is taken (pend_q falls without a new write)
  always @(posedge clk) if (rst_n && dut.state_q == 0 && dut.pend_q && dut.desc_ok && dut.fit)
    accept_cyc = cyc;

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      col_done[c] = 0;
      if (col_active[c]) begin
        remaining[c]--;
        if (remaining[c] == 0) begin col_done[c] = 1; n_done_pulses++; end
      end
      col_stall[c] = col_active[c] && ($urandom % 4 == 0);
    end
  end
  always @(posedge clk) if (rst_n) for (int c = 0; c < NC; c++) if (col_done[c]) col_active[c] <= 0;

  always @(posedge clk) if (rst_n && (start[0] || start[1] || start[2] || start[3])) begin
    launch_t e;
    int k;
    check(expect_q.size() > 0, "unexpected launch");
    e = expect_q.pop_front();
    k = e.kid;
    check(cyc - accept_cyc == k_cols[k] * k_instr[k] * NR + 2,
          $sformatf("kernel %0d copy latency %0d", k, cyc - accept_cyc));
    for (int c = 0; c < NC; c++) begin
      int rel;
      rel = (c + NC - e.base) % NC;
      check(start[c] == (rel < k_cols[k]), $sformatf("kernel %0d start column %0d", k, c));
      if (rel < k_cols[k]) begin
        check(ptr_load[c] && rd_ptr[c] == snap_rd[k][rel] && wr_ptr[c] == snap_wr[k][rel],
              $sformatf("kernel %0d pointers column %0d", k, c));
        col_active[c] <= 1;
        remaining[c] = k_len[k];
        // copied program
        for (int i = 0; i < k_instr[k]; i++) for (int r = 0; r < NR; r++)
          check(pm[c][r][i] == ctx[k_start[k] + (rel * k_instr[k] + i) * NR + r],
                $sformatf("kernel %0d col %0d row %0d instr %0d", k, c, r, i));
      end
    end
  end
  // group tags while running
  always @(negedge clk) if (rst_n)
    for (int c = 0; c < NC; c++) if (col_active[c] && dut.alloc_q[c])
      if (group[c] != dut.grp_q[c]) check(0, "group tag");

  // ---- bus access ----
  int held;
  task automatic access(input logic we, input int idx, input logic [31:0] wd, output logic [31:0] rdv);
    @(negedge clk);
    req = '0; req.req = 1; req.we = we; req.be = 4'hF; req.addr = 32'(4 * idx); req.wdata = wd;
    forever begin
      #4;
      if (rsp.gnt) begin @(posedge clk); break; end
      held++;
      @(posedge clk);
    end
    @(negedge clk);
    req = '0;
    check(rsp.rvalid, "rvalid one cycle after grant");
    rdv = rsp.rdata;
  endtask
  task automatic wr(input int idx, input logic [31:0] d);
    logic [31:0] x;
    access(1, idx, d, x);
  endtask
  task automatic request(input int k, input int base, input logic [31:0] rp [NC], input logic [31:0] wp [NC]);
    launch_t e;
    for (int c = 0; c < NC; c++) begin
      wr(REG_RD_PTR + c, rp[c]); wr(REG_WR_PTR + c, wp[c]);
      snap_rd[k][c] = rp[c]; snap_wr[k][c] = wp[c];
    end
    e.kid = k; e.base = base; e.accept_cyc = 0;
    expect_q.push_back(e);
    wr(REG_REQ, k);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, rp [NC], wp [NC];
    int held_before;
    req = '0; held = 0;
    for (int k = 0; k < 16; k++) begin k_cols[k] = 0; k_instr[k] = 0; k_start[k] = 0; k_len[k] = 0; end
    for (int c = 0; c < NC; c++) begin col_active[c] = 0; col_done[c] = 0; col_stall[c] = 0; remaining[c] = 0; end
    for (int i = 0; i < 512; i++) ctx[i] = $urandom;
    // A: 1 col x 5, B: 2 cols x 3, C: 1 col x 2, D: 2 cols x 4
    k_cols[1] = 1; k_instr[1] = 5; k_start[1] = 0;   k_len[1] = 150;
    k_cols[2] = 2; k_instr[2] = 3; k_start[2] = 20;  k_len[2] = 600;
    k_cols[3] = 1; k_instr[3] = 2; k_start[3] = 44;  k_len[3] = 100;
    k_cols[4] = 2; k_instr[4] = 4; k_start[4] = 100; k_len[4] = 50;
    k_cols[5] = 1; k_instr[5] = 32; k_start[5] = 400; k_len[5] = 10;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) begin rp[c] = 32'h1000 + 16 * c; wp[c] = 32'h2000 + 16 * c; end
    request(1, 0, rp, wp);
    for (int c = 0; c < NC; c++) begin rp[c] = 32'h3000 + 16 * c; wp[c] = 32'h4000 + 16 * c; end
    request(2, 1, rp, wp);
    for (int c = 0; c < NC; c++) begin rp[c] = 32'h5000 + 16 * c; wp[c] = 32'h6000 + 16 * c; end
    request(3, 3, rp, wp);
    for (int c = 0; c < NC; c++) begin rp[c] = 32'h7000 + 16 * c; wp[c] = 32'h8000 + 16 * c; end
    request(4, 3, rp, wp);
    access(0, REG_STATUS, 0, v);
    check(v[0] == 1'b1, "kernel 4 waits");
    held_before = held;
    wr(REG_REQ, 9);                  // empty descriptor, held until kernel 4 is placed
    check(held > held_before + 10, "second request held while one waits");
    while (expect_q.size() != 0) @(negedge clk);
    repeat (10) @(negedge clk);
    access(0, REG_STATUS, 0, v);
    check(v[1] == 1'b1 && v[0] == 1'b0, "empty descriptor dropped with error");
    wr(REG_STATUS, 0);
    access(0, REG_STATUS, 0, v);
    check(v[1] == 1'b0, "error cleared");
    wr(REG_REQ, 5);                  // 1 x 32 x 4 = 128 words from 400: past the end
    repeat (5) @(negedge clk);
    access(0, REG_STATUS, 0, v);
    check(v[1] == 1'b1 && v[0] == 1'b0, "descriptor past the context memory end dropped");
    wr(REG_STATUS, 0);
    // wait for all to end
    do access(0, REG_STATUS, 0, v); while (v[7:4] != 0);
    access(0, REG_DONE, 0, v);
    check(v == 32'b11110, $sformatf("done bits %b", v));
    access(0, REG_KCOUNT, 0, v);
    check(v == 4, "kernel count");
    access(0, REG_WAIT, 0, v);
    check(v > 50, $sformatf("wait counter %0d", v));
    access(0, REG_COL_ACT + 1, 0, v);
    check(v == 600, $sformatf("column 1 active cycles %0d", v));
    access(0, REG_COL_ACT + 3, 0, v);
    check(v == 150, $sformatf("column 3 active cycles %0d", v));
    access(0, REG_COL_STALL + 1, 0, v);
    check(v > 0 && v < 600, "column stall counter");
    access(0, REG_CYCLES, 0, v);
    check(v >= 600, "busy cycles");
    access(0, REG_RD_PTR + 2, 0, v);
    check(v == 32'h7020, "pointer register read-back");
    wr(REG_DONE, 32'b00110);
    access(0, REG_DONE, 0, v);
    check(v == 32'b11000, "done bits write-one-to-clear");
    check(n_pm_writes == 5*4 + 6*4 + 2*4 + 8*4, $sformatf("program words written %0d", n_pm_writes));
    check(n_done_pulses == 6, "column done pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
