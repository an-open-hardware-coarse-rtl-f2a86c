// tb_cgra_rc: runs a short program on one reconfigurable cell.
//
// The testbench plays the column controller (PC, advance = active and not
// busy, jumps) and the column DMA (answers each load/store after 0-2 cycles).
// The program exercises every operand source (immediate, zero, own output,
// register file, all four neighbours), the register-file write, the 3-cycle
// multiply, direct and indirect loads and stores, a not-taken and a taken
// flag jump using a neighbour's value through muxFsel, and EXIT. Every
// committed result, memory request and the number of cycles of each
// instruction are compared with values computed here.
module tb_cgra_rc;
  import cgra_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pm_we;
  logic [4:0]  pm_wa, pc;
  logic [31:0] pm_wd;
  logic        active, advance;
  logic [31:0] top, left, bottom, right, out;
  logic        busy, branch, ex, mreq, mwe, mind, mdone;
  logic [4:0]  tgt;
  logic [31:0] maddr, mwdata, mrdata;
  int checks = 0, failures = 0;

  cgra_rc #(.PM_DEPTH(32)) dut (
    .clk, .rst_n, .pm_we_i(pm_we), .pm_waddr_i(pm_wa), .pm_wdata_i(pm_wd),
    .pc_i(pc), .active_i(active), .advance_i(advance),
    .nb_top_i(top), .nb_left_i(left), .nb_bottom_i(bottom), .nb_right_i(right), .out_o(out),
    .busy_o(busy), .branch_o(branch), .target_o(tgt), .exit_o(ex),
    .mem_req_o(mreq), .mem_we_o(mwe), .mem_ind_o(mind), .mem_addr_o(maddr),
    .mem_wdata_o(mwdata), .mem_done_i(mdone), .mem_rdata_i(mrdata)
  );

  task automatic check(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] ins(input src_sel_e a, input src_sel_e b, input alu_op_e op,
                                      input int imm = 0, input int rf = 0, input bit we = 0,
                                      input flag_sel_e f = FLG_SELF);
    instr_t i;
    i.mux_a = a; i.mux_b = b; i.alu_op = op; i.rf_sel = 2'(rf); i.rf_we = we;
    i.mux_f = f; i.imm = 12'(imm);
    return 32'(i);
  endfunction

  // controller model
  assign advance = active && !busy;
  // plain always: the stimulus also sets and clears active
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc <= 0;
    end else if (advance) begin
      if (ex) active <= 0;
      else if (branch) pc <= tgt;
      else pc <= pc + 1;
    end

  // DMA model: answer each request after 0..2 cycles
  int          delay;
  logic        served;
  int          n_acc;
  logic [31:0] acc_addr [8], acc_data [8];
  logic        acc_we [8], acc_ind [8];
  logic [31:0] D1 = 32'h1234_5678, D2 = 32'h8765_4321;
  always_comb begin
    mdone  = mreq && !served && delay == 0;
    mrdata = (mind) ? D2 : D1;
  end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      delay <= 0; served <= 0; n_acc <= 0;
    end else begin
      if (advance) served <= 0;
      if (mreq && !served) begin
        if (delay == 0) begin
          served <= !advance;
          acc_addr[n_acc] <= maddr; acc_data[n_acc] <= mwdata;
          acc_we[n_acc] <= mwe; acc_ind[n_acc] <= mind;
          n_acc <= n_acc + 1;
          delay <= $urandom % 3;
        end else begin
          delay <= delay - 1;
        end
      end
    end

  // per-instruction cycle count
  int ncyc [32];
  int cur;
  always @(posedge clk) if (active) begin
    cur = cur + 1;
    if (advance) begin ncyc[pc] = cur; cur = 0; end
  end

  // commit log of the output register
  logic [31:0] out_at [32];
  always @(negedge clk) if (rst_n) out_at[pc] = out;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [13];
  initial begin
    logic [31:0] e;
    prog[0]  = ins(SRC_IMM, SRC_ZERO, OP_SADD, 5, 1, 1);          // out = rf1 = 5
    prog[1]  = ins(SRC_TOP, SRC_IMM, OP_SADD, -3);                // out = top - 3
    prog[2]  = ins(SRC_LEFT, SRC_RF1, OP_SSUB);                   // out = left - 5
    prog[3]  = ins(SRC_SELF, SRC_BOTTOM, OP_SMUL);                // out = out * bottom
    prog[4]  = ins(SRC_ZERO, SRC_ZERO, OP_LWD);                   // out = D1
    prog[5]  = ins(SRC_IMM, SRC_ZERO, OP_LWI, 'h40, 2, 1);        // out = rf2 = D2
    prog[6]  = ins(SRC_RIGHT, SRC_RF2, OP_SWI);                   // mem[right] = D2
    prog[7]  = ins(SRC_RF1, SRC_ZERO, OP_SWD);                    // mem[wptr] = 5
    prog[8]  = ins(SRC_ZERO, SRC_ZERO, OP_BZF, 31, 0, 0, FLG_TOP);   // top != 0: not taken
    prog[9]  = ins(SRC_ZERO, SRC_ZERO, OP_BSF, 11, 0, 0, FLG_RIGHT); // right < 0: taken
    prog[10] = ins(SRC_IMM, SRC_ZERO, OP_SADD, 99);               // skipped
    prog[11] = ins(SRC_SELF, SRC_RF1, OP_LXOR);                   // out = D2 ^ 5
    prog[12] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    pm_we = 0; pm_wa = 0; pm_wd = 0; active = 0; cur = 0;
    top = 32'h100; left = 32'd1000; bottom = 32'hFFFF_FFFD; right = 32'hF000_0080;
    for (int i = 0; i < 32; i++) ncyc[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 13; i++) begin
      @(negedge clk); pm_we = 1; pm_wa = 5'(i); pm_wd = prog[i];
    end
    @(negedge clk); pm_we = 0;
    check(out == 0 && !busy && !mreq, "idle after reset");
    active = 1;
    while (active) @(negedge clk);
    repeat (2) @(negedge clk);

    check(out_at[1] == 5, "immediate into output");
    check(out_at[2] == 32'h100 - 3, "top neighbour plus negative immediate");
    check(out_at[3] == 1000 - 5, "left neighbour minus register file");
    e = (1000 - 5) * 32'hFFFF_FFFD;
    check(out_at[4] == e, "multiply by bottom neighbour");
    check(ncyc[3] == 3, $sformatf("multiply took %0d cycles", ncyc[3]));
    check(ncyc[0] == 1 && ncyc[1] == 1 && ncyc[2] == 1, "one cycle per simple instruction");
    check(out_at[5] == D1, "direct load");
    check(out_at[6] == D2, "indirect load");
    check(n_acc == 4, $sformatf("memory accesses %0d", n_acc));
    check(!acc_we[0] && !acc_ind[0], "LWD is a direct read");
    check(!acc_we[1] && acc_ind[1] && acc_addr[1] == 'h40, "LWI reads address from the immediate");
    check(acc_we[2] && acc_ind[2] && acc_addr[2] == 32'hF000_0080 && acc_data[2] == D2,
          "SWI writes register file to the right neighbour's address");
    check(acc_we[3] && !acc_ind[3] && acc_data[3] == 5, "SWD writes operand A");
    check(out_at[8] == D2 && out_at[9] == D2, "stores and jumps keep the output");
    check(ncyc[10] == 0, "taken jump skips instruction 10");
    check(out == (D2 ^ 5), "xor after the jump");
    check(ncyc[12] == 1, "exit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
