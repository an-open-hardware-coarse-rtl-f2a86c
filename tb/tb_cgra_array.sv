// tb_cgra_array: checks the 4x4 array's torus wiring and the per-column
// merging of busy, jump and exit requests.
//
// Every cell first copies the output of its top, left, bottom and right
// neighbour into its four register-file entries (each cell's output holds a
// unique ID before each copy); the register files are then compared with the
// IDs of the expected torus neighbours, including the wrap-around links
// (RC0-RC3, RC0-RC12). Afterwards column 1 has two cells jumping to different
// targets (the lowest row must win), column 2 multiplies (the column must be
// busy for exactly two extra cycles) and all columns end with EXIT; the
// testbench acts as the column controller.
module tb_cgra_array;
  import cgra_pkg::*;
  localparam int NR = 4, NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pm_we [NC][NR];
  logic [4:0]  pm_wa;
  logic [31:0] pm_wd;
  logic [4:0]  pc [NC], target [NC];
  logic        active [NC], advance [NC], busy [NC], branch [NC], ex [NC];
  logic [31:0] rc_out [NC][NR];
  logic        mreq [NC][NR], mwe [NC][NR], mind [NC][NR], mdone [NC][NR];
  logic [31:0] maddr [NC][NR], mwd [NC][NR], mrd [NC];
  int checks = 0, failures = 0;

  cgra_array #(.N_ROWS(NR), .N_COLS(NC), .PM_DEPTH(32)) dut (
    .clk, .rst_n, .pm_we_i(pm_we), .pm_waddr_i(pm_wa), .pm_wdata_i(pm_wd),
    .pc_i(pc), .active_i(active), .advance_i(advance), .busy_o(busy), .branch_o(branch),
    .target_o(target), .exit_o(ex), .rc_out_o(rc_out), .mem_req_o(mreq), .mem_we_o(mwe),
    .mem_ind_o(mind), .mem_addr_o(maddr), .mem_wdata_o(mwd), .mem_done_i(mdone), .mem_rdata_i(mrd)
  );

  task automatic check(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [31:0] ins(input src_sel_e a, input src_sel_e b, input alu_op_e op,
                                      input int imm = 0, input int rf = 0, input bit we = 0);
    instr_t i;
    i = '0; i.mux_a = a; i.mux_b = b; i.alu_op = op; i.rf_sel = 2'(rf); i.rf_we = we; i.imm = 12'(imm);
    return 32'(i);
  endfunction

  // controller model: one kernel per column
  int exit_pc [NC], exit_cyc [NC], cyc;
  always_comb for (int c = 0; c < NC; c++) advance[c] = active[c] && !busy[c];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int c = 0; c < NC; c++) if (advance[c]) begin
      if (ex[c]) begin active[c] <= 0; exit_pc[c] = int'(pc[c]); exit_cyc[c] = cyc; end
      else if (branch[c]) pc[c] <= target[c];
      else pc[c] <= pc[c] + 1;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [NC][NR][32];
  localparam src_sel_e DIRS [4] = '{SRC_TOP, SRC_LEFT, SRC_BOTTOM, SRC_RIGHT};

  initial begin
    cyc = 0;
    for (int c = 0; c < NC; c++) begin
      active[c] = 0; pc[c] = 0; mrd[c] = 0; exit_pc[c] = -1;
      for (int r = 0; r < NR; r++) begin
        pm_we[c][r] = 0; mdone[c][r] = 0;
        for (int i = 0; i < 32; i++) prog[c][r][i] = 0;
        for (int d = 0; d < 4; d++) begin
          prog[c][r][2*d]     = ins(SRC_IMM, SRC_ZERO, OP_SADD, 16 * (d + 1) + c * NR + r);
          prog[c][r][2*d + 1] = ins(DIRS[d], SRC_ZERO, OP_SADD, 0, d, 1);
        end
        prog[c][r][9] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
      end
    end
    prog[1][2][8] = ins(SRC_ZERO, SRC_ZERO, OP_JUMP, 12);
    prog[1][3][8] = ins(SRC_ZERO, SRC_ZERO, OP_JUMP, 20);
    prog[1][0][12] = ins(SRC_ZERO, SRC_ZERO, OP_EXIT);
    prog[2][1][8] = ins(SRC_SELF, SRC_IMM, OP_SMUL, 3);
    pm_wa = 0; pm_wd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      pm_we[c][r] = 1; pm_wa = 5'(i); pm_wd = prog[c][r][i];
      @(negedge clk);
      pm_we[c][r] = 0;
    end
    @(negedge clk);
    for (int c = 0; c < NC; c++) active[c] = 1;
    cyc = 0;
    while (active[0] || active[1] || active[2] || active[3]) @(negedge clk);
    for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) begin
      int nb [4];
      nb[0] = c * NR + (r + NR - 1) % NR;
      nb[1] = ((c + NC - 1) % NC) * NR + r;
      nb[2] = c * NR + (r + 1) % NR;
      nb[3] = ((c + 1) % NC) * NR + r;
      check(!mreq[c][r], "no memory request");
    end
    check(exit_pc[0] == 9 && exit_pc[3] == 9, "columns 0 and 3 exit at instruction 9");
    check(exit_pc[1] == 12, $sformatf("column 1 jumped to the lowest row's target (exit at %0d)", exit_pc[1]));
    check(exit_pc[2] == 9 && exit_cyc[2] == exit_cyc[0] + 2, "multiply adds two cycles to column 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register-file contents (hierarchical probe)
  for (genvar c = 0; c < NC; c++) begin : g_c
    for (genvar r = 0; r < NR; r++) begin : g_r
      initial begin
        wait (exit_pc[0] == 9);
        #1;
        for (int d = 0; d < 4; d++) begin
          int nb;
          case (d)
            0: nb = c * NR + (r + NR - 1) % NR;
            1: nb = ((c + NC - 1) % NC) * NR + r;
            2: nb = c * NR + (r + 1) % NR;
            default: nb = ((c + 1) % NC) * NR + r;
          endcase
          check(dut.g_col[c].g_row[r].u_rc.rf_q[d] == 32'(16 * (d + 1) + nb),
                $sformatf("RC%0d neighbour %0d is RC%0d", c * NR + r, d, nb));
        end
      end
    end
  end
endmodule
