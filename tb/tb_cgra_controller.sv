// tb_cgra_controller: compares the column controller with a reference model
// for 3000 cycles of random stimulus. Columns are started in groups (one
// two-column kernel and two one-column kernels, restarted when they end);
// busy, jump and exit requests are random. Each cycle the model's stall,
// advance, done, PC and running state of every column are checked, so the
// lock-step stall of a kernel's columns, jumps and EXIT are all covered.
module tb_cgra_controller;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start [NC], busy [NC], branch [NC], ex [NC];
  logic [1:0] group [NC];
  logic [4:0] target [NC], pc [NC];
  logic       active [NC], advance [NC], stall [NC], done [NC];
  int checks = 0, failures = 0;
  int n_grp_stall = 0, n_jump = 0, n_exit = 0;

  cgra_controller #(.N_COLS(NC), .PM_DEPTH(32)) dut (
    .clk, .rst_n, .start_i(start), .group_i(group), .busy_i(busy), .branch_i(branch),
    .target_i(target), .exit_i(ex), .pc_o(pc), .active_o(active), .advance_o(advance),
    .stall_o(stall), .done_o(done)
  );

  logic [4:0] m_pc [NC];
  logic       m_run [NC];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) begin
      start[c] = 0; busy[c] = 0; branch[c] = 0; ex[c] = 0; target[c] = 0;
      m_pc[c] = 0; m_run[c] = 0;
    end
    // kernel A on columns 0,1 (group 0), B on column 2, C on column 3
    group[0] = 0; group[1] = 0; group[2] = 2; group[3] = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic m_stall [NC], m_adv [NC];
      @(negedge clk);
      // restart finished kernels
      for (int c = 0; c < NC; c++) start[c] = 0;
      if (!m_run[0] && !m_run[1] && ($urandom % 4 == 0)) begin start[0] = 1; start[1] = 1; end
      if (!m_run[2] && ($urandom % 4 == 0)) start[2] = 1;
      if (!m_run[3] && ($urandom % 4 == 0)) start[3] = 1;
      for (int c = 0; c < NC; c++) begin
        busy[c]   = ($urandom % 4) == 0;
        branch[c] = ($urandom % 5) == 0;
        ex[c]     = ($urandom % 40) == 0;
        target[c] = 5'($urandom);
      end
      // a kernel's columns exit together
      ex[1] = ex[0];
      #1;
      for (int c = 0; c < NC; c++) begin
        m_stall[c] = 0;
        for (int k = 0; k < NC; k++)
          if (m_run[k] && busy[k] && group[k] == group[c]) m_stall[c] = 1;
        m_stall[c] = m_stall[c] && m_run[c];
        m_adv[c]   = m_run[c] && !m_stall[c];
        checks++;
        if (stall[c] !== m_stall[c] || advance[c] !== m_adv[c] || done[c] !== (m_adv[c] && ex[c]) ||
            pc[c] !== m_pc[c] || active[c] !== m_run[c]) begin
          failures++;
          $display("FAIL t=%0d col %0d: stall %b/%b adv %b/%b pc %0d/%0d run %b/%b", t, c,
                   stall[c], m_stall[c], advance[c], m_adv[c], pc[c], m_pc[c], active[c], m_run[c]);
        end
        if (m_stall[c] && !busy[c]) n_grp_stall++;
        if (m_adv[c] && branch[c] && !ex[c]) n_jump++;
        if (m_adv[c] && ex[c]) n_exit++;
      end
      @(posedge clk);
      for (int c = 0; c < NC; c++) begin
        if (start[c]) begin m_pc[c] = 0; m_run[c] = 1; end
        else if (m_adv[c]) begin
          if (ex[c]) m_run[c] = 0;
          else if (branch[c]) m_pc[c] = target[c];
          else m_pc[c] = m_pc[c] + 1;
        end
      end
    end
    checks++;
    if (n_grp_stall == 0 || n_jump == 0 || n_exit == 0) begin
      failures++;
      $display("FAIL: mechanism not covered %0d %0d %0d", n_grp_stall, n_jump, n_exit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
