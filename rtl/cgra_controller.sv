// cgra_controller: the per-column program counters of the array.
//
// Each column has its own PC (the document: every RC executes the instruction
// indexed by its column PC, and jumps are handled column by column so several
// kernels can run at once). start_i loads PC 0 and marks the column running.
// A running column advances when no column of the same kernel is busy; the
// synchronizer tags the columns of one kernel with the same group_i value.
// Stalling all columns of a kernel together keeps multi-column kernels in
// lock-step, which modulo-scheduled code across columns relies on; this
// grouping rule is this design's own choice. On an advance the PC moves to
// the jump target when a cell of the column jumps, otherwise to PC+1; an EXIT
// stops the column and pulses done_o for one cycle.
module cgra_controller #(
  parameter int unsigned N_COLS   = 4,
  parameter int unsigned PM_DEPTH = 32,
  localparam int unsigned AW = $clog2(PM_DEPTH),
  localparam int unsigned GW = (N_COLS > 1) ? $clog2(N_COLS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i   [N_COLS],
  input  logic [GW-1:0] group_i   [N_COLS],
  input  logic          busy_i    [N_COLS],
  input  logic          branch_i  [N_COLS],
  input  logic [AW-1:0] target_i  [N_COLS],
  input  logic          exit_i    [N_COLS],
  output logic [AW-1:0] pc_o      [N_COLS],
  output logic          active_o  [N_COLS],
  output logic          advance_o [N_COLS],
  output logic          stall_o   [N_COLS],
  output logic          done_o    [N_COLS]
);

  logic [AW-1:0] pc_q  [N_COLS];
  logic          run_q [N_COLS];

  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      stall_o[c] = 1'b0;
      for (int k = 0; k < N_COLS; k++) begin
        if (run_q[k] && busy_i[k] && group_i[k] == group_i[c]) stall_o[c] = 1'b1;
      end
      stall_o[c]   = stall_o[c] && run_q[c];
      advance_o[c] = run_q[c] && !stall_o[c];
      done_o[c]    = advance_o[c] && exit_i[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_COLS; c++) begin
        pc_q[c]  <= '0;
        run_q[c] <= 1'b0;
      end
    end else begin
      for (int c = 0; c < N_COLS; c++) begin
        if (start_i[c]) begin
          pc_q[c]  <= '0;
          run_q[c] <= 1'b1;
        end else if (advance_o[c]) begin
          if (exit_i[c])        run_q[c] <= 1'b0;
          else if (branch_i[c]) pc_q[c]  <= target_i[c];
          else                  pc_q[c]  <= pc_q[c] + 1'b1;
        end
      end
    end
  end

  assign pc_o     = pc_q;
  assign active_o = run_q;

endmodule
