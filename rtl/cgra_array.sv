// cgra_array: the reconfigurable array, an N_ROWS x N_COLS mesh of RCs.
//
// Cell (column c, row r) is RC number c*N_ROWS + r, as in the document's
// figure (RC0..RC3 form column 0). Every cell reads the output registers of
// its top, left, bottom and right neighbours; the links wrap around at the
// edges (torus), so RC0's top neighbour is RC3 and its left neighbour is RC12.
// All cells of a column share the column's program counter, active and
// advance signals. Per column the cells' busy, jump and exit requests are
// merged: a column is busy if any of its cells is, it jumps if any cell
// jumps (to the target of the lowest such row) and it exits if any cell
// executes EXIT. The per-cell load/store requests go out to the column DMA.
module cgra_array
  import cgra_pkg::*;
#(
  parameter int unsigned N_ROWS   = 4,
  parameter int unsigned N_COLS   = 4,
  parameter int unsigned PM_DEPTH = 32,
  localparam int unsigned AW = $clog2(PM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pm_we_i    [N_COLS][N_ROWS],
  input  logic [AW-1:0] pm_waddr_i,
  input  logic [31:0]   pm_wdata_i,
  input  logic [AW-1:0] pc_i       [N_COLS],
  input  logic          active_i   [N_COLS],
  input  logic          advance_i  [N_COLS],
  output logic          busy_o     [N_COLS],
  output logic          branch_o   [N_COLS],
  output logic [AW-1:0] target_o   [N_COLS],
  output logic          exit_o     [N_COLS],
  output logic [31:0]   rc_out_o   [N_COLS][N_ROWS],
  output logic          mem_req_o  [N_COLS][N_ROWS],
  output logic          mem_we_o   [N_COLS][N_ROWS],
  output logic          mem_ind_o  [N_COLS][N_ROWS],
  output logic [31:0]   mem_addr_o [N_COLS][N_ROWS],
  output logic [31:0]   mem_wdata_o[N_COLS][N_ROWS],
  input  logic          mem_done_i [N_COLS][N_ROWS],
  input  logic [31:0]   mem_rdata_i[N_COLS]
);

  logic          rc_busy [N_COLS][N_ROWS];
  logic          rc_br   [N_COLS][N_ROWS];
  logic [AW-1:0] rc_tgt  [N_COLS][N_ROWS];
  logic          rc_exit [N_COLS][N_ROWS];

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    for (genvar r = 0; r < N_ROWS; r++) begin : g_row
      localparam int unsigned RU = (r + N_ROWS - 1) % N_ROWS;  // row above
      localparam int unsigned RD = (r + 1) % N_ROWS;           // row below
      localparam int unsigned CL = (c + N_COLS - 1) % N_COLS;  // column left
      localparam int unsigned CR = (c + 1) % N_COLS;           // column right
      cgra_rc #(.PM_DEPTH(PM_DEPTH)) u_rc (
        .clk, .rst_n,
        .pm_we_i    (pm_we_i[c][r]),
        .pm_waddr_i (pm_waddr_i),
        .pm_wdata_i (pm_wdata_i),
        .pc_i       (pc_i[c]),
        .active_i   (active_i[c]),
        .advance_i  (advance_i[c]),
        .nb_top_i   (rc_out_o[c][RU]),
        .nb_left_i  (rc_out_o[CL][r]),
        .nb_bottom_i(rc_out_o[c][RD]),
        .nb_right_i (rc_out_o[CR][r]),
        .out_o      (rc_out_o[c][r]),
        .busy_o     (rc_busy[c][r]),
        .branch_o   (rc_br[c][r]),
        .target_o   (rc_tgt[c][r]),
        .exit_o     (rc_exit[c][r]),
        .mem_req_o  (mem_req_o[c][r]),
        .mem_we_o   (mem_we_o[c][r]),
        .mem_ind_o  (mem_ind_o[c][r]),
        .mem_addr_o (mem_addr_o[c][r]),
        .mem_wdata_o(mem_wdata_o[c][r]),
        .mem_done_i (mem_done_i[c][r]),
        .mem_rdata_i(mem_rdata_i[c])
      );
    end

    always_comb begin
      busy_o[c]   = 1'b0;
      branch_o[c] = 1'b0;
      exit_o[c]   = 1'b0;
      target_o[c] = '0;
      for (int r = N_ROWS - 1; r >= 0; r--) begin
        busy_o[c] |= rc_busy[c][r];
        exit_o[c] |= rc_exit[c][r];
        if (rc_br[c][r]) begin
          branch_o[c] = 1'b1;
          target_o[c] = rc_tgt[c][r];
        end
      end
    end
  end

endmodule
