// cgra_sync: the CGRA synchronizer.
//
// It takes kernel requests from the CPU, finds free columns for them at run
// time, copies the kernel from the context memory into the program memories
// of those columns, loads the columns' DMA pointers and starts them; when all
// columns of a kernel have executed EXIT it frees them and flags the kernel
// done. A request that does not fit in the free columns waits until enough
// columns are released. This is the behaviour the document gives; the
// details below are this design's own.
//
// Allocation: a kernel of n columns gets n adjacent free columns, counted
// modulo N_COLS (the torus wraps), trying start columns 0, 1, ... in order.
// The copy reads one context-memory word per cycle; the kernel's words are
// stored column by column, each column instruction by instruction, each
// instruction row by row: word (c*n_instr + i)*N_ROWS + r from the kernel's
// start goes to program-memory address i of row r of the kernel's c-th
// column. A kernel of n columns and k instructions takes n*k*N_ROWS + 2
// cycles from acceptance to start. All columns of a kernel start in the same
// cycle and share a group tag (the physical number of their first column).
//
// Registers (32 words on the slave port, byte address = 4*index; N_COLS <= 4):
//   0 REQ       write a kernel ID (1..N_KERNELS) to request it; the write is
//               not granted while an earlier request is still waiting. Reads
//               the waiting ID, 0 if none.
//   1 STATUS    [0] request waiting, [1] bad request dropped (write 0 clears;
//               bad means an empty entry, too many columns or instructions,
//               or words past the end of the context memory),
//               [7:4] allocated columns, [11:8] running columns
//   2 DONE      bit k set when kernel k completed; write 1 to clear
//   3 PERF_CTRL write bit 0 = 1 to clear the performance counters
//   4..7  RD_PTR  read address of the kernel's 1st..4th column
//   8..11 WR_PTR  write address of the kernel's 1st..4th column
//               (the pointer values are captured when REQ is written)
//   12 CYCLES   cycles with at least one column running
//   13 KCOUNT   kernels completed
//   14 WAIT     cycles a request waited for free columns
//   16..19 COL_ACT   cycles column c was running
//   20..23 COL_STALL cycles column c was stalled
// Other indices read as zero. gnt is combinational, rvalid follows one cycle
// later.
module cgra_sync
  import cgra_pkg::*;
#(
  parameter int unsigned N_ROWS    = 4,
  parameter int unsigned N_COLS    = 4,
  parameter int unsigned PM_DEPTH  = 32,
  parameter int unsigned CTX_WORDS = 512,
  parameter int unsigned N_KERNELS = 15,
  localparam int unsigned AW  = $clog2(PM_DEPTH),
  localparam int unsigned CAW = $clog2(CTX_WORDS),
  localparam int unsigned KW  = $clog2(N_KERNELS + 1),
  localparam int unsigned GW  = (N_COLS > 1) ? $clog2(N_COLS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  bus_req_t       bus_req_i,
  output bus_rsp_t       bus_rsp_o,
  // kernel configuration memory
  output logic [KW-1:0]  kid_o,
  input  kdesc_t         desc_i,
  // context memory read port
  output logic           ctx_rd_en_o,
  output logic [CAW-1:0] ctx_rd_addr_o,
  input  logic [31:0]    ctx_rd_data_i,
  // program memory write port
  output logic           pm_we_o    [N_COLS][N_ROWS],
  output logic [AW-1:0]  pm_waddr_o,
  output logic [31:0]    pm_wdata_o,
  // column control
  output logic           start_o    [N_COLS],
  output logic [GW-1:0]  group_o    [N_COLS],
  output logic           ptr_load_o [N_COLS],
  output logic [31:0]    rd_ptr_o   [N_COLS],
  output logic [31:0]    wr_ptr_o   [N_COLS],
  input  logic           col_active_i [N_COLS],
  input  logic           col_stall_i  [N_COLS],
  input  logic           col_done_i   [N_COLS]
);

  typedef enum logic [1:0] {S_IDLE, S_COPY, S_LAUNCH} state_e;
  state_e state_q;

  // ---------------- registers ----------------
  logic          pend_q, err_q;
  logic [KW-1:0] pend_kid_q;
  logic [31:0]   rd_cfg_q [N_COLS], wr_cfg_q [N_COLS];   // CPU-visible pointer registers
  logic [31:0]   rd_snap_q[N_COLS], wr_snap_q[N_COLS];   // captured with the request
  logic [31:0]   rd_ker_q [N_COLS], wr_ker_q [N_COLS];   // of the kernel being launched
  logic [N_KERNELS:0] done_bits_q;
  logic [31:0]   cyc_q, kcount_q, wait_q;
  logic [31:0]   col_act_q [N_COLS], col_stall_q [N_COLS];
  logic          rvalid_q;
  logic [31:0]   rdata_q;

  // ---------------- column bookkeeping ----------------
  logic          alloc_q [N_COLS];
  logic          launched_q [N_COLS];
  logic          fin_q [N_COLS];
  logic [GW-1:0] grp_q [N_COLS];
  logic [KW-1:0] own_q [N_COLS];

  // ---------------- copy state ----------------
  logic [GW-1:0] base_q;
  logic [2:0]    ncols_q;
  logic [5:0]    ninstr_q;
  logic [CAW-1:0] caddr_q;
  logic [GW:0]   c_q;        // kernel-relative column being issued
  logic [AW:0]   i_q;
  logic [$clog2(N_ROWS+1)-1:0] r_q;
  logic          issue_done_q;
  logic          wv_q;       // a word read last cycle is to be written now
  logic [GW-1:0] wcol_q;
  logic [AW-1:0] wi_q;
  logic [$clog2(N_ROWS+1)-1:0] wr_q;

  // ---------------- bus slave ----------------
  logic [4:0] ridx;
  logic       wr_req_blocked, acc, wr_acc;
  assign ridx           = bus_req_i.addr[6:2];
  assign wr_req_blocked = bus_req_i.we && ridx == 5'(REG_REQ) && pend_q;
  assign acc            = bus_req_i.req && !wr_req_blocked;
  assign wr_acc         = acc && bus_req_i.we;
  assign bus_rsp_o.gnt    = acc;
  assign bus_rsp_o.rvalid = rvalid_q;
  assign bus_rsp_o.rdata  = rdata_q;

  logic [N_COLS-1:0] alloc_vec, run_vec;
  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      alloc_vec[c] = alloc_q[c];
      run_vec[c]   = col_active_i[c];
    end
  end

  function automatic logic [31:0] reg_read(input logic [4:0] idx);
    logic [31:0] v;
    v = '0;
    unique case (idx)
      5'(REG_REQ):       v = 32'(pend_q ? pend_kid_q : '0);
      5'(REG_STATUS):    v = {20'b0, 4'(run_vec), 4'(alloc_vec), 2'b0, err_q, pend_q};
      5'(REG_DONE):      v = 32'(done_bits_q);
      5'(REG_CYCLES):    v = cyc_q;
      5'(REG_KCOUNT):    v = kcount_q;
      5'(REG_WAIT):      v = wait_q;
      default: begin
        for (int c = 0; c < N_COLS; c++) begin
          if (idx == 5'(REG_RD_PTR + c))    v = rd_cfg_q[c];
          if (idx == 5'(REG_WR_PTR + c))    v = wr_cfg_q[c];
          if (idx == 5'(REG_COL_ACT + c))   v = col_act_q[c];
          if (idx == 5'(REG_COL_STALL + c)) v = col_stall_q[c];
        end
      end
    endcase
    return v;
  endfunction

  // ---------------- allocation search ----------------
  kdesc_t        desc;
  logic          desc_ok, fit;
  logic [GW-1:0] fit_base;
  assign kid_o = pend_kid_q;
  assign desc  = desc_i;
  // a descriptor is usable if it asks for 1..N_COLS columns and 1..PM_DEPTH
  // instructions and its words lie inside the context memory
  assign desc_ok = (desc.n_cols != 0) && (32'(desc.n_cols) <= N_COLS) &&
                   (desc.n_instr != 0) && (32'(desc.n_instr) <= PM_DEPTH) &&
                   (32'(desc.start) + 32'(desc.n_cols) * 32'(desc.n_instr) * N_ROWS
                    <= CTX_WORDS);

  always_comb begin
    fit      = 1'b0;
    fit_base = '0;
    for (int b = N_COLS - 1; b >= 0; b--) begin
      logic ok;
      ok = 1'b1;
      for (int k = 0; k < N_COLS; k++)
        if (k < 32'(desc.n_cols) && alloc_q[(b + k) % N_COLS]) ok = 1'b0;
      if (ok) begin
        fit      = 1'b1;
        fit_base = GW'(b);
      end
    end
  end

  // ---------------- copy datapath ----------------
  assign ctx_rd_en_o   = (state_q == S_COPY) && !issue_done_q;
  assign ctx_rd_addr_o = caddr_q;
  assign pm_waddr_o    = wi_q;
  assign pm_wdata_o    = ctx_rd_data_i;
  always_comb begin
    for (int c = 0; c < N_COLS; c++)
      for (int r = 0; r < N_ROWS; r++)
        pm_we_o[c][r] = wv_q && (wcol_q == GW'(c)) && (32'(wr_q) == r);
  end

  // launch outputs
  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      logic mine;
      int   rel;
      rel  = (c + N_COLS - int'(base_q)) % N_COLS;
      mine = (state_q == S_LAUNCH) && (rel < int'(ncols_q));
      start_o[c]    = mine;
      ptr_load_o[c] = mine;
      rd_ptr_o[c]   = rd_ker_q[rel];
      wr_ptr_o[c]   = wr_ker_q[rel];
      group_o[c]    = grp_q[c];
    end
  end

  // completion: all columns of a group have finished
  logic          rel_col [N_COLS];
  logic          grp_done [N_COLS];
  always_comb begin
    for (int b = 0; b < N_COLS; b++) begin
      logic any, all;
      any = 1'b0;
      all = 1'b1;
      for (int c = 0; c < N_COLS; c++) begin
        if (alloc_q[c] && launched_q[c] && grp_q[c] == GW'(b)) begin
          any = 1'b1;
          if (!(fin_q[c] || col_done_i[c])) all = 1'b0;
        end
      end
      grp_done[b] = any && all;
    end
    for (int c = 0; c < N_COLS; c++)
      rel_col[c] = alloc_q[c] && launched_q[c] && grp_done[grp_q[c]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      pend_q       <= 1'b0;
      pend_kid_q   <= '0;
      err_q        <= 1'b0;
      done_bits_q  <= '0;
      cyc_q        <= '0;
      kcount_q     <= '0;
      wait_q       <= '0;
      rvalid_q     <= 1'b0;
      rdata_q      <= '0;
      base_q       <= '0;
      ncols_q      <= '0;
      ninstr_q     <= '0;
      caddr_q      <= '0;
      c_q          <= '0;
      i_q          <= '0;
      r_q          <= '0;
      issue_done_q <= 1'b0;
      wv_q         <= 1'b0;
      wcol_q       <= '0;
      wi_q         <= '0;
      wr_q         <= '0;
      for (int c = 0; c < N_COLS; c++) begin
        rd_cfg_q[c]    <= '0;
        wr_cfg_q[c]    <= '0;
        rd_snap_q[c]   <= '0;
        wr_snap_q[c]   <= '0;
        rd_ker_q[c]    <= '0;
        wr_ker_q[c]    <= '0;
        col_act_q[c]   <= '0;
        col_stall_q[c] <= '0;
        alloc_q[c]     <= 1'b0;
        launched_q[c]  <= 1'b0;
        fin_q[c]       <= 1'b0;
        grp_q[c]       <= '0;
        own_q[c]       <= '0;
      end
    end else begin
      // ---- bus slave ----
      rvalid_q <= acc;
      if (acc && !bus_req_i.we) rdata_q <= reg_read(ridx);

      // ---- performance counters ----
      if (wr_acc && ridx == 5'(REG_PERF_CTRL) && bus_req_i.wdata[0]) begin
        cyc_q    <= '0;
        kcount_q <= '0;
        wait_q   <= '0;
        for (int c = 0; c < N_COLS; c++) begin
          col_act_q[c]   <= '0;
          col_stall_q[c] <= '0;
        end
      end else begin
        if (|run_vec) cyc_q <= cyc_q + 1;
        for (int c = 0; c < N_COLS; c++) begin
          if (col_active_i[c]) col_act_q[c]   <= col_act_q[c] + 1;
          if (col_stall_i[c])  col_stall_q[c] <= col_stall_q[c] + 1;
        end
        if (state_q == S_IDLE && pend_q && desc_ok && !fit) wait_q <= wait_q + 1;
      end

      // ---- register writes ----
      if (wr_acc) begin
        for (int c = 0; c < N_COLS; c++) begin
          if (ridx == 5'(REG_RD_PTR + c)) rd_cfg_q[c] <= bus_req_i.wdata;
          if (ridx == 5'(REG_WR_PTR + c)) wr_cfg_q[c] <= bus_req_i.wdata;
        end
        if (ridx == 5'(REG_STATUS) && !bus_req_i.wdata[1]) err_q <= 1'b0;
      end

      // ---- column completion ----
      for (int c = 0; c < N_COLS; c++) begin
        if (col_done_i[c]) fin_q[c] <= 1'b1;
        if (rel_col[c]) begin
          alloc_q[c]    <= 1'b0;
          launched_q[c] <= 1'b0;
          fin_q[c]      <= 1'b0;
        end
      end
      begin
        logic [N_KERNELS:0] set_bits;
        logic [31:0]        n_done;
        set_bits = '0;
        n_done   = '0;
        for (int b = 0; b < N_COLS; b++) begin
          if (grp_done[b]) begin
            n_done = n_done + 1;
            for (int c = 0; c < N_COLS; c++)
              if (rel_col[c] && grp_q[c] == GW'(b)) set_bits[own_q[c]] = 1'b1;
          end
        end
        if (wr_acc && ridx == 5'(REG_DONE))
          done_bits_q <= (done_bits_q & ~bus_req_i.wdata[N_KERNELS:0]) | set_bits;
        else
          done_bits_q <= done_bits_q | set_bits;
        if (!(wr_acc && ridx == 5'(REG_PERF_CTRL) && bus_req_i.wdata[0]))
          kcount_q <= kcount_q + n_done;
      end

      // ---- scheduling, copy and launch ----
      wv_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (pend_q) begin
            if (!desc_ok) begin
              pend_q <= 1'b0;
              err_q  <= 1'b1;
            end else if (fit) begin
              pend_q       <= 1'b0;
              base_q       <= fit_base;
              ncols_q      <= desc.n_cols;
              ninstr_q     <= desc.n_instr;
              caddr_q      <= desc.start[CAW-1:0];
              c_q          <= '0;
              i_q          <= '0;
              r_q          <= '0;
              issue_done_q <= 1'b0;
              for (int k = 0; k < N_COLS; k++) begin
                rd_ker_q[k] <= rd_snap_q[k];
                wr_ker_q[k] <= wr_snap_q[k];
                if (k < 32'(desc.n_cols)) begin
                  alloc_q[(int'(fit_base) + k) % N_COLS] <= 1'b1;
                  grp_q[(int'(fit_base) + k) % N_COLS]   <= fit_base;
                  own_q[(int'(fit_base) + k) % N_COLS]   <= pend_kid_q;
                end
              end
              state_q <= S_COPY;
            end
          end
        end
        S_COPY: begin
          if (!issue_done_q) begin
            wv_q    <= 1'b1;
            wcol_q  <= GW'((int'(base_q) + int'(c_q)) % N_COLS);
            wi_q    <= i_q[AW-1:0];
            wr_q    <= r_q;
            caddr_q <= caddr_q + 1'b1;
            if (32'(r_q) == N_ROWS - 1) begin
              r_q <= '0;
              if (32'(i_q) == 32'(ninstr_q) - 1) begin
                i_q <= '0;
                if (32'(c_q) == 32'(ncols_q) - 1) issue_done_q <= 1'b1;
                c_q <= c_q + 1'b1;
              end else begin
                i_q <= i_q + 1'b1;
              end
            end else begin
              r_q <= r_q + 1'b1;
            end
          end else begin
            state_q <= S_LAUNCH;   // the last word is written this cycle
          end
        end
        S_LAUNCH: begin
          for (int c = 0; c < N_COLS; c++)
            if (start_o[c]) launched_q[c] <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase

      // a new request (after the scheduling so that it is not lost)
      if (wr_acc && ridx == 5'(REG_REQ) && bus_req_i.wdata[KW-1:0] != '0) begin
        pend_q     <= 1'b1;
        pend_kid_q <= bus_req_i.wdata[KW-1:0];
        for (int c = 0; c < N_COLS; c++) begin
          rd_snap_q[c] <= rd_cfg_q[c];
          wr_snap_q[c] <= wr_cfg_q[c];
        end
      end
    end
  end

endmodule
