// cgra_rc: one reconfigurable cell (RC) of the array.
//
// Each cycle the cell reads the instruction at the column program counter from
// its private program memory. Two operand multiplexers (muxAsel, muxBsel) pick
// among zero, its own output register, its four register-file entries, the
// output registers of its top/left/bottom/right neighbours and the
// sign-extended immediate. The result of the ALU, of the three-cycle
// multiplier or of a load is written to the output register, and also to the
// register-file entry rfSel when rfWe is set. muxFsel picks whose output
// value the flag tests (BZF zero, BSF sign) look at. All of this follows the
// document's description and its instruction fields; the code values, the
// flag tests and the commit/stall scheme below are this design's own.
//
// Timing: results are committed only on advance_i, the cycle in which no cell
// of the kernel's columns is busy. busy_o is high while a multiply has not
// reached its third cycle, or while a load/store has not been answered by the
// column DMA. Loads/stores raise mem_req_o until mem_done_i; mem_done_i may
// come in the same cycle as the commit. For indirect accesses (LWI/SWI) the
// address, operand A, is captured in a dedicated address register on the
// instruction's first cycle and driven from it afterwards. Stores write
// operand A (SWD) or operand B (SWI). Jumps set branch_o with target_o = imm;
// EXIT sets exit_o.
module cgra_rc
  import cgra_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 32,
  localparam int unsigned AW = $clog2(PM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // program memory write port (synchronizer)
  input  logic          pm_we_i,
  input  logic [AW-1:0] pm_waddr_i,
  input  logic [31:0]   pm_wdata_i,
  // column control
  input  logic [AW-1:0] pc_i,
  input  logic          active_i,    // column is running a kernel
  input  logic          advance_i,   // commit the current instruction
  // neighbours' output registers
  input  logic [31:0]   nb_top_i,
  input  logic [31:0]   nb_left_i,
  input  logic [31:0]   nb_bottom_i,
  input  logic [31:0]   nb_right_i,
  output logic [31:0]   out_o,
  // to the column controller
  output logic          busy_o,
  output logic          branch_o,
  output logic [AW-1:0] target_o,
  output logic          exit_o,
  // to the column DMA
  output logic          mem_req_o,
  output logic          mem_we_o,
  output logic          mem_ind_o,   // indirect: address is mem_addr_o
  output logic [31:0]   mem_addr_o,
  output logic [31:0]   mem_wdata_o,
  input  logic          mem_done_i,
  input  logic [31:0]   mem_rdata_i
);

  logic [31:0] instr_word;
  instr_t      ins;
  logic [31:0] out_q;
  logic [31:0] rf_q [4];
  logic [31:0] op_a, op_b, flag_src, alu_res, mul_res, result;
  logic        alu_br, mul_done, is_mul, is_mem;
  logic        mem_ready_q, mem_issued_q;
  logic [31:0] ld_q, ind_addr_q;

  cgra_prog_mem #(.DEPTH(PM_DEPTH)) u_pm (
    .clk, .rst_n,
    .we_i(pm_we_i), .waddr_i(pm_waddr_i), .wdata_i(pm_wdata_i),
    .raddr_i(pc_i), .rdata_o(instr_word)
  );

  assign ins = instr_t'(instr_word);

  function automatic logic [31:0] pick(input logic [3:0] sel);
    unique case (sel)
      SRC_SELF:   return out_q;
      SRC_RF0:    return rf_q[0];
      SRC_RF1:    return rf_q[1];
      SRC_RF2:    return rf_q[2];
      SRC_RF3:    return rf_q[3];
      SRC_TOP:    return nb_top_i;
      SRC_LEFT:   return nb_left_i;
      SRC_BOTTOM: return nb_bottom_i;
      SRC_RIGHT:  return nb_right_i;
      SRC_IMM:    return sext12(ins.imm);
      default:    return '0;
    endcase
  endfunction

  always_comb begin
    op_a = pick(ins.mux_a);
    op_b = pick(ins.mux_b);
    unique case (ins.mux_f)
      FLG_TOP:    flag_src = nb_top_i;
      FLG_LEFT:   flag_src = nb_left_i;
      FLG_BOTTOM: flag_src = nb_bottom_i;
      FLG_RIGHT:  flag_src = nb_right_i;
      default:    flag_src = out_q;
    endcase
  end

  cgra_alu u_alu (
    .op_i(ins.alu_op), .a_i(op_a), .b_i(op_b), .flag_src_i(flag_src),
    .result_o(alu_res), .branch_o(alu_br)
  );

  assign is_mul = (ins.alu_op == OP_SMUL);
  assign is_mem = is_mem_op(ins.alu_op);

  cgra_mul u_mul (
    .clk, .rst_n,
    .start_i(active_i && is_mul), .clear_i(advance_i),
    .a_i(op_a), .b_i(op_b), .product_o(mul_res), .done_o(mul_done)
  );

  // memory access state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_ready_q  <= 1'b0;
      mem_issued_q <= 1'b0;
      ld_q         <= '0;
      ind_addr_q   <= '0;
    end else if (advance_i) begin
      mem_ready_q  <= 1'b0;
      mem_issued_q <= 1'b0;
    end else if (active_i && is_mem) begin
      if (!mem_issued_q) begin
        ind_addr_q   <= op_a;
        mem_issued_q <= 1'b1;
      end
      if (mem_done_i) begin
        mem_ready_q <= 1'b1;
        ld_q        <= mem_rdata_i;
      end
    end
  end

  assign mem_req_o   = active_i && is_mem && !mem_ready_q;
  assign mem_we_o    = (ins.alu_op == OP_SWD) || (ins.alu_op == OP_SWI);
  assign mem_ind_o   = (ins.alu_op == OP_LWI) || (ins.alu_op == OP_SWI);
  assign mem_addr_o  = mem_issued_q ? ind_addr_q : op_a;
  assign mem_wdata_o = (ins.alu_op == OP_SWI) ? op_b : op_a;

  assign busy_o = active_i && ((is_mul && !mul_done) ||
                               (is_mem && !mem_ready_q && !mem_done_i));

  always_comb begin
    if (is_mul)                      result = mul_res;
    else if (is_load_op(ins.alu_op)) result = mem_ready_q ? ld_q : mem_rdata_i;
    else                             result = alu_res;
  end

  // commit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_q <= '0;
      for (int i = 0; i < 4; i++) rf_q[i] <= '0;
    end else if (advance_i && writes_result(ins.alu_op)) begin
      out_q <= result;
      if (ins.rf_we) rf_q[ins.rf_sel] <= result;
    end
  end

  assign out_o    = out_q;
  assign branch_o = active_i && alu_br;
  assign target_o = ins.imm[AW-1:0];
  assign exit_o   = active_i && (ins.alu_op == OP_EXIT);

endmodule
