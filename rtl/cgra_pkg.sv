// cgra_pkg: types and constants shared by the CGRA blocks.
//
// The 32-bit RC instruction word has fixed fields (no decoder is needed):
//   [31:28] muxAsel  source of ALU operand A
//   [27:24] muxBsel  source of ALU operand B
//   [23:18] aluOp    operation
//   [17:16] rfSel    register-file entry written when rfWe is set
//   [15]    rfWe     register-file write enable
//   [14:12] muxFsel  RC whose output supplies the flags for BZF/BSF
//   [11:0]  imm      immediate, sign-extended to 32 bits
// The field positions are the document's; the code values of the selects and
// of the operations are this design's own choice. The bus structs describe a
// simple request/grant/response-valid protocol (one outstanding transfer),
// also this design's choice.
package cgra_pkg;

  // Operand sources (muxAsel / muxBsel)
  typedef enum logic [3:0] {
    SRC_ZERO   = 4'd0,
    SRC_SELF   = 4'd1,   // own output register
    SRC_RF0    = 4'd2,
    SRC_RF1    = 4'd3,
    SRC_RF2    = 4'd4,
    SRC_RF3    = 4'd5,
    SRC_TOP    = 4'd6,
    SRC_LEFT   = 4'd7,
    SRC_BOTTOM = 4'd8,
    SRC_RIGHT  = 4'd9,
    SRC_IMM    = 4'd10
  } src_sel_e;

  // Flag source (muxFsel)
  typedef enum logic [2:0] {
    FLG_SELF   = 3'd0,
    FLG_TOP    = 3'd1,
    FLG_LEFT   = 3'd2,
    FLG_BOTTOM = 3'd3,
    FLG_RIGHT  = 3'd4
  } flag_sel_e;

  // Operations (aluOp)
  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_SADD = 6'd1,
    OP_SSUB = 6'd2,
    OP_SMUL = 6'd3,   // 3-cycle multiply
    OP_SLL  = 6'd4,
    OP_SRL  = 6'd5,
    OP_SRA  = 6'd6,
    OP_LAND = 6'd7,
    OP_LOR  = 6'd8,
    OP_LXOR = 6'd9,
    OP_BEQ  = 6'd16,  // jump to imm if A == B
    OP_BNE  = 6'd17,
    OP_BLT  = 6'd18,  // signed
    OP_BGE  = 6'd19,  // signed
    OP_BZF  = 6'd20,  // jump if the flag source is zero
    OP_BSF  = 6'd21,  // jump if the flag source is negative
    OP_JUMP = 6'd22,
    OP_LWD  = 6'd32,  // load word, direct (column read pointer, auto-increment)
    OP_SWD  = 6'd33,  // store A, direct (column write pointer, auto-increment)
    OP_LWI  = 6'd34,  // load word from address A
    OP_SWI  = 6'd35,  // store B to address A
    OP_EXIT = 6'd63   // end of kernel for this column
  } alu_op_e;

  typedef struct packed {
    logic [3:0]  mux_a;
    logic [3:0]  mux_b;
    logic [5:0]  alu_op;
    logic [1:0]  rf_sel;
    logic        rf_we;
    logic [2:0]  mux_f;
    logic [11:0] imm;
  } instr_t;

  // Bus master -> slave
  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

  // Bus slave -> master
  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } bus_rsp_t;

  // Kernel descriptor in the kernel configuration memory
  //   [2:0] number of columns (0 = empty entry)
  //   [12:4] first word of the kernel in the context memory
  //   [21:16] instructions per RC
  typedef struct packed {
    logic [9:0] unused_hi;
    logic [5:0] n_instr;
    logic [2:0] unused_mid;
    logic [8:0] start;
    logic       unused_lo;
    logic [2:0] n_cols;
  } kdesc_t;

  // Synchronizer register word indices
  localparam int unsigned REG_REQ       = 0;
  localparam int unsigned REG_STATUS    = 1;
  localparam int unsigned REG_DONE      = 2;
  localparam int unsigned REG_PERF_CTRL = 3;
  localparam int unsigned REG_RD_PTR    = 4;   // 4..7
  localparam int unsigned REG_WR_PTR    = 8;   // 8..11
  localparam int unsigned REG_CYCLES    = 12;
  localparam int unsigned REG_KCOUNT    = 13;
  localparam int unsigned REG_WAIT      = 14;
  localparam int unsigned REG_COL_ACT   = 16;  // 16..19
  localparam int unsigned REG_COL_STALL = 20;  // 20..23

  function automatic logic [31:0] sext12(input logic [11:0] v);
    return {{20{v[11]}}, v};
  endfunction

  function automatic logic is_mem_op(input logic [5:0] op);
    return op inside {OP_LWD, OP_SWD, OP_LWI, OP_SWI};
  endfunction

  function automatic logic is_load_op(input logic [5:0] op);
    return op inside {OP_LWD, OP_LWI};
  endfunction

  // True when the operation writes the output register (and may write the RF)
  function automatic logic writes_result(input logic [5:0] op);
    return op inside {OP_SADD, OP_SSUB, OP_SMUL, OP_SLL, OP_SRL, OP_SRA,
                      OP_LAND, OP_LOR, OP_LXOR, OP_LWD, OP_LWI};
  endfunction

endpackage
