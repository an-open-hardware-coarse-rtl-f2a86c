// tb_cgra_alu: self-checking test of the RC ALU. Random operands for every
// arithmetic, shift and logic operation and every jump condition are compared
// with a reference computed here; edge values (0, -1, most negative) are
// included. The ALU is combinational: results are checked 1 ns after inputs.
module tb_cgra_alu;
  import cgra_pkg::*;

  logic [5:0]  op;
  logic [31:0] a, b, f, res;
  logic        br;
  int checks = 0, failures = 0;

  cgra_alu dut (.op_i(op), .a_i(a), .b_i(b), .flag_src_i(f), .result_o(res), .branch_o(br));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input alu_op_e o, input logic [31:0] ta, tb, tf);
    logic [31:0] er;
    logic        eb;
    op = o; a = ta; b = tb; f = tf;
    #1;
    er = 0; eb = 0;
    case (o)
      OP_SADD: er = ta + tb;
      OP_SSUB: er = ta + (~tb + 1);
      OP_SLL:  for (int i = 0; i < 32; i++) er[i] = (i >= int'(tb[4:0])) ? ta[i - int'(tb[4:0])] : 1'b0;
      OP_SRL:  for (int i = 0; i < 32; i++) er[i] = (i + int'(tb[4:0]) < 32) ? ta[i + int'(tb[4:0])] : 1'b0;
      OP_SRA:  for (int i = 0; i < 32; i++) er[i] = (i + int'(tb[4:0]) < 32) ? ta[i + int'(tb[4:0])] : ta[31];
      OP_LAND: er = ta & tb;
      OP_LOR:  er = ta | tb;
      OP_LXOR: er = ta ^ tb;
      OP_BEQ:  eb = ta == tb;
      OP_BNE:  eb = ta != tb;
      OP_BLT:  eb = (ta[31] != tb[31]) ? ta[31] : (ta < tb);
      OP_BGE:  eb = !((ta[31] != tb[31]) ? ta[31] : (ta < tb));
      OP_BZF:  eb = tf == 0;
      OP_BSF:  eb = tf[31];
      OP_JUMP: eb = 1;
      default: ;
    endcase
    checks++;
    if (res !== er || br !== eb) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h f=%h: res=%h/%h br=%b/%b", o, ta, tb, tf, res, er, br, eb);
    end
  endtask

  alu_op_e ops [16] = '{OP_NOP, OP_SADD, OP_SSUB, OP_SLL, OP_SRL, OP_SRA, OP_LAND, OP_LOR,
                        OP_LXOR, OP_BEQ, OP_BNE, OP_BLT, OP_BGE, OP_BZF, OP_BSF, OP_JUMP};
  logic [31:0] edges [4] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};

  initial begin
    for (int k = 0; k < 16; k++) begin
      for (int n = 0; n < 200; n++) begin
        logic [31:0] ra, rb;
        ra = (n % 5 == 0) ? edges[n % 4] : $urandom;
        rb = (n % 7 == 0) ? edges[(n / 7) % 4] : ((n % 3 == 0) ? ra : $urandom);
        try(ops[k], ra, rb, (n % 4 == 0) ? 32'h0 : $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
