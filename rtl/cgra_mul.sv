// cgra_mul: the three-cycle multiplier of a reconfigurable cell.
//
// The document states that multiplications take 3 cycles to relax the
// critical path. This unit splits the work over two register stages: in the
// first cycle of a SMUL instruction (start_i) the operands are captured, in
// the second the 32x32 product (low 32 bits) is registered, and in the third
// the product is on product_o with done_o high so the cell can commit it.
// done_o stays high until clear_i (the cell's commit) so a multiply can wait
// for a stalled column. The staging is this design's own choice.
module cgra_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,   // SMUL is the current instruction of an active column
  input  logic        clear_i,   // instruction committed
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] product_o,
  output logic        done_o
);

  logic [1:0]  stage_q;
  logic [31:0] a_q, b_q, p_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= '0;
      a_q     <= '0;
      b_q     <= '0;
      p_q     <= '0;
    end else if (clear_i) begin
      stage_q <= '0;
    end else if (start_i) begin
      unique case (stage_q)
        2'd0: begin
          a_q     <= a_i;
          b_q     <= b_i;
          stage_q <= 2'd1;
        end
        2'd1: begin
          p_q     <= a_q * b_q;
          stage_q <= 2'd2;
        end
        default: ;
      endcase
    end
  end

  assign product_o = p_q;
  assign done_o    = (stage_q == 2'd2);

endmodule
