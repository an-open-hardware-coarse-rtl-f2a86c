// cgra_prog_mem: private program memory of one reconfigurable cell.
//
// DEPTH 32-bit instruction words held in flip-flops (the document says the
// program memories are registers built from standard cells, 32 words each).
// The synchronizer writes it one word per cycle while the kernel is copied
// from the context memory; the cell reads the word at the column program
// counter combinationally, so a new instruction is issued every cycle.
// Every word is cleared by reset, which decodes as a NOP.
module cgra_prog_mem #(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [31:0]   wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [31:0]   rdata_o
);

  logic [31:0] mem_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else if (we_i) begin
      mem_q[waddr_i] <= wdata_i;
    end
  end

  assign rdata_o = mem_q[raddr_i];

endmodule
