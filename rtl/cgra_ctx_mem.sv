// cgra_ctx_mem: the context memory, 2 KiB of kernel instructions.
//
// The CPU writes kernels into it over the system bus; the synchronizer reads
// it to copy a kernel into the program memories of the columns it assigns.
// It is WORDS x 32 bits (the document: 2 KiB, built from SRAM macros; here a
// plain memory array). The bus port is a slave of the protocol of cgra_pkg:
// gnt is given at once, rvalid follows one cycle later for reads and writes,
// byte enables are honoured, and the byte address selects the word
// (addr[AW+1:2]). The synchronizer's read port is separate and returns the
// word one cycle after rd_en_i. The two ports are this design's choice; the
// contents are not reset.
module cgra_ctx_mem
  import cgra_pkg::*;
#(
  parameter int unsigned WORDS = 512,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_req_t      bus_req_i,
  output bus_rsp_t      bus_rsp_o,
  input  logic          rd_en_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic [31:0]   rd_data_o
);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;
  logic          rvalid_q;
  logic [31:0]   rdata_q;

  assign widx = bus_req_i.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (bus_req_i.req && bus_req_i.we) begin
      for (int b = 0; b < 4; b++)
        if (bus_req_i.be[b]) mem[widx][8*b +: 8] <= bus_req_i.wdata[8*b +: 8];
    end
    if (bus_req_i.req && !bus_req_i.we) rdata_q <= mem[widx];
    if (rd_en_i) rd_data_o <= mem[rd_addr_i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid_q <= 1'b0;
    else        rvalid_q <= bus_req_i.req;
  end

  assign bus_rsp_o.gnt    = bus_req_i.req;
  assign bus_rsp_o.rvalid = rvalid_q;
  assign bus_rsp_o.rdata  = rdata_q;

endmodule
