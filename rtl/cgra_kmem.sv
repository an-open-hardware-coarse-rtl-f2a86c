// cgra_kmem: the kernel configuration memory.
//
// Holds one descriptor per kernel stored in the context memory (the document:
// 15 elements giving the number of columns, the start position in the context
// memory and the number of instructions per RC). Kernel IDs run from 1 to
// N_KERNELS; ID 0 means "no kernel" and its entry always reads as zero, which
// this design chose so that a zero request word is never a valid kernel. The
// descriptor layout is kdesc_t in cgra_pkg (this design's encoding). The CPU
// writes and reads entries over a bus slave port at byte address 4*ID
// (gnt at once, rvalid one cycle later); the synchronizer reads the entry of
// kid_i combinationally. Entries are cleared by reset.
module cgra_kmem
  import cgra_pkg::*;
#(
  parameter int unsigned N_KERNELS = 15,
  localparam int unsigned KW = $clog2(N_KERNELS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bus_req_t      bus_req_i,
  output bus_rsp_t      bus_rsp_o,
  input  logic [KW-1:0] kid_i,
  output kdesc_t        desc_o
);

  logic [31:0]   ent_q [N_KERNELS + 1];
  logic [KW-1:0] idx;
  logic          idx_ok, kid_ok;   // index names an existing entry
  logic          rvalid_q;
  logic [31:0]   rdata_q;

  assign idx = bus_req_i.addr[KW+1:2];

  // When N_KERNELS + 1 is a power of two every index exists; otherwise the
  // indices above N_KERNELS read as zero and ignore writes.
  if (N_KERNELS + 1 == 2 ** KW) begin : g_full
    assign idx_ok = 1'b1;
    assign kid_ok = 1'b1;
  end else begin : g_part
    assign idx_ok = 32'(idx) <= N_KERNELS;
    assign kid_ok = 32'(kid_i) <= N_KERNELS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= N_KERNELS; k++) ent_q[k] <= '0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      rvalid_q <= bus_req_i.req;
      if (bus_req_i.req) begin
        if (bus_req_i.we) begin
          if (idx != '0 && idx_ok) ent_q[idx] <= bus_req_i.wdata;
        end else begin
          rdata_q <= idx_ok ? ent_q[idx] : '0;
        end
      end
    end
  end

  assign bus_rsp_o.gnt    = bus_req_i.req;
  assign bus_rsp_o.rvalid = rvalid_q;
  assign bus_rsp_o.rdata  = rdata_q;
  assign desc_o = kid_ok ? kdesc_t'(ent_q[kid_i]) : '0;

endmodule
