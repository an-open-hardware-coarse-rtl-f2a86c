// tb_bus_mem: behavioural main-memory model for the CGRA's DMA master ports.
//
// A word-addressed memory of WORDS 32-bit words with N_PORTS slave ports of
// the request/grant/rvalid protocol of cgra_pkg. Each port grants a request
// only in cycles picked at random (wait states, GNT_PCT percent of cycles),
// performs the access at the grant and answers with one rvalid pulse 1 to 3
// cycles later. All ports can transfer in the same cycle, like a bus that
// allows several master-slave transactions at once. It also counts grants,
// refused requests and direct/indirect accesses per port for the testbench.
module tb_bus_mem
  import cgra_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned GNT_PCT = 60
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req_i [N_PORTS],
  output bus_rsp_t rsp_o [N_PORTS]
);

  logic [31:0] mem [WORDS];
  logic        gnt_en  [N_PORTS];
  logic        busy_q  [N_PORTS];
  logic [1:0]  cnt_q   [N_PORTS];
  logic        rvalid_q[N_PORTS];
  logic [31:0] rdata_q [N_PORTS];
  int          n_gnt   [N_PORTS];
  int          n_wait  [N_PORTS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hDEAD_0000 + i;

  always @(negedge clk)
    for (int p = 0; p < N_PORTS; p++) gnt_en[p] = ($urandom % 100) < GNT_PCT;

  always_comb
    for (int p = 0; p < N_PORTS; p++) begin
      rsp_o[p].gnt    = req_i[p].req && gnt_en[p] && !busy_q[p] && !rvalid_q[p];
      rsp_o[p].rvalid = rvalid_q[p];
      rsp_o[p].rdata  = rdata_q[p];
    end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        busy_q[p] <= 0; cnt_q[p] <= 0; rvalid_q[p] <= 0; rdata_q[p] <= 0;
        n_gnt[p] <= 0; n_wait[p] <= 0;
      end
    end else begin
      for (int p = 0; p < N_PORTS; p++) begin
        rvalid_q[p] <= 1'b0;
        if (req_i[p].req && !rsp_o[p].gnt) n_wait[p] <= n_wait[p] + 1;
        if (rsp_o[p].gnt) begin
          n_gnt[p]  <= n_gnt[p] + 1;
          busy_q[p] <= 1'b1;
          cnt_q[p]  <= 2'($urandom % 3);
          if (req_i[p].we) mem[32'(req_i[p].addr[31:2]) % WORDS] <= req_i[p].wdata;
          else             rdata_q[p] <= mem[32'(req_i[p].addr[31:2]) % WORDS];
        end else if (busy_q[p]) begin
          if (cnt_q[p] == 0) begin
            busy_q[p]   <= 1'b0;
            rvalid_q[p] <= 1'b1;
          end else begin
            cnt_q[p] <= cnt_q[p] - 1;
          end
        end
      end
    end
  end

endmodule
