// cgra_dma: the DMA master port of one array column.
//
// The document connects each column to main memory through its own master
// port, driven by DMA, and keeps a read address and a write address per
// column that the CPU configures. Direct loads (LWD) read at the read pointer
// and direct stores (SWD) write at the write pointer; each pointer advances by
// one 32-bit word after every access. Indirect loads/stores (LWI/SWI) use the
// address supplied by the cell. Requests from the cells of the column are
// served one at a time, lowest row first, so several direct accesses issued in
// the same cycle get consecutive addresses in row order.
//
// Bus protocol (this design's choice): the master holds req, addr, we, be
// and wdata stable until gnt; the slave answers every transfer, read or write,
// with one rvalid pulse (rdata valid for reads) in a later cycle. One transfer
// is outstanding at a time. A request is put on the bus in the same cycle the
// cell raises it; done_o pulses in the rvalid cycle for the served row.
// ptr_load_i (from the synchronizer at kernel launch) loads both pointers.
module cgra_dma
  import cgra_pkg::*;
#(
  parameter int unsigned N_ROWS = 4,
  localparam int unsigned RW = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ptr_load_i,
  input  logic [31:0] rd_ptr_i,
  input  logic [31:0] wr_ptr_i,
  input  logic        req_i   [N_ROWS],
  input  logic        we_i    [N_ROWS],
  input  logic        ind_i   [N_ROWS],
  input  logic [31:0] addr_i  [N_ROWS],
  input  logic [31:0] wdata_i [N_ROWS],
  output logic        done_o  [N_ROWS],
  output logic [31:0] rdata_o,
  output bus_req_t    bus_req_o,
  input  bus_rsp_t    bus_rsp_i,
  output logic [31:0] rd_ptr_o,
  output logic [31:0] wr_ptr_o
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RESP} state_e;
  state_e        state_q;
  logic [RW-1:0] sel_q, pick, sel;
  logic          any;
  logic [31:0]   rd_ptr_q, wr_ptr_q;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int r = N_ROWS - 1; r >= 0; r--) begin
      if (req_i[r]) begin
        any  = 1'b1;
        pick = RW'(r);
      end
    end
    sel = (state_q == S_IDLE) ? pick : sel_q;
  end

  always_comb begin
    bus_req_o       = '0;
    bus_req_o.req   = (state_q == S_IDLE && any) || (state_q == S_REQ);
    bus_req_o.we    = we_i[sel];
    bus_req_o.be    = 4'hF;
    bus_req_o.wdata = wdata_i[sel];
    if (ind_i[sel])      bus_req_o.addr = addr_i[sel];
    else if (we_i[sel])  bus_req_o.addr = wr_ptr_q;
    else                 bus_req_o.addr = rd_ptr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      sel_q    <= '0;
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE, S_REQ: begin
          if (bus_req_o.req) begin
            sel_q   <= sel;
            state_q <= bus_rsp_i.gnt ? S_RESP : S_REQ;
          end
        end
        S_RESP: if (bus_rsp_i.rvalid) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
      if (ptr_load_i) begin
        rd_ptr_q <= rd_ptr_i;
        wr_ptr_q <= wr_ptr_i;
      end else if (bus_req_o.req && bus_rsp_i.gnt && !ind_i[sel]) begin
        if (we_i[sel]) wr_ptr_q <= wr_ptr_q + 32'd4;
        else           rd_ptr_q <= rd_ptr_q + 32'd4;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < N_ROWS; r++)
      done_o[r] = (state_q == S_RESP) && bus_rsp_i.rvalid && (sel_q == RW'(r));
  end

  assign rdata_o  = bus_rsp_i.rdata;
  assign rd_ptr_o = rd_ptr_q;
  assign wr_ptr_o = wr_ptr_q;

  // A request, once raised, stays unchanged until it is granted.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bus_req_o.req && !bus_rsp_i.gnt |=> bus_req_o.req && $stable(bus_req_o.addr)
                                        && $stable(bus_req_o.we));

endmodule
