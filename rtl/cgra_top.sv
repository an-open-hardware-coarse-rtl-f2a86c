// cgra_top: the coarse-grained reconfigurable array accelerator.
//
// A memory-mapped accelerator for a microcontroller bus. The CPU writes kernel
// instructions into the context memory and kernel descriptors into the kernel
// configuration memory, sets per-column read/write addresses in the
// synchronizer and requests a kernel by writing its ID. The synchronizer
// places the kernel on free columns of the N_ROWS x N_COLS torus array,
// copies its instructions into the cells' program memories and starts those
// columns; each column steps its own program counter, stalls with the other
// columns of its kernel on multi-cycle operations, and moves data through its
// own DMA master port. This structure and the default sizes (4x4 cells, 32
// instructions per cell, 2 KiB context memory, 15 kernels, one master port per
// column) follow the document; protocols, encodings and timing details are
// this design's own and are described in the sub-blocks.
//
// Ports: three bus slave ports (synchronizer registers, kernel configuration
// memory, context memory) and N_COLS bus master ports, all with the
// request/grant/rvalid structs of cgra_pkg. The system bus decodes the
// addresses of the three slaves; each slave only looks at the low address
// bits.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned N_ROWS    = 4,
  parameter int unsigned N_COLS    = 4,
  parameter int unsigned PM_DEPTH  = 32,
  parameter int unsigned CTX_WORDS = 512,
  parameter int unsigned N_KERNELS = 15
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t sync_req_i,
  output bus_rsp_t sync_rsp_o,
  input  bus_req_t kmem_req_i,
  output bus_rsp_t kmem_rsp_o,
  input  bus_req_t ctx_req_i,
  output bus_rsp_t ctx_rsp_o,
  output bus_req_t dma_req_o [N_COLS],
  input  bus_rsp_t dma_rsp_i [N_COLS]
);

  localparam int unsigned AW  = $clog2(PM_DEPTH);
  localparam int unsigned CAW = $clog2(CTX_WORDS);
  localparam int unsigned KW  = $clog2(N_KERNELS + 1);
  localparam int unsigned GW  = (N_COLS > 1) ? $clog2(N_COLS) : 1;

  // synchronizer <-> memories
  logic [KW-1:0]  kid;
  kdesc_t         desc;
  logic           ctx_rd_en;
  logic [CAW-1:0] ctx_rd_addr;
  logic [31:0]    ctx_rd_data;
  logic           pm_we [N_COLS][N_ROWS];
  logic [AW-1:0]  pm_waddr;
  logic [31:0]    pm_wdata;
  // column control
  logic           start [N_COLS], ptr_load [N_COLS];
  logic [GW-1:0]  group [N_COLS];
  logic [31:0]    rd_ptr [N_COLS], wr_ptr [N_COLS];
  logic [AW-1:0]  pc [N_COLS], target [N_COLS];
  logic           active [N_COLS], advance [N_COLS], stall [N_COLS], done [N_COLS];
  logic           busy [N_COLS], branch [N_COLS], exit_c [N_COLS];
  // array <-> DMA
  logic [31:0]    rc_out    [N_COLS][N_ROWS];
  logic           mem_req   [N_COLS][N_ROWS];
  logic           mem_we    [N_COLS][N_ROWS];
  logic           mem_ind   [N_COLS][N_ROWS];
  logic [31:0]    mem_addr  [N_COLS][N_ROWS];
  logic [31:0]    mem_wdata [N_COLS][N_ROWS];
  logic           mem_done  [N_COLS][N_ROWS];
  logic [31:0]    mem_rdata [N_COLS];

  cgra_ctx_mem #(.WORDS(CTX_WORDS)) u_ctx (
    .clk, .rst_n,
    .bus_req_i(ctx_req_i), .bus_rsp_o(ctx_rsp_o),
    .rd_en_i(ctx_rd_en), .rd_addr_i(ctx_rd_addr), .rd_data_o(ctx_rd_data)
  );

  cgra_kmem #(.N_KERNELS(N_KERNELS)) u_kmem (
    .clk, .rst_n,
    .bus_req_i(kmem_req_i), .bus_rsp_o(kmem_rsp_o),
    .kid_i(kid), .desc_o(desc)
  );

  cgra_sync #(
    .N_ROWS(N_ROWS), .N_COLS(N_COLS), .PM_DEPTH(PM_DEPTH),
    .CTX_WORDS(CTX_WORDS), .N_KERNELS(N_KERNELS)
  ) u_sync (
    .clk, .rst_n,
    .bus_req_i(sync_req_i), .bus_rsp_o(sync_rsp_o),
    .kid_o(kid), .desc_i(desc),
    .ctx_rd_en_o(ctx_rd_en), .ctx_rd_addr_o(ctx_rd_addr), .ctx_rd_data_i(ctx_rd_data),
    .pm_we_o(pm_we), .pm_waddr_o(pm_waddr), .pm_wdata_o(pm_wdata),
    .start_o(start), .group_o(group),
    .ptr_load_o(ptr_load), .rd_ptr_o(rd_ptr), .wr_ptr_o(wr_ptr),
    .col_active_i(active), .col_stall_i(stall), .col_done_i(done)
  );

  cgra_controller #(.N_COLS(N_COLS), .PM_DEPTH(PM_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .start_i(start), .group_i(group),
    .busy_i(busy), .branch_i(branch), .target_i(target), .exit_i(exit_c),
    .pc_o(pc), .active_o(active), .advance_o(advance), .stall_o(stall), .done_o(done)
  );

  cgra_array #(.N_ROWS(N_ROWS), .N_COLS(N_COLS), .PM_DEPTH(PM_DEPTH)) u_array (
    .clk, .rst_n,
    .pm_we_i(pm_we), .pm_waddr_i(pm_waddr), .pm_wdata_i(pm_wdata),
    .pc_i(pc), .active_i(active), .advance_i(advance),
    .busy_o(busy), .branch_o(branch), .target_o(target), .exit_o(exit_c),
    .rc_out_o(rc_out),
    .mem_req_o(mem_req), .mem_we_o(mem_we), .mem_ind_o(mem_ind),
    .mem_addr_o(mem_addr), .mem_wdata_o(mem_wdata),
    .mem_done_i(mem_done), .mem_rdata_i(mem_rdata)
  );

  for (genvar c = 0; c < N_COLS; c++) begin : g_dma
    cgra_dma #(.N_ROWS(N_ROWS)) u_dma (
      .clk, .rst_n,
      .ptr_load_i(ptr_load[c]), .rd_ptr_i(rd_ptr[c]), .wr_ptr_i(wr_ptr[c]),
      .req_i(mem_req[c]), .we_i(mem_we[c]), .ind_i(mem_ind[c]),
      .addr_i(mem_addr[c]), .wdata_i(mem_wdata[c]),
      .done_o(mem_done[c]), .rdata_o(mem_rdata[c]),
      .bus_req_o(dma_req_o[c]), .bus_rsp_i(dma_rsp_i[c]),
      .rd_ptr_o(), .wr_ptr_o()
    );
  end

endmodule
