// ahb_mc_top: AMBA AHB static-memory controller (AHB-MC).
//
// An AHB slave that gives a processor access to external SRAM and ROM in up
// to four banks sharing one 32-bit data bus, plus a configuration port.
//   AHB clock domain (hclk): the AHB slave interface on the memory port,
//     and the AHB-to-APB bridge on the configuration port with the APB
//     registers of the configuration interface.
//   Memory clock domain (mclk): the external memory interface and the
//     memory-clock copy of the per-chip timing registers.
//   Between them: three asynchronous FIFOs of FIFO_DEPTH entries, for
//     commands and write data (AHB to memory) and read data (memory to AHB).
// Both AHB ports sit on the same AHB bus: they share the address, control
// and write-data inputs and each has its own HSEL and its own HREADYOUT,
// HRESP and HRDATA, which the bus multiplexes. `hready` is the bus HREADY.
// `remap` selects the memory map: low, region 0 is the boot ROM; high,
// region 0 is SRAM bank 0. The XD bus is brought out as xd_out, xd_oe and
// xd_in for the pad ring to combine.
// The partition into these blocks, the two clock domains and the FIFO
// depth of 16 (bursts up to 16 beats) follow the document; the port split
// and the shared-bus port arrangement are this design's choice.
module ahb_mc_top
  import ahb_mc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = MAX_BEATS,
  parameter bit          RETRY_EN   = 1'b1
) (
  input  logic               hclk,
  input  logic               hresetn,
  input  logic               mclk,
  input  logic               mresetn,
  input  logic               remap,
  // shared AHB bus signals
  input  logic [31:0]        haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [2:0]         hsize,
  input  logic [2:0]         hburst,
  input  logic [DATA_W-1:0]  hwdata,
  input  logic               hready,
  // memory port
  input  logic               hsel_mem,
  output logic               hreadyout_mem,
  output logic [1:0]         hresp_mem,
  output logic [DATA_W-1:0]  hrdata_mem,
  // configuration port
  input  logic               hsel_cfg,
  output logic               hreadyout_cfg,
  output logic [1:0]         hresp_cfg,
  output logic [DATA_W-1:0]  hrdata_cfg,
  // external memory bus
  output logic [XADDR_W-1:0] xa,
  output logic [DATA_W-1:0]  xd_out,
  output logic               xd_oe,
  input  logic [DATA_W-1:0]  xd_in,
  output logic [NBANK-1:0]   xcsn,
  output logic               xoen,
  output logic [3:0]         xwen
);
  // command FIFO
  logic     cmd_push, cmd_full, cmd_pop, cmd_empty;
  mem_cmd_t cmd_in, cmd_out;
  // write-data FIFO
  logic     wf_push, wf_full, wf_pop, wf_empty;
  wdata_t   wf_in, wf_out;
  // read-data FIFO
  logic              rf_push, rf_full, rf_pop, rf_empty;
  logic [DATA_W-1:0] rf_in, rf_out;
  // APB
  logic [31:0] paddr, pwdata, prdata;
  logic        psel, penable, pwrite;
  chip_cfg_t   chip_cfg_m [NBANK];

  ahb_slave_if #(.RETRY_EN(RETRY_EN)) u_ahb (
    .hclk, .hresetn, .remap,
    .hsel(hsel_mem), .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hready,
    .hreadyout(hreadyout_mem), .hresp(hresp_mem), .hrdata(hrdata_mem),
    .cmd_full, .cmd_push, .cmd(cmd_in),
    .wf_full, .wf_push, .wf_data(wf_in),
    .rf_empty, .rf_pop, .rf_data(rf_out)
  );

  async_fifo #(.WIDTH($bits(mem_cmd_t)), .DEPTH(FIFO_DEPTH)) u_cmd_fifo (
    .wr_clk(hclk), .wr_rst_n(hresetn), .wr_en(cmd_push), .wr_data(cmd_in), .full(cmd_full),
    .rd_clk(mclk), .rd_rst_n(mresetn), .rd_en(cmd_pop), .rd_data(cmd_out), .empty(cmd_empty)
  );

  async_fifo #(.WIDTH($bits(wdata_t)), .DEPTH(FIFO_DEPTH)) u_wdata_fifo (
    .wr_clk(hclk), .wr_rst_n(hresetn), .wr_en(wf_push), .wr_data(wf_in), .full(wf_full),
    .rd_clk(mclk), .rd_rst_n(mresetn), .rd_en(wf_pop), .rd_data(wf_out), .empty(wf_empty)
  );

  async_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_rdata_fifo (
    .wr_clk(mclk), .wr_rst_n(mresetn), .wr_en(rf_push), .wr_data(rf_in), .full(rf_full),
    .rd_clk(hclk), .rd_rst_n(hresetn), .rd_en(rf_pop), .rd_data(rf_out), .empty(rf_empty)
  );

  ext_mem_if u_ext (
    .clk(mclk), .rst_n(mresetn),
    .cmd_empty, .cmd(cmd_out), .cmd_pop,
    .wf_empty, .wf_data(wf_out), .wf_pop,
    .rf_full, .rf_push, .rf_data(rf_in),
    .chip_cfg(chip_cfg_m),
    .xa, .xd_out, .xd_oe, .xd_in, .xcsn, .xoen, .xwen
  );

  ahb2apb_bridge u_bridge (
    .hclk, .hresetn,
    .hsel(hsel_cfg), .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hreadyout(hreadyout_cfg), .hresp(hresp_cfg), .hrdata(hrdata_cfg),
    .paddr, .psel, .penable, .pwrite, .pwdata, .prdata
  );

  cfg_if u_cfg (
    .pclk(hclk), .presetn(hresetn),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .mclk, .mresetn, .chip_cfg_m
  );
endmodule
