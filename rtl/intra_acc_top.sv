// intra_acc_top: FPGA side of the HEVC intra prediction system.
//
// The host (an ARM processor in the hard processor system, not part of this RTL) places the
// original CTU and the unfiltered above/left reference samples of a block in system memory,
// points the three DMAs at them, and writes the block configuration through the AXI4-Lite
// configuration port. ORIG DMA streams the CTU to SAD PARALLEL (32-bit words), UNFILT1 and
// UNFILT2 DMA stream the above and left samples to IP CTRL (8-bit beats), and the accelerator
// predicts all 35 modes, selects the cheapest, writes cost, mode and rate cost into the result
// memory and pulses irq, which the host sees through its PIO.
// Ports: one CSR write port shared by the DMAs (csr_addr[2:1] selects ORIG=0, UNFILT1=1,
// UNFILT2=2, csr_addr[0] the register), three 64-bit memory read ports (index 0 ORIG, 1 UNFILT1,
// 2 UNFILT2) towards the SDRAM controller, the AXI4-Lite configuration port, the host read port
// of the result memory, irq and the DMA busy flags.
// Timing: each DMA keeps one memory read in flight, so the reference samples arrive at a rate set
// by the memory latency; after the last sample the accelerator needs the cycles given in ip_acc.
// The three results are readable once irq has pulsed. The set of blocks and the channel widths
// (32-bit original and configuration words, 8-bit reference samples) follow the document's
// system drawing; the register map and memory-port protocol of the DMAs, the AXI4-Lite subset
// and bringing irq out directly are this design's choices.
module intra_acc_top
  import intra_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // DMA control
  input  logic              csr_we,
  input  logic [2:0]        csr_addr,
  input  logic [31:0]       csr_wdata,
  output logic [2:0]        dma_busy,
  // memory read ports of the three DMAs
  output logic [2:0]        mem_read,
  output logic [2:0][31:0]  mem_address,
  input  logic [2:0]        mem_waitrequest,
  input  logic [2:0][63:0]  mem_readdata,
  input  logic [2:0]        mem_readdatavalid,
  // configuration (AXI4-Lite write)
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_awaddr,
  input  logic              s_wvalid,
  output logic              s_wready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  output logic              s_bvalid,
  input  logic              s_bready,
  output logic [1:0]        s_bresp,
  // results
  input  logic [5:0]        res_raddr,
  output logic [31:0]       res_rdata,
  output logic              irq,
  output logic              stall
);

  logic        cfg_valid, cfg_ready;
  logic [31:0] cfg_data;
  logic        orig_valid, orig_ready;
  logic [31:0] orig_data;
  logic        unf1_valid, unf1_ready, unf2_valid, unf2_ready;
  pixel_t      unf1_data, unf2_data;
  logic        res_we;
  logic [5:0]  res_waddr;
  logic [31:0] res_wdata;

  stream_dma #(.DATA_W(32)) u_orig_dma (
    .clk, .rst_n, .csr_we(csr_we && csr_addr[2:1] == 2'd0), .csr_addr(csr_addr[0]), .csr_wdata,
    .busy(dma_busy[0]), .mem_read(mem_read[0]), .mem_address(mem_address[0]),
    .mem_waitrequest(mem_waitrequest[0]), .mem_readdata(mem_readdata[0]),
    .mem_readdatavalid(mem_readdatavalid[0]),
    .out_valid(orig_valid), .out_ready(orig_ready), .out_data(orig_data));

  stream_dma #(.DATA_W(8)) u_unfilt1_dma (
    .clk, .rst_n, .csr_we(csr_we && csr_addr[2:1] == 2'd1), .csr_addr(csr_addr[0]), .csr_wdata,
    .busy(dma_busy[1]), .mem_read(mem_read[1]), .mem_address(mem_address[1]),
    .mem_waitrequest(mem_waitrequest[1]), .mem_readdata(mem_readdata[1]),
    .mem_readdatavalid(mem_readdatavalid[1]),
    .out_valid(unf1_valid), .out_ready(unf1_ready), .out_data(unf1_data));

  stream_dma #(.DATA_W(8)) u_unfilt2_dma (
    .clk, .rst_n, .csr_we(csr_we && csr_addr[2:1] == 2'd2), .csr_addr(csr_addr[0]), .csr_wdata,
    .busy(dma_busy[2]), .mem_read(mem_read[2]), .mem_address(mem_address[2]),
    .mem_waitrequest(mem_waitrequest[2]), .mem_readdata(mem_readdata[2]),
    .mem_readdatavalid(mem_readdatavalid[2]),
    .out_valid(unf2_valid), .out_ready(unf2_ready), .out_data(unf2_data));

  axi_to_channel u_axi2ch (
    .clk, .rst_n, .s_awvalid, .s_awready, .s_awaddr, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .ch_valid(cfg_valid), .ch_ready(cfg_ready), .ch_data(cfg_data));

  ip_acc u_ip_acc (
    .clk, .rst_n, .cfg_valid, .cfg_ready, .cfg_data,
    .unf1_valid, .unf1_ready, .unf1_data, .unf2_valid, .unf2_ready, .unf2_data,
    .orig_valid, .orig_ready, .orig_data,
    .res_we, .res_addr(res_waddr), .res_data(res_wdata), .irq, .stall);

  result_ram u_result_ram (
    .clk, .a_we(res_we), .a_addr(res_waddr), .a_wdata(res_wdata),
    .b_addr(res_raddr), .b_rdata(res_rdata));

endmodule
