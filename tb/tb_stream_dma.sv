// tb_stream_dma: self-checking testbench for stream_dma.
//
// Two DMAs, 8-bit and 32-bit channel width, read from memory port models with random wait and
// latency. Each transfer programs a base address and a length, and the channel output, taken
// with random back-pressure, must reproduce the memory bytes in address order, with exactly
// LEN/BYTES beats and busy dropping at the end. Lengths cover less than, exactly and more than
// one 64-bit word.
`timescale 1ns/1ps
module tb_stream_dma;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        csr_we [2];
  logic        csr_addr [2];
  logic [31:0] csr_wdata [2];
  logic        busy [2];
  logic        mem_read [2], mem_waitrequest [2], mem_readdatavalid [2];
  logic [31:0] mem_address [2];
  logic [63:0] mem_readdata [2];
  logic        out_valid [2], out_ready [2];
  logic [7:0]  d8;
  logic [31:0] d32;

  stream_dma #(.DATA_W(8)) dut8 (
    .clk, .rst_n, .csr_we(csr_we[0]), .csr_addr(csr_addr[0]), .csr_wdata(csr_wdata[0]), .busy(busy[0]),
    .mem_read(mem_read[0]), .mem_address(mem_address[0]), .mem_waitrequest(mem_waitrequest[0]),
    .mem_readdata(mem_readdata[0]), .mem_readdatavalid(mem_readdatavalid[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(d8));
  stream_dma #(.DATA_W(32)) dut32 (
    .clk, .rst_n, .csr_we(csr_we[1]), .csr_addr(csr_addr[1]), .csr_wdata(csr_wdata[1]), .busy(busy[1]),
    .mem_read(mem_read[1]), .mem_address(mem_address[1]), .mem_waitrequest(mem_waitrequest[1]),
    .mem_readdata(mem_readdata[1]), .mem_readdatavalid(mem_readdatavalid[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(d32));

  for (genvar g = 0; g < 2; g++) begin : g_mem
    mem_port_model u_mem (
      .clk, .mem_read(mem_read[g]), .mem_address(mem_address[g]),
      .mem_waitrequest(mem_waitrequest[g]), .mem_readdata(mem_readdata[g]),
      .mem_readdatavalid(mem_readdatavalid[g]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready[0] <= $urandom_range(0, 3) != 0;
    out_ready[1] <= $urandom_range(0, 3) != 0;
  end

  int got [2];
  int base [2];
  always @(negedge clk) begin
    if (rst_n && out_valid[0] && out_ready[0]) begin
      check(d8 == g_mem[0].u_mem.mem[base[0] + got[0]], $sformatf("8-bit beat %0d", got[0]));
      got[0]++;
    end
    if (rst_n && out_valid[1] && out_ready[1]) begin
      check(d32 == {g_mem[1].u_mem.mem[base[1] + 4 * got[1] + 3], g_mem[1].u_mem.mem[base[1] + 4 * got[1] + 2],
                    g_mem[1].u_mem.mem[base[1] + 4 * got[1] + 1], g_mem[1].u_mem.mem[base[1] + 4 * got[1]]},
            $sformatf("32-bit beat %0d", got[1]));
      got[1]++;
    end
  end

  task automatic start(input int g, input int b, input int len);
    base[g] = b; got[g] = 0;
    csr_we[g] = 1; csr_addr[g] = 0; csr_wdata[g] = 32'(b);
    @(posedge clk); #1;
    csr_addr[g] = 1; csr_wdata[g] = 32'(len);
    @(posedge clk); #1;
    csr_we[g] = 0;
  endtask

  initial begin
    int lens [4] = '{4, 8, 40, 1024};
    for (int g = 0; g < 2; g++) begin csr_we[g] = 0; csr_addr[g] = 0; csr_wdata[g] = 0; got[g] = 0; base[g] = 0; end
    for (int g = 0; g < 2; g++) for (int i = 0; i < 8192; i++) ;
    for (int i = 0; i < 8192; i++) begin
      g_mem[0].u_mem.mem[i] = 8'($urandom);
      g_mem[1].u_mem.mem[i] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      start(0, 8 * $urandom_range(0, 500), lens[t]);
      start(1, 8 * $urandom_range(0, 500), lens[t]);
      while (busy[0] || busy[1]) @(posedge clk);
      repeat (2) @(posedge clk);
      check(got[0] == lens[t], $sformatf("8-bit DMA sent %0d of %0d beats", got[0], lens[t]));
      check(got[1] == lens[t] / 4, $sformatf("32-bit DMA sent %0d of %0d beats", got[1], lens[t] / 4));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
