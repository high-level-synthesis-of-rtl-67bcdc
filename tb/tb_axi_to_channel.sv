// tb_axi_to_channel: self-checking testbench for axi_to_channel.
//
// Issues AXI4-Lite writes with the address before, with or after the data and random
// channel back-pressure, and checks that every written word comes out of the channel once, in
// order, and that each write receives exactly one OKAY response after its word has been taken.
`timescale 1ns/1ps
module tb_axi_to_channel;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready, ch_valid, ch_ready;
  logic [31:0] s_awaddr, s_wdata, ch_data;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp;

  axi_to_channel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] sent [$];
  int nresp = 0, nout = 0;
  always @(posedge clk) ch_ready <= $urandom_range(0, 2) != 0;
  always @(negedge clk) if (rst_n) begin
    if (ch_valid && ch_ready) begin
      check(sent.size() > 0 && ch_data == sent[0], $sformatf("word %0d", nout));
      if (sent.size() > 0) void'(sent.pop_front());
      nout++;
    end
    if (s_bvalid && s_bready) begin
      check(s_bresp == 2'b00 && nresp < nout, "write response after the word left");
      nresp++;
    end
  end

  task automatic axi_write(input logic [31:0] d, input int order);
    s_awaddr = 32'h10; s_wdata = d; s_wstrb = 4'hf;
    sent.push_back(d);
    if (order != 1) s_awvalid = 1;
    if (order != 2) s_wvalid = 1;
    fork
      begin
        if (order == 1) begin @(posedge clk); #1 s_awvalid = 1; end
        @(negedge clk); while (!s_awready || !s_awvalid) @(negedge clk);
        @(posedge clk); #1 s_awvalid = 0;
      end
      begin
        if (order == 2) begin @(posedge clk); #1 s_wvalid = 1; end
        @(negedge clk); while (!s_wready || !s_wvalid) @(negedge clk);
        @(posedge clk); #1 s_wvalid = 0;
      end
    join
    s_bready = 1;
    @(negedge clk); while (!s_bvalid) @(negedge clk);
    @(posedge clk); #1 s_bready = 0;
  endtask

  initial begin
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_awaddr = 0; s_wdata = 0; s_wstrb = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 60; i++) axi_write($urandom, i % 3);
    repeat (5) @(posedge clk);
    check(nout == 60 && nresp == 60, $sformatf("%0d words, %0d responses", nout, nresp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
