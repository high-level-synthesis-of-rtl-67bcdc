// tb_result_ram: self-checking testbench for result_ram. Writes random words at random
// addresses on port A while reading random addresses on port B, and checks each read (one cycle
// latency) against a shadow copy, including a read of the address written in the same cycle
// (old contents are returned).
`timescale 1ns/1ps
module tb_result_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        a_we;
  logic [5:0]  a_addr, b_addr;
  logic [31:0] a_wdata, b_rdata;
  result_ram dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] shadow [64];
  logic        known [64];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    bit          expk;
    for (int i = 0; i < 64; i++) known[i] = 0;
    a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      a_we = $urandom_range(0, 1); a_addr = 6'($urandom); a_wdata = $urandom;
      b_addr = (i % 7 == 0) ? a_addr : 6'($urandom);
      expv = shadow[b_addr]; expk = known[b_addr];
      @(posedge clk);
      if (a_we) begin shadow[a_addr] = a_wdata; known[a_addr] = 1; end
      #1;
      if (expk) begin
        checks++;
        if (b_rdata !== expv) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: %h exp %h", b_addr, b_rdata, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
