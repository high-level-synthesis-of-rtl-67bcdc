// mem_port_model: behavioural model of one 64-bit read port of the system SDRAM controller, for
// testbenches only. It holds BYTES bytes (filled by the testbench through the `mem` array),
// answers a read after a random wait of 0..3 cycles of waitrequest and 1..4 cycles of latency,
// little-endian, one read at a time.
`timescale 1ns/1ps
module mem_port_model #(
  parameter int BYTES = 8192
) (
  input  logic        clk,
  input  logic        mem_read,
  input  logic [31:0] mem_address,
  output logic        mem_waitrequest,
  output logic [63:0] mem_readdata,
  output logic        mem_readdatavalid
);
  logic [7:0] mem [BYTES];
  int wait_left = 0, lat_left = -1, reads = 0;
  logic [31:0] pend_addr;

  initial begin
    mem_waitrequest = 1'b1;
    mem_readdatavalid = 1'b0;
    mem_readdata = '0;
  end

  always @(posedge clk) begin
    #1;
    mem_readdatavalid = 1'b0;
    if (lat_left == 0) begin
      for (int b = 0; b < 8; b++) mem_readdata[8*b +: 8] = mem[(pend_addr + 32'(b)) % BYTES];
      mem_readdatavalid = 1'b1;
      lat_left = -1;
    end else if (lat_left > 0) lat_left--;
  end

  // accept a request when waitrequest is low at the rising edge
  always @(posedge clk) begin
    if (mem_read && !mem_waitrequest) begin
      pend_addr = mem_address;
      lat_left  = $urandom_range(0, 3);
      reads++;
    end
    #2;
    if (!mem_read) mem_waitrequest = 1'b1;
    else if (wait_left == 0) begin
      mem_waitrequest = 1'b0;
      wait_left = $urandom_range(0, 3);   // wait cycles for the next request
    end else begin
      mem_waitrequest = 1'b1;
      wait_left--;
    end
  end
endmodule
