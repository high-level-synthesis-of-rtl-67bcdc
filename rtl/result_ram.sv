// result_ram: dual-port on-chip memory for the accelerator results ("Onchip Dualport").
//
// Port A is written by SAD PARALLEL (6-bit address, 32-bit data, as drawn in the system
// diagram); port B is read by the host with one cycle of latency. Words 0..34 receive the cost
// of the chosen mode at that mode's address, word 35 the chosen mode, word 36 its rate cost.
// Contents are not reset.
module result_ram #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [WIDTH-1:0]         b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    b_rdata <= mem[b_addr];
  end

endmodule
