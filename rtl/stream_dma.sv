// stream_dma: memory-to-channel DMA (ORIG DMA, UNFILT1 DMA, UNFILT2 DMA).
//
// Reads a buffer of LEN bytes from system memory, starting at byte address BASE, and pushes it
// into an accelerator channel DATA_W bits at a time, lowest byte address first. The host writes
// BASE to register 0 and then LEN to register 1, which starts the transfer; `busy` is high until
// the last beat has left. Memory is read through a 64-bit read port with Avalon-MM style
// signalling (read/waitrequest, readdata/readdatavalid), one word outstanding at a time: a word is
// requested, received, and split into 64/DATA_W channel beats before the next request. LEN is a
// multiple of DATA_W/8; BASE is 8-byte aligned. The document gives the job of this block (read
// the data the kernel driver placed in memory from a configured start address); the register
// map, the memory-port protocol and the one-word-at-a-time schedule are this design's choices.
module stream_dma #(
  parameter int DATA_W = 8,
  parameter int MEM_W  = 64,
  parameter int ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // control registers
  input  logic              csr_we,
  input  logic              csr_addr,
  input  logic [31:0]       csr_wdata,
  output logic              busy,
  // memory read port
  output logic              mem_read,
  output logic [ADDR_W-1:0] mem_address,
  input  logic              mem_waitrequest,
  input  logic [MEM_W-1:0]  mem_readdata,
  input  logic              mem_readdatavalid,
  // output channel
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);

  localparam int PIECES = MEM_W / DATA_W;
  localparam int BYTES  = DATA_W / 8;

  typedef enum logic [1:0] {D_IDLE, D_REQ, D_WAIT, D_SEND} dstate_t;
  dstate_t state;

  logic [ADDR_W-1:0] base, addr;
  logic [31:0]       remaining;     // bytes still to send
  logic [MEM_W-1:0]  word;
  logic [$clog2(PIECES+1)-1:0] piece;

  assign busy        = (state != D_IDLE);
  assign mem_read    = (state == D_REQ);
  assign mem_address = addr;
  assign out_valid   = (state == D_SEND);
  assign out_data    = word[DATA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      base      <= '0;
      addr      <= '0;
      remaining <= '0;
      word      <= '0;
      piece     <= '0;
    end else begin
      case (state)
        D_IDLE: if (csr_we) begin
          if (!csr_addr) base <= csr_wdata[ADDR_W-1:0];
          else if (csr_wdata != 0) begin
            remaining <= csr_wdata;
            addr      <= base;
            state     <= D_REQ;
          end
        end
        D_REQ: if (!mem_waitrequest) state <= D_WAIT;
        D_WAIT: if (mem_readdatavalid) begin
          word  <= mem_readdata;
          piece <= '0;
          state <= D_SEND;
        end
        D_SEND: if (out_ready) begin
          word      <= word >> DATA_W;
          piece     <= piece + 1'b1;
          remaining <= remaining - BYTES;
          if (remaining == BYTES) state <= D_IDLE;
          else if (int'(piece) == PIECES - 1) begin
            addr  <= addr + ADDR_W'(MEM_W / 8);
            state <= D_REQ;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
