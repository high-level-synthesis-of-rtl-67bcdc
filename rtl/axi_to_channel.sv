// axi_to_channel: AXI4-Lite write slave feeding the accelerator configuration channel.
//
// Every write the host makes, at any address, becomes one 32-bit word on the channel, in the
// order written. The address and data of a write may arrive in either order; the word is held
// until the channel takes it, and the write response (OKAY) follows. One write is in flight at a
// time: awready/wready drop until the response has been accepted. Reads are not supported by
// this wrapper. The document names this block as the wrapper between the AXI bus and the
// configuration channel; the write-only, one-at-a-time form is this design's choice.
module axi_to_channel (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  output logic        ch_valid,
  input  logic        ch_ready,
  output logic [31:0] ch_data
);

  logic have_aw, have_w;

  assign s_awready = !have_aw && !s_bvalid;
  assign s_wready  = !have_w && !s_bvalid;
  assign ch_valid  = have_aw && have_w;
  assign s_bresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_aw  <= 1'b0;
      have_w   <= 1'b0;
      s_bvalid <= 1'b0;
      ch_data  <= '0;
    end else begin
      if (s_awvalid && s_awready) have_aw <= 1'b1;
      if (s_wvalid && s_wready) begin
        have_w  <= 1'b1;
        ch_data <= s_wdata;
      end
      if (ch_valid && ch_ready) begin
        have_aw  <= 1'b0;
        have_w   <= 1'b0;
        s_bvalid <= 1'b1;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
    end
  end

  // The address only routes the write here; strobes are not used (whole words are expected).
  logic unused;
  assign unused = ^{s_awaddr, s_wstrb};

endmodule
