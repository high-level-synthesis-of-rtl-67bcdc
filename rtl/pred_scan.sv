// pred_scan: output sequencer shared by the GET blocks.
//
// Once `go` is high it walks a block of N x N pixels two at a time: outer index k = 0..N-1,
// inner index j = 0, 2, .., N-2, one step per accepted output beat (out_valid & out_ready).
// The owning block maps (k, j) to picture coordinates: row/column for the vertical class, the
// transpose for the horizontal class. After the last beat `done` pulses for one cycle, which
// frees the reference store for the next block. No bubbles: one beat per cycle when not stalled.
module pred_scan (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,
  input  logic [2:0] log2_size,
  input  logic       out_ready,
  output logic       out_valid,
  output logic [5:0] k,
  output logic [5:0] j,
  output logic       done
);

  logic [5:0] n_m1;
  logic       last;

  assign n_m1      = 6'((1 << log2_size) - 1);
  assign out_valid = go && !done;
  assign last      = (k == n_m1) && (j == n_m1 - 6'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k    <= '0;
      j    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) begin
        if (last) begin
          k    <= '0;
          j    <= '0;
          done <= 1'b1;
        end else if (j == n_m1 - 6'd1) begin
          j <= '0;
          k <= k + 6'd1;
        end else begin
          j <= j + 6'd2;
        end
      end
    end
  end

endmodule
