// get_dc: HEVC DC prediction (mode 1).
//
// Once the (always unfiltered) references are in, one cycle adds the N above and N left samples
// and registers dc = (sum + N) >> (log2 N + 1); this state change makes DC start one cycle after
// the angular blocks. For blocks smaller than 32x32 the top row and left column are smoothed:
//   (0,0): (left[1] + 2*dc + above[1] + 2) >> 2
//   (x,0): (above[x+1] + 3*dc + 2) >> 2      (0,y): (left[y+1] + 3*dc + 2) >> 2
// everything else is dc. Output is row by row (k = y, j = x), two pixels per beat, with the
// handshake of get_pos.
module get_dc
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ref_valid,
  output logic       ref_ready,
  input  ref_word_t  ref_data,
  output logic       out_valid,
  input  logic       out_ready,
  output pred_word_t out_data
);

  pixel_t     above [REF_LEN];
  pixel_t     left  [REF_LEN];
  logic [2:0] log2_size;
  logic       full, done, dc_ok;
  logic [5:0] k, j;
  pixel_t     dc;
  logic [14:0] sum;

  ref_loader u_ref (
    .clk, .rst_n, .in_valid(ref_valid), .in_ready(ref_ready), .in_data(ref_data),
    .full, .release_i(done), .log2_size, .above, .left
  );

  pred_scan u_scan (
    .clk, .rst_n, .go(full && dc_ok), .log2_size, .out_ready, .out_valid, .k, .j, .done
  );

  always_comb begin
    sum = '0;
    for (int i = 1; i <= MAX_CU; i++)
      if (i <= (1 << log2_size)) sum = sum + 15'(above[i]) + 15'(left[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc    <= '0;
      dc_ok <= 1'b0;
    end else if (done) begin
      dc_ok <= 1'b0;
    end else if (full && !dc_ok) begin
      dc    <= pixel_t'((sum + (15'd1 << log2_size)) >> (log2_size + 3'd1));
      dc_ok <= 1'b1;
    end
  end

  function automatic pixel_t dc_px(input logic [5:0] kk, input logic [5:0] jj, input int t);
    int x, y;
    y = int'(kk);
    x = int'(jj) + t;
    if (log2_size != 3'd5) begin
      if (x == 0 && y == 0) return pixel_t'((int'(left[1]) + 2 * int'(dc) + int'(above[1]) + 2) >> 2);
      if (y == 0)           return pixel_t'((int'(above[x + 1]) + 3 * int'(dc) + 2) >> 2);
      if (x == 0)           return pixel_t'((int'(left[y + 1]) + 3 * int'(dc) + 2) >> 2);
    end
    return dc;
  endfunction

  assign out_data.p0 = dc_px(k, j, 0);
  assign out_data.p1 = dc_px(k, j, 1);

endmodule
