// get_planar: HEVC planar prediction (mode 0).
//
// Each pixel is the average of a horizontal and a vertical linear interpolation:
//   pred(x, y) = ((N-1-x) * left[y+1] + (x+1) * above[N+1]
//               + (N-1-y) * above[x+1] + (y+1) * left[N+1] + N) >> (log2 N + 1)
// IP CTRL hands it the filtered references for blocks of 8x8 and up. It emits the block row by
// row (k = y, j = x), two pixels per beat, with the handshake and timing of get_pos.
module get_planar
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
  logic       full, done;
  logic [5:0] k, j;

  ref_loader u_ref (
    .clk, .rst_n, .in_valid(ref_valid), .in_ready(ref_ready), .in_data(ref_data),
    .full, .release_i(done), .log2_size, .above, .left
  );

  pred_scan u_scan (
    .clk, .rst_n, .go(full), .log2_size, .out_ready, .out_valid, .k, .j, .done
  );

  function automatic pixel_t planar_px(input logic [5:0] kk, input logic [5:0] jj, input int t);
    int n, x, y, tr, bl;
    n  = 1 << log2_size;
    y  = int'(kk);
    x  = int'(jj) + t;
    tr = int'(above[n + 1]);
    bl = int'(left[n + 1]);
    return pixel_t'(((n - 1 - x) * int'(left[y + 1]) + (x + 1) * tr +
                     (n - 1 - y) * int'(above[x + 1]) + (y + 1) * bl + n) >> (log2_size + 1));
  endfunction

  assign out_data.p0 = planar_px(k, j, 0);
  assign out_data.p1 = planar_px(k, j, 1);

endmodule
