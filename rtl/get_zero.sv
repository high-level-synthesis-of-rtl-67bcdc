// get_zero: pure horizontal (MODE 10) or pure vertical (MODE 26) prediction.
//
// Each pixel copies the reference sample in line with it: main[j + 1], main being the above
// array for mode 26 and the left array for mode 10. For blocks smaller than 32x32 the first
// line next to the other reference side is smoothed as in HEVC luma:
//   j == 0 : clip(main[1] + ((side[k + 1] - side[0]) >> 1)).
// Output order, handshake and timing are those of get_pos: the vertical mode emits rows (k = y),
// the horizontal mode columns (k = x), two pixels per beat. The edge smoothing is the HEVC rule
// for these two modes; the document splits them into their own block but does not list it.
module get_zero
  import intra_pkg::*;
#(
  parameter int MODE = 26
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ref_valid,
  output logic       ref_ready,
  input  ref_word_t  ref_data,
  output logic       out_valid,
  input  logic       out_ready,
  output pred_word_t out_data
);

  localparam bit VER = (MODE == 26);

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

  function automatic pixel_t zero_px(input logic [5:0] kk, input logic [5:0] jj, input int t);
    int m, edge_v;
    m = int'(jj) + t + 1;
    if (int'(jj) + t == 0 && log2_size != 3'd5) begin
      if (VER) edge_v = int'(above[1]) + ((int'(left[kk + 1]) - int'(left[0])) >>> 1);
      else     edge_v = int'(left[1]) + ((int'(above[kk + 1]) - int'(above[0])) >>> 1);
      return clip_pixel(edge_v);
    end
    return VER ? above[m] : left[m];
  endfunction

  assign out_data.p0 = zero_px(k, j, 0);
  assign out_data.p1 = zero_px(k, j, 1);

endmodule
