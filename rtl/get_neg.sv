// get_neg: angular prediction for one mode with a negative angle (modes 11..25 except 26 and
// 10, i.e. 11..17 and 18..25; fifteen instances, selected by MODE).
//
// A negative angle reaches past the corner into the other reference side. HEVC first projects
// that side onto the main direction:
//   main[x] = side[(x * invAngle + 128) >> 8]   for x = -1 down to (N * angle) >> 5
// (only when (N * angle) >> 5 < -1; otherwise no negative index is ever read). Because MODE is
// fixed per instance, the side index for every x is a constant, so this block does not build a
// projected array: a read of main[x] with x < 0 goes straight to the side sample it maps to.
// Prediction therefore starts in the cycle after the last reference beat, like get_pos, and
// proj_rd marks the beats whose first pixel uses a projected sample. The prediction itself is the
// get_pos formula with the main index allowed to go negative. Output order, handshake and
// two-pixel beats are those of get_pos.
// Document: the modes handled by the GET NEG blocks and the HEVC projection rule. This design's
// own choice: reading the projection through constant index maps instead of a copy.
module get_neg
  import intra_pkg::*;
#(
  parameter int MODE = 18
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

  localparam int ANGLE = intra_angle(MODE);
  localparam int INV   = inv_angle(ANGLE);
  localparam bit VER   = (MODE >= 18);

  pixel_t     above [REF_LEN];
  pixel_t     left  [REF_LEN];
  logic [2:0] log2_size;
  logic       full, done, proj_rd;
  logic [5:0] k, j;

  ref_loader u_ref (
    .clk, .rst_n, .in_valid(ref_valid), .in_ready(ref_ready), .in_data(ref_data),
    .full, .release_i(done), .log2_size, .above, .left
  );

  pred_scan u_scan (
    .clk, .rst_n, .go(full), .log2_size, .out_ready, .out_valid, .k, .j, .done
  );

  function automatic pixel_t side_at(input int idx);
    int c;
    c = (idx > REF_LEN - 1) ? REF_LEN - 1 : idx;
    return VER ? left[c] : above[c];
  endfunction

  function automatic pixel_t main_at(input int idx);
    int c;
    if (idx < 0) return side_at((idx * INV + 128) >>> 8);
    c = (idx > REF_LEN - 1) ? REF_LEN - 1 : idx;
    return VER ? above[c] : left[c];
  endfunction

  // Pixel j + t of row k along the main direction.
  function automatic pixel_t ang_px(input logic [5:0] kk, input logic [5:0] jj, input int t);
    int p, idx, f, m;
    p   = (int'(kk) + 1) * ANGLE;
    idx = p >>> 5;
    f   = p & 31;
    m   = int'(jj) + t + idx + 1;
    if (f == 0) return main_at(m);
    return pixel_t'(((32 - f) * int'(main_at(m)) + f * int'(main_at(m + 1)) + 16) >>> 5);
  endfunction

  // first main index read by pixel 0 of the current beat
  function automatic int first_idx(input logic [5:0] kk, input logic [5:0] jj);
    return int'(jj) + (((int'(kk) + 1) * ANGLE) >>> 5) + 1;
  endfunction

  assign proj_rd = out_valid && (first_idx(k, j) < 0);

  assign out_data.p0 = ang_px(k, j, 0);
  assign out_data.p1 = ang_px(k, j, 1);

endmodule
