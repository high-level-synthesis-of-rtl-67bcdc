// get_pos: angular prediction for one mode with a positive angle (modes 2..9 and 27..34).
//
// The accelerator has sixteen of these, one per mode, selected by MODE. After its reference
// store (ref_loader) is full, it emits the N x N prediction two pixels per beat. For row k of the
// main direction, with p = (k+1) * angle, idx = p >> 5 and f = p & 31, pixel j is
//   f == 0 : main[j + idx + 1]
//   else   : ((32 - f) * main[j + idx + 1] + f * main[j + idx + 2] + 16) >> 5
// where main is the above array for modes >= 18 and the left array otherwise. Vertical modes
// emit row by row (k = y, j = x); horizontal modes emit column by column (k = x, j = y), so no
// transpose is needed here; SAD PARALLEL reads the original block transposed instead.
// Timing: the first beat is offered the cycle after the last reference beat; then one beat per
// cycle unless out_ready is low. Two pixels per beat follows the two-pixel version of the
// accelerator; the rest is the HEVC angular rule.
module get_pos
  import intra_pkg::*;
#(
  parameter int MODE = 2
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

  localparam int  ANGLE = intra_angle(MODE);
  localparam bit  VER   = (MODE >= 18);

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

  function automatic pixel_t main_at(input int idx);
    int c;
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

  assign out_data.p0 = ang_px(k, j, 0);
  assign out_data.p1 = ang_px(k, j, 1);

endmodule
