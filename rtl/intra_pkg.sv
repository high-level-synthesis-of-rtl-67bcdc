// intra_pkg: types, sizes and mode tables shared by the intra prediction accelerator.
//
// The accelerator predicts one luma block (4x4 .. 32x32) in all 35 HEVC intra modes at once and
// picks the cheapest mode. Reference arrays use the HEVC layout: index 0 is the corner sample
// p[-1][-1], index i (1..2N) of the "above" array is p[i-1][-1] and of the "left" array p[-1][i-1].
// Channels between blocks are valid/ready pairs; the data word of each channel is a type below.
package intra_pkg;

  localparam int MAX_CU     = 32;            // largest block predicted
  localparam int REF_LEN    = 2 * MAX_CU + 1; // reference samples per side
  localparam int NUM_MODES  = 35;            // planar, DC, 33 angular
  localparam int CTU        = 64;            // original CTU held by SAD PARALLEL
  localparam int ORIG_WORDS = CTU * CTU / 4; // 32-bit words of one CTU
  localparam int COST_W     = 32;            // width of SAD and cost words
  localparam logic [5:0] NO_CAND = 6'h3f;    // "no candidate" (-1 in 6 bits)

  typedef logic [7:0] pixel_t;

  // Reference beat from IP CTRL to a GET block: two consecutive reference indices per side.
  // The first beat of a block is a header holding log2 of the block size in bits [2:0].
  typedef struct packed {
    pixel_t left1;
    pixel_t above1;
    pixel_t left0;
    pixel_t above0;
  } ref_word_t;

  // Prediction beat from a GET block to SAD PARALLEL: two predicted pixels.
  typedef struct packed {
    pixel_t p1;
    pixel_t p0;
  } pred_word_t;

  // Per-block configuration, sent as three 32-bit words through the configuration channel:
  //   word 0: [2:0] log2 size, [7:3] filter threshold, [13:8] block x in CTU, [19:14] block y,
  //           [20] a new original CTU follows on the ORIG channel
  //   word 1: [5:0] candidate 0, [11:6] candidate 1, [17:12] candidate 2 (63 = none)
  //   word 2: [15:0] lambda
  typedef struct packed {
    logic [2:0]  log2_size;
    logic [4:0]  threshold;
    logic [5:0]  cu_x;
    logic [5:0]  cu_y;
    logic        new_ctu;
    logic [5:0]  cand0;
    logic [5:0]  cand1;
    logic [5:0]  cand2;
    logic [15:0] lambda;
  } blk_cfg_t;

  // HEVC intraPredAngle of modes 2..34.
  function automatic int intra_angle(input int mode);
    case (mode)
      2, 34:  return 32;
      3, 33:  return 26;
      4, 32:  return 21;
      5, 31:  return 17;
      6, 30:  return 13;
      7, 29:  return 9;
      8, 28:  return 5;
      9, 27:  return 2;
      10, 26: return 0;
      11, 25: return -2;
      12, 24: return -5;
      13, 23: return -9;
      14, 22: return -13;
      15, 21: return -17;
      16, 20: return -21;
      17, 19: return -26;
      18:     return -32;
      default: return 0;
    endcase
  endfunction

  // HEVC invAngle = round(8192 / intraPredAngle) for the negative angles.
  function automatic int inv_angle(input int angle);
    case (angle)
      -2:  return -4096;
      -5:  return -1638;
      -9:  return -910;
      -13: return -630;
      -17: return -482;
      -21: return -390;
      -26: return -315;
      -32: return -256;
      default: return 0;
    endcase
  endfunction

  // True for modes whose GET block scans the block column by column (modes 2..17, the
  // horizontal class); SAD PARALLEL then reads the original block transposed.
  function automatic bit mode_is_hor(input int mode);
    return (mode >= 2) && (mode <= 17);
  endfunction

  // Reference set choice of IP CTRL: filtered (1) or unfiltered (0) samples for a mode.
  function automatic logic use_filtered(input int mode, input logic [2:0] log2_size,
                                        input logic [4:0] threshold);
    int d26, d10, min_dist;
    if (log2_size == 3'd2 || mode == 1) return 1'b0;
    if (mode == 0) return 1'b1;
    d26 = (mode > 26) ? mode - 26 : 26 - mode;
    d10 = (mode > 10) ? mode - 10 : 10 - mode;
    min_dist = (d26 < d10) ? d26 : d10;
    return min_dist > int'(threshold);
  endfunction

  function automatic pixel_t clip_pixel(input int v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return pixel_t'(v);
  endfunction

endpackage
