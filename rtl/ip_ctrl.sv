// ip_ctrl: front end of the intra prediction accelerator (IP CTRL).
//
// Per block it
//   1. reads three configuration words (layout in intra_pkg::blk_cfg_t) from the config channel
//      and offers the decoded configuration to SAD PARALLEL,
//   2. broadcasts to the 35 GET blocks a header beat (log2 N),
//   3. takes the 2N+1 unfiltered above samples (UNFILT1 channel) and 2N+1 unfiltered left
//      samples (UNFILT2 channel), one sample per beat on each, both channels in parallel, and
//      while they arrive broadcasts N+1 reference beats of two indices per side. Beat b (indices
//      2b and 2b+1) is sent as soon as index min(2b+2, 2N) has arrived on both channels, so the
//      sending ends a cycle or two after the last sample is received. Every mode gets its own
//      data lane: the [1 2 1] filtered samples are computed on the fly while sending, and each
//      lane carries filtered or unfiltered samples according to the mode, the block size and
//      the threshold (use_filtered in intra_pkg).
// A broadcast beat moves only when all 35 GET blocks are ready. The filter follows HEVC:
//   f[0] = (left[1] + 2*c + above[1] + 2) >> 2, f[i] = (s[i-1] + 2*s[i] + s[i+1] + 2) >> 2,
//   f[2N] = s[2N]. Strong 32x32 smoothing is not applied.
// Document: the IP CTRL role, the two unfiltered channels, filtering inside IP CTRL and the 32+2
// wide channel to the GET blocks. This design's own choices: the word layout, one lane per mode,
// and overlapping reception with sending.
module ip_ctrl
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // configuration channel
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  logic [31:0] cfg_data,
  // unfiltered above (UNFILT1) and left (UNFILT2) reference channels
  input  logic        unf1_valid,
  output logic        unf1_ready,
  input  pixel_t      unf1_data,
  input  logic        unf2_valid,
  output logic        unf2_ready,
  input  pixel_t      unf2_data,
  // configuration for SAD PARALLEL
  output logic        sad_cfg_valid,
  input  logic        sad_cfg_ready,
  output blk_cfg_t    sad_cfg,
  // reference broadcast to the prediction blocks, one lane per mode
  output logic                            ref_valid,
  input  logic      [NUM_MODES-1:0]       ref_ready,
  output ref_word_t [NUM_MODES-1:0]       ref_data
);

  typedef enum logic [2:0] {S_CFG0, S_CFG1, S_CFG2, S_HDR, S_SEND} state_t;
  state_t state;

  blk_cfg_t   cfg;
  pixel_t     above [REF_LEN];
  pixel_t     left  [REF_LEN];
  logic [6:0] n1, n2;        // samples received on each reference channel
  logic [6:0] ref_cnt;       // 2N + 1
  logic [5:0] beat;          // reference beat being broadcast
  logic       sad_pending;
  logic       fire, loading, avail;
  logic [6:0] need;          // highest index the current beat reads

  assign ref_cnt    = 7'((2 << cfg.log2_size) + 1);
  assign cfg_ready  = (state == S_CFG0) || (state == S_CFG1) ||
                      ((state == S_CFG2) && !sad_pending);
  assign loading    = (state == S_HDR) || (state == S_SEND);
  assign unf1_ready = loading && (n1 != ref_cnt);
  assign unf2_ready = loading && (n2 != ref_cnt);
  assign need       = (7'({beat, 1'b0}) + 7'd2 > ref_cnt - 7'd1) ? ref_cnt - 7'd1
                                                                 : 7'({beat, 1'b0}) + 7'd2;
  assign avail      = (n1 > need) && (n2 > need);
  assign ref_valid  = (state == S_HDR) || ((state == S_SEND) && avail);
  assign fire       = ref_valid && (&ref_ready);
  assign sad_cfg       = cfg;
  assign sad_cfg_valid = sad_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_CFG0;
      cfg         <= '0;
      n1          <= '0;
      n2          <= '0;
      beat        <= '0;
      sad_pending <= 1'b0;
      for (int i = 0; i < REF_LEN; i++) begin
        above[i] <= '0;
        left[i]  <= '0;
      end
    end else begin
      if (sad_pending && sad_cfg_ready) sad_pending <= 1'b0;
      case (state)
        S_CFG0: if (cfg_valid) begin
          cfg.log2_size <= cfg_data[2:0];
          cfg.threshold <= cfg_data[7:3];
          cfg.cu_x      <= cfg_data[13:8];
          cfg.cu_y      <= cfg_data[19:14];
          cfg.new_ctu   <= cfg_data[20];
          state         <= S_CFG1;
        end
        S_CFG1: if (cfg_valid) begin
          cfg.cand0 <= cfg_data[5:0];
          cfg.cand1 <= cfg_data[11:6];
          cfg.cand2 <= cfg_data[17:12];
          state     <= S_CFG2;
        end
        S_CFG2: if (cfg_valid && !sad_pending) begin
          cfg.lambda  <= cfg_data[15:0];
          sad_pending <= 1'b1;
          n1          <= '0;
          n2          <= '0;
          state       <= S_HDR;
        end
        S_HDR: if (fire) begin
          beat  <= '0;
          state <= S_SEND;
        end
        S_SEND: if (fire) begin
          beat <= beat + 6'd1;
          if (beat == 6'(1 << cfg.log2_size)) state <= S_CFG0;
        end
        default: state <= S_CFG0;
      endcase
      if (unf1_valid && unf1_ready) begin
        above[n1] <= unf1_data;
        n1        <= n1 + 7'd1;
      end
      if (unf2_valid && unf2_ready) begin
        left[n2] <= unf2_data;
        n2       <= n2 + 7'd1;
      end
    end
  end

  // Filtered sample i of one side; s is that side, o the other (for the shared corner).
  function automatic pixel_t filt(input int i, input logic above_side);
    int last, a, b, c;
    last = 2 << cfg.log2_size;
    if (i > last) return '0;
    if (i == 0) return pixel_t'((int'(left[1]) + 2 * int'(above[0]) + int'(above[1]) + 2) >> 2);
    if (i == last) return above_side ? above[i] : left[i];
    a = above_side ? int'(above[i - 1]) : int'(left[i - 1]);
    b = above_side ? int'(above[i])     : int'(left[i]);
    c = above_side ? int'(above[i + 1]) : int'(left[i + 1]);
    return pixel_t'((a + 2 * b + c + 2) >> 2);
  endfunction

  function automatic pixel_t raw(input int i, input logic above_side);
    if (i > (2 << cfg.log2_size) || i >= REF_LEN) return '0;
    return above_side ? above[i] : left[i];
  endfunction

  ref_word_t unf_w, flt_w;
  int        i0;
  assign i0    = 2 * int'(beat);
  assign unf_w = '{left1: raw(i0 + 1, 1'b0), above1: raw(i0 + 1, 1'b1),
                   left0: raw(i0, 1'b0),     above0: raw(i0, 1'b1)};
  assign flt_w = '{left1: filt(i0 + 1, 1'b0), above1: filt(i0 + 1, 1'b1),
                   left0: filt(i0, 1'b0),     above0: filt(i0, 1'b1)};

  always_comb begin
    for (int m = 0; m < NUM_MODES; m++) begin
      if (state == S_HDR)
        ref_data[m] = ref_word_t'({29'd0, cfg.log2_size});
      else
        ref_data[m] = use_filtered(m, cfg.log2_size, cfg.threshold) ? flt_w : unf_w;
    end
  end

endmodule
