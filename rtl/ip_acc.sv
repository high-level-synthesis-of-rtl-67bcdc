// ip_acc: the intra prediction accelerator (IP ACC).
//
// Predicts one luma block of 4x4 to 32x32 pixels in all 35 HEVC intra modes at the same time
// and selects the mode with the lowest cost (SAD plus rate cost times lambda). IP CTRL receives
// the configuration and unfiltered references and feeds 35 prediction blocks in parallel:
// GET PLANAR (mode 0), GET DC (1), 16 GET POS (2..9, 27..34), 15 GET NEG (11..25 except 26)
// and 2 GET ZERO (10, 26). Each prediction block sends two pixels per cycle to SAD PARALLEL,
// which compares them with the original CTU, stalls modes that run ahead, picks the best mode,
// writes the result words and raises irq.
// Channels: cfg (32-bit words), unf1/unf2 (one 8-bit sample per beat), orig (four pixels per
// 32-bit word), all valid/ready. A 4x4 block with 16 pixels spends 8 beats in prediction and SAD.
// Timing with the CTU already loaded and no gaps on the inputs, from the first configuration word
// to irq: 3 configuration cycles, 2N+1 reference cycles (the broadcast overlaps them), N*N/2
// prediction beats, then the comparison tree and three result writes: 27, 59, 171 and 587
// cycles for 4x4 to 32x32. The block set, the mode split and the two-pixel lanes follow the
// document's final accelerator; the lane-per-mode reference broadcast and the lockstep SAD
// lanes are this design's choices.
module ip_acc
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  logic [31:0] cfg_data,
  input  logic        unf1_valid,
  output logic        unf1_ready,
  input  pixel_t      unf1_data,
  input  logic        unf2_valid,
  output logic        unf2_ready,
  input  pixel_t      unf2_data,
  input  logic        orig_valid,
  output logic        orig_ready,
  input  logic [31:0] orig_data,
  output logic               res_we,
  output logic [5:0]         res_addr,
  output logic [COST_W-1:0]  res_data,
  output logic               irq,
  output logic               stall
);

  logic                            sad_cfg_valid, sad_cfg_ready;
  blk_cfg_t                        sad_cfg;
  logic                            ref_valid;
  logic       [NUM_MODES-1:0]      ref_ready;
  ref_word_t  [NUM_MODES-1:0]      ref_data;
  logic       [NUM_MODES-1:0]      pred_valid, pred_ready;
  pred_word_t [NUM_MODES-1:0]      pred_data;

  ip_ctrl u_ctrl (
    .clk, .rst_n,
    .cfg_valid, .cfg_ready, .cfg_data,
    .unf1_valid, .unf1_ready, .unf1_data,
    .unf2_valid, .unf2_ready, .unf2_data,
    .sad_cfg_valid, .sad_cfg_ready, .sad_cfg,
    .ref_valid, .ref_ready, .ref_data
  );

  for (genvar m = 0; m < NUM_MODES; m++) begin : g_mode
    if (m == 0) begin : g_planar
      get_planar u_get (
        .clk, .rst_n, .ref_valid, .ref_ready(ref_ready[m]), .ref_data(ref_data[m]),
        .out_valid(pred_valid[m]), .out_ready(pred_ready[m]), .out_data(pred_data[m]));
    end else if (m == 1) begin : g_dc
      get_dc u_get (
        .clk, .rst_n, .ref_valid, .ref_ready(ref_ready[m]), .ref_data(ref_data[m]),
        .out_valid(pred_valid[m]), .out_ready(pred_ready[m]), .out_data(pred_data[m]));
    end else if (m == 10 || m == 26) begin : g_zero
      get_zero #(.MODE(m)) u_get (
        .clk, .rst_n, .ref_valid, .ref_ready(ref_ready[m]), .ref_data(ref_data[m]),
        .out_valid(pred_valid[m]), .out_ready(pred_ready[m]), .out_data(pred_data[m]));
    end else if (m > 10 && m < 26) begin : g_neg
      get_neg #(.MODE(m)) u_get (
        .clk, .rst_n, .ref_valid, .ref_ready(ref_ready[m]), .ref_data(ref_data[m]),
        .out_valid(pred_valid[m]), .out_ready(pred_ready[m]), .out_data(pred_data[m]));
    end else begin : g_pos
      get_pos #(.MODE(m)) u_get (
        .clk, .rst_n, .ref_valid, .ref_ready(ref_ready[m]), .ref_data(ref_data[m]),
        .out_valid(pred_valid[m]), .out_ready(pred_ready[m]), .out_data(pred_data[m]));
    end
  end

  sad_parallel u_sad (
    .clk, .rst_n,
    .cfg_valid(sad_cfg_valid), .cfg_ready(sad_cfg_ready), .cfg_in(sad_cfg),
    .orig_valid, .orig_ready, .orig_data,
    .pred_valid, .pred_ready, .pred_data,
    .res_we, .res_addr, .res_data, .irq, .stall
  );

endmodule
