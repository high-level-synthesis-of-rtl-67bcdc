// sad_parallel: mode cost computation and mode decision (SAD PARALLEL).
//
// Holds the original 64x64 CTU, loaded from the ORIG channel (four pixels per 32-bit word, row
// by row) whenever the block configuration says a new CTU follows. For each block it
//   1. takes the configuration from IP CTRL and presets the 35 cost accumulators with the rate
//      cost: ratecost * lambda, where ratecost is 1 for candidate 0, 2 for candidates 1 and 2,
//      5 for the other modes, and 0 for the other modes when there is no candidate 0,
//   2. accepts a prediction beat from all 35 GET blocks at once, only when all of them have one
//      (a faster mode is held back by out_ready low: a stall), and adds |orig - pred| of both
//      pixels to each mode's accumulator. Modes 2..17 arrive column by column, so their original
//      pixels are read transposed,
//   3. finds the lowest cost with a balanced comparison tree (ties go to the lower mode), one
//      cycle, then writes three words to the result memory: cost of the best mode at the address
//      of that mode, the best mode at address 35 and its rate cost at address 36, one word per
//      cycle, and pulses irq with the last write.
// Result latency after the last prediction beat: 4 cycles (tree, three writes).
module sad_parallel
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // configuration from IP CTRL
  input  logic       cfg_valid,
  output logic       cfg_ready,
  input  blk_cfg_t   cfg_in,
  // original CTU pixels (ORIG channel)
  input  logic        orig_valid,
  output logic        orig_ready,
  input  logic [31:0] orig_data,
  // predictions, one lane per mode
  input  logic       [NUM_MODES-1:0] pred_valid,
  output logic       [NUM_MODES-1:0] pred_ready,
  input  pred_word_t [NUM_MODES-1:0] pred_data,
  // result memory write port and interrupt
  output logic               res_we,
  output logic [5:0]         res_addr,
  output logic [COST_W-1:0]  res_data,
  output logic               irq,
  // lanes were valid but not all of them: a stall cycle
  output logic               stall
);

  typedef enum logic [2:0] {S_CFG, S_ORIG, S_RUN, S_MIN, S_W0, S_W1, S_W2} state_t;
  state_t state;

  blk_cfg_t    cfg;
  pixel_t      orig [CTU * CTU];
  logic [COST_W-1:0] acc [NUM_MODES];
  logic [9:0]  orig_cnt;
  logic [5:0]  k, j, n_m1;
  logic        all_valid, take;
  logic [5:0]  best_idx;
  logic [COST_W-1:0] best_cost;
  logic [5:0]  tree_idx;
  logic [COST_W-1:0] tree_cost;
  pixel_t      o_ver [2];
  pixel_t      o_hor [2];

  assign n_m1       = 6'((1 << cfg.log2_size) - 1);
  assign cfg_ready  = (state == S_CFG);
  assign orig_ready = (state == S_ORIG);
  assign all_valid  = &pred_valid;
  assign take       = (state == S_RUN) && all_valid;
  assign pred_ready = {NUM_MODES{take}};
  assign stall      = (state == S_RUN) && (|pred_valid) && !all_valid;

  function automatic logic [2:0] ratecost(input logic [5:0] m, input blk_cfg_t c);
    logic [2:0] r;
    r = (c.cand0 == NO_CAND) ? 3'd0 : 3'd5;
    if (c.cand0 == m) r = 3'd1;
    else if (c.cand1 == m || c.cand2 == m) r = 3'd2;
    return r;
  endfunction

  // Balanced minimum tree over the 35 costs: adjacent pairs each level, left wins ties.
  // Returns {index, cost} of the lowest of the 35 accumulators.
  function automatic logic [COST_W+5:0] min_tree();
    logic [COST_W-1:0] c [NUM_MODES];
    logic [5:0]        ix [NUM_MODES];
    int n;
    for (int m = 0; m < NUM_MODES; m++) begin
      c[m]  = acc[m];
      ix[m] = 6'(m);
    end
    n = NUM_MODES;
    for (int lvl = 0; lvl < 6; lvl++) begin
      for (int p = 0; p < (NUM_MODES + 1) / 2; p++) begin
        if (2 * p + 1 < n) begin
          if (c[2*p] <= c[2*p+1]) begin
            c[p] = c[2*p];  ix[p] = ix[2*p];
          end else begin
            c[p] = c[2*p+1]; ix[p] = ix[2*p+1];
          end
        end else if (2 * p < n) begin
          c[p] = c[2*p]; ix[p] = ix[2*p];
        end
      end
      n = (n + 1) / 2;
    end
    return {ix[0], c[0]};
  endfunction

  assign {tree_idx, tree_cost} = min_tree();

  // Accumulator update for one accepted beat.
  function automatic logic [COST_W-1:0] acc_add(input int m);
    logic [COST_W-1:0] s;
    pixel_t o, p;
    s = acc[m];
    for (int t = 0; t < 2; t++) begin
      o = mode_is_hor(m) ? o_hor[t] : o_ver[t];
      p = (t == 0) ? pred_data[m].p0 : pred_data[m].p1;
      s = s + COST_W'((o > p) ? 8'(o - p) : 8'(p - o));
    end
    return s;
  endfunction

  // Original CTU store: a plain memory, written four pixels per ORIG beat, not reset.
  always_ff @(posedge clk) begin
    if (state == S_ORIG && orig_valid)
      for (int b = 0; b < 4; b++) orig[{orig_cnt, 2'(b)}] <= orig_data[8*b +: 8];
  end

  // The four original pixels of the current beat: row order (vertical class, planar, DC) and
  // column order (horizontal class).
  for (genvar t = 0; t < 2; t++) begin : g_orig_rd
    logic [5:0] r_ver, c_ver, r_hor, c_hor;
    assign r_ver = cfg.cu_y + k;
    assign c_ver = cfg.cu_x + j + 6'(t);
    assign r_hor = cfg.cu_y + j + 6'(t);
    assign c_hor = cfg.cu_x + k;
    assign o_ver[t] = orig[{r_ver, c_ver}];
    assign o_hor[t] = orig[{r_hor, c_hor}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CFG;
      cfg       <= '0;
      orig_cnt  <= '0;
      k         <= '0;
      j         <= '0;
      best_idx  <= '0;
      best_cost <= '0;
      res_we    <= 1'b0;
      res_addr  <= '0;
      res_data  <= '0;
      irq       <= 1'b0;
      for (int m = 0; m < NUM_MODES; m++) acc[m] <= '0;
    end else begin
      res_we <= 1'b0;
      irq    <= 1'b0;
      case (state)
        S_CFG: if (cfg_valid) begin
          cfg <= cfg_in;
          for (int m = 0; m < NUM_MODES; m++)
            acc[m] <= COST_W'(ratecost(6'(m), cfg_in)) * COST_W'(cfg_in.lambda);
          k        <= '0;
          j        <= '0;
          orig_cnt <= '0;
          state    <= cfg_in.new_ctu ? S_ORIG : S_RUN;
        end
        S_ORIG: if (orig_valid) begin
          orig_cnt <= orig_cnt + 10'd1;
          if (orig_cnt == 10'(ORIG_WORDS - 1)) state <= S_RUN;
        end
        S_RUN: if (all_valid) begin
          for (int m = 0; m < NUM_MODES; m++) acc[m] <= acc_add(m);
          if (j == n_m1 - 6'd1) begin
            j <= '0;
            k <= k + 6'd1;
            if (k == n_m1) state <= S_MIN;
          end else begin
            j <= j + 6'd2;
          end
        end
        S_MIN: begin
          best_cost <= tree_cost;
          best_idx  <= tree_idx;
          state     <= S_W0;
        end
        S_W0: begin
          res_we   <= 1'b1;
          res_addr <= best_idx;
          res_data <= best_cost;
          state    <= S_W1;
        end
        S_W1: begin
          res_we   <= 1'b1;
          res_addr <= 6'd35;
          res_data <= COST_W'(best_idx);
          state    <= S_W2;
        end
        S_W2: begin
          res_we   <= 1'b1;
          res_addr <= 6'd36;
          res_data <= COST_W'(ratecost(best_idx, cfg));
          irq      <= 1'b1;
          state    <= S_CFG;
        end
        default: state <= S_CFG;
      endcase
    end
  end

endmodule
