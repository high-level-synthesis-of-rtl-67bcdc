// tb_sad_parallel: self-checking testbench for sad_parallel.
//
// Loads a random original CTU, then for blocks of every size at random positions drives 35
// lanes of random predicted pixels. In the first blocks every lane is always valid (no stall),
// later in half of the cycles one random lane has no beat, so the block must hold the other lanes back. The
// expected cost of each mode (SAD against the original, transposed for modes 2..17, plus rate
// cost times lambda), the best mode (lowest cost, lowest mode on ties) and its rate cost are
// computed here and compared with the three result writes. Timing checks: N*N/2 accepted beats
// in N*N/2 cycles without stalls, and irq at most 6 cycles after the last beat (the cost search
// and result saving budget of the optimized accelerator).
`timescale 1ns/1ps
module tb_sad_parallel;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_valid, cfg_ready;
  blk_cfg_t    cfg_in;
  logic        orig_valid, orig_ready;
  logic [31:0] orig_data;
  logic       [NUM_MODES-1:0] pred_valid, pred_ready;
  pred_word_t [NUM_MODES-1:0] pred_data;
  logic               res_we, irq, stall;
  logic [5:0]         res_addr;
  logic [COST_W-1:0]  res_data;

  sad_parallel dut (.cfg_in, .*);

  int checks = 0, failures = 0, cyc = 0, stalls = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (stall) stalls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int orig [64][64];   // [row][col]
  int pred [35][1024]; // stream order per mode
  int pos  [35];       // next beat per lane
  bit randv;

  // lane drivers: each lane offers its next beat, with random gaps when randv is set
  for (genvar m = 0; m < NUM_MODES; m++) begin : g_lane
    always @(posedge clk) begin
      #1;
      pred_data[m].p0 = pixel_t'(pred[m][2 * pos[m]]);
      pred_data[m].p1 = pixel_t'(pred[m][2 * pos[m] + 1]);
    end
  end

  // The block takes all lanes together; advance the lanes at each accepted beat.
  int beats, first_cyc, last_cyc;
  logic [NUM_MODES-1:0] lane_on;
  always @(negedge clk) begin
    if (rst_n && |pred_ready && &pred_valid) begin
      if (beats == 0) first_cyc = cyc;
      last_cyc = cyc;
      beats++;
      for (int m = 0; m < NUM_MODES; m++) pos[m]++;
    end
  end
  // with random gaps on, half of the cycles one randomly chosen lane has no beat
  always @(posedge clk) begin
    int slow;
    #1;
    slow = (randv && $urandom_range(0, 1) == 1) ? int'($urandom_range(0, NUM_MODES - 1)) : -1;
    for (int m = 0; m < NUM_MODES; m++)
      pred_valid[m] = lane_on[m] && (m != slow);
  end

  int wr_addr [3], wr_data [3], nwr, irq_cyc;
  always @(negedge clk) if (rst_n && res_we && nwr < 3) begin
    wr_addr[nwr] = int'(res_addr); wr_data[nwr] = int'(res_data); nwr++;
  end
  always @(negedge clk) if (irq) irq_cyc = cyc;

  initial begin
    int n, x, y, c0, c1, c2, lam, cost [35], best, r, o, p;
    blk_cfg_t c;
    lane_on = '0; randv = 0; cfg_valid = 0; cfg_in = '0; orig_valid = 0; orig_data = 0;
    for (int m = 0; m < 35; m++) pos[m] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int blk = 0; blk < 14; blk++) begin
      n = 4 << (blk % 4);
      randv = blk >= 4;
      x = $urandom_range(0, (64 / n) - 1) * n;
      y = $urandom_range(0, (64 / n) - 1) * n;
      c0 = (blk == 6) ? 63 : $urandom_range(0, 34);
      c1 = $urandom_range(0, 34); c2 = (blk == 7) ? c1 : $urandom_range(0, 34);
      lam = (blk == 8) ? 0 : $urandom_range(0, 2000);
      c = '{log2_size: 3'(log2i(n)), threshold: 5'd0, cu_x: 6'(x), cu_y: 6'(y),
            new_ctu: (blk % 5 == 0), cand0: 6'(c0), cand1: 6'(c1), cand2: 6'(c2), lambda: 16'(lam)};
      if (c.new_ctu)
        for (int i = 0; i < 64; i++) for (int j = 0; j < 64; j++) orig[i][j] = $urandom_range(0, 255);
      // predictions: random, and one mode made equal to the original to create a clear winner
      for (int m = 0; m < 35; m++)
        for (int i = 0; i < n * n; i++) pred[m][i] = $urandom_range(0, 255);
      if (blk == 9 || blk == 10) begin
        // two identical best modes: the lower one must win
        for (int i = 0; i < n * n; i++) begin pred[20][i] = 0; pred[21][i] = 0; end
      end
      for (int m = 0; m < 35; m++) pos[m] = 0;
      beats = 0; nwr = 0; irq_cyc = -1;
      cfg_in = c; cfg_valid = 1'b1;
      @(negedge clk);
      while (!cfg_ready) @(negedge clk);
      @(posedge clk);
      #1 cfg_valid = 1'b0;
      if (c.new_ctu) begin
        for (int w = 0; w < 1024; w++) begin
          orig_data = {8'(orig[w / 16][(w % 16) * 4 + 3]), 8'(orig[w / 16][(w % 16) * 4 + 2]),
                       8'(orig[w / 16][(w % 16) * 4 + 1]), 8'(orig[w / 16][(w % 16) * 4])};
          orig_valid = 1'b1;
          @(negedge clk);
          while (!orig_ready) @(negedge clk);
          @(posedge clk);
          #1 orig_valid = 1'b0;
        end
      end
      lane_on = '1;
      while (beats < n * n / 2) @(posedge clk);
      #1 lane_on = '0;
      while (irq_cyc < 0) @(posedge clk);
      // expected costs
      for (int m = 0; m < 35; m++) begin
        cost[m] = ratecost(m, c0, c1, c2) * lam;
        for (int i = 0; i < n * n; i++) begin
          int kk, jj;
          kk = i / n; jj = i % n;
          o = (m >= 2 && m <= 17) ? orig[y + jj][x + kk] : orig[y + kk][x + jj];
          p = pred[m][i];
          cost[m] += (o > p) ? o - p : p - o;
        end
      end
      best = 0;
      for (int m = 1; m < 35; m++) if (cost[m] < cost[best]) best = m;
      r = ratecost(best, c0, c1, c2);
      check(nwr == 3, $sformatf("blk %0d: %0d result writes", blk, nwr));
      check(wr_addr[0] == best && wr_data[0] == cost[best],
            $sformatf("blk %0d: best write @%0d=%0d, expected @%0d=%0d", blk, wr_addr[0], wr_data[0], best, cost[best]));
      check(wr_addr[1] == 35 && wr_data[1] == best, $sformatf("blk %0d: mode word %0d exp %0d", blk, wr_data[1], best));
      check(wr_addr[2] == 36 && wr_data[2] == r, $sformatf("blk %0d: ratecost word %0d exp %0d", blk, wr_data[2], r));
      check(irq_cyc - last_cyc <= 6, $sformatf("blk %0d: irq %0d cycles after last beat", blk, irq_cyc - last_cyc));
      if (!randv) check(last_cyc - first_cyc + 1 == n * n / 2, $sformatf("blk %0d: %0d cycles for %0d beats", blk, last_cyc - first_cyc + 1, n * n / 2));
      @(posedge clk); #1;
    end
    check(stalls > 0, "no stall happened");
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
