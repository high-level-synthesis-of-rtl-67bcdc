// tb_ip_acc: end-to-end testbench of the intra prediction accelerator ip_acc.
//
// For a sequence of blocks of all four sizes, at random positions of random original CTUs, it
// sends the three configuration words, the CTU when new, and the unfiltered references, then
// compares the three result words with the full mode decision of the model in intra_ref_pkg.
// Each newly loaded CTU gets, at the block position, the prediction of a target mode (26, planar,
// DC, 18, 2, 34, ... in turn) plus small noise, so that the lanes have to produce winning costs,
// not only losing ones. It counts the mechanisms of the design and fails if one never happened:
// a new CTU load, a reused CTU, filtered and unfiltered reference sets, reads of projected
// samples by negative-angle modes, lane stalls in SAD PARALLEL, and a block with no candidate
// modes. The block time from the first configuration word to irq (CTU already loaded) is
// reported and checked to be within 10% of the cycle counts the document reports for the final
// accelerator: 40, 68, 172 and 572 cycles for 4x4 to 32x32.
`timescale 1ns/1ps
module tb_ip_acc;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  // target modes planted in the newly loaded CTUs, in turn
  localparam int TARGETS [14] = '{10, 26, 0, 1, 18, 2, 34, 14, 22, 6, 30, 11, 25, 17};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_valid, cfg_ready, unf1_valid, unf1_ready, unf2_valid, unf2_ready;
  logic        orig_valid, orig_ready, res_we, irq, stall;
  logic [31:0] cfg_data, orig_data;
  pixel_t      unf1_data, unf2_data;
  logic [5:0]  res_addr;
  logic [COST_W-1:0] res_data;

  ip_acc dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_newctu = 0, n_reuse = 0, n_filt = 0, n_unfilt = 0, n_nocand = 0, n_proj = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (stall) n_stall++;
  always @(posedge clk) if (dut.g_mode[18].g_neg.u_get.proj_rd &&
                            dut.g_mode[18].g_neg.u_get.out_ready) n_proj++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_cfg(input logic [31:0] w);
    cfg_data = w; cfg_valid = 1'b1;
    @(negedge clk);
    while (!cfg_ready) @(negedge clk);
    @(posedge clk);
    #1 cfg_valid = 1'b0;
  endtask

  ref_arr_t a, l;
  ctu_t orig;

  task automatic feed_ref(input int which, input int n);
    for (int i = 0; i <= 2 * n; i++) begin
      if (which == 1) begin unf1_data = pixel_t'(a[i]); unf1_valid = 1'b1; end
      else            begin unf2_data = pixel_t'(l[i]); unf2_valid = 1'b1; end
      @(negedge clk);
      while (!((which == 1) ? unf1_ready : unf2_ready)) @(negedge clk);
      @(posedge clk);
      #1;
      if (which == 1) unf1_valid = 1'b0; else unf2_valid = 1'b0;
    end
  endtask

  task automatic feed_orig();
    for (int w = 0; w < 1024; w++) begin
      orig_data = {8'(orig[w / 16][(w % 16) * 4 + 3]), 8'(orig[w / 16][(w % 16) * 4 + 2]),
                   8'(orig[w / 16][(w % 16) * 4 + 1]), 8'(orig[w / 16][(w % 16) * 4])};
      orig_valid = 1'b1;
      @(negedge clk);
      while (!orig_ready) @(negedge clk);
      @(posedge clk);
      #1 orig_valid = 1'b0;
    end
  endtask

  int wr_addr [3], wr_data [3], nwr;
  bit got_irq;
  int irq_cyc;
  always @(negedge clk) if (rst_n && res_we && nwr < 3) begin
    wr_addr[nwr] = int'(res_addr); wr_data[nwr] = int'(res_data); nwr++;
  end
  always @(negedge clk) if (irq) begin got_irq = 1; irq_cyc = cyc; end

  initial begin
    int n, thr, x, y, c0, c1, c2, lam, best, bcost, brc, t0, nblocks, tgt, n_tgt;
    bit newc;
    cfg_valid = 0; cfg_data = 0; unf1_valid = 0; unf2_valid = 0; unf1_data = 0; unf2_data = 0;
    orig_valid = 0; orig_data = 0;
    nblocks = 12; n_tgt = 0;
    if ($test$plusargs("long")) nblocks = 40;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int blk = 0; blk < nblocks; blk++) begin
      n = 4 << (blk % 4);
      newc = (blk % 3 == 0);
      thr = hevc_threshold(n);
      x = $urandom_range(0, (64 / n) - 1) * n;
      y = $urandom_range(0, (64 / n) - 1) * n;
      c0 = (blk == 3) ? 63 : $urandom_range(0, 34);
      c1 = $urandom_range(0, 34); c2 = $urandom_range(0, 34);
      lam = $urandom_range(0, 300);
      if (newc) begin
        int g;
        g = $urandom_range(0, 3);
        // smooth gradient picture with noise, so that directions differ in cost
        for (int r = 0; r < 64; r++)
          for (int c = 0; c < 64; c++)
            orig[r][c] = clip8((g * r + (3 - g) * c) * 2 + 20 + int'($urandom_range(0, 8)));
        n_newctu++;
      end else n_reuse++;
      for (int i = 0; i < 65; i++) begin
        a[i] = clip8(orig[y][x] + int'($urandom_range(0, 40)) - 20 + i);
        l[i] = clip8(orig[y][x] + int'($urandom_range(0, 40)) - 20 + 2 * i);
      end
      l[0] = a[0];
      if (newc) begin
        // plant the prediction of a target mode (plus small noise) at the block position, so
        // that each lane in turn has to produce the winning cost
        ref_arr_t fa, fl;
        blk_t     p;
        tgt = TARGETS[n_newctu % $size(TARGETS)];
        smooth(n, a, l, fa, fl);
        if (filtered_for(tgt, n, thr)) predict(tgt, n, fa, fl, p);
        else                            predict(tgt, n, a, l, p);
        for (int r = 0; r < n; r++)
          for (int c = 0; c < n; c++) orig[y + r][x + c] = clip8(p[r][c] + int'($urandom_range(0, 2)));
      end
      for (int m = 0; m < 35; m++) if (filtered_for(m, n, thr)) n_filt++; else n_unfilt++;
      if (c0 == 63) n_nocand++;
      nwr = 0; got_irq = 0;
      t0 = cyc;
      put_cfg({11'd0, newc, 6'(y), 6'(x), 5'(thr), 3'(log2i(n))});
      put_cfg({14'd0, 6'(c2), 6'(c1), 6'(c0)});
      put_cfg({16'd0, 16'(lam)});
      fork
        if (newc) feed_orig();
        feed_ref(1, n);
        feed_ref(2, n);
      join
      while (!got_irq) @(posedge clk);
      decide(n, a, l, thr, orig, x, y, c0, c1, c2, lam, best, bcost, brc);
      check(nwr == 3, "three result writes");
      check(wr_addr[0] == best && wr_data[0] == bcost,
            $sformatf("blk %0d size %0d: best @%0d=%0d, expected @%0d=%0d", blk, n, wr_addr[0], wr_data[0], best, bcost));
      check(wr_addr[1] == 35 && wr_data[1] == best, $sformatf("blk %0d: mode word", blk));
      check(wr_addr[2] == 36 && wr_data[2] == brc, $sformatf("blk %0d: rate cost word", blk));
      if (newc && best == tgt) n_tgt++;
      if (!newc) begin   // Accelerator VII block times: 40, 68, 172, 572 cycles
        int ref_cyc;
        ref_cyc = (n == 4) ? 40 : (n == 8) ? 68 : (n == 16) ? 172 : 572;
        $display("%0dx%0d block: %0d cycles from first configuration word to irq (document %0d)",
                 n, n, irq_cyc - t0, ref_cyc);
        check((irq_cyc - t0) * 10 <= ref_cyc * 11, $sformatf("%0dx%0d block time", n, n));
      end
      @(posedge clk); #1;
    end
    $display("new CTUs %0d, reused CTUs %0d, filtered lanes %0d, unfiltered lanes %0d, beats using projected samples %0d, stall cycles %0d, no-candidate blocks %0d",
             n_newctu, n_reuse, n_filt, n_unfilt, n_proj, n_stall, n_nocand);
    $display("planted target mode won in %0d of %0d new-CTU blocks", n_tgt, n_newctu);
    check(n_newctu > 0, "new CTU load");
    check(n_reuse > 0, "CTU reuse");
    check(n_filt > 0, "filtered references");
    check(n_unfilt > 0, "unfiltered references");
    check(n_proj > 0, "negative-angle projection");
    check(n_stall > 0, "SAD PARALLEL stall");
    check(n_nocand > 0, "no-candidate block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
