// tb_ip_ctrl: self-checking testbench for ip_ctrl.
//
// Sends random block configurations (sizes 4..32, thresholds 0..7) and random unfiltered
// references on the two sample channels with random gaps, holds the 35 GET-side ready lines
// with random back-pressure, and checks: the decoded configuration offered to SAD PARALLEL, the
// header beat, and for every mode lane every reference beat against the [1 2 1] filter and the
// filtered/unfiltered choice of the HEVC model in intra_ref_pkg. Samples and broadcast overlap,
// so feeding and collecting run in parallel; with no back-pressure the last reference beat must
// leave at most 2 cycles after the last sample arrives.
`timescale 1ns/1ps
module tb_ip_ctrl;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_valid, cfg_ready;
  logic [31:0] cfg_data;
  logic        unf1_valid, unf1_ready, unf2_valid, unf2_ready;
  pixel_t      unf1_data, unf2_data;
  logic        sad_cfg_valid, sad_cfg_ready;
  blk_cfg_t    sad_cfg;
  logic        ref_valid;
  logic      [NUM_MODES-1:0] ref_ready;
  ref_word_t [NUM_MODES-1:0] ref_data;

  ip_ctrl dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bp;
  // GET-side readiness: random when bp is set
  always @(posedge clk) ref_ready <= bp ? NUM_MODES'({$urandom, $urandom}) | ({NUM_MODES{$urandom_range(0,1) == 1}}) : '1;

  task automatic put_cfg(input logic [31:0] w);
    cfg_data = w; cfg_valid = 1'b1;
    @(negedge clk);
    while (!cfg_ready) @(negedge clk);
    @(posedge clk);
    #1 cfg_valid = 1'b0;
  endtask

  int a [65], l [65];
  int nblk, last_in;

  // reference channels: each feeds its 2N+1 samples with random gaps
  task automatic feed(input int which, input int n);
    for (int i = 0; i <= 2 * n; i++) begin
      if (which == 1) begin unf1_data = pixel_t'(a[i]); unf1_valid = 1'b1; end
      else            begin unf2_data = pixel_t'(l[i]); unf2_valid = 1'b1; end
      @(negedge clk);
      while (!((which == 1) ? unf1_ready : unf2_ready)) @(negedge clk);
      @(posedge clk);
      #1;
      last_in = cyc;
      if (which == 1) unf1_valid = 1'b0; else unf2_valid = 1'b0;
      if (bp) repeat ($urandom_range(0, 1)) @(posedge clk);
      #0;
    end
  endtask

  initial begin
    int n, thr, c0, c1, c2, lam, x, y, nb, last_beat_cyc;
    int fa [65], fl [65];
    ref_word_t w;
    bit newc;
    cfg_valid = 0; cfg_data = 0; unf1_valid = 0; unf2_valid = 0; unf1_data = 0; unf2_data = 0;
    sad_cfg_ready = 1'b0; bp = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (nblk = 0; nblk < 16; nblk++) begin
      n = 4 << (nblk % 4);
      bp = nblk >= 4;
      thr = $urandom_range(0, 7);
      c0 = (nblk == 5) ? 63 : $urandom_range(0, 34);
      c1 = $urandom_range(0, 34); c2 = $urandom_range(0, 34);
      lam = $urandom_range(0, 65535);
      x = $urandom_range(0, 63); y = $urandom_range(0, 63); newc = nblk[0];
      for (int i = 0; i < 65; i++) begin a[i] = $urandom_range(0, 255); l[i] = $urandom_range(0, 255); end
      l[0] = a[0];
      put_cfg({11'd0, newc, 6'(y), 6'(x), 5'(thr), 3'(log2i(n))});
      put_cfg({14'd0, 6'(c2), 6'(c1), 6'(c0)});
      put_cfg({16'd0, 16'(lam)});
      smooth(n, a, l, fa, fl);
      nb = 0;
      fork
        begin
          // SAD PARALLEL side takes the configuration
          @(negedge clk);
          check(sad_cfg_valid, "sad cfg valid");
          check(sad_cfg.log2_size == 3'(log2i(n)) && sad_cfg.threshold == 5'(thr) &&
                sad_cfg.cu_x == 6'(x) && sad_cfg.cu_y == 6'(y) && sad_cfg.new_ctu == newc &&
                sad_cfg.cand0 == 6'(c0) && sad_cfg.cand1 == 6'(c1) && sad_cfg.cand2 == 6'(c2) &&
                sad_cfg.lambda == 16'(lam), "sad cfg fields");
          sad_cfg_ready = 1'b1;
          @(posedge clk); #1 sad_cfg_ready = 1'b0;
        end
        feed(1, n);
        feed(2, n);
        begin
          // collect the header and the N+1 reference beats
          while (nb < n + 2) begin
            @(negedge clk);
            if (ref_valid && &ref_ready) begin
              last_beat_cyc = cyc;
              for (int m = 0; m < NUM_MODES; m++) begin
                w = ref_data[m];
                if (nb == 0) check(w[2:0] == 3'(log2i(n)), $sformatf("header mode %0d", m));
                else begin
                  int i0, ea0, el0, ea1, el1;
                  bit f;
                  i0  = 2 * (nb - 1);
                  f   = filtered_for(m, n, thr);
                  ea0 = f ? fa[i0] : a[i0];
                  el0 = f ? fl[i0] : l[i0];
                  ea1 = (i0 + 1 <= 2 * n) ? (f ? fa[i0 + 1] : a[i0 + 1]) : 0;
                  el1 = (i0 + 1 <= 2 * n) ? (f ? fl[i0 + 1] : l[i0 + 1]) : 0;
                  check(int'(w.above0) == ea0 && int'(w.left0) == el0,
                        $sformatf("blk %0d mode %0d idx %0d: %0d/%0d exp %0d/%0d", nblk, m, i0, w.above0, w.left0, ea0, el0));
                  if (i0 + 1 <= 2 * n)
                    check(int'(w.above1) == ea1 && int'(w.left1) == el1,
                          $sformatf("blk %0d mode %0d idx %0d", nblk, m, i0 + 1));
                end
              end
              nb++;
            end
          end
        end
      join
      if (!bp) check(last_beat_cyc - last_in <= 2,
                     $sformatf("last beat %0d cycles after the last sample", last_beat_cyc - last_in));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
