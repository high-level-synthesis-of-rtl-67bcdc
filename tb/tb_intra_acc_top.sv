// tb_intra_acc_top: end-to-end testbench of the whole FPGA-side system, at its default sizes.
//
// Acts as the host: places original CTUs and reference samples in three SDRAM port models,
// programs the three DMAs, writes the configuration words over AXI4-Lite, waits for irq and
// reads the three result words back from the result memory. Results are compared with the full
// mode decision of the model in intra_ref_pkg. Twelve blocks of random size, position,
// candidates and lambda come first; then the worst-case search of one whole CTU: every 32x32,
// 16x16, 8x8 and 4x4 block (340 blocks) in the search order, each block's references taken from
// the original picture around it.
// Mechanisms counted (a failure if one never happens): new CTU load, CTU reuse, filtered and
// unfiltered reference lanes, negative-angle projection, SAD PARALLEL stalls, blocks without
// candidates, memory wait states seen by the DMAs. Cycles from the first configuration word to
// irq are reported per block size.
`timescale 1ns/1ps
module tb_intra_acc_top;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              csr_we;
  logic [2:0]        csr_addr;
  logic [31:0]       csr_wdata;
  logic [2:0]        dma_busy;
  logic [2:0]        mem_read;
  logic [2:0][31:0]  mem_address;
  logic [2:0]        mem_waitrequest;
  logic [2:0][63:0]  mem_readdata;
  logic [2:0]        mem_readdatavalid;
  logic              s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic [31:0]       s_awaddr, s_wdata;
  logic [3:0]        s_wstrb;
  logic [1:0]        s_bresp;
  logic [5:0]        res_raddr;
  logic [31:0]       res_rdata;
  logic              irq, stall;

  intra_acc_top dut (.*);

  for (genvar g = 0; g < 3; g++) begin : g_mem
    mem_port_model u_mem (
      .clk, .mem_read(mem_read[g]), .mem_address(mem_address[g]),
      .mem_waitrequest(mem_waitrequest[g]), .mem_readdata(mem_readdata[g]),
      .mem_readdatavalid(mem_readdatavalid[g]));
  end

  int checks = 0, failures = 0, cyc = 0;
  int n_stall = 0, n_newctu = 0, n_reuse = 0, n_filt = 0, n_unfilt = 0, n_nocand = 0;
  int n_proj = 0, n_wait = 0;
  int size_cyc [6], size_cnt [6];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (stall) n_stall++;
  always @(negedge clk) if (|(mem_read & mem_waitrequest)) n_wait++;
  always @(posedge clk) if (dut.u_ip_acc.g_mode[18].g_neg.u_get.proj_rd &&
                            dut.u_ip_acc.g_mode[18].g_neg.u_get.out_ready) n_proj++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host operations ----
  task automatic csr(input int a, input int d);
    csr_we = 1; csr_addr = 3'(a); csr_wdata = 32'(d);
    @(posedge clk); #1 csr_we = 0;
  endtask

  task automatic axi_write(input logic [31:0] d);
    s_awaddr = 32'h0; s_wdata = d; s_wstrb = 4'hf; s_awvalid = 1; s_wvalid = 1;
    @(negedge clk);
    while (s_awvalid || s_wvalid) begin
      bit aw_hs, w_hs;
      aw_hs = s_awvalid && s_awready;
      w_hs  = s_wvalid && s_wready;
      @(posedge clk); #1;
      if (aw_hs) s_awvalid = 0;
      if (w_hs)  s_wvalid = 0;
      if (s_awvalid || s_wvalid) @(negedge clk);
    end
    s_bready = 1;
    @(negedge clk);
    while (!s_bvalid) @(negedge clk);
    @(posedge clk); #1 s_bready = 0;
  endtask

  task automatic read_result(input int a, output int d);
    res_raddr = 6'(a);
    @(posedge clk); #1 d = int'(res_rdata);
  endtask

  ctu_t orig;
  int   irq_cyc, ctu_t0, acc_sum;
  bit   got_irq;
  always @(negedge clk) if (irq) begin got_irq = 1; irq_cyc = cyc; end

  // One block through the whole system.
  task automatic run_block(input int n, input int x, input int y, input bit newc,
                           input int c0, input int c1, input int c2, input int lam);
    ref_arr_t a, l;
    int thr, best, bcost, brc, r0, r1, r2, t0, ab, lb;
    thr = hevc_threshold(n);
    // references: reconstructed-looking samples taken from the picture around the block
    for (int i = 0; i <= 2 * n; i++) begin
      int xx, yy;
      xx = x - 1 + i; yy = y - 1;
      a[i] = clip8(((yy >= 0 && xx < 64) ? orig[yy][xx] : orig[y][x]) + int'($urandom_range(0, 6)) - 3);
      xx = x - 1; yy = y - 1 + i;
      l[i] = clip8(((xx >= 0 && yy < 64) ? orig[yy][xx] : orig[y][x]) + int'($urandom_range(0, 6)) - 3);
    end
    l[0] = a[0];
    for (int m = 0; m < 35; m++) if (filtered_for(m, n, thr)) n_filt++; else n_unfilt++;
    if (c0 == 63) n_nocand++;
    if (newc) n_newctu++; else n_reuse++;
    ab = 8 * $urandom_range(0, 900);
    lb = 8 * $urandom_range(0, 900);
    for (int i = 0; i <= 2 * n; i++) begin
      g_mem[1].u_mem.mem[ab + i] = 8'(a[i]);
      g_mem[2].u_mem.mem[lb + i] = 8'(l[i]);
    end
    if (newc) begin
      for (int r = 0; r < 64; r++)
        for (int c = 0; c < 64; c++) g_mem[0].u_mem.mem[r * 64 + c] = 8'(orig[r][c]);
      csr(0, 0); csr(1, 4096);
    end
    csr(2, ab); csr(3, 2 * n + 1);
    csr(4, lb); csr(5, 2 * n + 1);
    got_irq = 0;
    t0 = cyc;
    axi_write({11'd0, newc, 6'(y), 6'(x), 5'(thr), 3'(log2i(n))});
    axi_write({14'd0, 6'(c2), 6'(c1), 6'(c0)});
    axi_write({16'd0, 16'(lam)});
    while (!got_irq) @(posedge clk);
    if (!newc) begin   // block time without the CTU load
      size_cyc[log2i(n)] += irq_cyc - t0;
      size_cnt[log2i(n)]++;
    end
    @(posedge clk); #1;
    decide(n, a, l, thr, orig, x, y, c0, c1, c2, lam, best, bcost, brc);
    read_result(35, r1);
    read_result(36, r2);
    read_result(r1 % 64, r0);
    check(r1 == best && r0 == bcost && r2 == brc,
          $sformatf("block %0dx%0d at (%0d,%0d): mode %0d cost %0d rc %0d, expected %0d %0d %0d",
                    n, n, x, y, r1, r0, r2, best, bcost, brc));
  endtask

  task automatic new_picture(input int g);
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++)
        orig[r][c] = clip8((g * r + (3 - g) * c) * 2 + 20 + ((r / 8 + c / 8) % 2) * 30 +
                           int'($urandom_range(0, 8)));
  endtask

  initial begin
    csr_we = 0; csr_addr = 0; csr_wdata = 0; s_awvalid = 0; s_wvalid = 0; s_bready = 0;
    s_awaddr = 0; s_wdata = 0; s_wstrb = 0; res_raddr = 0;
    for (int i = 0; i < 6; i++) begin size_cyc[i] = 0; size_cnt[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    begin
      for (int blk = 0; blk < 12; blk++) begin
        int n;
        n = 4 << (blk % 4);
        if (blk % 6 == 0) new_picture($urandom_range(0, 3));
        run_block(n, $urandom_range(0, 64 / n - 1) * n, $urandom_range(0, 64 / n - 1) * n,
                  blk % 6 == 0, (blk == 5) ? 63 : $urandom_range(0, 34),
                  $urandom_range(0, 34), $urandom_range(0, 34), $urandom_range(0, 400));
      end
    end
    for (int i = 0; i < 6; i++) begin size_cyc[i] = 0; size_cnt[i] = 0; end
    ctu_t0 = cyc;
    begin
      // worst case search order of one CTU: each 32x32, then its 16x16s, 8x8s and 4x4s (z-order)
      new_picture(1);
      for (int q32 = 0; q32 < 4; q32++) begin
        int x32, y32;
        x32 = (q32 % 2) * 32; y32 = (q32 / 2) * 32;
        run_block(32, x32, y32, q32 == 0, $urandom_range(0, 34), 0, 1, 100);
        for (int q16 = 0; q16 < 4; q16++) begin
          int x16, y16;
          x16 = x32 + (q16 % 2) * 16; y16 = y32 + (q16 / 2) * 16;
          run_block(16, x16, y16, 1'b0, $urandom_range(0, 34), 0, 1, 100);
          for (int q8 = 0; q8 < 4; q8++) begin
            int x8, y8;
            x8 = x16 + (q8 % 2) * 8; y8 = y16 + (q8 / 2) * 8;
            run_block(8, x8, y8, 1'b0, (q8 == 3) ? 63 : $urandom_range(0, 34), 0, 1, 100);
            for (int q4 = 0; q4 < 4; q4++)
              run_block(4, x8 + (q4 % 2) * 4, y8 + (q4 / 2) * 4, 1'b0, $urandom_range(0, 34), 0, 1, 100);
          end
        end
      end
      check(size_cnt[2] == 256 && size_cnt[3] == 64 && size_cnt[4] == 16 && size_cnt[5] == 3,
            "340 blocks of one CTU searched");
    end
    acc_sum = 0;
    for (int s = 2; s <= 5; s++) acc_sum += size_cyc[s];
    // one 32x32 block (the CTU load) is left out of size_cyc; count it at the 32x32 average
    acc_sum += size_cyc[5] / size_cnt[5];
    $display("whole CTU search: %0d cycles with host steps, %0d cycles configuration to irq", cyc - ctu_t0, acc_sum);
    $display("Full HD worst case at 125 MHz (506 CTUs per frame): %0d.%0d frames per second",
             125000000 / (acc_sum * 506), (1250000000 / (acc_sum * 506)) % 10);
    for (int s = 2; s <= 5; s++)
      if (size_cnt[s] > 0)
        $display("%0dx%0d: %0d blocks, %0d cycles per block from first configuration word to irq",
                 1 << s, 1 << s, size_cnt[s], size_cyc[s] / size_cnt[s]);
    $display("new CTUs %0d, reused %0d, filtered lanes %0d, unfiltered lanes %0d, beats using projected samples %0d, stall cycles %0d, no-candidate blocks %0d, memory wait cycles %0d",
             n_newctu, n_reuse, n_filt, n_unfilt, n_proj, n_stall, n_nocand, n_wait);
    check(n_newctu > 0, "new CTU load");
    check(n_reuse > 0, "CTU reuse");
    check(n_filt > 0, "filtered references");
    check(n_unfilt > 0, "unfiltered references");
    check(n_proj > 0, "negative-angle projection");
    check(n_stall > 0, "SAD PARALLEL stall");
    check(n_nocand > 0, "no-candidate block");
    check(n_wait > 0, "memory wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
