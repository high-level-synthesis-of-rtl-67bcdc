// tb_get_neg: self-checking testbench for get_neg (angular prediction, negative angles).
//
// Drives the same header and reference beats into one instance per mode (11, 14, 17, 18, 19, 22, 25), for block
// sizes 4, 8, 16 and 32 and random reference samples, and compares every output pixel with the
// HEVC reference model in intra_ref_pkg. The first pass of each size keeps out_ready high and
// checks the timing: N*N/2 output beats back to back, starting at most 2 cycles after the
// last reference beat; the later passes apply random back-pressure.
`timescale 1ns/1ps
module tb_get_neg;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  localparam int NI = 7;
  localparam int MODES [NI] = '{11, 14, 17, 18, 19, 22, 25};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       ref_valid;
  ref_word_t  ref_data;
  logic [NI-1:0] ref_ready, out_valid, out_ready;
  pred_word_t    out_data [NI];

  int checks = 0, failures = 0;
  int exp_px [NI][1024];
  int got    [NI];
  int first_cyc [NI], last_cyc [NI];
  int cyc = 0;
  bit bp;   // random back-pressure on
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < NI; g++) begin : g_dut
    get_neg #(.MODE(MODES[g])) u_dut (
      .clk, .rst_n, .ref_valid, .ref_ready(ref_ready[g]), .ref_data,
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(out_data[g]));
    always @(posedge clk) begin
      out_ready[g] <= bp ? 1'($urandom_range(0, 3) != 0) : 1'b1;
    end
    // a beat seen at the falling edge is taken at the next rising edge
    always @(negedge clk) begin
      if (rst_n && out_valid[g] && out_ready[g]) begin
        if (got[g] == 0) first_cyc[g] = cyc;
        last_cyc[g] = cyc;
        checks += 2;
        if (int'(out_data[g].p0) != exp_px[g][got[g]]) begin
          failures++;
          if (failures < 10) $display("mode %0d pixel %0d: got %0d expected %0d", MODES[g], got[g], out_data[g].p0, exp_px[g][got[g]]);
        end
        if (int'(out_data[g].p1) != exp_px[g][got[g] + 1]) begin
          failures++;
          if (failures < 10) $display("mode %0d pixel %0d: got %0d expected %0d", MODES[g], got[g] + 1, out_data[g].p1, exp_px[g][got[g] + 1]);
        end
        got[g] = got[g] + 2;
      end
    end
  end

  task automatic send(input ref_word_t w);
    // inputs change 1 ns after a rising edge; readiness is sampled at the falling edge
    ref_data  = w;
    ref_valid = 1'b1;
    @(negedge clk);
    while (!(&ref_ready)) @(negedge clk);
    @(posedge clk);
    #1 ref_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_arr_t a, l;
    blk_t p;
    int n, ref_end;
    bit all_done;
    ref_valid = 1'b0;
    ref_data  = '0;
    bp        = 1'b0;
    for (int g = 0; g < NI; g++) got[g] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    for (int pass = 0; pass < 12; pass++) begin
      n  = 4 << (pass % 4);
      bp = (pass >= 4);
      for (int i = 0; i < 65; i++) begin
        a[i] = (pass == 4) ? 255 : ((pass == 5) ? 0 : int'($urandom_range(0, 255)));
        l[i] = (pass == 4) ? 0 : int'($urandom_range(0, 255));
      end
      for (int g = 0; g < NI; g++) begin
        predict(MODES[g], n, a, l, p);
        for (int i = 0; i < n * n; i++) exp_px[g][i] = stream_pixel(MODES[g], n, p, i);
        got[g] = 0;
      end
      send(ref_word_t'(32'(log2i(n))));
      for (int b = 0; b <= n; b++)
        send('{left1: pixel_t'((2*b+1 <= 2*n) ? l[2*b+1] : 0), above1: pixel_t'((2*b+1 <= 2*n) ? a[2*b+1] : 0),
               left0: pixel_t'(l[2*b]), above0: pixel_t'(a[2*b])});
      ref_end = cyc;
      do begin
        @(posedge clk);
        all_done = 1'b1;
        for (int g = 0; g < NI; g++) if (got[g] < n * n) all_done = 1'b0;
      end while (!all_done);
      if (!bp) begin
        for (int g = 0; g < NI; g++) begin
          checks++;
          if (last_cyc[g] - first_cyc[g] + 1 != n * n / 2) begin
            failures++;
            $display("mode %0d size %0d: %0d cycles for %0d beats", MODES[g], n, last_cyc[g] - first_cyc[g] + 1, n * n / 2);
          end
          checks++;
          if (first_cyc[g] - ref_end > 2) begin
            failures++;
            $display("mode %0d size %0d: first beat %0d cycles after the references", MODES[g], n, first_cyc[g] - ref_end);
          end
        end
      end
      repeat (3) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
