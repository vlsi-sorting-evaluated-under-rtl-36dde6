// tb_vlsi_sort_top: end-to-end test of the whole sorter at its default size.
//
// Shifts 2^M * NS/2 random keys in bit-serially, Q at a time, lets the design
// rearrange, load and sort them, reads the result and compares it with the
// keys sorted here. Eight rounds are run, some with many equal keys, with
// the BBB board and with the TWB board; a producer shifts keys in as fast as
// the design accepts them while a consumer reads results, so input of one
// round overlaps the sort of the previous one. Checks also: SEMA's clock
// count, the number and length of the BBB passes, the number of TWB merges
// and passes, and that each mechanism happened at least once: SEMA
// transforms, block words into both staging memories and moved into M00 and
// M01, input overlapping a sort, ascending and descending pair sorts, result
// writes into both output memories, swaps of input and output memories, TWB
// sort-splits, TWB source switches and rounds on each board.
module tb_vlsi_sort_top;
  import vsort_pkg::*;
  localparam int K  = 16;
  localparam int NS = 4;
  localparam int M  = 3;
  localparam int Q  = 4;
  localparam int N  = (1 << M) * NS / 2;
  localparam int TPART  = (1 << (M - 1)) * 2 * Q + NS * mc_latency(Q);
  localparam int NPARTS = (M * M + M) / 2;
  localparam int TSEMA  = 2 + Q + K - 2;

  logic clk = 0, rst_n = 0;
  logic ser_ready, ser_valid = 0, sorting, out_pop = 0, out_valid;
  logic [Q-1:0] ser_bits = '0;
  logic [NS/2-1:0][Q-1:0] out_col;
  logic sema_done, part_done, cur_q, wr_r, s_desc;
  logic alg_twb = 0, merge_done, pass_done, switched;
  logic [7:0] cur_j, cur_k, cur_p;
  int checks = 0, failures = 0;

  vlsi_sort_top dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters and per-pass checks, sampled at the clock edge
  int n_sema = 0, n_ld0 = 0, n_ld1 = 0, n_asc = 0, n_desc = 0, n_w0 = 0, n_w1 = 0;
  int n_swap = 0, n_pass = 0, t_pass = 0, sema_clk = 0;
  logic q_d = 0;
  int n_tsort = 0, n_tswitch = 0, n_tmerge = 0, n_tpass = 0, n_rb = 0, n_rt = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_twb.s_in_head) n_tsort++;
      if (switched) n_tswitch++;
      if (merge_done) n_tmerge++;
      if (pass_done) n_tpass++;
      if (dut.u_sema.busy) sema_clk++;
      if (sema_done) begin
        n_sema++;
        checks++;
        if (sema_clk != TSEMA) begin failures++; $display("SEMA took %0d clocks", sema_clk); end
        sema_clk = 0;
      end
      if (dut.load_valid) begin if (dut.load_sel) n_ld1++; else n_ld0++; end
      if (dut.u_board.s_in_head) begin if (s_desc) n_desc++; else n_asc++; end
      if (dut.u_board.wr_push) begin if (wr_r) n_w1++; else n_w0++; end
      if (cur_q != q_d) n_swap++;
      q_d = cur_q;
      if (dut.u_board.u_ctrl.state == 1 && t_pass == 0) t_pass = 1;
      else if (t_pass > 0) t_pass++;
      if (part_done) begin
        n_pass++;
        checks++;
        if (t_pass != TPART) begin failures++; $display("pass took %0d clocks, expected %0d", t_pass, TPART); end
        t_pass = 0;
      end
      if (!sorting) t_pass = 0;
    end
  end

  // rounds: keys, board choice and key range of each
  localparam int NR = 8;
  logic [K-1:0] keys [NR][N];
  bit           r_twb [NR];
  int           n_overlap = 0, n_st0 = 0, n_st1 = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (ser_valid && ser_ready && (sorting || out_valid)) n_overlap++;
      if (dut.st_push[0]) n_st0++;
      if (dut.st_push[1]) n_st1++;
    end
  end

  // producer: shifts the rounds in as fast as the design takes them
  task automatic produce();
    for (int r = 0; r < NR; r++) begin
      for (int g = 0; g < N / Q; g++) begin
        #1;
        while (!ser_ready) begin @(posedge clk); #1; end
        for (int b = 0; b < K; b++) begin
          ser_valid <= 1;
          alg_twb   <= r_twb[r];
          for (int y = 0; y < Q; y++) ser_bits[y] <= keys[r][g * Q + y][K - 1 - b];
          @(posedge clk);
        end
        ser_valid <= 0;
      end
    end
  endtask

  // consumer: reads each round's result and checks it
  task automatic consume();
    for (int r = 0; r < NR; r++) begin
      logic [K-1:0] got [N];
      logic [K-1:0] srt [N];
      int p0, m0, tp0;
      p0 = n_pass; m0 = n_tmerge; tp0 = n_tpass;
      #1;
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (n_pass - p0 != (r_twb[r] ? 0 : NPARTS)) begin failures++; $display("round %0d: %0d BBB passes", r, n_pass - p0); end
      checks++;
      if (n_tmerge - m0 != (r_twb[r] ? (1 << M) - 1 : 0) || n_tpass - tp0 != (r_twb[r] ? M : 0)) begin
        failures++; $display("round %0d: %0d TWB merges, %0d TWB passes", r, n_tmerge - m0, n_tpass - tp0);
      end
      if (r_twb[r]) n_rt++; else n_rb++;
      for (int blk = 0; blk < N / (NS / 2); blk++) begin
        for (int t = 0; t < Q; t++) begin
          checks++;
          if (!out_valid) begin failures++; $display("result word missing"); end
          for (int n = 0; n < NS / 2; n++)
            for (int c = 0; c < Q; c++) got[blk * NS / 2 + n][(Q - 1 - t) * Q + c] = out_col[n][c];
          out_pop <= 1;
          @(posedge clk);
          out_pop <= 0;
          #1;
        end
      end
      srt = keys[r];
      srt.sort();
      for (int n = 0; n < N; n++) begin
        checks++;
        if (got[n] !== srt[n]) begin failures++; $display("round %0d key %0d: got %h expected %h", r, n, got[n], srt[n]); end
      end
    end
  endtask

  initial begin
    for (int r = 0; r < NR; r++) begin
      int range_max;
      range_max = (r % 3 == 1) ? 5 : 0;
      r_twb[r] = r[1] ^ r[0];
      for (int n = 0; n < N; n++) keys[r][n] = (range_max == 0) ? K'($urandom) : K'($urandom_range(0, range_max));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      produce();
      consume();
    join
    checks++;
    if (n_sema == 0 || n_ld0 == 0 || n_ld1 == 0 || n_asc == 0 || n_desc == 0 ||
        n_w0 == 0 || n_w1 == 0 || n_swap == 0 || n_tsort == 0 || n_tswitch == 0 ||
        n_rb == 0 || n_rt == 0 || n_overlap == 0 || n_st0 == 0 || n_st1 == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("SEMA transforms %0d, words staged X0 %0d X1 %0d, moved into M00 %0d M01 %0d,",
             n_sema, n_st0, n_st1, n_ld0, n_ld1);
    $display("input clocks overlapping a sort or output %0d, pair sorts asc %0d desc %0d,",
             n_overlap, n_asc, n_desc);
    $display("result words to M.0 %0d M.1 %0d, memory swaps %0d, passes %0d",
             n_w0, n_w1, n_swap, n_pass);
    $display("rounds BBB %0d TWB %0d, TWB sort-splits %0d, source switches %0d, merges %0d, passes %0d",
             n_rb, n_rt, n_tsort, n_tswitch, n_tmerge, n_tpass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
