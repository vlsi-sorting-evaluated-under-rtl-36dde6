// tb_twb_sorter: end-to-end test of the one-board TWB(S) sorter.
//
// Loads random keys (several rounds, some with many equal keys, one already
// sorted and one in reverse order) into M00 and M01, runs the sort and reads
// the result. Checks: the result equals the keys sorted here; there are M
// passes and 2^M - 1 merges; pass j has 2^(M-j) merges of 2^j - 1 sort-splits
// each; each merge of 2^j blocks takes (2^j - 1) * TS + 2S clocks, the whole
// sort ((M-1) * 2^M + 1) * TS + (2^M - 1) * 2S clocks; after a
// merge of 2^j blocks the output memory received exactly 2^j blocks, in
// ascending order. It counts sort-splits, switches of the source memory and
// writes into each output memory, and fails if one never occurs.
module tb_twb_sorter;
  import vsort_pkg::*;
  localparam int M  = 3;
  localparam int NS = 4;
  localparam int R  = 4;
  localparam int S  = 4;
  localparam int K  = R * S;
  localparam int NB = 1 << M;
  localparam int N  = NB * NS / 2;
  localparam int TS = NS * mc_latency(R);

  logic clk = 0, rst_n = 0;
  logic load_valid = 0, load_sel = 0, start = 0, out_pop = 0;
  logic [NS/2-1:0][R-1:0] load_col = '0, out_col;
  logic busy, done, out_valid, merge_done, pass_done, switched;
  logic [7:0] cur_j;
  int checks = 0, failures = 0;

  twb_sorter #(.M(M), .NS(NS), .R(R), .S(S)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_sorts = 0, n_switch = 0, n_w0 = 0, n_w1 = 0, n_merge = 0, n_pass = 0;
  int m_sorts = 0, m_words = 0, t_last = 0, t_start = 0;
  always @(posedge clk) begin
    if (rst_n && dut.s_in_head) begin n_sorts++; m_sorts++; end
    if (rst_n && switched) n_switch++;
    if (rst_n && dut.wr_push) begin
      m_words++;
      if (dut.q) n_w1++; else n_w0++;
    end
    if (rst_n && merge_done) begin
      checks++;
      if (m_sorts != (1 << cur_j) - 1) begin
        failures++; $display("merge in pass %0d: %0d sort-splits", cur_j, m_sorts);
      end
      checks++;
      // merge_done comes with the last word, which is counted above in the
      // same clock
      if (m_words != (1 << cur_j) * S) begin
        failures++; $display("merge in pass %0d: %0d words written", cur_j, m_words);
      end
      checks++;
      if (cycle - t_last != ((1 << cur_j) - 1) * TS + 2 * S) begin
        failures++; $display("merge in pass %0d took %0d clocks", cur_j, cycle - t_last);
      end
      t_last = cycle;
      m_sorts = 0; m_words = 0;
      n_merge++;
      if (pass_done) n_pass++;
    end
  end

  logic [K-1:0] keys [N];

  task automatic run_one(input int mode);
    logic [K-1:0] got [N];
    logic [K-1:0] srt [N];
    for (int n = 0; n < N; n++) keys[n] = (mode == 0) ? K'($urandom) : K'($urandom_range(0, mode));
    srt = keys;
    srt.sort();
    if (mode == -1) keys = srt;
    if (mode == -2) for (int n = 0; n < N; n++) keys[n] = srt[N - 1 - n];
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < S; t++) begin
        load_valid <= 1;
        load_sel   <= b[0];
        for (int n = 0; n < NS / 2; n++)
          for (int i = 0; i < R; i++) load_col[n][i] <= keys[b * NS / 2 + n][(S - 1 - t) * R + i];
        @(posedge clk);
      end
    end
    load_valid <= 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    t_last = cycle;
    t_start = cycle;
    n_merge = 0; n_pass = 0; m_sorts = 0; m_words = 0;
    #1;
    while (!done) begin @(posedge clk); #1; end
    // whole sort: ((M-1) * 2^M + 1) sort-splits of TS clocks, plus 2S clocks
    // for the last block of each of the 2^M - 1 merges; done is seen one
    // clock after the last write
    checks++;
    if (cycle - t_start != ((M - 1) * NB + 1) * TS + (NB - 1) * 2 * S + 1) begin
      failures++; $display("sort took %0d clocks, expected %0d", cycle - t_start,
                           ((M - 1) * NB + 1) * TS + (NB - 1) * 2 * S + 1);
    end
    checks++;
    if (n_merge != NB - 1 || n_pass != M) begin
      failures++; $display("%0d merges, %0d passes", n_merge, n_pass);
    end
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < S; t++) begin
        #1;
        checks++;
        if (!out_valid) begin failures++; $display("result word missing"); end
        for (int n = 0; n < NS / 2; n++)
          for (int i = 0; i < R; i++) got[b * NS / 2 + n][(S - 1 - t) * R + i] = out_col[n][i];
        out_pop <= 1;
        @(posedge clk);
        out_pop <= 0;
      end
    end
    #1;
    checks++;
    if (out_valid) begin failures++; $display("result memory not empty"); end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (got[n] !== srt[n]) begin failures++; $display("key %0d: got %h expected %h", n, got[n], srt[n]); end
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_one(0);
    run_one(3);
    run_one(-1);
    run_one(-2);
    for (int i = 0; i < 6; i++) run_one(i % 2 == 0 ? 0 : 100);
    checks++;
    if (n_sorts == 0 || n_switch == 0 || n_w0 == 0 || n_w1 == 0) begin
      failures++; $display("mechanism never seen: sorts %0d switches %0d w0 %0d w1 %0d",
                           n_sorts, n_switch, n_w0, n_w1);
    end
    $display("sort-splits %0d, source switches %0d, writes to M.0 %0d, to M.1 %0d",
             n_sorts, n_switch, n_w0, n_w1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
