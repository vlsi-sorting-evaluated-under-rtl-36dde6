// tb_bbb_sorter: end-to-end test of the one-board BBB(S) sorter.
//
// Loads random keys (several rounds, some with many equal keys) into M00 and
// M01, runs the sort and reads the result. Checks: the result equals the keys
// sorted here; there are (M^2+M)/2 passes; each pass takes
// 2^(M-1) * 2S + NS * mc_latency(R) clocks; the pass variables j, k, p follow
// the loop nest of BBB(S). It also counts ascending and descending pair
// sorts and writes into each output memory, and fails if one never occurs.
module tb_bbb_sorter;
  import vsort_pkg::*;
  localparam int M  = 3;
  localparam int NS = 4;
  localparam int R  = 4;
  localparam int S  = 4;
  localparam int K  = R * S;
  localparam int NB = 1 << M;
  localparam int N  = NB * NS / 2;
  localparam int TPART = (1 << (M - 1)) * 2 * S + NS * mc_latency(R);
  localparam int NPARTS = (M * M + M) / 2;

  logic clk = 0, rst_n = 0;
  logic load_valid = 0, load_sel = 0, start = 0, out_pop = 0;
  logic [NS/2-1:0][R-1:0] load_col = '0, out_col;
  logic busy, done, out_valid, part_done, cur_q, wr_r, s_desc;
  logic [7:0] cur_j, cur_k, cur_p;
  int checks = 0, failures = 0;

  bbb_sorter #(.M(M), .NS(NS), .R(R), .S(S)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int n_asc = 0, n_desc = 0, n_w0 = 0, n_w1 = 0;
  always @(posedge clk) begin
    if (rst_n && dut.s_in_head) begin
      if (s_desc) n_desc++; else n_asc++;
    end
    if (rst_n && dut.wr_push) begin
      if (wr_r) n_w1++; else n_w0++;
    end
  end

  logic [K-1:0] keys [N];

  // Pass checks, sampled at the clock edge.
  int t_last, nparts, exp_j, exp_k, exp_p;
  always @(posedge clk) begin
    if (rst_n && part_done) begin
      checks++;
      if (cur_j != 8'(exp_j) || cur_k != 8'(exp_k) || cur_p != 8'(exp_p)) begin
        failures++; $display("pass %0d: j k p = %0d %0d %0d, expected %0d %0d %0d",
                             nparts, cur_j, cur_k, cur_p, exp_j, exp_k, exp_p);
      end
      checks++;
      if (cycle - t_last != TPART) begin
        failures++; $display("pass %0d took %0d clocks, expected %0d", nparts, cycle - t_last, TPART);
      end
      t_last = cycle;
      nparts++;
      if (exp_k == exp_j) begin exp_j++; exp_k = 0; end
      else begin exp_k++; if (exp_k == exp_j) exp_p = exp_j; end
    end
  end

  task automatic run_one(input int range_max);
    logic [K-1:0] got [N];
    logic [K-1:0] srt [N];
    for (int n = 0; n < N; n++) keys[n] = (range_max == 0) ? K'($urandom) : K'($urandom_range(0, range_max));
    // block b holds keys b*NS/2 ..; even blocks go to M00, odd ones to M01
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
    nparts = 0;
    exp_j = 0; exp_k = 0; exp_p = 0;
    #1;
    while (!done) @(posedge clk);
    checks++;
    if (nparts != NPARTS) begin failures++; $display("%0d passes, expected %0d", nparts, NPARTS); end
    // read the result
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
    srt = keys;
    srt.sort();
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
    run_one(0);
    run_one(40);
    checks++;
    if (n_asc == 0 || n_desc == 0 || n_w0 == 0 || n_w1 == 0) begin
      failures++; $display("mechanism never seen: asc %0d desc %0d w0 %0d w1 %0d", n_asc, n_desc, n_w0, n_w1);
    end
    $display("ascending pair sorts %0d, descending %0d, writes to M.0 %0d, to M.1 %0d",
             n_asc, n_desc, n_w0, n_w1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
