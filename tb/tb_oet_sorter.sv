// tb_oet_sorter: self-checking test of sorting chip S.
//
// Feeds random problems of NS keys back to back (one every S clocks), with
// small key ranges now and then so that equal keys occur, alternating the
// direction. Each output problem is checked against the keys sorted here by a
// simple insertion sort, and the sorting time against NS * mc_latency(R).
module tb_oet_sorter;
  import vsort_pkg::*;
  localparam int NS = 4;
  localparam int R = 4;
  localparam int S = 4;
  localparam int K = R * S;
  localparam int TS = NS * mc_latency(R);
  localparam int NPROB = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_head = 0, in_desc = 0;
  logic [R-1:0] in_col [NS];
  logic out_valid, out_head, out_desc;
  logic [R-1:0] out_col [NS];
  int checks = 0, failures = 0;

  oet_sorter #(.NS(NS), .R(R), .S(S)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [K-1:0] keys [NPROB][NS];
  logic         dirs [NPROB];
  int           t_in [NPROB];

  int oprob = 0, ocol = 0;
  logic [K-1:0] acc [NS];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocol == 0) begin
        checks++;
        if (!out_head || cycle != t_in[oprob] + TS) begin
          failures++; $display("problem %0d: head %0d after %0d clocks, expected %0d",
                               oprob, out_head, cycle - t_in[oprob], TS);
        end
      end
      for (int n = 0; n < NS; n++)
        for (int i = 0; i < R; i++) acc[n][(S - 1 - ocol) * R + i] = out_col[n][i];
      if (ocol == S - 1) begin
        logic [K-1:0] srt [NS];
        srt = keys[oprob];
        for (int a = 1; a < NS; a++)
          for (int b = a; b > 0; b--)
            if (dirs[oprob] ? (srt[b] > srt[b-1]) : (srt[b] < srt[b-1])) begin
              logic [K-1:0] tmp; tmp = srt[b]; srt[b] = srt[b-1]; srt[b-1] = tmp;
            end
        for (int n = 0; n < NS; n++) begin
          checks++;
          if (acc[n] !== srt[n]) begin
            failures++; $display("problem %0d key %0d: got %h expected %h", oprob, n, acc[n], srt[n]);
          end
        end
        oprob++; ocol = 0;
      end else ocol++;
    end
  end

  initial begin
    for (int p = 0; p < NPROB; p++) begin
      dirs[p] = p[1];
      for (int n = 0; n < NS; n++)
        keys[p][n] = (p % 4 == 3) ? K'($urandom_range(0, 3)) : K'($urandom);
    end
    for (int n = 0; n < NS; n++) in_col[n] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < NPROB; p++) begin
      for (int t = 0; t < S; t++) begin
        in_valid <= 1; in_head <= (t == 0); in_desc <= dirs[p];
        for (int n = 0; n < NS; n++)
          for (int i = 0; i < R; i++) in_col[n][i] <= keys[p][n][(S - 1 - t) * R + i];
        if (t == 0) t_in[p] = cycle + 1;
        @(posedge clk);
      end
    end
    in_valid <= 0; in_head <= 0;
    repeat (TS + 5) @(posedge clk);
    checks++;
    if (oprob != NPROB) begin failures++; $display("only %0d problems out", oprob); end
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
