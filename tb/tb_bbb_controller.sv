// tb_bbb_controller: self-checking test of the BBB(S) control units.
//
// A delay line of TS clocks stands in for sorting chip S. For every pass the
// test checks, against the loop nest of BBB(S) worked out here: the number of
// block columns read (2^(M-1) * S) and written (2^M * S); that a pair's
// direction is bit j of its index i; that the output memory is bit p of the
// pair index; that the written pair index runs in order; that q flips after a
// pass; and the pass length 2^(M-1) * 2S + TS.
module tb_bbb_controller;
  localparam int M  = 3;
  localparam int S  = 4;
  localparam int TS = 13;
  localparam int NB2 = 1 << (M - 1);
  localparam int NPARTS = (M * M + M) / 2;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, q, rd_pop, s_in_valid, s_in_head, s_in_desc;
  logic s_out_valid, wr_push, wr_hi, wr_r, part_done;
  logic [7:0] cur_j, cur_k, cur_p;
  int checks = 0, failures = 0;

  bbb_controller #(.M(M), .S(S)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // stand-in for S: valid delayed by TS clocks
  logic dly [TS];
  always @(posedge clk) begin
    dly[0] <= rst_n && s_in_valid;
    for (int i = 1; i < TS; i++) dly[i] <= dly[i-1];
  end
  assign s_out_valid = dly[TS-1];

  int pops = 0, pushes = 0, heads = 0, t_last = 0, nparts = 0;
  int ej = 0, ek = 0, ep = 0;
  logic q_prev = 0;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (rd_pop) pops++;
      if (s_in_head) begin
        checks++;
        if (s_in_desc != heads[ej]) begin
          failures++; $display("pass %0d pair %0d: desc %0d", nparts, heads, s_in_desc);
        end
        heads++;
      end
      if (wr_push) begin
        checks++;
        if (wr_r != ((pushes / (2 * S)) >> ep & 1)) begin
          failures++; $display("pass %0d write %0d: r %0d", nparts, pushes, wr_r);
        end
        checks++;
        if (wr_hi != ((pushes % (2 * S)) >= S)) begin failures++; $display("wr_hi wrong at write %0d", pushes); end
        pushes++;
      end
      if (part_done) begin
        checks++;
        if (pops != NB2 * S || pushes != 2 * NB2 * S || heads != NB2) begin
          failures++; $display("pass %0d: %0d pops %0d pushes %0d pairs", nparts, pops, pushes, heads);
        end
        checks++;
        if (cycle - t_last != NB2 * 2 * S + TS) begin
          failures++; $display("pass %0d took %0d", nparts, cycle - t_last);
        end
        checks++;
        if (cur_j != 8'(ej) || cur_k != 8'(ek) || cur_p != 8'(ep)) begin
          failures++; $display("pass %0d: j k p %0d %0d %0d", nparts, cur_j, cur_k, cur_p);
        end
        checks++;
        if (q != q_prev) begin failures++; $display("q changed inside a pass"); end
        q_prev = ~q;
        t_last = cycle;
        pops = 0; pushes = 0; heads = 0;
        nparts++;
        if (ek == ej) begin ej++; ek = 0; end
        else begin ek++; if (ek == ej) ep = ej; end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      start <= 1;
      @(posedge clk);
      start <= 0;
      t_last = cycle;
      nparts = 0; ej = 0; ek = 0; ep = 0; q_prev = 0;
      #1;
      while (!done) @(posedge clk);
      checks++;
      if (nparts != NPARTS) begin failures++; $display("%0d passes", nparts); end
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
