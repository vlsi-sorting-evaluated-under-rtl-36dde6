// tb_twb_controller: test of the TWB(S) control units against a model of the
// board.
//
// The memories are modelled as queues of blocks (NS/2 keys each, S words a
// block), the sorting chip S as a unit that sorts the two blocks it was fed
// and gives them back after TS clocks, S words each. The model follows the
// controller's pops, selects and writes word by word, and presents the last
// key of the block at the head of each memory on new_last_col and
// kept_last_col. Checks: the controller reads a whole block at a time from
// the memory it selects, never from an empty one, and takes the kept block
// from Mp1 exactly in the first sort of a merge; each merge reads each of its
// two sequences completely; every output block written holds keys not
// smaller than the block before it in the same merge; at the end all keys
// are in one memory in sorted order; the counts of merges and passes.
// Model updates happen 1 time unit after the clock edge, after the
// controller has sampled its inputs.
module tb_twb_controller;
  localparam int M  = 3;
  localparam int R  = 4;
  localparam int S  = 4;
  localparam int K  = R * S;
  localparam int NS = 4;
  localparam int KB = NS / 2;           // keys per block
  localparam int NB = 1 << M;
  localparam int TS = 13;               // sorting time of the model S

  typedef logic [K-1:0] key_t;
  typedef key_t blk_t [KB];

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, p, rd_sel, rd_pop, rd_kept_pop, sel_recirc;
  logic [R-1:0] new_last_col, kept_last_col;
  logic s_in_valid, s_in_head, s_out_valid, q, wr_push, wr_hi, hold_shift;
  logic merge_done, pass_done, switched;
  logic [7:0] cur_j;
  int checks = 0, failures = 0;

  twb_controller #(.M(M), .R(R), .S(S)) dut (.*);

  always #5 clk = ~clk;

  // model state
  blk_t mem [4][$];
  int   widx [4];                      // words of the head block already read
  blk_t fed_new, fed_kept, lo_blk, hi_blk, prev_out;
  logic have_prev;
  int   feed_cnt = 0, out_start = -1, out_cnt = 0, cycle = 0;
  int   wr_words = 0, n_merge = 0, n_pass = 0, n_switch = 0, n_sorts = 0;
  int   rd_blocks [2];

  function automatic logic [R-1:0] last_col(int g);
    logic [R-1:0] c;
    c = '0;
    if (mem[g].size() > 0)
      for (int i = 0; i < R; i++) c[i] = mem[g][0][KB-1][(S - 1 - widx[g]) * R + i];
    return c;
  endfunction

  always_comb begin
    new_last_col  = last_col({p, rd_sel});
    kept_last_col = last_col({p, 1'b1});
  end
  assign s_out_valid = out_start >= 0 && cycle >= out_start && cycle < out_start + S;

  task automatic pop_word(int g);
    checks++;
    if (mem[g].size() == 0) begin failures++; $display("pop from empty memory %0d", g); return; end
    widx[g]++;
    if (widx[g] == S) begin widx[g] = 0; void'(mem[g].pop_front()); end
  endtask

  always @(posedge clk) begin
    logic v_pop, v_kpop, v_rec, v_in, v_head, v_wr, v_hi, v_p, v_q, v_sel, v_md, v_pd, v_sw, v_out;
    int gn, gk, vj;
    v_pop = rd_pop; v_kpop = rd_kept_pop; v_rec = sel_recirc; v_in = s_in_valid;
    v_head = s_in_head; v_wr = wr_push; v_hi = wr_hi; v_p = p; v_q = q; v_sel = rd_sel;
    v_md = merge_done; v_pd = pass_done; v_sw = switched; v_out = s_out_valid;
    vj = int'(cur_j);
    #1;
    if (!rst_n) begin cycle++; end
    else begin
      gn = {v_p, v_sel};
      gk = {v_p, 1'b1};
      if (v_in) begin
        checks++;
        if (v_pop != 1 || v_kpop == v_rec) begin
          failures++; $display("feed with pop %b kept pop %b recirc %b", v_pop, v_kpop, v_rec);
        end
        if (v_head) begin
          checks++;
          if (widx[gn] != 0 || (v_kpop && widx[gk] != 0)) begin
            failures++; $display("sort-split does not start at a block boundary");
          end
          if (mem[gn].size() > 0) fed_new = mem[gn][0];
          if (v_kpop) begin
            checks++;
            if (mem[gk].size() == 0) begin failures++; $display("no kept block in memory %0d", gk); end
            else fed_kept = mem[gk][0];
          end else begin
            checks++;
            if (!have_prev) begin failures++; $display("recirculation without a kept block"); end
            fed_kept = hi_blk;
          end
          rd_blocks[v_sel]++;
          if (v_kpop) rd_blocks[1]++;
          n_sorts++;
        end
        pop_word(gn);
        if (v_kpop) pop_word(gk);
        feed_cnt++;
        if (feed_cnt == S) begin
          key_t all [2 * KB];
          feed_cnt = 0;
          for (int i = 0; i < KB; i++) begin all[i] = fed_new[i]; all[KB + i] = fed_kept[i]; end
          all.sort();
          for (int i = 0; i < KB; i++) begin lo_blk[i] = all[i]; hi_blk[i] = all[KB + i]; end
          have_prev = 1;
          out_start = cycle + TS - S + 1;
        end
      end
      if (v_wr) begin
        checks++;
        if (v_hi == v_out) begin failures++; $display("write with hi %b while S outputs %b", v_hi, v_out); end
        if (wr_words % S == 0) begin
          blk_t b;
          b = v_hi ? hi_blk : lo_blk;
          checks++;
          if (wr_words > 0 && b[0] < prev_out[KB-1]) begin
            failures++; $display("output block out of order in merge %0d", n_merge);
          end
          prev_out = b;
          mem[{~v_p, v_q}].push_back(b);
        end
        wr_words++;
      end
      if (v_sw) n_switch++;
      if (v_md) begin
        checks++;
        if (wr_words != (1 << vj) * S || rd_blocks[0] != (1 << (vj - 1)) ||
            rd_blocks[1] != (1 << (vj - 1))) begin
          failures++; $display("merge in pass %0d: %0d words written, blocks read %0d/%0d",
                               vj, wr_words, rd_blocks[0], rd_blocks[1]);
        end
        wr_words = 0; rd_blocks[0] = 0; rd_blocks[1] = 0; have_prev = 0;
        n_merge++;
        if (v_pd) n_pass++;
      end
      cycle++;
    end
  end

  task automatic run_one(int mode);
    key_t keys [NB * KB];
    key_t srt [NB * KB];
    key_t got [$];
    for (int n = 0; n < NB * KB; n++) keys[n] = (mode == 0) ? K'($urandom) : K'($urandom_range(0, mode));
    srt = keys;
    srt.sort();
    for (int g = 0; g < 4; g++) begin mem[g].delete(); widx[g] = 0; end
    for (int b = 0; b < NB; b++) begin
      blk_t bl;
      for (int i = 0; i < KB; i++) bl[i] = keys[b * KB + i];
      mem[b % 2].push_back(bl);
    end
    n_merge = 0; n_pass = 0; wr_words = 0; rd_blocks[0] = 0; rd_blocks[1] = 0; have_prev = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    #2;
    while (!done) begin @(posedge clk); #2; end
    checks++;
    if (n_merge != NB - 1 || n_pass != M) begin failures++; $display("%0d merges %0d passes", n_merge, n_pass); end
    for (int g = 0; g < 4; g++) begin
      if (mem[g].size() == NB) foreach (mem[g][b]) for (int i = 0; i < KB; i++) got.push_back(mem[g][b][i]);
      else if (mem[g].size() != 0) begin
        checks++; failures++; $display("memory %0d holds %0d blocks at the end", g, mem[g].size());
      end
    end
    checks++;
    if (got.size() != NB * KB) begin failures++; $display("result has %0d keys", got.size()); end
    else for (int n = 0; n < NB * KB; n++) begin
      checks++;
      if (got[n] !== srt[n]) begin failures++; $display("key %0d: got %h expected %h", n, got[n], srt[n]); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 12; i++) run_one(i % 3 == 1 ? 3 : 0);
    checks++;
    if (n_sorts == 0 || n_switch == 0) begin failures++; $display("no sort-split or no switch seen"); end
    $display("sort-splits %0d, source switches %0d", n_sorts, n_switch);
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
