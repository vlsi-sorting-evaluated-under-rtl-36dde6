// twb_controller: control units CI and CO of two-way merge on blocks of
// data, TWB(S).
//
// The data starts as 2^M blocks, 2^(M-1) in each of M00 and M01. Pass j
// (j = 1..M) merges the sorted sequences of 2^(j-1) blocks in Mp0 and Mp1
// pairwise into 2^(M-j) sequences of 2^j blocks, written alternately into
// M(not p)q and M(not p)(not q); then p is inverted. A merge keeps one block
// in the sorting chip: each sort-split gets the block kept from the previous
// one and a new block, the smaller half goes to the output memory and the
// larger half is kept. The new block is read from Mpr, where r is opposite to
// the sequence the largest key read so far came from; a sequence whose
// 2^(j-1) blocks have all been read is not chosen again, and r moves to the
// other one when the current one runs out. The last kept block is written
// after the last sort. The loop nest, the counters n0/n1, r and max follow
// the paper's algorithm TWB(S) (q starts at 1, p at 0).
//
// Datapath interface: new blocks go into S as keys 0..NS/2-1 (from Mpr) and
// the kept block as keys NS/2..NS-1. In the first sort of a merge the kept
// block is read from Mp1 at the same time (the paper's step D) and the new
// block from Mp0; later the kept block is S's own upper output, fed back in
// the clocks it comes out (sel_recirc). Blocks are sorted inside after pass
// 1, so the largest key of a block is its last key; its columns arrive on
// new_last_col (and kept_last_col in a first sort) to update max.
//
// Timing: one sort-split per TS clocks (the sorting time of S, TS > S+1),
// plus 2S clocks to write the last two blocks of each merge. This pacing is
// this design's choice.
module twb_controller #(
  parameter int M = 3,
  parameter int R = 4,
  parameter int S = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         done,
  // CI
  output logic         p,
  output logic         rd_sel,        // memory Mp<rd_sel> gives the new block
  output logic         rd_pop,        // pop Mp<rd_sel>
  output logic         rd_kept_pop,   // pop Mp1 for the kept block (first sort)
  output logic         sel_recirc,    // kept block from S's output
  input  logic [R-1:0] new_last_col,
  input  logic [R-1:0] kept_last_col,
  output logic         s_in_valid,
  output logic         s_in_head,
  // CO
  input  logic         s_out_valid,
  output logic         q,
  output logic         wr_push,       // write M(not p)q
  output logic         wr_hi,         // write the buffered upper block
  output logic         hold_shift,    // capture S's upper block in the buffer
  // status
  output logic         merge_done,
  output logic         pass_done,
  output logic         switched,      // r changed after a sort-split
  output logic [7:0]   cur_j
);
  localparam int K   = R * S;
  localparam int CW  = $clog2(2 * S + 1);
  localparam int BW  = M + 1;

  typedef enum logic [2:0] {T_IDLE, T_FEED, T_DECIDE, T_LAST, T_DONE} state_e;
  state_e state;

  logic [7:0]    j;
  logic [BW-1:0] n0, n1, half, sorts_left, merges;
  logic          r, first;
  logic [CW-1:0] fcnt, lcnt, hcnt;
  logic [K-1:0]  mx, cur_last, kept_last;

  assign half = BW'(1) << (j - 1);

  logic feed_now;
  assign feed_now = (state == T_FEED) && (first || s_out_valid);

  // decision after a new block has been read (values after n_r + 1)
  logic [BW-1:0] nr_new, nrb;
  logic [K-1:0]  mx_ref;
  logic          do_switch;
  always_comb begin
    nr_new    = (r ? n1 : n0) + 1'b1;
    nrb       = r ? n0 : n1;
    mx_ref    = first ? kept_last : mx;
    do_switch = ((cur_last > mx_ref) && nrb != half) || nr_new == half;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      j          <= 8'd1;
      p          <= 1'b0;
      q          <= 1'b1;
      r          <= 1'b0;
      n0         <= '0;
      n1         <= '0;
      first      <= 1'b1;
      sorts_left <= '0;
      merges     <= '0;
      fcnt       <= '0;
      lcnt       <= '0;
      hcnt       <= '0;
      mx         <= '0;
      cur_last   <= '0;
      kept_last  <= '0;
    end else begin
      case (state)
        T_IDLE, T_DONE: if (start) begin
          state      <= T_FEED;
          j          <= 8'd1;
          p          <= 1'b0;
          q          <= 1'b1;
          r          <= 1'b0;
          n0         <= '0;
          n1         <= BW'(1);
          first      <= 1'b1;
          sorts_left <= BW'(1);
          merges     <= '0;
          fcnt       <= '0;
        end
        T_FEED: if (feed_now) begin
          for (int i = 0; i < R; i++) begin
            cur_last[(S - 1 - int'(fcnt)) * R + i]  <= new_last_col[i];
            kept_last[(S - 1 - int'(fcnt)) * R + i] <= kept_last_col[i];
          end
          if (fcnt == CW'(S - 1)) begin
            fcnt  <= '0;
            state <= T_DECIDE;
          end else fcnt <= fcnt + 1'b1;
        end
        T_DECIDE: begin
          if (r) n1 <= nr_new; else n0 <= nr_new;
          if (do_switch) begin
            mx <= cur_last;
            r  <= ~r;
          end else if (first) begin
            mx <= kept_last;
          end
          first <= 1'b0;
          if (sorts_left == BW'(1)) begin
            state <= T_LAST;
            lcnt  <= '0;
            hcnt  <= '0;
          end else begin
            sorts_left <= sorts_left - 1'b1;
            state      <= T_FEED;
          end
        end
        T_LAST: begin
          // lower block straight from S, then the buffered upper block
          if (s_out_valid) begin
            if (lcnt == CW'(S - 1)) hcnt <= CW'(S);
            lcnt <= lcnt + 1'b1;
          end
          if (hcnt != '0) begin
            hcnt <= hcnt - 1'b1;
            if (hcnt == CW'(1)) begin
              // merge complete
              q <= ~q;
              if (merges == (BW'(1) << (M - int'(j))) - 1) begin
                merges <= '0;
                p      <= ~p;
                if (j == 8'(M)) begin
                  state <= T_DONE;
                end else begin
                  j          <= j + 1'b1;
                  sorts_left <= (BW'(2) << j) - 1'b1;
                  state      <= T_FEED;
                end
              end else begin
                merges     <= merges + 1'b1;
                sorts_left <= (BW'(1) << j) - 1'b1;
                state      <= T_FEED;
              end
              r     <= 1'b0;
              n0    <= '0;
              n1    <= BW'(1);
              first <= 1'b1;
              fcnt  <= '0;
            end
          end
        end
        default: ;
      endcase
    end
  end

  // CI
  assign rd_sel      = first ? 1'b0 : r;
  assign rd_pop      = feed_now;
  assign rd_kept_pop = feed_now && first;
  assign sel_recirc  = !first;
  assign s_in_valid  = feed_now;
  assign s_in_head   = feed_now && fcnt == '0;

  // CO
  assign wr_hi      = (state == T_LAST) && hcnt != '0;
  assign wr_push    = s_out_valid || wr_hi;
  assign hold_shift = (state == T_LAST) && (s_out_valid || wr_hi);

  assign busy       = (state != T_IDLE) && (state != T_DONE);
  assign done       = (state == T_DONE);
  assign merge_done = wr_hi && hcnt == CW'(1);
  assign pass_done  = merge_done && merges == (BW'(1) << (M - int'(j))) - 1;
  assign switched   = (state == T_DECIDE) && do_switch;
  assign cur_j      = j;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(s_out_valid && wr_hi)) else $error("twb_controller: output blocks overlap");
      assert (!(state == T_FEED && !first && s_out_valid && !feed_now))
        else $error("twb_controller: kept block not fed back");
    end
  end

endmodule
