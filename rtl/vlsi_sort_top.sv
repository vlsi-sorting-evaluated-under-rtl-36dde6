// vlsi_sort_top: chip-external sorter fed with bit-serial keys.
//
// Keys of K bits arrive bit-serially, Q = sqrt(K) at a time (one per input
// line, most significant bit first). SEMA rearranges each group of Q keys into
// Q x Q bit matrices; the loader writes them, NS/2 keys per block, into a
// third pair of shift memories X0/X1 (the staging pair), alternating between
// the two. A SEMA tile read row by row from the top is exactly the column
// sequence the matrix comparators expect (most significant column first), so
// the loader copies tile row t into block word t. When 2^M blocks are staged
// and the board is free, the staging pair is moved into M00/M01 of the board
// at one word per clock and the sort runs by itself; the sorted keys are then
// read from out_col. Input of the next round (bit-serial, slow) overlaps the
// sort and the output of the current one, so the sorting chip is not held
// back by the input rate.
//
// Two boards are present, each with its own sorting chip S built from matrix
// comparators: one runs BBB(S) (bitonic sort on blocks), the other TWB(S)
// (two-way merge on blocks). Input alg_twb picks the board for a round; it is
// taken while the first group of the round is shifted in.
//
// The pieces follow the paper: SEMA for the word-serial to matrix conversion,
// matrix comparators, shift memories, BBB(S) and TWB(S) control, and a third
// pair of shift memories for input while the other pairs sort. The loader
// that joins SEMA to the memories, the board choice, the fact that the third
// pair takes input only (output is read from the board's result memory) and
// the sequencing below are this design's own.
//
// Interface:
//   alg_twb      0: sort with BBB(S), 1: sort with TWB(S)
//   ser_ready    high while a group of Q keys may be shifted in
//   ser_valid    one bit of each of the Q keys on ser_bits (K clocks a group)
//   sorting      high while a board sorts
//   out_valid    a sorted block word is on out_col; out_pop takes it. Words
//                come block by block, ascending, S words a block, key n of
//                the block in bits [n*Q +: Q]; word t holds row t of each key
//                matrix (bits (Q-1-t)*Q .. (Q-1-t)*Q+Q-1 of the key).
//   status       part_done pulses at the end of each BBB pass; cur_j/k/p/q are
//                the BBB loop variables; merge_done, pass_done and switched
//                come from TWB (cur_j is TWB's pass number when alg_twb);
//                sema_done, wr_r, s_desc as in the blocks.
// Timing: K clocks per group in, log2(Q) + Q + K - 2 clocks of SEMA and Q
// clocks per block of staging; 2^M * Q clocks to move a round into the board;
// then for BBB (M^2+M)/2 passes of 2^(M-1) * 2Q + NS * (Q+1) clocks each, for
// TWB M passes, a merge of 2^j blocks taking (2^j - 1) * NS * (Q+1) + 2Q
// clocks; 2^M * Q clocks to read the result.
module vlsi_sort_top
  import vsort_pkg::*;
#(
  parameter int K  = 16,
  parameter int NS = 4,
  parameter int M  = 3
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   alg_twb,
  output logic                                   ser_ready,
  input  logic                                   ser_valid,
  input  logic [$rtoi($sqrt(K))-1:0]             ser_bits,
  output logic                                   sorting,
  input  logic                                   out_pop,
  output logic                                   out_valid,
  output logic [NS/2-1:0][$rtoi($sqrt(K))-1:0]   out_col,
  output logic                                   sema_done,
  output logic                                   part_done,
  output logic                                   cur_q,
  output logic [7:0]                             cur_j,
  output logic [7:0]                             cur_k,
  output logic [7:0]                             cur_p,
  output logic                                   wr_r,
  output logic                                   s_desc,
  output logic                                   merge_done,
  output logic                                   pass_done,
  output logic                                   switched
);
  localparam int Q      = $rtoi($sqrt(K));
  localparam int KPB    = NS / 2;           // keys per block
  localparam int BPG    = Q / KPB;          // blocks per SEMA group
  localparam int NB     = 1 << M;           // blocks in all
  localparam int CW     = $clog2(K + 1);

  // input side: groups of keys into the staging pair
  typedef enum logic [1:0] {I_SER, I_SEMA, I_XFER, I_FULL} istate_e;
  // board side: staging pair into the board, sort, result out
  typedef enum logic [1:0] {B_IDLE, B_MOVE, B_SORT, B_OUT} bstate_e;
  istate_e istate;
  bstate_e bstate;

  logic [CW-1:0]            bitcnt;
  logic [$clog2(NB+1)-1:0]  blocks;      // blocks staged so far
  logic [$clog2(BPG+1)-1:0] gblk;        // block within the SEMA group
  logic [$clog2(Q+1)-1:0]   word;        // word within the block
  logic [$clog2(NB*Q+1)-1:0] outcnt;
  logic                     stage_alg;   // board chosen for the staged round

  // SEMA
  logic         sema_start, sema_busy;
  logic [K-1:0] tiles [Q];
  sema #(.K(K)) u_sema (
    .clk, .rst_n,
    .load_en  (istate == I_SER && ser_valid),
    .load_bits(ser_bits),
    .start    (sema_start),
    .busy     (sema_busy),
    .done     (sema_done),
    .a_out    (tiles)
  );

  // the two boards
  logic                  use_twb;
  logic                  load_valid, load_sel, bbb_start, busy, done, board_valid;
  logic [KPB-1:0][Q-1:0] load_col;
  logic                  b_busy, b_done, b_valid, t_busy, t_done, t_valid;
  logic [KPB-1:0][Q-1:0] b_col, t_col;
  logic [7:0]            b_j, t_j;
  bbb_sorter #(.M(M), .NS(NS), .R(Q), .S(Q)) u_board (
    .clk, .rst_n,
    .load_valid (load_valid && !use_twb), .load_sel, .load_col,
    .start (bbb_start && !use_twb),
    .busy (b_busy), .done (b_done),
    .out_pop (out_pop && bstate == B_OUT && !use_twb),
    .out_valid (b_valid), .out_col (b_col),
    .part_done, .cur_q, .cur_j (b_j), .cur_k, .cur_p, .wr_r, .s_desc
  );
  twb_sorter #(.M(M), .NS(NS), .R(Q), .S(Q)) u_twb (
    .clk, .rst_n,
    .load_valid (load_valid && use_twb), .load_sel, .load_col,
    .start (bbb_start && use_twb),
    .busy (t_busy), .done (t_done),
    .out_pop (out_pop && bstate == B_OUT && use_twb),
    .out_valid (t_valid), .out_col (t_col),
    .merge_done, .pass_done, .switched, .cur_j (t_j)
  );
  assign busy        = use_twb ? t_busy  : b_busy;
  assign done        = use_twb ? t_done  : b_done;
  assign board_valid = use_twb ? t_valid : b_valid;
  assign out_col     = use_twb ? t_col   : b_col;
  assign cur_j       = use_twb ? t_j     : b_j;

  // loader: tile (gblk*KPB + n) becomes key n of the block, tile row word
  // becomes block word word. Blocks go alternately into staging memories
  // X0 and X1, the third memory pair.
  logic [KPB-1:0][Q-1:0] stage_din;
  logic                  st_push [2];
  logic                  st_pop  [2];
  logic [KPB-1:0][Q-1:0] st_dout [2];
  logic                  st_empty [2];
  logic [$clog2(NB/2*Q+1)-1:0] st_cnt [2];
  always_comb begin
    for (int n = 0; n < KPB; n++)
      for (int c = 0; c < Q; c++)
        stage_din[n][c] = tiles[int'(word)][(int'(gblk) * KPB + n) * Q + c];
  end

  for (genvar g = 0; g < 2; g++) begin : g_stage
    logic full;
    assign st_push[g] = (istate == I_XFER) && blocks[0] == 1'(g);
    shift_memory #(.WIDTH(KPB * Q), .DEPTH(NB / 2 * Q)) u_mem (
      .clk, .rst_n,
      .push (st_push[g]), .din (stage_din),
      .pop  (st_pop[g]),  .dout (st_dout[g]),
      .empty(st_empty[g]), .full (full), .count (st_cnt[g])
    );
  end

  // moving: X0 into M00, then X1 into M01, one word per clock
  assign st_pop[0]  = (bstate == B_MOVE) && !st_empty[0];
  assign st_pop[1]  = (bstate == B_MOVE) && st_empty[0] && !st_empty[1];
  assign load_valid = st_pop[0] || st_pop[1];
  assign load_sel   = st_empty[0];
  assign load_col   = st_empty[0] ? st_dout[1] : st_dout[0];

  assign ser_ready  = (istate == I_SER);
  assign sema_start = (istate == I_SER) && ser_valid && bitcnt == CW'(K - 1);
  assign bbb_start  = st_pop[1] && st_cnt[1] == ($clog2(NB/2*Q+1))'(1);
  assign sorting    = (bstate == B_SORT);
  assign out_valid  = board_valid && bstate == B_OUT;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      istate    <= I_SER;
      bitcnt    <= '0;
      blocks    <= '0;
      gblk      <= '0;
      word      <= '0;
      stage_alg <= 1'b0;
    end else begin
      if (istate == I_SER && blocks == '0) stage_alg <= alg_twb;
      case (istate)
        I_SER: if (ser_valid) begin
          if (bitcnt == CW'(K - 1)) begin
            bitcnt <= '0;
            istate <= I_SEMA;
          end else bitcnt <= bitcnt + 1'b1;
        end
        I_SEMA: if (sema_done) begin
          istate <= I_XFER;
          gblk   <= '0;
          word   <= '0;
        end
        I_XFER: begin
          if (word == ($clog2(Q+1))'(Q - 1)) begin
            word   <= '0;
            blocks <= blocks + 1'b1;
            if (blocks == ($clog2(NB+1))'(NB - 1)) begin
              istate <= I_FULL;
            end else if (gblk == ($clog2(BPG+1))'(BPG - 1)) begin
              istate <= I_SER;
            end else begin
              gblk <= gblk + 1'b1;
            end
          end else word <= word + 1'b1;
        end
        default: if (bbb_start) begin   // I_FULL: until the board has taken it
          istate <= I_SER;
          blocks <= '0;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bstate  <= B_IDLE;
      outcnt  <= '0;
      use_twb <= 1'b0;
    end else begin
      case (bstate)
        B_IDLE: if (istate == I_FULL) begin
          bstate  <= B_MOVE;
          use_twb <= stage_alg;
        end
        B_MOVE: if (bbb_start) bstate <= B_SORT;
        B_SORT: if (done) begin
          bstate <= B_OUT;
          outcnt <= '0;
        end
        default: begin   // B_OUT
          if (out_pop && out_valid) begin
            if (outcnt == ($clog2(NB*Q+1))'(NB * Q - 1)) bstate <= B_IDLE;
            outcnt <= outcnt + 1'b1;
          end
        end
      endcase
    end
  end

  logic unused;
  assign unused = busy ^ sema_busy;

  initial begin
    assert (Q * Q == K) else $error("vlsi_sort_top: K must be a square");
    assert (Q % KPB == 0 && NB % BPG == 0) else $error("vlsi_sort_top: NS/2 must divide sqrt(K), and the groups the block count");
  end

endmodule
