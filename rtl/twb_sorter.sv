// twb_sorter: one-board chip-external sorter running TWB(S), two-way merge
// on blocks of data.
//
// Same structure as bbb_sorter: four shift memories M00..M11, sorting chip S
// (oet_sorter, always ascending) and the control units (twb_controller). The
// difference is in the control and in one data path: the larger half of each
// sort-split is fed straight back into S with the next block, so one block
// stays "in" the sorting chip for the whole merge. The data is pumped through
// S only M times instead of (M^2+M)/2.
//
// Use as bbb_sorter: while not busy, write 2^(M-1) blocks into each of M00
// and M01 (load_valid/load_sel, S words a block), pulse start, wait for done
// and pop the sorted words (ascending, block by block) from out_col. The
// result lies in the memory the final merge wrote, remembered here.
//
// Timing: per merge of 2^j blocks, (2^j - 1) sort-splits of TS clocks each
// plus 2S clocks, TS = NS * mc_latency(R).
module twb_sorter
  import vsort_pkg::*;
#(
  parameter int M  = 3,
  parameter int NS = 4,
  parameter int R  = 4,
  parameter int S  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load_valid,
  input  logic                    load_sel,
  input  logic [NS/2-1:0][R-1:0]  load_col,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  input  logic                    out_pop,
  output logic                    out_valid,
  output logic [NS/2-1:0][R-1:0]  out_col,
  output logic                    merge_done,
  output logic                    pass_done,
  output logic                    switched,
  output logic [7:0]              cur_j
);
  localparam int BW    = NS / 2 * R;
  localparam int DEPTH = (1 << M) * S;

  typedef logic [NS/2-1:0][R-1:0] bcol_t;

  logic p, q, rd_sel, rd_pop, rd_kept_pop, sel_recirc;
  logic s_in_valid, s_in_head, s_out_valid, s_out_head, s_out_desc;
  logic wr_push, wr_hi, hold_shift;
  logic [R-1:0] new_last_col, kept_last_col;

  twb_controller #(.M(M), .R(R), .S(S)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .p, .rd_sel, .rd_pop, .rd_kept_pop, .sel_recirc,
    .new_last_col, .kept_last_col,
    .s_in_valid, .s_in_head,
    .s_out_valid, .q, .wr_push, .wr_hi, .hold_shift,
    .merge_done, .pass_done, .switched, .cur_j
  );

  logic  m_push [4];
  logic  m_pop  [4];
  bcol_t m_din  [4];
  bcol_t m_dout [4];
  logic  m_empty [4];
  bcol_t wr_data;
  logic [1:0] res_idx;

  for (genvar g = 0; g < 4; g++) begin : g_mem
    logic [$clog2(DEPTH+1)-1:0] cnt;
    logic full;
    shift_memory #(.WIDTH(BW), .DEPTH(DEPTH)) u_mem (
      .clk, .rst_n,
      .push (m_push[g]),
      .din  (m_din[g]),
      .pop  (m_pop[g]),
      .dout (m_dout[g]),
      .empty(m_empty[g]),
      .full (full),
      .count(cnt)
    );
  end

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      logic [1:0] gi;
      gi = 2'(g);
      m_pop[g] = (rd_pop && gi == {p, rd_sel}) || (rd_kept_pop && gi == {p, 1'b1}) ||
                 (done && out_pop && gi == res_idx);
      if (busy) begin
        m_push[g] = wr_push && gi == {~p, q};
        m_din[g]  = wr_data;
      end else begin
        m_push[g] = load_valid && gi == {1'b0, load_sel};
        m_din[g]  = load_col;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                res_idx <= 2'b00;
    else if (busy && wr_push)  res_idx <= {~p, q};
  end

  // sorting chip S: new block below, kept block above
  logic [R-1:0] s_in  [NS];
  logic [R-1:0] s_out [NS];
  bcol_t new_blk, kept_blk, lo_blk, hi_blk;
  always_comb begin
    new_blk  = m_dout[{p, rd_sel}];
    kept_blk = m_dout[{p, 1'b1}];
    for (int n = 0; n < NS / 2; n++) begin
      lo_blk[n] = s_out[n];
      hi_blk[n] = s_out[n + NS / 2];
      s_in[n]          = new_blk[n];
      s_in[n + NS / 2] = sel_recirc ? hi_blk[n] : kept_blk[n];
    end
    new_last_col  = new_blk[NS/2-1];
    kept_last_col = kept_blk[NS/2-1];
  end

  oet_sorter #(.NS(NS), .R(R), .S(S)) u_sort (
    .clk, .rst_n,
    .in_valid (s_in_valid),
    .in_head  (s_in_head),
    .in_desc  (1'b0),
    .in_col   (s_in),
    .out_valid(s_out_valid),
    .out_head (s_out_head),
    .out_desc (s_out_desc),
    .out_col  (s_out)
  );

  // buffer for the last kept block of a merge
  bcol_t hbuf [S];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < S; i++) hbuf[i] <= '0;
    end else if (hold_shift) begin
      hbuf[0] <= hi_blk;
      for (int i = 1; i < S; i++) hbuf[i] <= hbuf[i-1];
    end
  end

  assign wr_data   = wr_hi ? hbuf[S-1] : lo_blk;
  assign out_valid = done && !m_empty[res_idx];
  assign out_col   = m_dout[res_idx];

  logic unused_flags;
  assign unused_flags = s_out_head ^ s_out_desc;

endmodule
