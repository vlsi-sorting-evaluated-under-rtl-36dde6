// bbb_sorter: one-board chip-external sorter running BBB(S).
//
// Four shift memories M00, M01, M10 and M11, the sorting chip S (oet_sorter)
// and the control units CI and CO (bbb_controller), connected as in the
// paper's one-board sorter: CI takes block columns from Mq0 and Mq1 into S, CO
// takes S's results into M(not q)0 or M(not q)1. N = 2^M * NS/2 keys of
// R*S bits are sorted; a block holds NS/2 keys and a memory word is one block
// column, NS/2 * R bits (key n of the block in bits [n*R +: R]).
//
// Use: while not busy (and after the previous result has been read out),
// write 2^(M-1) blocks into each of M00 and M01 with
// load_valid/load_sel, S words per block, most significant key column first.
// Pulse start. busy is high while sorting; when done rises, the sorted keys
// are in Mq0 (the memory the final pass wrote): out_valid shows a word on
// out_col and out_pop takes it, ascending block by block, S words per block.
// Every memory is 2^M blocks deep, enough for the last pass, which writes all
// blocks into one memory. The upper result block of each pair waits in an
// S-word buffer while the lower one is written.
//
// Timing: (M^2+M)/2 passes of 2^(M-1) * 2S + NS * mc_latency(R) clocks.
module bbb_sorter
  import vsort_pkg::*;
#(
  parameter int M  = 3,
  parameter int NS = 4,
  parameter int R  = 4,
  parameter int S  = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // initial data
  input  logic                    load_valid,
  input  logic                    load_sel,
  input  logic [NS/2-1:0][R-1:0]  load_col,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // result
  input  logic                    out_pop,
  output logic                    out_valid,
  output logic [NS/2-1:0][R-1:0]  out_col,
  // pass status
  output logic                    part_done,
  output logic                    cur_q,
  output logic [7:0]              cur_j,
  output logic [7:0]              cur_k,
  output logic [7:0]              cur_p,
  output logic                    wr_r,
  output logic                    s_desc
);
  localparam int BW    = NS / 2 * R;
  localparam int DEPTH = (1 << M) * S;

  typedef logic [NS/2-1:0][R-1:0] bcol_t;

  // controller
  logic q, rd_pop, s_in_valid, s_in_head, s_in_desc;
  logic s_out_valid, s_out_head, s_out_desc;
  logic wr_push, wr_hi;

  bbb_controller #(.M(M), .S(S)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .q, .rd_pop, .s_in_valid, .s_in_head, .s_in_desc,
    .s_out_valid, .wr_push, .wr_hi, .wr_r,
    .part_done, .cur_j, .cur_k, .cur_p
  );
  assign cur_q  = q;
  assign s_desc = s_in_desc;

  // memories: index {b1, b0} is M<b1><b0>
  logic  m_push [4];
  logic  m_pop  [4];
  bcol_t m_din  [4];
  bcol_t m_dout [4];
  logic  m_empty [4];

  bcol_t wr_data;

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
      // CI reads Mq0 and Mq1; the result is taken from Mq0 when done.
      m_pop[g]  = (rd_pop && gi[1] == q) || (done && out_pop && gi == {q, 1'b0});
      // CO writes M(not q)r; loading writes M00 / M01 while not sorting.
      if (busy) begin
        m_push[g] = wr_push && gi == {~q, wr_r};
        m_din[g]  = wr_data;
      end else begin
        m_push[g] = load_valid && gi == {1'b0, load_sel};
        m_din[g]  = load_col;
      end
    end
  end

  // sorting chip S: keys 0..NS/2-1 from Mq0, the rest from Mq1
  logic [R-1:0] s_in  [NS];
  logic [R-1:0] s_out [NS];
  always_comb begin
    for (int n = 0; n < NS / 2; n++) begin
      s_in[n]          = m_dout[{q, 1'b0}][n];
      s_in[n + NS / 2] = m_dout[{q, 1'b1}][n];
    end
  end

  oet_sorter #(.NS(NS), .R(R), .S(S)) u_sort (
    .clk, .rst_n,
    .in_valid (s_in_valid),
    .in_head  (s_in_head),
    .in_desc  (s_in_desc),
    .in_col   (s_in),
    .out_valid(s_out_valid),
    .out_head (s_out_head),
    .out_desc (s_out_desc),
    .out_col  (s_out)
  );

  // CO datapath: lower block direct, upper block through an S-word buffer.
  bcol_t lo_blk, hi_blk;
  bcol_t hbuf [S];
  always_comb begin
    for (int n = 0; n < NS / 2; n++) begin
      lo_blk[n] = s_out[n];
      hi_blk[n] = s_out[n + NS / 2];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < S; i++) hbuf[i] <= '0;
    end else if (s_out_valid || wr_hi) begin
      hbuf[0] <= hi_blk;
      for (int i = 1; i < S; i++) hbuf[i] <= hbuf[i-1];
    end
  end

  assign wr_data = wr_hi ? hbuf[S-1] : lo_blk;

  assign out_valid = done && !m_empty[{q, 1'b0}];
  assign out_col   = m_dout[{q, 1'b0}];

  // S's head and direction flags are not needed by CO, which counts columns.
  logic unused_flags;
  assign unused_flags = s_out_head ^ s_out_desc;

endmodule
