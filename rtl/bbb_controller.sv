// bbb_controller: control units CI and CO of Batcher's bitonic sort on blocks
// of data, BBB(S).
//
// The data starts as 2^M blocks, 2^(M-1) in each of M00 and M01. One pass
// ("part B") reads block i (i = 0 .. 2^(M-1)-1) from each of Mq0 and Mq1,
// lets sorting chip S sort the two blocks together, ascending when bit j of i
// is 0 and descending otherwise, and writes the two result blocks, the lower
// one first, into memory M(not q)r with r = bit p of i. The output memory thus
// changes every 2^p pairs, which performs the perfect shuffle on groups of
// 2^p blocks. After a pass q is inverted. The passes run for j = 0..M-1 and
// k = 0..j, with p := j when k = j; there are (M^2+M)/2 of them, and the last
// one leaves all blocks in ascending order in Mq0. These loops follow the
// paper's algorithm BBB(S).
//
// CI (input side) pops one block column from Mq0 and Mq1 per clock for S
// clocks and marks the first column (head) and the direction. CO (output
// side) counts the result pairs coming out of S; it writes the lower block
// straight from S and the upper one, held in a one-block buffer in the
// datapath, in the next S clocks. Since a memory takes one block column per
// clock, writing a pair takes 2S clocks, so CI starts a pair every 2S clocks
// (period p_S = 2S); this pacing is this design's choice.
//
// Timing: a pass takes 2^(M-1) * 2S + TS clocks, where TS is the sorting time
// of S; the next pass starts the clock after the last write of the previous.
module bbb_controller #(
  parameter int M  = 3,
  parameter int S  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  // CI
  output logic       q,
  output logic       rd_pop,
  output logic       s_in_valid,
  output logic       s_in_head,
  output logic       s_in_desc,
  // CO
  input  logic       s_out_valid,
  output logic       wr_push,
  output logic       wr_hi,
  output logic       wr_r,
  // pass status
  output logic       part_done,
  output logic [7:0] cur_j,
  output logic [7:0] cur_k,
  output logic [7:0] cur_p
);
  localparam int NB2 = 1 << (M - 1);   // block pairs per pass
  localparam int IW  = M + 1;
  localparam int CW  = $clog2(2 * S + 1);

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_DONE} state_e;
  state_e state;

  logic [7:0]    j, k, p;
  // CI counters
  logic          feeding;
  logic [IW-1:0] fi;
  logic [CW-1:0] ft;
  // CO counters
  logic [IW-1:0] oi;
  logic [CW-1:0] lc, hc;

  logic last_write;
  assign last_write = (hc == CW'(1)) && (oi == IW'(NB2 - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      j       <= '0;
      k       <= '0;
      p       <= '0;
      q       <= 1'b0;
      feeding <= 1'b0;
      fi      <= '0;
      ft      <= '0;
      oi      <= '0;
      lc      <= '0;
      hc      <= '0;
    end else begin
      case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state   <= ST_RUN;
            j       <= '0;
            k       <= '0;
            p       <= '0;
            q       <= 1'b0;
            feeding <= 1'b1;
            fi      <= '0;
            ft      <= '0;
            oi      <= '0;
            lc      <= '0;
            hc      <= '0;
          end
        end
        default: begin
          // CI: S columns of a pair, then S idle clocks.
          if (feeding) begin
            if (ft == CW'(2 * S - 1)) begin
              ft <= '0;
              fi <= fi + 1'b1;
            end else begin
              ft <= ft + 1'b1;
            end
            if (ft == CW'(S - 1) && fi == IW'(NB2 - 1)) feeding <= 1'b0;
          end
          // CO: lower block straight from S, then the buffered upper block.
          if (s_out_valid) begin
            if (lc == CW'(S - 1)) begin
              lc <= '0;
              hc <= CW'(S);
            end else begin
              lc <= lc + 1'b1;
            end
          end
          if (hc != '0) begin
            hc <= hc - 1'b1;
            if (hc == CW'(1)) oi <= oi + 1'b1;
          end
          // End of a pass: advance the loops, swap input and output memories.
          if (last_write) begin
            q  <= ~q;
            oi <= '0;
            if (k == j) begin
              if (j == 8'(M - 1)) begin
                state <= ST_DONE;
              end else begin
                j       <= j + 1'b1;
                k       <= '0;
                feeding <= 1'b1;
                fi      <= '0;
                ft      <= '0;
              end
            end else begin
              k <= k + 1'b1;
              if (k + 1'b1 == j) p <= j;
              feeding <= 1'b1;
              fi      <= '0;
              ft      <= '0;
            end
          end
        end
      endcase
    end
  end

  // CI outputs
  assign rd_pop     = (state == ST_RUN) && feeding && (ft < CW'(S));
  assign s_in_valid = rd_pop;
  assign s_in_head  = rd_pop && (ft == '0);
  assign s_in_desc  = fi[j[$clog2(IW)-1:0]];

  // CO outputs
  assign wr_hi   = (hc != '0);
  assign wr_push = (state == ST_RUN) && (s_out_valid || wr_hi);
  assign wr_r    = oi[p[$clog2(IW)-1:0]];

  assign busy      = (state == ST_RUN);
  assign done      = (state == ST_DONE);
  assign part_done = (state == ST_RUN) && last_write;
  assign cur_j     = j;
  assign cur_k     = k;
  assign cur_p     = p;

  // CO must have finished the upper block of a pair before S delivers the
  // next pair.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(s_out_valid && wr_hi)) else $error("bbb_controller: output pairs overlap");
  end

  initial assert (M >= 1 && M <= 8) else $error("bbb_controller: M out of range");

endmodule
