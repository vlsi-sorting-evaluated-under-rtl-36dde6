// matrix_comparator: systolic compare-exchange of two keys stored as R x S bit
// matrices (the "matrix comparator" of the linear-model sorter).
//
// Keys X and Y enter one column per clock, most significant column first; a
// column carries R bits of each key, bit R-1 being the most significant row
// (key bit (S-1-t)*R + i sits in row i of column t). Each row has a chain of
// B cells, which shift the bit pair {x, y} to the right unchanged, and a chain
// of C cells, which shift the same pair and in the same clock spread the
// comparison result:
//   C' = E  if E != e          (decision of the more significant column, east)
//   C' = S  if E == e, S != e  (decision of the more significant row, south)
//   C' = N  if E == S == C == e
//   C' = C  otherwise
// where e is 00 or 11. After mc_cols(R) = R cell columns (numbered 0..R-1)
// every C cell of a key column holds the pair at the most significant
// differing bit, and the R cell of each row outputs {y, x} when that pair is
// 10 (X > Y), else {x, y}. These rules and the cell arrangement follow the
// matrix comparator of the linear-model sorter. The column count is R: with
// one column fewer, a later key column can reach the last column before the
// decision of an earlier one has spread to all rows.
//
// Design choices of this implementation: a head flag travels with each column
// and, on a key pair's first column, hides the east neighbour (which belongs
// to the previous key pair) so pairs can follow each other back to back; a
// direction flag selects descending order (exchange on 01 instead of 10); the
// two phases of a clock period are merged into one register update.
//
// Timing: a column presented at a rising edge leaves the R cells
// mc_latency(R) = R+1 clocks later (out_* registered); one key pair per S clocks.
module matrix_comparator
  import vsort_pkg::*;
#(
  parameter int R = 4,
  parameter int S = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_head,
  input  logic         in_desc,
  input  logic [R-1:0] in_x,
  input  logic [R-1:0] in_y,
  output logic         out_valid,
  output logic         out_head,
  output logic         out_desc,
  output logic [R-1:0] out_lo,
  output logic [R-1:0] out_hi
);
  localparam int NC = mc_cols(R);

  pair_t b_q [R][NC];
  pair_t c_q [R][NC];
  logic  v_q [NC];
  logic  h_q [NC];
  logic  d_q [NC];

  // Phase one: what each cell takes from its left neighbour (or the inputs).
  pair_t b_in [R][NC];
  pair_t c_in [R][NC];
  logic  h_in [NC];

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      h_in[c] = (c == 0) ? in_head : h_q[c-1];
      for (int r = 0; r < R; r++) begin
        b_in[r][c] = (c == 0) ? {in_x[r], in_y[r]} : b_q[r][c-1];
        c_in[r][c] = (c == 0) ? {in_x[r], in_y[r]} : c_q[r][c-1];
      end
    end
  end

  // Phase two: spread the decision with the rules above.
  pair_t c_nxt [R][NC];

  always_comb begin
    pair_t e_n, s_n, n_n, own;
    for (int c = 0; c < NC; c++) begin
      for (int r = 0; r < R; r++) begin
        e_n = (c == NC - 1 || h_in[c]) ? PAIR_E : c_in[r][(c == NC - 1) ? c : c + 1];
        s_n = (r == R - 1) ? PAIR_E : c_in[(r == R - 1) ? r : r + 1][c];
        n_n = (r == 0) ? PAIR_E : c_in[(r == 0) ? r : r - 1][c];
        own = c_in[r][c];
        if (!pair_is_e(e_n))      c_nxt[r][c] = e_n;
        else if (!pair_is_e(s_n)) c_nxt[r][c] = s_n;
        else if (pair_is_e(own))  c_nxt[r][c] = n_n;
        else                      c_nxt[r][c] = own;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NC; c++) begin
        v_q[c] <= 1'b0;
        h_q[c] <= 1'b0;
        d_q[c] <= 1'b0;
        for (int r = 0; r < R; r++) begin
          b_q[r][c] <= PAIR_E;
          c_q[r][c] <= PAIR_E;
        end
      end
    end else begin
      for (int c = 0; c < NC; c++) begin
        v_q[c] <= (c == 0) ? in_valid : v_q[c-1];
        h_q[c] <= h_in[c];
        d_q[c] <= (c == 0) ? in_desc : d_q[c-1];
        for (int r = 0; r < R; r++) begin
          b_q[r][c] <= b_in[r][c];
          c_q[r][c] <= c_nxt[r][c];
        end
      end
    end
  end

  // Protocol check: a key pair is S consecutive valid columns, the first one
  // flagged as head.
  int unsigned col_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) col_cnt <= 0;
    else if (in_valid) col_cnt <= in_head ? 1 : col_cnt + 1;
  end
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      assert (in_head == (col_cnt == 0 || col_cnt == S))
        else $error("matrix_comparator: head flag must start every key pair of %0d columns", S);
    end
  end

  // R cells: exchange the pair when the decision says the order is wrong.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_desc  <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
    end else begin
      out_valid <= v_q[NC-1];
      out_head  <= h_q[NC-1];
      out_desc  <= d_q[NC-1];
      for (int r = 0; r < R; r++) begin
        if (c_q[r][NC-1] == (d_q[NC-1] ? 2'b01 : 2'b10)) begin
          out_lo[r] <= b_q[r][NC-1][0];
          out_hi[r] <= b_q[r][NC-1][1];
        end else begin
          out_lo[r] <= b_q[r][NC-1][1];
          out_hi[r] <= b_q[r][NC-1][0];
        end
      end
    end
  end

endmodule
