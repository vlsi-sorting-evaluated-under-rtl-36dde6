// oet_sorter: sorting chip S, an odd-even transposition network of matrix
// comparators.
//
// NS keys, each an R x S bit matrix, enter in parallel one column per clock
// (most significant column first, see matrix_comparator for the bit order).
// Stage t (t = 0..NS-1) compares keys (0,1), (2,3), ... when t is even and
// keys (1,2), (3,4), ... when t is odd; the keys a stage does not pair pass
// through a delay line as long as a comparator. After NS stages the keys are
// in ascending order (key 0 smallest) or, with in_desc, descending order.
// Using odd-even transposition with the bit-serial comparator replaced by a
// matrix comparator follows the paper's AP^2-optimal sorter; the stage
// arrangement is the textbook odd-even transposition network.
//
// Timing: sorting time NS * mc_latency(R) clocks from the first column in to
// the first column out; a new problem may start every S clocks (period S).
module oet_sorter
  import vsort_pkg::*;
#(
  parameter int NS = 4,
  parameter int R  = 4,
  parameter int S  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_head,
  input  logic         in_desc,
  input  logic [R-1:0] in_col  [NS],
  output logic         out_valid,
  output logic         out_head,
  output logic         out_desc,
  output logic [R-1:0] out_col [NS]
);
  localparam int LAT = mc_latency(R);

  // Stage boundaries: index 0 is the input, index NS the output. The key
  // columns of stage outputs live in col[1..NS]; each stage picks its input
  // (in_col or the previous stage) in its own x, so the module input and
  // output are separate signals.
  logic [R-1:0] col  [1:NS][NS];
  logic         vld  [NS+1];
  logic         head [NS+1];
  logic         desc [NS+1];

  assign vld[0]  = in_valid;
  assign head[0] = in_head;
  assign desc[0] = in_desc;

  for (genvar t = 0; t < NS; t++) begin : g_stage
    localparam int FIRST = t % 2;
    logic [R-1:0] x [NS];
    if (t == 0) begin : g_in
      assign x = in_col;
    end else begin : g_prev
      assign x = col[t];
    end
    for (genvar k = 0; k < NS; k++) begin : g_key
      if (k >= FIRST && k + 1 < NS && (k - FIRST) % 2 == 0) begin : g_cmp
        logic v_o, h_o, d_o;
        matrix_comparator #(.R(R), .S(S)) u_cmp (
          .clk      (clk),
          .rst_n    (rst_n),
          .in_valid (vld[t]),
          .in_head  (head[t]),
          .in_desc  (desc[t]),
          .in_x     (x[k]),
          .in_y     (x[k+1]),
          .out_valid(v_o),
          .out_head (h_o),
          .out_desc (d_o),
          .out_lo   (col[t+1][k]),
          .out_hi   (col[t+1][k+1])
        );
        // The flags are the same in every comparator of a stage; the first
        // one of the stage drives the stage's flag outputs.
        if (k == FIRST) begin : g_flags
          assign vld[t+1]  = v_o;
          assign head[t+1] = h_o;
          assign desc[t+1] = d_o;
        end
      end else if (k == 0 || (k == NS - 1 && (NS - 1 - FIRST) % 2 == 0)) begin : g_pass
        // Unpaired key of an odd stage (or the last key): delay line.
        logic [R-1:0] dly [LAT];
        always_ff @(posedge clk) begin
          if (!rst_n) begin
            for (int i = 0; i < LAT; i++) dly[i] <= '0;
          end else begin
            dly[0] <= x[k];
            for (int i = 1; i < LAT; i++) dly[i] <= dly[i-1];
          end
        end
        assign col[t+1][k] = dly[LAT-1];
      end
    end
  end

  assign out_col   = col[NS];
  assign out_valid = vld[NS];
  assign out_head  = head[NS];
  assign out_desc  = desc[NS];

  initial begin
    assert (NS >= 2 && NS % 2 == 0) else $error("oet_sorter: NS must be even and at least 2");
  end

endmodule
