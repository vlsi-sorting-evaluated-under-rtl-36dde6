// sema: algorithm SEMA ("serial to matrix"), which turns keys that arrive
// bit-serially into sqrt(K) x sqrt(K) bit matrices, the form the matrix
// comparator needs.
//
// The array has Q = sqrt(K) rows of K processing elements (tosi_array). Row y
// receives key y bit-serially, most significant bit first, so that after K
// load clocks bit c of the key sits in column c. SEMA then applies
// TOSI(2^i, K/2^i) for i = 0 .. log2(Q)-1 to the whole array: each
// application turns every pair of stacked 2^i x K/2^i keys into two
// 2^(i+1) x K/2^(i+1) keys side by side. At the end the Q keys lie side by
// side as Q x Q matrices, row-major with the top row most significant. The
// iteration follows the paper's SEMA; which key lands in which tile follows
// from TOSI putting the upper key to the right.
//
// Interface: load_en/load_bits as in tosi_array; start begins the transform,
// busy is high during it and done pulses in its last clock. a_out shows the A
// registers. Timing: the transform takes log2(Q) + Q + K - 2 clocks, the
// paper's T_SEMA (the applications follow each other without a gap).
module sema #(
  parameter int K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_en,
  input  logic [$rtoi($sqrt(K))-1:0] load_bits,
  input  logic         start,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] a_out [$rtoi($sqrt(K))]
);
  localparam int Q  = $rtoi($sqrt(K));
  localparam int LQ = $clog2(Q);
  localparam int LK = $clog2(K);

  logic       t_start, t_busy, t_last;
  logic [3:0] it;
  logic       running;
  logic [3:0] it_next;

  tosi_array #(.H(Q), .W(K)) u_array (
    .clk, .rst_n,
    .load_en,
    .load_bits,
    .start (t_start),
    .lg_r  (it_next),
    .lg_s  (5'(LK) - 5'(it_next)),
    .busy  (t_busy),
    .last  (t_last),
    .a_out
  );

  logic final_it;
  assign final_it = (it == 4'(LQ - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      it      <= '0;
      running <= 1'b0;
    end else if (!running) begin
      if (start) begin
        it      <= '0;
        running <= 1'b1;
      end
    end else if (t_last) begin
      if (final_it) running <= 1'b0;
      else          it <= it + 1'b1;
    end
  end

  // TOSI is started when SEMA starts and again in the last clock of every
  // application but the final one; it reads lg_r/lg_s in that clock.
  assign it_next = (!running) ? 4'd0 : it + 4'd1;
  assign t_start = (!running && start) || (running && t_last && !final_it);

  assign busy = t_busy;
  assign done = running && t_last && final_it;

  initial begin
    assert (Q * Q == K && Q >= 2) else $error("sema: K must be an even power of two, at least 4");
  end

endmodule
