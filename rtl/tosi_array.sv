// tosi_array: H x W array of processing elements running algorithm TOSI
// ("top to side"): in every 2r x s tile, the r x s key X in the upper r rows
// and the r x s key Y in the lower r rows become two 2r x s/2 keys side by
// side, X in the right half and Y in the left half.
//
// Every PE has two one-bit registers, A (upper) and B (lower). Keys are kept
// row-major with the top row most significant, before and after. The steps
// follow the paper's TOSI:
//   1 (1 clock)     the left half of the tile copies A into B;
//   2 (s/2 clocks)  in the upper r rows B shifts right into the right half,
//                   in the lower r rows A shifts left into the left half;
//   3 (2r clocks)   the right half shifts down and the left half up, through
//                   the chain A, B, A, B, ... of consecutive PEs, until every
//                   bit sits in an A register.
// In step 3 the bit that has q bits ahead of it in its chain moves q times
// (right half) or q+1 times (left half); a PE whose position in the chain is
// below 2t+1 (right) or 2t (left) in the t-th clock of the step holds its bit.
// This stop rule, counted from the step's clock number, is this design's
// choice: the paper only says the bits move until they are in the A
// registers. TOSI(r, s) thus takes 1 + s/2 + 2r clocks, as in the paper.
//
// Interface: load_en shifts load_bits[y] into A of row y from the left
// (column 0) and every A one column to the right, so a row takes W clocks
// and the bit given first ends in column W-1. start (with lg_r = log2 r and
// lg_s = log2 s, 2r dividing H and s dividing W, s >= 2) begins step 1 in
// the next clock; last is high in the final clock of step 3, where a new
// start may already be given. a_out shows the A registers.
module tosi_array #(
  parameter int H = 4,
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_en,
  input  logic [H-1:0] load_bits,
  input  logic         start,
  input  logic [3:0]   lg_r,
  input  logic [4:0]   lg_s,
  output logic         busy,
  output logic         last,
  output logic [W-1:0] a_out [H]
);
  typedef enum logic [1:0] {T_IDLE, T_STEP1, T_STEP2, T_STEP3} step_e;
  step_e step;
  logic [15:0] cnt;
  logic [3:0]  rl;
  logic [4:0]  sl;

  logic [W-1:0] a_q [H];
  logic [W-1:0] b_q [H];
  logic [W-1:0] a_d [H];
  logic [W-1:0] b_d [H];

  // sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step <= T_IDLE;
      cnt  <= '0;
      rl   <= '0;
      sl   <= '0;
    end else if (start && (step == T_IDLE || last)) begin
      step <= T_STEP1;
      cnt  <= '0;
      rl   <= lg_r;
      sl   <= lg_s;
    end else begin
      case (step)
        T_STEP1: begin
          step <= T_STEP2;
          cnt  <= '0;
        end
        T_STEP2: begin
          if (cnt == (16'(1) << sl) / 2 - 1) begin
            step <= T_STEP3;
            cnt  <= '0;
          end else cnt <= cnt + 1'b1;
        end
        T_STEP3: begin
          if (last) step <= T_IDLE;
          else cnt <= cnt + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign last = (step == T_STEP3) && (cnt == (16'(2) << rl) - 1);
  assign busy = (step != T_IDLE);

  // PE next state
  always_comb begin
    int r2, s, by, bx, pos, t;
    logic upper, left;
    r2 = 2 << rl;
    s  = 1 << sl;
    t  = int'(cnt);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        pos   = 0;
        by    = y % r2;
        bx    = x % s;
        upper = by < r2 / 2;
        left  = bx < s / 2;
        a_d[y][x] = a_q[y][x];
        b_d[y][x] = b_q[y][x];
        case (step)
          T_IDLE: begin
            if (load_en) a_d[y][x] = (x == 0) ? load_bits[y] : a_q[y][(x == 0) ? 0 : x - 1];
          end
          T_STEP1: begin
            if (left) b_d[y][x] = a_q[y][x];
          end
          T_STEP2: begin
            if (upper) b_d[y][x] = (bx == 0) ? 1'b0 : b_q[y][(x == 0) ? 0 : x - 1];
            else       a_d[y][x] = (bx == s - 1) ? 1'b0 : a_q[y][(x == W - 1) ? x : x + 1];
          end
          T_STEP3: begin
            if (!left) begin
              // downward chain: A(by) at 2by, B(by) at 2by+1
              pos = 2 * by;
              if (by > 0 && pos - 1 >= 2 * t + 1) a_d[y][x] = b_q[(y == 0) ? 0 : y - 1][x];
              if (pos >= 2 * t + 1) b_d[y][x] = a_q[y][x];
            end else begin
              // upward chain: B(by) at 2(2r-1-by), A(by) one above it
              pos = 2 * (r2 - 1 - by);
              if (pos >= 2 * t) a_d[y][x] = b_q[y][x];
              if (by < r2 - 1 && pos - 1 >= 2 * t) b_d[y][x] = a_q[(y == H - 1) ? y : y + 1][x];
            end
          end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int y = 0; y < H; y++) begin
        a_q[y] <= '0;
        b_q[y] <= '0;
      end
    end else begin
      a_q <= a_d;
      b_q <= b_d;
    end
  end

  assign a_out = a_q;

endmodule
