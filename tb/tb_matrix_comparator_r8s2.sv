// tb_matrix_comparator_r8s2: the matrix comparator test on 8 x 2 key matrices (tall keys: the
// decision has 7 rows to spread through while a pair lasts only 2 clocks).
//
// Streams random key pairs back to back (one pair per S clocks), plus pairs
// that differ only in their least significant bit, equal pairs and pairs that
// differ in a single row, in both directions. The expected outputs are the
// integer minimum and maximum of each pair, computed here; the test also
// checks that every column leaves exactly mc_latency(R) clocks after entering.
module tb_matrix_comparator_r8s2;
  import vsort_pkg::*;
  localparam int R = 8;
  localparam int S = 2;
  localparam int K = R * S;
  localparam int LAT = mc_latency(R);
  localparam int NPAIRS = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_head = 0, in_desc = 0;
  logic [R-1:0] in_x = '0, in_y = '0;
  logic out_valid, out_head, out_desc;
  logic [R-1:0] out_lo, out_hi;
  int checks = 0, failures = 0;

  matrix_comparator #(.R(R), .S(S)) dut (.*);

  always #5 clk = ~clk;

  logic [K-1:0] xs [NPAIRS], ys [NPAIRS];
  logic         ds [NPAIRS];
  int           in_cycle [NPAIRS];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [R-1:0] col_of(input logic [K-1:0] key, input int t);
    for (int i = 0; i < R; i++) col_of[i] = key[(S - 1 - t) * R + i];
  endfunction

  // Output collector
  int opair = 0, ocol = 0;
  logic [K-1:0] lo_acc, hi_acc;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocol == 0) begin
        checks++;
        if (!out_head) begin failures++; $display("missing head at pair %0d", opair); end
        checks++;
        if (cycle != in_cycle[opair] + LAT) begin
          failures++; $display("latency %0d, expected %0d", cycle - in_cycle[opair], LAT);
        end
      end
      for (int i = 0; i < R; i++) begin
        lo_acc[(S - 1 - ocol) * R + i] = out_lo[i];
        hi_acc[(S - 1 - ocol) * R + i] = out_hi[i];
      end
      if (ocol == S - 1) begin
        logic [K-1:0] mn, mx;
        mn = (xs[opair] < ys[opair]) ? xs[opair] : ys[opair];
        mx = (xs[opair] < ys[opair]) ? ys[opair] : xs[opair];
        if (ds[opair]) begin logic [K-1:0] t; t = mn; mn = mx; mx = t; end
        checks++;
        if (lo_acc != mn || hi_acc != mx) begin
          failures++;
          $display("pair %0d x=%h y=%h desc=%0d: got %h %h, expected %h %h",
                   opair, xs[opair], ys[opair], ds[opair], lo_acc, hi_acc, mn, mx);
        end
        opair++;
        ocol = 0;
      end else ocol++;
    end
  end

  initial begin
    for (int p = 0; p < NPAIRS; p++) begin
      xs[p] = K'($urandom);
      ds[p] = p[0] ^ p[3];
      case (p % 5)
        0: ys[p] = xs[p] ^ K'(1);                     // least significant bit only
        1: ys[p] = xs[p];                             // equal keys
        2: ys[p] = xs[p] ^ (K'($urandom) & {S{R'(1) << (p % R)}}); // one row
        default: ys[p] = K'($urandom);
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < NPAIRS; p++) begin
      // a gap of a few clocks now and then
      if (p % 37 == 5) begin
        in_valid <= 0; in_head <= 0;
        repeat (3) @(posedge clk);
      end
      for (int t = 0; t < S; t++) begin
        in_valid <= 1;
        in_head  <= (t == 0);
        in_desc  <= ds[p];
        in_x     <= col_of(xs[p], t);
        in_y     <= col_of(ys[p], t);
        if (t == 0) in_cycle[p] = cycle + 1;
        @(posedge clk);
      end
    end
    in_valid <= 0; in_head <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (opair != NPAIRS) begin failures++; $display("only %0d pairs out", opair); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
