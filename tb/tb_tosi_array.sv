// tb_tosi_array: self-checking test of the TOSI processing-element array.
//
// Runs TOSI(2, 8) on a 4 x 8 array (the two 2 x 8 keys turned into two 4 x 4
// keys side by side) and TOSI(1, 8), TOSI(2, 4), TOSI(4, 2) and TOSI(1, 2)
// on an 8 x 8 array, each with random keys. The expected layout is computed
// here from the bit numbering: a key's bit b lies in row R-1-b/C, column b%C
// of its R x C tile, and X must end in the right half, Y in the left half.
// The clock count 1 + s/2 + 2r of each run is checked as well.
module tb_tosi_array;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  // clocks spent busy, counted at the clock edge
  int bc4 = 0, bc8 = 0;
  always @(posedge clk) begin
    if (busy4) bc4++;
    if (busy8) bc8++;
  end

  // array A: 4 x 8
  logic       ld4 = 0, st4 = 0;
  logic [3:0] lb4 = '0;
  logic [3:0] lr4 = '0;
  logic [4:0] ls4 = '0;
  logic       busy4, last4;
  logic [7:0] ao4 [4];
  tosi_array #(.H(4), .W(8)) u4 (.clk, .rst_n, .load_en(ld4), .load_bits(lb4), .start(st4),
                                 .lg_r(lr4), .lg_s(ls4), .busy(busy4), .last(last4), .a_out(ao4));
  // array B: 8 x 8
  logic       ld8 = 0, st8 = 0;
  logic [7:0] lb8 = '0;
  logic [3:0] lr8 = '0;
  logic [4:0] ls8 = '0;
  logic       busy8, last8;
  logic [7:0] ao8 [8];
  tosi_array #(.H(8), .W(8)) u8 (.clk, .rst_n, .load_en(ld8), .load_bits(lb8), .start(st8),
                                 .lg_r(lr8), .lg_s(ls8), .busy(busy8), .last(last8), .a_out(ao8));

  logic init [8][8];
  logic expd [8][8];

  // expected layout after TOSI(r, s) on an h x 8 grid
  task automatic expect_tosi(input int h, input int r, input int s);
    for (int ty = 0; ty < h; ty += 2 * r)
      for (int tx = 0; tx < 8; tx += s)
        for (int key = 0; key < 2; key++)
          for (int b = 0; b < r * s; b++) begin
            int y0, x0, y1, x1;
            y0 = ty + key * r + (r - 1 - b / s);
            x0 = tx + b % s;
            y1 = ty + (2 * r - 1 - b / (s / 2));
            x1 = tx + (key == 0 ? s / 2 : 0) + b % (s / 2);
            expd[y1][x1] = init[y0][x0];
          end
  endtask

  task automatic run4(input int lr, input int ls);
    int t0;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 8; x++) init[y][x] = 1'($urandom);
    for (int n = 0; n < 8; n++) begin
      ld4 <= 1;
      for (int y = 0; y < 4; y++) lb4[y] <= init[y][7 - n];
      @(posedge clk);
    end
    ld4 <= 0; st4 <= 1; lr4 <= 4'(lr); ls4 <= 5'(ls);
    @(posedge clk);
    st4 <= 0;
    t0 = bc4;
    #1;
    while (busy4) @(posedge clk);
    #1;
    checks++;
    if (bc4 - t0 != 1 + (1 << ls) / 2 + 2 * (1 << lr)) begin
      failures++; $display("TOSI(%0d,%0d) took %0d clocks", 1 << lr, 1 << ls, bc4 - t0);
    end
    expect_tosi(4, 1 << lr, 1 << ls);
    for (int y = 0; y < 4; y++) for (int x = 0; x < 8; x++) begin
      checks++;
      if (ao4[y][x] != expd[y][x]) begin failures++; $display("4x8 TOSI(%0d,%0d) PE %0d,%0d wrong", 1 << lr, 1 << ls, y, x); end
    end
  endtask

  task automatic run8(input int lr, input int ls);
    int t0;
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) init[y][x] = 1'($urandom);
    for (int n = 0; n < 8; n++) begin
      ld8 <= 1;
      for (int y = 0; y < 8; y++) lb8[y] <= init[y][7 - n];
      @(posedge clk);
    end
    ld8 <= 0; st8 <= 1; lr8 <= 4'(lr); ls8 <= 5'(ls);
    @(posedge clk);
    st8 <= 0;
    t0 = bc8;
    #1;
    while (busy8) @(posedge clk);
    #1;
    checks++;
    if (bc8 - t0 != 1 + (1 << ls) / 2 + 2 * (1 << lr)) begin
      failures++; $display("TOSI(%0d,%0d) took %0d clocks", 1 << lr, 1 << ls, bc8 - t0);
    end
    expect_tosi(8, 1 << lr, 1 << ls);
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      checks++;
      if (ao8[y][x] != expd[y][x]) begin failures++; $display("8x8 TOSI(%0d,%0d) PE %0d,%0d wrong", 1 << lr, 1 << ls, y, x); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      run4(1, 3);
      run8(0, 3);
      run8(1, 2);
      run8(2, 1);
      run8(0, 1);
    end
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
