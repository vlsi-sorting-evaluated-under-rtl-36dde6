// tb_sema: self-checking test of the serial-to-matrix transform.
//
// Loads sqrt(K) random keys bit-serially (K = 16 and K = 64), runs SEMA and
// compares the array with a model computed here: the keys reshaped tile by
// tile as TOSI(1, K), TOSI(2, K/2), ... prescribe (bit b of an R x C key in
// row R-1-b/C, column b%C; the upper key of a pair goes to the right). It also
// checks that every final tile holds one whole key in row-major order, top row
// most significant, and the clock count log2(Q) + Q + K - 2.
module tb_sema;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ld16 = 0, st16 = 0, busy16, done16;
  logic [3:0]  lb16 = '0;
  logic [15:0] ao16 [4];
  sema #(.K(16)) u16 (.clk, .rst_n, .load_en(ld16), .load_bits(lb16), .start(st16),
                      .busy(busy16), .done(done16), .a_out(ao16));

  logic        ld64 = 0, st64 = 0, busy64, done64;
  logic [7:0]  lb64 = '0;
  logic [63:0] ao64 [8];
  sema #(.K(64)) u64 (.clk, .rst_n, .load_en(ld64), .load_bits(lb64), .start(st64),
                      .busy(busy64), .done(done64), .a_out(ao64));

  int bc16 = 0, bc64 = 0, dn16 = 0, dn64 = 0;
  always @(posedge clk) begin
    if (busy16) bc16++;
    if (busy64) bc64++;
    if (done16) dn16++;
    if (done64) dn64++;
  end

  int grid [8][64];   // key id * 64 + bit index at each PE

  task automatic model(input int q, input int k);
    int tmp [8][64];
    for (int y = 0; y < q; y++) for (int x = 0; x < k; x++) grid[y][x] = y * 64 + x;
    for (int i = 0; (1 << i) < q; i++) begin
      int r, s;
      r = 1 << i; s = k >> i;
      for (int ty = 0; ty < q; ty += 2 * r)
        for (int tx = 0; tx < k; tx += s)
          for (int key = 0; key < 2; key++)
            for (int b = 0; b < r * s; b++)
              tmp[ty + 2 * r - 1 - b / (s / 2)][tx + (key == 0 ? s / 2 : 0) + b % (s / 2)] =
                grid[ty + key * r + r - 1 - b / s][tx + b % s];
      for (int y = 0; y < q; y++) for (int x = 0; x < k; x++) grid[y][x] = tmp[y][x];
    end
  endtask

  logic [63:0] keys [8];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int round = 0; round < 10; round++) begin
      int b0, d0;
      // K = 16
      for (int y = 0; y < 8; y++) keys[y] = {$urandom, $urandom};
      for (int n = 0; n < 16; n++) begin
        ld16 <= 1;
        for (int y = 0; y < 4; y++) lb16[y] <= keys[y][15 - n];
        @(posedge clk);
      end
      ld16 <= 0; st16 <= 1; b0 = bc16; d0 = dn16;
      @(posedge clk);
      st16 <= 0;
      #1;
      while (busy16) @(posedge clk);
      #1;
      checks++;
      if (bc16 - b0 != 2 + 4 + 16 - 2 || dn16 - d0 != 1) begin
        failures++; $display("K=16: %0d clocks, %0d done pulses", bc16 - b0, dn16 - d0);
      end
      model(4, 16);
      for (int y = 0; y < 4; y++) for (int x = 0; x < 16; x++) begin
        checks++;
        if (ao16[y][x] != keys[grid[y][x] / 64][grid[y][x] % 64]) begin
          failures++; $display("K=16 PE %0d,%0d wrong", y, x);
        end
        // tile structure: tile x/4 holds one key, bit (3-y)*4 + x%4
        checks++;
        if (grid[y][x] % 64 != (3 - y) * 4 + x % 4 || grid[y][x] / 64 != grid[0][x & ~3] / 64) begin
          failures++; $display("K=16 tile layout wrong at %0d,%0d", y, x);
        end
      end
      // K = 64
      for (int n = 0; n < 64; n++) begin
        ld64 <= 1;
        for (int y = 0; y < 8; y++) lb64[y] <= keys[y][63 - n];
        @(posedge clk);
      end
      ld64 <= 0; st64 <= 1; b0 = bc64; d0 = dn64;
      @(posedge clk);
      st64 <= 0;
      #1;
      while (busy64) @(posedge clk);
      #1;
      checks++;
      if (bc64 - b0 != 3 + 8 + 64 - 2 || dn64 - d0 != 1) begin
        failures++; $display("K=64: %0d clocks, %0d done pulses", bc64 - b0, dn64 - d0);
      end
      model(8, 64);
      for (int y = 0; y < 8; y++) for (int x = 0; x < 64; x++) begin
        checks++;
        if (ao64[y][x] != keys[grid[y][x] / 64][grid[y][x] % 64]) begin
          failures++; $display("K=64 PE %0d,%0d wrong", y, x);
        end
      end
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
