// tb_shift_memory: self-checking test of the FIFO shift memory.
//
// Random pushes and pops (never past full or empty) are checked against a
// queue kept in the testbench; the test also fills the memory to its depth,
// checks the full flag and the count, and empties it again in order.
module tb_shift_memory;
  localparam int WIDTH = 12;
  localparam int DEPTH = 20;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];

  shift_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic step(input logic do_push, input logic do_pop);
    logic [WIDTH-1:0] d;
    d = WIDTH'($urandom);
    push <= do_push; pop <= do_pop; din <= d;
    @(posedge clk);
    if (do_pop) void'(model.pop_front());
    if (do_push) model.push_back(d);
    push <= 0; pop <= 0;
    #1;
    checks++;
    if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
      failures++; $display("count %0d empty %0d full %0d, model size %0d", count, empty, full, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (dout != model[0]) begin failures++; $display("dout %h expected %h", dout, model[0]); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic pu, po;
      pu = $urandom_range(0, 1) && model.size() < DEPTH;
      po = $urandom_range(0, 1) && model.size() > 0;
      step(pu, po);
    end
    while (model.size() > 0) step(0, 1);
    for (int n = 0; n < DEPTH; n++) step(1, 0);
    checks++;
    if (!full) begin failures++; $display("not full after %0d pushes", DEPTH); end
    step(1, 1);
    while (model.size() > 0) step(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
