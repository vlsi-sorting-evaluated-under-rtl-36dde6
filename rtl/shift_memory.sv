// shift_memory: one data chip of the one-board sorter (M00, M01, M10, M11).
//
// A first-in first-out memory of DEPTH words of WIDTH bits. Seen from its
// ports it is the large shift register of the paper's data chips: words leave
// in the order they entered, with no addressing from outside. Here the words
// stay in place in an array and a read and a write pointer move instead, which
// behaves the same at the ports and avoids moving every word on every shift.
//
// Interface: push writes din; pop removes the word shown on dout (dout is
// valid whenever empty is low, first-word fall-through). push and pop may be
// given in the same clock. Pushing when full or popping when empty is a
// protocol error (checked by assertions). Timing: one word in and one out per
// clock.
module shift_memory #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  assign dout  = mem[rp];
  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(push && full && !pop)) else $error("shift_memory: push while full");
      assert (!(pop && empty)) else $error("shift_memory: pop while empty");
    end
  end

endmodule
