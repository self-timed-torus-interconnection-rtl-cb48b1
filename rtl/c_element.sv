// c_element: Muller C-element row, WIDTH bits wide, with an optional
// asymmetric "plus" input.
//
// Each output bit rises when all of its inputs a, b (and c) are high and
// falls when a and b are both low; otherwise it holds. The "plus" input c
// only takes part in the rising condition, as in the asymmetric three-input
// C-element of the document, whose falling condition ignores c. Tie c high
// for an ordinary two-input C-element.
//
// Timing: the state-holding node of every C-element is a register clocked by
// clk, so a C-element switches one clk step after its inputs allow it. This
// unit-delay rendering of the self-timed circuit is this design's choice: it
// keeps every feedback loop behind a flip-flop so that the circuit can be
// synthesized and simulated cycle by cycle, while the handshakes stay
// delay-insensitive. rst_n clears the row.
module c_element #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] z
);
  always_ff @(posedge clk) begin
    if (!rst_n) z <= '0;
    else        z <= (a & b & c) | (z & (a | b));
  end
endmodule
