// mutex: two-way mutual exclusion element.
//
// Grants g1 to r1 or g2 to r2, never both. A grant stays high as long as its
// request does; it falls one step after the request falls, and only then can
// the other request be granted. In the circuit of the document a
// cross-coupled NAND pair followed by a metastability filter decides between
// two requests that arrive together; here the decision is a register and a
// tie is resolved in favour of the side that did not win last time, an
// arbitrary but fair choice that is this design's own.
//
// Interface: r1, r2 requests; g1, g2 grants, registered (one clk step after
// the request).
module mutex (
  input  logic clk,
  input  logic rst_n,
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  logic last_was_1;  // side that won the most recent new grant
  logic g1_d, g2_d;

  always_comb begin
    g1_d = r1 & (g1 | (~g2 & (~r2 | ~last_was_1)));
    g2_d = r2 & (g2 | (~g1 & ~g1_d));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      g1 <= 1'b0;
      g2 <= 1'b0;
      last_was_1 <= 1'b0;
    end else begin
      g1 <= g1_d;
      g2 <= g2_d;
      if (g1_d & ~g1) last_was_1 <= 1'b1;
      else if (g2_d & ~g2) last_was_1 <= 1'b0;
    end
  end

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(g1 && g2));
endmodule
