// circe_pipe_reg: one of the REG boxes of CIRCE.
//
// Holds a field of the instruction in flight (its CV-X-IF id, or its
// destination register rd) from the cycle the decoder accepts it until the
// committer hands the result back, so that the result carries the right
// tags. Loads `d_i` on a clock edge with `en_i` high, keeps its value
// otherwise; reset clears it. The document draws the box and its input;
// width, enable and reset are this design's choices.
module circe_pipe_reg #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             en_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   q_o <= '0;
    else if (en_i) q_o <= d_i;
  end

endmodule
