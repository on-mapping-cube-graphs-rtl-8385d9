// delay_line: the connection behind one labelled output port of a processor.
//
// A value written in cycle t appears at the output in cycle t+DELAY: a chain
// of DELAY registers, DELAY >= 1. In the array, DELAY is the label's delay
// constant d_l, so a data stream moves 1/d_l processors per cycle. The chain
// holds DELAY values at once; the array keeps them apart because the mapping
// never puts two values at one input port in the same cycle.
//
// Interface: d_in is sampled on every rising edge of clk; d_out is the last
// register. rst_n (synchronous, active low) clears the chain to zero, so an
// array leaving reset carries only zeros. The reset is this design's choice;
// the document does not describe one.
module delay_line
  import cube_map_pkg::*;
#(
  parameter int unsigned DELAY = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t d_in,
  output word_t d_out
);

  // stage[0] is the newest value, stage[DELAY-1] the oldest.
  word_t [DELAY-1:0] stage;

  if (DELAY == 1) begin : g_single
    always_ff @(posedge clk) begin
      if (!rst_n) stage <= '0;
      else        stage <= d_in;
    end
  end else begin : g_chain
    always_ff @(posedge clk) begin
      if (!rst_n) stage <= '0;
      else        stage <= {stage[DELAY-2:0], d_in};
    end
  end

  assign d_out = stage[DELAY-1];

  if (DELAY < 1) begin : g_bad_delay
    $error("delay_line: DELAY must be at least 1");
  end

endmodule
