// linear_systolic_array: a Cube Graph program (here: matrix multiplication)
// laid onto a one-dimensional chain of identical processors.
//
// Many systolic algorithms are naturally written for a 2-D mesh. This array
// runs them on a linear chain instead: every vertex <x1,x2,x3> of the
// program's 3-D grid goes to the processor numbered by its diagonal weight
// w1*x1 + w2*x2 + w3*x3, and the three data streams (labels l1, l2, l3) move
// between neighbouring processors at speeds 1/d_l chosen so that the values a
// vertex needs meet at the right processor in the right cycle and no two
// values of one stream ever share a port.
//
// Parameters H1, H2, H3 are the grid sizes and W1, W2, W3 the diagonalisation
// factor (+1 or -1 each). Everything else follows from cube_map_pkg: the
// processor count NPROC = H1+H2+H3-2, the direction N_l of each stream (+1:
// from processor 1 towards NPROC, -1: the other way) and its delay D_l. The
// defaults (H = 3,2,2, W = 1,1,1) are the document's first example, a 2x2 by
// 2x3 matrix product on 5 processors with d = 1, 2, 5 and every stream moving
// right. W3 = -1 gives its second example, d = 1, 2, 1 with the partial sums
// flowing left against the operands.
//
// Interface (all plain words, cube_map_pkg::word_t):
//   in_l1/in_l2/in_l3  host input of each stream. It drives the input port of
//                      processor 1 when N_l = +1 and of processor NPROC when
//                      N_l = -1, combinationally, in the same cycle.
//   out_l1/out_l2/out_l3 host output of each stream, taken from the far end
//                      processor through one more delay line, so a value that
//                      processor computes in cycle t is visible in cycle t+D_l.
// Timing: a value offered on in_lX in cycle t reaches processor p (counted
// from the entry end, first = 0) in cycle t + p*D_X and leaves on out_lX in
// cycle t + NPROC*D_X. The array has no valid bits and no control: the host
// pumps zeros in every cycle that carries no operand, as the document
// prescribes, so partial sums passing idle processors stay unchanged.
// rst_n (synchronous, active low) empties every delay line.
module linear_systolic_array
  import cube_map_pkg::*;
#(
  parameter int H1 = 3,
  parameter int H2 = 2,
  parameter int H3 = 2,
  parameter int W1 = 1,
  parameter int W2 = 1,
  parameter int W3 = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t in_l1,
  input  word_t in_l2,
  input  word_t in_l3,
  output word_t out_l1,
  output word_t out_l2,
  output word_t out_l3
);

  localparam int NPROC = num_procs(H1, H2, H3);
  localparam int N1 = nbr(W1, W2, W3, 1);
  localparam int N2 = nbr(W1, W2, W3, 2);
  localparam int N3 = nbr(W1, W2, W3, 3);
  localparam int D1 = dly(H1, H2, W1, W2, W3, 1);
  localparam int D2 = dly(H1, H2, W1, W2, W3, 2);
  localparam int D3 = dly(H1, H2, W1, W2, W3, 3);

  localparam int NBR [3] = '{N1, N2, N3};
  localparam int DLY [3] = '{D1, D2, D3};

  // Elaboration checks on the parameters.
  if (H1 < 1 || H2 < 1 || H3 < 1) begin : g_bad_size
    $error("linear_systolic_array: grid sizes must be at least 1");
  end
  if ((W1 != 1 && W1 != -1) || (W2 != 1 && W2 != -1) || (W3 != 1 && W3 != -1)) begin : g_bad_w
    $error("linear_systolic_array: diagonalisation factors must be +1 or -1");
  end
  if (D3 < 1) begin : g_bad_d3
    $error("linear_systolic_array: this H/W choice gives d3 < 1");
  end

  // Per processor and label: the value at its input port and the value it
  // computes; link_out[l][p] is the output of the delay line behind
  // processor p's l-labelled output port.
  port_triple_t pe_in  [NPROC];
  port_triple_t pe_out [NPROC];
  word_t        link_out [3][NPROC];
  word_t        host_in  [3];

  assign host_in[0] = in_l1;
  assign host_in[1] = in_l2;
  assign host_in[2] = in_l3;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    word_t pin [3];
    word_t pout [3];

    for (genvar l = 0; l < 3; l++) begin : g_label
      // Input port: from the host at the entry end, else from the
      // neighbour upstream of this stream's direction.
      if (NBR[l] == 1) begin : g_right
        if (p == 0) begin : g_host
          assign pin[l] = host_in[l];
        end else begin : g_nbr
          assign pin[l] = link_out[l][p-1];
        end
      end else begin : g_left
        if (p == NPROC - 1) begin : g_host
          assign pin[l] = host_in[l];
        end else begin : g_nbr
          assign pin[l] = link_out[l][p+1];
        end
      end

      delay_line #(.DELAY(DLY[l])) u_link (
        .clk  (clk),
        .rst_n(rst_n),
        .d_in (pout[l]),
        .d_out(link_out[l][p])
      );
    end

    assign pe_in[p] = '{l1: pin[0], l2: pin[1], l3: pin[2]};
    assign pout[0]  = pe_out[p].l1;
    assign pout[1]  = pe_out[p].l2;
    assign pout[2]  = pe_out[p].l3;

    systolic_pe u_pe (
      .si(pe_in[p]),
      .so(pe_out[p])
    );
  end

  // Host outputs: the delay line behind the exit-end processor.
  assign out_l1 = (N1 == 1) ? link_out[0][NPROC-1] : link_out[0][0];
  assign out_l2 = (N2 == 1) ? link_out[1][NPROC-1] : link_out[1][0];
  assign out_l3 = (N3 == 1) ? link_out[2][NPROC-1] : link_out[2][0];

endmodule
