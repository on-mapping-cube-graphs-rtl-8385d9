// array_harness: one linear_systolic_array configuration with its host model
// and event counters, for the end-to-end testbench.
//
// The host's SPARSE_ZEROS mode and zero windows are passed through.
// Counts, over the run, the processor-cycles in which
//   mac_events  a processor adds a nonzero product a*b to a partial sum,
//   hold_events a nonzero partial sum passes a processor with a*b = 0, i.e.
//               it is kept unchanged by a pumped zero.
module array_harness
  import cube_map_pkg::*;
#(
  parameter int H1 = 3,
  parameter int H2 = 2,
  parameter int H3 = 2,
  parameter int W1 = 1,
  parameter int W2 = 1,
  parameter int W3 = 1,
  parameter int SEED = 1,
  parameter bit SPARSE_ZEROS = 1'b0,
  parameter int ZLO_A = 0,
  parameter int ZHI_A = -1,
  parameter int ZLO_B = 0,
  parameter int ZHI_B = -1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   mac_events,
  output int   hold_events,
  output logic done
);

  localparam int NPROC = num_procs(H1, H2, H3);

  logic  rst_n;
  word_t in_l1, in_l2, in_l3, out_l1, out_l2, out_l3;
  int    t1, cycle;

  linear_systolic_array #(
    .H1(H1), .H2(H2), .H3(H3), .W1(W1), .W2(W2), .W3(W3)
  ) dut (
    .clk, .rst_n, .in_l1, .in_l2, .in_l3, .out_l1, .out_l2, .out_l3
  );

  matmul_host #(
    .H1(H1), .H2(H2), .H3(H3), .W1(W1), .W2(W2), .W3(W3), .SEED(SEED),
    .SPARSE_ZEROS(SPARSE_ZEROS), .ZLO_A(ZLO_A), .ZHI_A(ZHI_A), .ZLO_B(ZLO_B), .ZHI_B(ZHI_B)
  ) host (
    .clk, .rst_n, .in_l1, .in_l2, .in_l3, .out_l1, .out_l2, .out_l3,
    .checks, .failures, .t1, .cycle, .done
  );

  initial begin
    mac_events = 0;
    hold_events = 0;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      #1;
      for (int p = 0; p < NPROC; p++) begin
        if (dut.pe_in[p].l1 * dut.pe_in[p].l2 != '0) mac_events++;
        else if (dut.pe_in[p].l3 != '0) hold_events++;
      end
    end
  end

endmodule
