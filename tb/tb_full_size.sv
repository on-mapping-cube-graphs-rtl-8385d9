// tb_full_size: the array at its default parameters (the document's first
// example: A 2x2 times B 2x3 on 5 processors, d = 1, 2, 5) through one
// complete matrix product, driven by the behavioural host.
//
// Besides the host's checks of every result and every operand leaving the
// array, this testbench looks inside the array and checks, cycle by cycle
// relative to t1 (the cycle of vertex p11):
//   - each of the 12 vertices p_ij, q_ij meets its operands a(i,k), b(k,j) at
//     the processor and time of the example's mapping (vertex timings t1+0..9
//     of the mapped graph), and its partial sum leaves with a*b added;
//   - every passage of a partial sum through a processor where it has no
//     vertex: c(i,j) must be at that processor's l3 input at the listed time
//     with a zero on l1, so that it passes unchanged. The times are those of
//     the example's passage table (e.g. c23 initial value at processors 1,2,3
//     at t1-11, t1-6, t1-1; final c11 at processors 3,4,5 at t1+10,15,20).
module tb_full_size;
  import cube_map_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  word_t in_l1, in_l2, in_l3, out_l1, out_l2, out_l3;
  int    hchecks, hfailures, t1, cycle;
  logic  done;
  int    checks = 0, failures = 0;
  int    n_vertex = 0, n_hold = 0;

  always #5 clk = ~clk;

  linear_systolic_array dut (
    .clk, .rst_n, .in_l1, .in_l2, .in_l3, .out_l1, .out_l2, .out_l3
  );

  matmul_host #(.SEED(7)) host (
    .clk, .rst_n, .in_l1, .in_l2, .in_l3, .out_l1, .out_l2, .out_l3,
    .checks(hchecks), .failures(hfailures), .t1, .cycle, .done
  );

  // Vertex table of the example: {k, i, j, processor, time - t1}, 1-based.
  localparam int NV = 12;
  localparam int VTX [NV][5] = '{
    '{1, 1, 1, 1, 0}, '{1, 1, 2, 2, 1}, '{1, 1, 3, 3, 2},
    '{1, 2, 1, 2, 2}, '{1, 2, 2, 3, 3}, '{1, 2, 3, 4, 4},
    '{2, 1, 1, 2, 5}, '{2, 1, 2, 3, 6}, '{2, 1, 3, 4, 7},
    '{2, 2, 1, 3, 7}, '{2, 2, 2, 4, 8}, '{2, 2, 3, 5, 9}};

  // Passages of partial sums through idle processors:
  // {i, j, final(1)/initial(0), processor, time - t1}.
  localparam int NP = 16;
  localparam int PASS [NP][5] = '{
    '{1, 2, 0, 1,  -4},
    '{1, 3, 0, 1,  -8}, '{1, 3, 0, 2,  -3},
    '{2, 1, 0, 1,  -3},
    '{2, 2, 0, 1,  -7}, '{2, 2, 0, 2,  -2},
    '{2, 3, 0, 1, -11}, '{2, 3, 0, 2,  -6}, '{2, 3, 0, 3,  -1},
    '{1, 1, 1, 3,  10}, '{1, 1, 1, 4,  15}, '{1, 1, 1, 5,  20},
    '{1, 2, 1, 4,  11}, '{1, 2, 1, 5,  16},
    '{1, 3, 1, 5,  12},
    '{2, 1, 1, 4,  12}};

  // Partial sum of c(i,j) after the first k products.
  function automatic word_t partial(int i, int j, int k);
    word_t s;
    s = host.c0[i][j];
    for (int kk = 0; kk < k; kk++) s += host.a[i][kk] * host.b[kk][j];
    return s;
  endfunction

  always @(negedge clk) begin
    if (rst_n && !done) begin
      #2;
      for (int v = 0; v < NV; v++) begin
        if (cycle - t1 == VTX[v][4]) begin
          int k, i, j, p;
          k = VTX[v][0] - 1; i = VTX[v][1] - 1; j = VTX[v][2] - 1; p = VTX[v][3] - 1;
          checks += 3;
          n_vertex++;
          if (dut.pe_in[p].l1 !== host.a[i][k] || dut.pe_in[p].l2 !== host.b[k][j] ||
              dut.pe_in[p].l3 !== partial(i, j, k)) begin
            failures++;
            $display("vertex %s%0d%0d at processor %0d, t1+%0d: got a=%0h b=%0h c=%0h",
                     (k != 0) ? "q" : "p", i + 1, j + 1, p + 1, VTX[v][4],
                     dut.pe_in[p].l1, dut.pe_in[p].l2, dut.pe_in[p].l3);
          end
          if (dut.pe_out[p].l3 !== partial(i, j, k + 1)) failures++;
        end
      end
      for (int q = 0; q < NP; q++) begin
        if (cycle - t1 == PASS[q][4]) begin
          int i, j, p;
          i = PASS[q][0] - 1; j = PASS[q][1] - 1; p = PASS[q][3] - 1;
          checks += 2;
          n_hold++;
          if (dut.pe_in[p].l3 !== ((PASS[q][2] != 0) ? host.cref[i][j] : host.c0[i][j])) begin
            failures++;
            $display("c%0d%0d not at processor %0d at t1 + (%0d)", i + 1, j + 1, p + 1, PASS[q][4]);
          end
          if (dut.pe_out[p].l3 !== dut.pe_in[p].l3) begin
            failures++;
            $display("c%0d%0d changed at processor %0d at t1 + (%0d)", i + 1, j + 1, p + 1, PASS[q][4]);
          end
        end
      end
    end
  end

  initial begin : watchdog
    repeat (500) @(posedge clk);
    $display("tb_full_size: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks, failures + hfailures + 1);
    $finish;
  end

  initial begin
    // The host clears done at time 0; wait past that before waiting for it.
    #1;
    wait (done);
    @(posedge clk);
    checks += 2;
    if (n_vertex != NV) begin failures++; $display("%0d of %0d vertices seen", n_vertex, NV); end
    if (n_hold != NP) begin failures++; $display("%0d of %0d passages seen", n_hold, NP); end
    // The l3 stream moves at 1/5 processor per cycle: a partial sum entering
    // processor 1 at t1-11 (c23) leaves the array 5*5 = 25 cycles later.
    $display("t1 = cycle %0d after reset, last cycle %0d", t1, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks, failures + hfailures);
    $finish;
  end
endmodule
