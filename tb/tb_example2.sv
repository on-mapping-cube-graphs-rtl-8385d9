// tb_example2: the second worked example (H = 3,2,2, w = <1,1,-1>: d = 1,2,1,
// partial sums flowing from processor 5 towards processor 1 against A and B)
// through one complete product, looking inside the array.
//
// The host pumps random values in idle slots and zeros on l1 only in the
// cycles t1-7..t1-2 and t1+3..t1+8. Relative to t1 (the cycle of vertex
// p11) the testbench checks that
//   - each of the 12 vertices sees a(i,k), b(k,j) and the right partial sum
//     at its processor and cycle (p11..p23 on processors 2,3,4,3,4,5 at
//     t1+0,1,2,2,3,4; q11..q23 on 1,2,3,2,3,4 at t1+1,2,3,3,4,5),
//   - every passage of a partial sum through a processor with no vertex for
//     it finds the sum at that processor's l3 input in the listed cycle and
//     leaves it unchanged (e.g. initial c11 at processors 5,4,3 at t1-3,-2,-1;
//     final c23 at processors 3,2,1 at t1+6,7,8),
// and the host checks all results and operands leaving the array.
module tb_example2;
  import cube_map_pkg::*;

  logic clk = 1'b0;
  int   hchecks, hfailures, mac, hold;
  logic done;
  int   checks = 0, failures = 0;
  int   n_vertex = 0, n_pass = 0;

  always #5 clk = ~clk;

  array_harness #(.H1(3), .H2(2), .H3(2), .W1(1), .W2(1), .W3(-1), .SEED(21),
                  .SPARSE_ZEROS(1'b1), .ZLO_A(-7), .ZHI_A(-2), .ZLO_B(3), .ZHI_B(8)) u (
    .clk, .checks(hchecks), .failures(hfailures), .mac_events(mac), .hold_events(hold), .done
  );

  // {k, i, j, processor, time - t1}, 1-based.
  localparam int NV = 12;
  localparam int VTX [NV][5] = '{
    '{1, 1, 1, 2, 0}, '{1, 1, 2, 3, 1}, '{1, 1, 3, 4, 2},
    '{1, 2, 1, 3, 2}, '{1, 2, 2, 4, 3}, '{1, 2, 3, 5, 4},
    '{2, 1, 1, 1, 1}, '{2, 1, 2, 2, 2}, '{2, 1, 3, 3, 3},
    '{2, 2, 1, 2, 3}, '{2, 2, 2, 3, 4}, '{2, 2, 3, 4, 5}};

  // {i, j, final(1)/initial(0), processor, time - t1}.
  localparam int NP = 18;
  localparam int PASS [NP][5] = '{
    '{1, 1, 0, 3, -1}, '{1, 1, 0, 4, -2}, '{1, 1, 0, 5, -3},
    '{1, 2, 0, 4,  0}, '{1, 2, 0, 5, -1},
    '{1, 3, 0, 5,  1},
    '{2, 1, 0, 4,  1}, '{2, 1, 0, 5,  0},
    '{2, 2, 0, 5,  2},
    '{1, 2, 1, 1,  3},
    '{1, 3, 1, 1,  5}, '{1, 3, 1, 2,  4},
    '{2, 1, 1, 1,  4},
    '{2, 2, 1, 1,  6}, '{2, 2, 1, 2,  5},
    '{2, 3, 1, 3,  6}, '{2, 3, 1, 2,  7}, '{2, 3, 1, 1,  8}};

  function automatic word_t partial(int i, int j, int k);
    word_t s;
    s = u.host.c0[i][j];
    for (int kk = 0; kk < k; kk++) s += u.host.a[i][kk] * u.host.b[kk][j];
    return s;
  endfunction

  task automatic check_pass(input int i, input int j, input int fin, input int p, input int rel);
    checks += 2;
    n_pass++;
    if (u.dut.pe_in[p].l3 !== ((fin != 0) ? u.host.cref[i][j] : u.host.c0[i][j])) begin
      failures++;
      $display("c%0d%0d not at processor %0d at t1 + (%0d)", i + 1, j + 1, p + 1, rel);
    end
    if (u.dut.pe_out[p].l3 !== u.dut.pe_in[p].l3) begin
      failures++;
      $display("c%0d%0d changed at processor %0d at t1 + (%0d)", i + 1, j + 1, p + 1, rel);
    end
  endtask

  always begin
    @(negedge clk);
    #2;
    if (u.rst_n && !done) begin
      for (int v = 0; v < NV; v++) begin
        if (u.cycle - u.t1 == VTX[v][4]) begin
          int k, i, j, p;
          k = VTX[v][0] - 1; i = VTX[v][1] - 1; j = VTX[v][2] - 1; p = VTX[v][3] - 1;
          checks += 2;
          n_vertex++;
          if (u.dut.pe_in[p].l1 !== u.host.a[i][k] || u.dut.pe_in[p].l2 !== u.host.b[k][j] ||
              u.dut.pe_in[p].l3 !== partial(i, j, k)) begin
            failures++;
            $display("vertex %s%0d%0d at processor %0d, t1+%0d: got a=%0h b=%0h c=%0h",
                     (k != 0) ? "q" : "p", i + 1, j + 1, p + 1, VTX[v][4],
                     u.dut.pe_in[p].l1, u.dut.pe_in[p].l2, u.dut.pe_in[p].l3);
          end
          if (u.dut.pe_out[p].l3 !== partial(i, j, k + 1)) failures++;
        end
      end
      for (int q = 0; q < NP; q++)
        if (u.cycle - u.t1 == PASS[q][4])
          check_pass(PASS[q][0] - 1, PASS[q][1] - 1, PASS[q][2], PASS[q][3] - 1, PASS[q][4]);
    end
  end

  initial begin : watchdog
    repeat (500) @(posedge clk);
    $display("tb_example2: watchdog expired");
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
    if (n_pass != NP) begin
      failures++;
      $display("%0d of %0d passages seen", n_pass, NP);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + hchecks, failures + hfailures);
    $finish;
  end
endmodule
