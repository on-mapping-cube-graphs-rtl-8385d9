// tb_cube_map_pkg: checks the mapping functions against the worked examples.
//   First example (the default array), H=3,2,2 w=<1,1,1>:  5 processors, n=1,1,1, d=1,2,5; diagonals
//     D1={p11} D2={p12,p21,q11} D3={p13,p22,q12,q21} D4={p23,q13,q22} D5={q23}
//     and times p11..p23 = t1+0,1,2,2,3,4, q11..q23 = t1+5,6,7,7,8,9.
//   Second example, H=3,2,2 w=<1,1,-1>: n=1,1,-1, d=1,2,1; D1={q11}
//     D2={p11,q12,q21} D3={p12,p21,q13,q22} D4={p13,p22,q23} D5={p23};
//     times p = t1+0,1,2,2,3,4, q = t1+1,2,3,3,4,5.
// plus hand-worked delays for the other three phase-three cases and for a
// factor with w1 = -1. Vertex p_ij is <j-1,i-1,0>, q_ij is <j-1,i-1,1>.
module tb_cube_map_pkg;
  import cube_map_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s = %0d, expected %0d", what, got, exp_v);
    end
  endtask

  // Expected processor and time of p_ij / q_ij, indexed [k][i][j] (0-based).
  localparam int EX1_PA [2][2][3] = '{'{'{1, 2, 3}, '{2, 3, 4}}, '{'{2, 3, 4}, '{3, 4, 5}}};
  localparam int EX1_TA [2][2][3] = '{'{'{0, 1, 2}, '{2, 3, 4}}, '{'{5, 6, 7}, '{7, 8, 9}}};
  localparam int EX2_PA [2][2][3] = '{'{'{2, 3, 4}, '{3, 4, 5}}, '{'{1, 2, 3}, '{2, 3, 4}}};
  localparam int EX2_TA [2][2][3] = '{'{'{0, 1, 2}, '{2, 3, 4}}, '{'{1, 2, 3}, '{3, 4, 5}}};

  initial begin : watchdog
    #100000;
    $display("tb_cube_map_pkg: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // First example
    expect_eq("ex1 procs", num_procs(3, 2, 2), 5);
    expect_eq("ex1 n1", nbr(1, 1, 1, 1), 1);
    expect_eq("ex1 n2", nbr(1, 1, 1, 2), 1);
    expect_eq("ex1 n3", nbr(1, 1, 1, 3), 1);
    expect_eq("ex1 d1", dly(3, 2, 1, 1, 1, 1), 1);
    expect_eq("ex1 d2", dly(3, 2, 1, 1, 1, 2), 2);
    expect_eq("ex1 d3", dly(3, 2, 1, 1, 1, 3), 5);
    // Second example
    expect_eq("ex2 n3", nbr(1, 1, -1, 3), -1);
    expect_eq("ex2 d2", dly(3, 2, 1, 1, -1, 2), 2);
    expect_eq("ex2 d3", dly(3, 2, 1, 1, -1, 3), 1);
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 3; j++) begin
          string v;
          v = $sformatf("%s%0d%0d", (k == 0) ? "p" : "q", i + 1, j + 1);
          expect_eq({"ex1 PA ", v}, proc_of(3, 2, 2, 1, 1, 1, j, i, k), EX1_PA[k][i][j]);
          expect_eq({"ex1 TA ", v}, time_of(3, 2, 1, 1, 1, j, i, k), EX1_TA[k][i][j]);
          expect_eq({"ex2 PA ", v}, proc_of(3, 2, 2, 1, 1, -1, j, i, k), EX2_PA[k][i][j]);
          expect_eq({"ex2 TA ", v}, time_of(3, 2, 1, 1, -1, j, i, k), EX2_TA[k][i][j]);
        end
    // Case n1 = n2, h1-h2+n3 < 0: H=2,4 w=<1,1,1> -> d3 = h2+n3 = 5.
    expect_eq("1b d3", dly(2, 4, 1, 1, 1, 3), 5);
    // Case n1 != n2, h2-h1+n3 >= 0: H=2,3 w=<1,-1,1> -> d2 = 1, d3 = 2h2-1+n3 = 6.
    expect_eq("2a n2", nbr(1, -1, 1, 2), -1);
    expect_eq("2a d2", dly(2, 3, 1, -1, 1, 2), 1);
    expect_eq("2a d3", dly(2, 3, 1, -1, 1, 3), 6);
    // Case n1 != n2, h2-h1+n3 < 0: H=4,2 w=<1,-1,1> -> d3 = 2h1-1-n3 = 6;
    // H=5,2 w=<1,-1,-1> -> d3 = 2*5-1+1 = 10.
    expect_eq("2b d3", dly(4, 2, 1, -1, 1, 3), 6);
    expect_eq("2b' d3", dly(5, 2, 1, -1, -1, 3), 10);
    // w1 = -1: n = -w, diagonals numbered from the other end. H=3,2,3 has
    // 6 processors and weights -x1+x2+x3 from -2 (index 1) to 3 (index 6);
    // processor = 7 - index.
    expect_eq("rev n1", nbr(-1, 1, 1, 1), 1);
    expect_eq("rev n2", nbr(-1, 1, 1, 2), -1);
    expect_eq("rev n3", nbr(-1, 1, 1, 3), -1);
    expect_eq("rev PA <0,0,0>", proc_of(3, 2, 3, -1, 1, 1, 0, 0, 0), 4);
    expect_eq("rev PA <2,0,0>", proc_of(3, 2, 3, -1, 1, 1, 2, 0, 0), 6);
    expect_eq("rev PA <0,1,2>", proc_of(3, 2, 3, -1, 1, 1, 0, 1, 2), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
