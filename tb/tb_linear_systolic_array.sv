// tb_linear_systolic_array: end-to-end test of the array in eight
// configurations, each a random matrix product checked against plain loops.
// The first six pump zeros in every idle cycle:
//   cfg_ex1   H=3,2,2 w=< 1, 1, 1>: the document's first example; all streams
//             move right, d = 1,2,5 (phase-three case n1=n2, h1-h2+n3 >= 0).
//   cfg_ex2   H=3,2,2 w=< 1, 1,-1>: the second example; partial sums flow
//             left against the operands, d = 1,2,1.
//   cfg_1b    H=2,4,2 w=< 1, 1, 1>: case n1=n2, h1-h2+n3 < 0 (d3 = 5).
//   cfg_2a    H=2,3,3 w=< 1,-1, 1>: case n1!=n2, h2-h1+n3 >= 0; l2 flows left.
//   cfg_2b    H=4,2,2 w=< 1,-1, 1>: case n1!=n2, h2-h1+n3 < 0.
//   cfg_rev   H=3,2,3 w=<-1, 1, 1>: w1 = -1, diagonals placed in reverse.
//   ex1_sparse, ex2_sparse: the two examples again, but idle cycles carry
//             random values, and l1 carries zeros only in the windows the
//             document says suffice: t1-11..t1-3 and t1+8..t1+16 for the
//             first example, t1-7..t1-2 and t1+3..t1+8 for the second.
// Every configuration must check results, run at least one multiply-
// accumulate and hold at least one partial sum across an idle processor.
module tb_linear_systolic_array;

  localparam int NCFG = 8;
  localparam string NAMES [NCFG] = '{"ex1", "ex2", "1b", "2a", "2b", "rev", "ex1_sparse", "ex2_sparse"};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   chk [NCFG], fail [NCFG], mac [NCFG], hold [NCFG];
  logic dn [NCFG];
  int   checks = 0, failures = 0;

  array_harness #(.H1(3), .H2(2), .H3(2), .W1( 1), .W2( 1), .W3( 1), .SEED(11)) cfg_ex1
    (.clk, .checks(chk[0]), .failures(fail[0]), .mac_events(mac[0]), .hold_events(hold[0]), .done(dn[0]));
  array_harness #(.H1(3), .H2(2), .H3(2), .W1( 1), .W2( 1), .W3(-1), .SEED(12)) cfg_ex2
    (.clk, .checks(chk[1]), .failures(fail[1]), .mac_events(mac[1]), .hold_events(hold[1]), .done(dn[1]));
  array_harness #(.H1(2), .H2(4), .H3(2), .W1( 1), .W2( 1), .W3( 1), .SEED(13)) cfg_1b
    (.clk, .checks(chk[2]), .failures(fail[2]), .mac_events(mac[2]), .hold_events(hold[2]), .done(dn[2]));
  array_harness #(.H1(2), .H2(3), .H3(3), .W1( 1), .W2(-1), .W3( 1), .SEED(14)) cfg_2a
    (.clk, .checks(chk[3]), .failures(fail[3]), .mac_events(mac[3]), .hold_events(hold[3]), .done(dn[3]));
  array_harness #(.H1(4), .H2(2), .H3(2), .W1( 1), .W2(-1), .W3( 1), .SEED(15)) cfg_2b
    (.clk, .checks(chk[4]), .failures(fail[4]), .mac_events(mac[4]), .hold_events(hold[4]), .done(dn[4]));
  array_harness #(.H1(3), .H2(2), .H3(3), .W1(-1), .W2( 1), .W3( 1), .SEED(16)) cfg_rev
    (.clk, .checks(chk[5]), .failures(fail[5]), .mac_events(mac[5]), .hold_events(hold[5]), .done(dn[5]));

  array_harness #(.H1(3), .H2(2), .H3(2), .W1( 1), .W2( 1), .W3( 1), .SEED(17),
                  .SPARSE_ZEROS(1'b1), .ZLO_A(-11), .ZHI_A(-3), .ZLO_B(8), .ZHI_B(16)) cfg_ex1_sparse
    (.clk, .checks(chk[6]), .failures(fail[6]), .mac_events(mac[6]), .hold_events(hold[6]), .done(dn[6]));
  array_harness #(.H1(3), .H2(2), .H3(2), .W1( 1), .W2( 1), .W3(-1), .SEED(18),
                  .SPARSE_ZEROS(1'b1), .ZLO_A(-7), .ZHI_A(-2), .ZLO_B(3), .ZHI_B(8)) cfg_ex2_sparse
    (.clk, .checks(chk[7]), .failures(fail[7]), .mac_events(mac[7]), .hold_events(hold[7]), .done(dn[7]));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("tb_linear_systolic_array: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin : main
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      foreach (dn[i]) all_done &= dn[i];
    end while (!all_done);
    for (int i = 0; i < NCFG; i++) begin
      $display("cfg %s: checks=%0d failures=%0d mac=%0d hold=%0d",
               NAMES[i], chk[i], fail[i], mac[i], hold[i]);
      checks += chk[i] + 3;
      failures += fail[i];
      if (chk[i] == 0) failures++;
      if (mac[i] == 0) begin
        failures++;
        $display("cfg %s: no multiply-accumulate happened", NAMES[i]);
      end
      if (hold[i] == 0) begin
        failures++;
        $display("cfg %s: no partial sum was held across an idle processor", NAMES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
