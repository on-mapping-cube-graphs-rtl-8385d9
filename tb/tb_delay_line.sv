// tb_delay_line: drives random words into delay lines of length 1, 2 and 5
// (the document's d_l values) and checks that each word appears at the output
// exactly DELAY cycles later, that reset empties the line, and that nothing
// appears early.
module tb_delay_line;
  import cube_map_pkg::*;

  localparam int NL = 3;
  localparam int DL [NL] = '{1, 2, 5};

  logic  clk = 1'b0;
  logic  rst_n;
  word_t din [NL];
  word_t dout [NL];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NL; g++) begin : g_dut
    delay_line #(.DELAY(DL[g])) dut (.clk, .rst_n, .d_in(din[g]), .d_out(dout[g]));
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("tb_delay_line: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    word_t hist [NL][$];
    rst_n = 1'b0;
    foreach (din[g]) din[g] = $urandom;
    repeat (2) @(negedge clk);
    // Reset clears: outputs are zero while reset holds.
    foreach (dout[g]) begin
      checks++;
      if (dout[g] !== '0) begin failures++; $display("line %0d not cleared", g); end
    end
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      for (int g = 0; g < NL; g++) begin
        word_t exp_v;
        // The word written DL cycles ago; zeros from reset before that.
        exp_v = (k >= DL[g]) ? hist[g][k - DL[g]] : '0;
        checks++;
        if (dout[g] !== exp_v) begin
          failures++;
          $display("line %0d cycle %0d: %0h expected %0h", g, k, dout[g], exp_v);
        end
        din[g] = $urandom;
        hist[g].push_back(din[g]);
      end
      @(negedge clk);
      // Mid-run reset empties the lines again.
      if (k == 150) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        for (int g = 0; g < NL; g++) begin
          checks++;
          if (dout[g] !== '0) begin failures++; $display("line %0d not cleared", g); end
          hist[g].delete();
          for (int j = 0; j <= k; j++) hist[g].push_back('0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
