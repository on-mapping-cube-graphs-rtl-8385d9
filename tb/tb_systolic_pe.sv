// tb_systolic_pe: checks the processor function on random and corner inputs.
// Expected values are worked out here from the definition
// so = <si.l1, si.l2, si.l3 + si.l1*si.l2>, with 64-bit products truncated
// to the word width; a zero on l1 or l2 must leave the partial sum unchanged.
module tb_systolic_pe;
  import cube_map_pkg::*;

  port_triple_t si, so;
  int checks = 0, failures = 0;

  systolic_pe dut (.si, .so);

  task automatic apply(input word_t a, input word_t b, input word_t c);
    longint unsigned prod;
    word_t exp_c;
    si = '{l1: a, l2: b, l3: c};
    #1;
    prod = longint'(a) * longint'(b);
    exp_c = word_t'(c + prod[DATA_W-1:0]);
    checks += 3;
    if (so.l1 !== a) begin failures++; $display("l1 %0h expected %0h", so.l1, a); end
    if (so.l2 !== b) begin failures++; $display("l2 %0h expected %0h", so.l2, b); end
    if (so.l3 !== exp_c) begin
      failures++;
      $display("l3 %0h expected %0h (a=%0h b=%0h c=%0h)", so.l3, exp_c, a, b, c);
    end
  endtask

  initial begin : watchdog
    #100000;
    $display("tb_systolic_pe: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    apply(3, 4, 5);                        // 5 + 12
    apply(0, 32'hdead_beef, 32'h1234_5678); // zero on l1 holds c
    apply(32'hdead_beef, 0, 32'h1234_5678); // zero on l2 holds c
    apply('1, '1, '1);                     // wrap-around
    for (int i = 0; i < 500; i++) apply($urandom, $urandom, $urandom);
    for (int i = 0; i < 200; i++) apply($urandom_range(0, 9), $urandom_range(0, 9), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
