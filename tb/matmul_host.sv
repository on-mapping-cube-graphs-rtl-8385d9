// matmul_host: behavioural model of the host computer that drives the
// linear systolic array as a peripheral, for testbenches only.
//
// It draws random matrices A (H2 x H3), B (H3 x H1) and initial partial sums
// C0 (H2 x H1) and computes the reference C = C0 + A*B by plain loops. It
// then builds the pumping schedule from the vertex mapping: for every
// major path of each label it works out the cycle at which its first value
// must enter the array so that it meets its first vertex at the mapped
// processor and time (k hops of a stream take k*d_l cycles), and
// pumps zero in every other cycle. After a reset it plays the schedule, one
// word per stream per cycle, and checks
//   - every c(i,j) on out_l3 in the cycle it should emerge,
//   - every a(i,k) on out_l1 and b(k,j) on out_l2 unchanged after crossing
//     the whole array (the operands are only passed on),
//   - that no two values were scheduled on one input port in one cycle.
// Cycle k of the schedule is the k-th cycle after reset is released; T1 is the
// cycle in which vertex <0,0,0> runs.
// Inputs change and outputs are sampled at the falling edge of clk.
// With SPARSE_ZEROS set, idle cycles carry random values instead of zeros
// except in given zero windows on l1 (see the parameters).
module matmul_host
  import cube_map_pkg::*;
#(
  parameter int H1 = 3,
  parameter int H2 = 2,
  parameter int H3 = 2,
  parameter int W1 = 1,
  parameter int W2 = 1,
  parameter int W3 = 1,
  parameter int SEED = 1,
  // SPARSE_ZEROS = 1: idle input cycles carry random values, except on l1
  // inside the windows [t1+ZLO_A, t1+ZHI_A] and [t1+ZLO_B, t1+ZHI_B], which
  // carry zeros. This tests that zeros in those windows alone keep every
  // passing partial sum intact.
  parameter bit SPARSE_ZEROS = 1'b0,
  parameter int ZLO_A = 0,
  parameter int ZHI_A = -1,
  parameter int ZLO_B = 0,
  parameter int ZHI_B = -1
) (
  input  logic  clk,
  output logic  rst_n,
  output word_t in_l1,
  output word_t in_l2,
  output word_t in_l3,
  input  word_t out_l1,
  input  word_t out_l2,
  input  word_t out_l3,
  output int    checks,
  output int    failures,
  output int    t1,
  output int    cycle,
  output logic  done
);

  localparam int NPROC = num_procs(H1, H2, H3);
  localparam int N1 = nbr(W1, W2, W3, 1);
  localparam int N2 = nbr(W1, W2, W3, 2);
  localparam int N3 = nbr(W1, W2, W3, 3);
  localparam int D1 = dly(H1, H2, W1, W2, W3, 1);
  localparam int D2 = dly(H1, H2, W1, W2, W3, 2);
  localparam int D3 = dly(H1, H2, W1, W2, W3, 3);

  word_t a [H2][H3];
  word_t b [H3][H1];
  word_t c0 [H2][H1];
  word_t cref [H2][H1];

  // Schedules keyed by cycle, before the shift that makes the first entry 0.
  word_t sin1 [int], sin2 [int], sin3 [int];
  word_t sout1 [int], sout2 [int], sout3 [int];

  int tmin, tmax;

  // Cycle at which a value must enter a stream with neighbourhood n and
  // delay d so that it is at processor s (1-based) at time t.
  function automatic int entry_time(int n, int d, int s, int t);
    int e;
    e = (n == 1) ? 1 : NPROC;
    return t - (s - e) * n * d;
  endfunction

  // Cycle at which a value computed by processor s at time t is seen on the
  // host output of its stream.
  function automatic int exit_time(int n, int d, int s, int t);
    int x;
    x = (n == 1) ? NPROC : 1;
    return t + ((x - s) * n + 1) * d;
  endfunction

  function automatic int pa(int x1, int x2, int x3);
    return proc_of(H1, H2, H3, W1, W2, W3, x1, x2, x3);
  endfunction

  function automatic int ta(int x1, int x2, int x3);
    return time_of(H1, H2, W1, W2, W3, x1, x2, x3);
  endfunction

  // Value pumped in an idle cycle.
  function automatic word_t idle_word();
    return SPARSE_ZEROS ? word_t'($urandom) : '0;
  endfunction

  // Idle value on l1 at cycle t1 + rel.
  function automatic word_t idle_l1(int rel);
    if ((rel >= ZLO_A && rel <= ZHI_A) || (rel >= ZLO_B && rel <= ZHI_B)) return '0;
    return idle_word();
  endfunction

  task automatic put(ref word_t q [int], input int t, input word_t v);
    if (q.exists(t)) begin
      failures++;
      $display("HOST: two values scheduled on one port at cycle %0d", t);
    end
    q[t] = v;
    if (t < tmin) tmin = t;
    if (t > tmax) tmax = t;
  endtask

  initial begin
    int dummy, t, k;
    word_t exp_v;
    checks = 0; failures = 0; done = 1'b0; cycle = 0;
    rst_n = 1'b0; in_l1 = '0; in_l2 = '0; in_l3 = '0;
    dummy = $urandom(SEED);
    tmin = 1 << 30; tmax = -(1 << 30);

    foreach (a[i, kk]) a[i][kk] = word_t'($urandom_range(1, 65535));
    foreach (b[kk, j]) b[kk][j] = word_t'($urandom_range(1, 65535));
    foreach (c0[i, j]) c0[i][j] = word_t'($urandom_range(1, 65535));
    foreach (cref[i, j]) begin
      cref[i][j] = c0[i][j];
      for (int kk = 0; kk < H3; kk++) cref[i][j] += a[i][kk] * b[kk][j];
    end

    // Vertex <x1,x2,x3> = <j,i,k>. l1 paths: a(i,k), first vertex x1 = 0.
    for (int i = 0; i < H2; i++)
      for (int kk = 0; kk < H3; kk++) begin
        put(sin1, entry_time(N1, D1, pa(0, i, kk), ta(0, i, kk)), a[i][kk]);
        put(sout1, exit_time(N1, D1, pa(H1-1, i, kk), ta(H1-1, i, kk)), a[i][kk]);
      end
    // l2 paths: b(k,j), first vertex x2 = 0.
    for (int kk = 0; kk < H3; kk++)
      for (int j = 0; j < H1; j++) begin
        put(sin2, entry_time(N2, D2, pa(j, 0, kk), ta(j, 0, kk)), b[kk][j]);
        put(sout2, exit_time(N2, D2, pa(j, H2-1, kk), ta(j, H2-1, kk)), b[kk][j]);
      end
    // l3 paths: c(i,j), first vertex x3 = 0, last x3 = H3-1.
    for (int i = 0; i < H2; i++)
      for (int j = 0; j < H1; j++) begin
        put(sin3, entry_time(N3, D3, pa(j, i, 0), ta(j, i, 0)), c0[i][j]);
        put(sout3, exit_time(N3, D3, pa(j, i, H3-1), ta(j, i, H3-1)), cref[i][j]);
      end
    t1 = -tmin;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (k = 0; k <= tmax - tmin; k++) begin
      t = k + tmin;
      cycle = k;
      in_l1 = sin1.exists(t) ? sin1[t] : idle_l1(k - t1);
      in_l2 = sin2.exists(t) ? sin2[t] : idle_word();
      in_l3 = sin3.exists(t) ? sin3[t] : idle_word();
      if (sout1.exists(t)) begin
        checks++;
        if (out_l1 !== sout1[t]) begin
          failures++;
          $display("HOST: cycle %0d out_l1=%0h expected %0h", k, out_l1, sout1[t]);
        end
      end
      if (sout2.exists(t)) begin
        checks++;
        if (out_l2 !== sout2[t]) begin
          failures++;
          $display("HOST: cycle %0d out_l2=%0h expected %0h", k, out_l2, sout2[t]);
        end
      end
      if (sout3.exists(t)) begin
        exp_v = sout3[t];
        checks++;
        if (out_l3 !== exp_v) begin
          failures++;
          $display("HOST: cycle %0d out_l3=%0h expected %0h", k, out_l3, exp_v);
        end
      end
      @(negedge clk);
    end
    in_l1 = '0; in_l2 = '0; in_l3 = '0;
    done = 1'b1;
  end

endmodule
