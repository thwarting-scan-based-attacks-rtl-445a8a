// tb_secure_comparator -- end-to-end test of the secure comparator with a
// behavioural scan circuit, in both configurations side by side.
//
// Instance 0 is the plain comparator (MASKING = 0), instance 1 the masking
// variant (P = 3); both have 4 chains of 40 flip-flops. The testbench plays
// the tester: it shifts stimuli in through the shared Sin/TestRes pads and
// expected responses in through Sexp, lowers Sen, reads the pads before the
// capture edge and captures. An independent reference follows every clock:
// it tracks the scan chain contents, the per-chain mismatch state, the mask
// budget and the number of shift clocks since the last capture, and predicts
// every pass/fail bit. Directed sequences also check the expected bits by
// construction:
//   - matching and partly matching vectors (pass / fail per chain);
//   - a read after fewer than N_SFF shifts (result withheld, reads fail);
//   - two vectors shifted without a capture between them and two capture
//     clocks in a row (the flag stays set);
//   - the comparator self-test sequence (partly matching, fully unmatching,
//     correct, two unmatching without capture, double capture, correct), whose
//     length must be 6 * (N_SFF + 1) clocks;
//   - fault-dictionary diagnosis: three stuck-at faults and the five
//     vector / expected-response pairs of the dictionary example, whose
//     pass/fail pattern must single out each fault;
//   - masking: P masked mismatches pass, P+1 fail, random traffic.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_secure_comparator
  import scan_tb_pkg::*;
;

  localparam int unsigned S = 4;
  localparam int unsigned N = 40;
  localparam int unsigned P = 3;
  localparam int          K = 2;   // instances

  typedef logic [N-1:0] vec_t;
  typedef vec_t         vecs_t [S];

  logic         clk = 1'b0;
  logic         sen      [K];
  logic [S-1:0] sexp     [K];
  logic [S-1:0] mask     [K];
  logic [S-1:0] tb_sin   [K];
  logic [S-1:0] sin_dut  [K];
  logic [S-1:0] sout     [K];
  wire  [S-1:0] pad0, pad1;
  logic         fault_en [K];
  int unsigned  fault_chain [K];
  int unsigned  fault_pos   [K];
  logic         fault_val   [K];

  int checks = 0, failures = 0;
  int cycle = 0;
  // mechanism counters
  int n_pass = 0, n_fail = 0, n_early = 0, n_nocapture = 0, n_double = 0;
  int n_selftest = 0, n_diag = 0, n_mask_ok = 0, n_mask_refused = 0;

  // ---------------------------------------------------------------- design
  secure_comparator #(.N_CHAINS(S), .N_SFF(N), .MASKING(1'b0)) u_plain (
    .clk, .sen(sen[0]), .sexp(sexp[0]), .mask(mask[0]), .sin_testres_pad(pad0),
    .sout(sout[0]), .sin_dut(sin_dut[0])
  );
  secure_comparator #(.N_CHAINS(S), .N_SFF(N), .MASKING(1'b1), .P(P)) u_masked (
    .clk, .sen(sen[1]), .sexp(sexp[1]), .mask(mask[1]), .sin_testres_pad(pad1),
    .sout(sout[1]), .sin_dut(sin_dut[1])
  );

  // the tester drives the pads only while shifting
  assign pad0 = sen[0] ? tb_sin[0] : 'z;
  assign pad1 = sen[1] ? tb_sin[1] : 'z;

  for (genvar k = 0; k < K; k++) begin : g_dut
    scan_dut_model #(.N_CHAINS(S), .N_SFF(N)) u_dut (
      .clk, .sen(sen[k]), .sin(sin_dut[k]), .sout(sout[k]),
      .fault_en(fault_en[k]), .fault_chain(fault_chain[k]),
      .fault_pos(fault_pos[k]), .fault_val(fault_val[k])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- reference
  function automatic vec_t tb_response(input vec_t v, input int unsigned c);
    vec_t r;
    for (int unsigned i = 0; i < N; i++)
      r[i] = v[(i + N - 1) % N] ^ key_bit(c, i);
    return r;
  endfunction

  vec_t ref_state [K][S];
  logic ref_flag  [K][S];
  int   ref_pcnt  [K][S];
  int   ref_shifts[K];

  always @(posedge clk) begin
    for (int k = 0; k < K; k++) begin
      for (int c = 0; c < int'(S); c++) begin
        if (sen[k]) begin
          automatic logic out = ref_state[k][c][N-1];
          if (k == 1 && mask[k][c] && ref_pcnt[k][c] < int'(P)) begin
            ref_pcnt[k][c]++;
            n_mask_ok++;
          end else begin
            if (k == 1 && mask[k][c]) n_mask_refused++;
            if (out != sexp[k][c]) ref_flag[k][c] = 1'b1;
          end
          ref_state[k][c] = {ref_state[k][c][N-2:0], tb_sin[k][c]};
        end else begin
          automatic vec_t r = tb_response(ref_state[k][c], c);
          if (fault_en[k] && fault_chain[k] == c) r[fault_pos[k]] = fault_val[k];
          ref_state[k][c] = r;
          ref_flag[k][c]  = 1'b0;
          ref_pcnt[k][c]  = 0;
        end
      end
      if (sen[k]) ref_shifts[k]++;
      else        ref_shifts[k] = 0;
    end
  end

  // ---------------------------------------------------------------- tester
  function automatic vecs_t rand_vecs();
    vecs_t v;
    for (int c = 0; c < int'(S); c++)
      for (int i = 0; i < int'(N); i++) v[c][i] = 1'($urandom);
    return v;
  endfunction

  function automatic vecs_t inv_vecs(input vecs_t v);
    vecs_t r;
    for (int c = 0; c < int'(S); c++) r[c] = ~v[c];
    return r;
  endfunction

  function automatic vecs_t zero_vecs();
    vecs_t r;
    for (int c = 0; c < int'(S); c++) r[c] = '0;
    return r;
  endfunction

  // what the chains hold now, i.e. the correct expected response
  function automatic vecs_t captured(input int k);
    vecs_t r;
    for (int c = 0; c < int'(S); c++) r[c] = ref_state[k][c];
    return r;
  endfunction

  // n shift clocks: stimulus, expected and mask bits in scan order (MSB first)
  task automatic shift(input int k, input vecs_t sin_v, input vecs_t exp_v,
                       input vecs_t mask_v, input int n);
    for (int t = 0; t < n; t++) begin
      automatic int idx = int'(N) - 1 - (t % int'(N));
      @(negedge clk);
      sen[k] = 1'b1;
      for (int c = 0; c < int'(S); c++) begin
        tb_sin[k][c] = sin_v[c][idx];
        sexp[k][c]   = exp_v[c][idx];
        mask[k][c]   = mask_v[c][idx];
      end
      #1;
      checks++;
      if (sin_dut[k] !== tb_sin[k] || (k == 0 ? pad0 : pad1) !== tb_sin[k]) begin
        failures++;
        $display("%0t: inst %0d pad not an input while shifting", $time, k);
      end
    end
  endtask

  // lower Sen and read the pads before the capture edge
  task automatic read_result(input int k, output logic [S-1:0] res);
    logic [S-1:0] pred;
    @(negedge clk);
    sen[k] = 1'b0;
    #1;
    res = (k == 0) ? pad0 : pad1;
    for (int c = 0; c < int'(S); c++)
      pred[c] = (ref_shifts[k] >= int'(N)) && !ref_flag[k][c];
    checks++;
    if (res !== pred) begin
      failures++;
      $display("%0t: inst %0d TestRes=%b reference %b", $time, k, res, pred);
    end
    if (ref_shifts[k] < int'(N)) n_early++;
    for (int c = 0; c < int'(S); c++) if (res[c]) n_pass++; else n_fail++;
  endtask

  task automatic expect_res(input string what, input logic [S-1:0] got, input logic [S-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: TestRes=%b expected %b", what, got, exp);
    end
  endtask

  task automatic capture(input int k, input int n);
    sen[k] = 1'b0;
    repeat (n) @(posedge clk);
    #1;  // let the reference take the capture edge first
    if (n > 1) n_double++;
  endtask

  // -------------------------------------------------------------- sequences
  task automatic plain_basic();
    logic [S-1:0] res;
    vecs_t e, s;
    shift(0, rand_vecs(), rand_vecs(), zero_vecs(), N);      // load
    read_result(0, res);
    capture(0, 1);
    shift(0, rand_vecs(), captured(0), zero_vecs(), N);      // all correct
    read_result(0, res); expect_res("matching", res, '1);
    capture(0, 1);
    e = captured(0); e[1][7] = ~e[1][7];                      // one bit wrong in chain 1
    shift(0, rand_vecs(), e, zero_vecs(), N);
    read_result(0, res); expect_res("one mismatch", res, 4'b1101);
    capture(0, 1);
    shift(0, rand_vecs(), captured(0), zero_vecs(), N - 1);  // stopped one clock early
    read_result(0, res); expect_res("early read", res, '0);
    capture(0, 1);
    e = captured(0); e[2][N-1] = ~e[2][N-1];                  // wrong first bit, chain 2
    s = rand_vecs();
    shift(0, s, e, zero_vecs(), N);                           // then a second vector,
    shift(0, rand_vecs(), s, zero_vecs(), N);                 // no capture in between
    n_nocapture++;
    read_result(0, res); expect_res("sticky over two vectors", res, 4'b1011);
    capture(0, 2);
  endtask

  // self-test of the comparator through its pins only
  task automatic plain_selftest();
    logic [S-1:0] res;
    vecs_t e, s;
    int    start;
    shift(0, rand_vecs(), rand_vecs(), zero_vecs(), N);      // initial load
    read_result(0, res);
    capture(0, 1);
    start = cycle;
    e = captured(0); for (int c = 0; c < int'(S); c++) e[c][c] = ~e[c][c];
    shift(0, rand_vecs(), e, zero_vecs(), N);                 // partially matching
    read_result(0, res); expect_res("self-test partial", res, '0);
    capture(0, 1);
    shift(0, rand_vecs(), inv_vecs(captured(0)), zero_vecs(), N);  // fully unmatching
    read_result(0, res); expect_res("self-test unmatching", res, '0);
    capture(0, 1);
    shift(0, rand_vecs(), captured(0), zero_vecs(), N);       // correct
    read_result(0, res); expect_res("self-test correct", res, '1);
    capture(0, 1);
    s = rand_vecs();                                          // two unmatching, no capture
    shift(0, s, inv_vecs(captured(0)), zero_vecs(), N);
    shift(0, rand_vecs(), inv_vecs(s), zero_vecs(), N);
    n_nocapture++;
    read_result(0, res); expect_res("self-test two unmatching", res, '0);
    capture(0, 2);                                            // capture twice
    shift(0, rand_vecs(), captured(0), zero_vecs(), N);       // correct
    read_result(0, res); expect_res("self-test final correct", res, '1);
    capture(0, 1);
    checks++;
    if (cycle - start != 6 * (int'(N) + 1)) begin
      failures++;
      $display("self-test took %0d clocks, expected %0d", cycle - start, 6 * (N + 1));
    end else n_selftest++;
  endtask

  // fault-dictionary diagnosis on chain 0 with three stuck-at faults
  task automatic plain_diagnosis();
    vecs_t va, vb, ra, rb;
    int    pos [3];
    int    found = 0;
    vecs_t stim [5];
    vecs_t expv [5];
    logic  table_exp [4][5];
    logic [S-1:0] res;
    // rows: no fault, f1, f2, f3; columns: va/ra vb/rb va/ra^f1 vb/rb^f2 vb/rb^f3
    table_exp = '{'{1,1,0,0,0}, '{0,1,1,0,0}, '{1,0,0,1,0}, '{1,0,0,0,1}};
    do begin
      va = rand_vecs(); vb = rand_vecs();
      for (int c = 0; c < int'(S); c++) begin
        ra[c] = tb_response(va[c], c);
        rb[c] = tb_response(vb[c], c);
      end
      found = 0;
      for (int i = 0; i < int'(N) && found < 3; i++)
        if (ra[0][i] != rb[0][i]) pos[found++] = i;
    end while (found < 3);
    stim = '{va, vb, va, vb, vb};
    expv = '{ra, rb, ra, rb, rb};
    expv[2][0][pos[0]] = ~ra[0][pos[0]];   // f1 seen only through va
    expv[3][0][pos[1]] = ~rb[0][pos[1]];   // f2 seen only through vb
    expv[4][0][pos[2]] = ~rb[0][pos[2]];   // f3 seen only through vb
    for (int f = 0; f < 4; f++) begin
      automatic bit row_ok = 1'b1;
      fault_en[0]    = (f != 0);
      fault_chain[0] = 0;
      fault_pos[0]   = (f == 0) ? 0 : pos[f-1];
      fault_val[0]   = (f == 1) ? rb[0][pos[0]] : (f == 0) ? 1'b0 : ra[0][pos[f-1]];
      shift(0, stim[0], rand_vecs(), zero_vecs(), N);
      read_result(0, res);
      capture(0, 1);
      for (int t = 0; t < 5; t++) begin
        shift(0, (t < 4) ? stim[t+1] : rand_vecs(), expv[t], zero_vecs(), N);
        read_result(0, res);
        checks++;
        if (res[0] !== table_exp[f][t]) begin
          failures++; row_ok = 1'b0;
          $display("diagnosis: fault %0d, test %0d: TestRes=%b expected %b", f, t, res[0], table_exp[f][t]);
        end
        capture(0, 1);
      end
      if (row_ok) n_diag++;
    end
    fault_en[0] = 1'b0;
  endtask

  task automatic masked_tests();
    logic [S-1:0] res;
    vecs_t e, m;
    shift(1, rand_vecs(), rand_vecs(), zero_vecs(), N);      // load
    read_result(1, res);
    capture(1, 1);
    // P masked mismatches on chain 0, P masked matching bits on chain 1
    e = captured(1); m = zero_vecs();
    for (int i = 0; i < int'(P); i++) begin
      e[0][N-1-i] = ~e[0][N-1-i]; m[0][N-1-i] = 1'b1;
      m[1][5+i] = 1'b1;
    end
    shift(1, rand_vecs(), e, m, N);
    read_result(1, res); expect_res("P masked mismatches", res, '1);
    capture(1, 1);
    // P+1 masked mismatches on chain 0; on chain 3, masked bits then an
    // unmasked mismatch
    e = captured(1); m = zero_vecs();
    for (int i = 0; i <= int'(P); i++) begin
      e[0][10+i] = ~e[0][10+i]; m[0][10+i] = 1'b1;
    end
    m[3][30] = 1'b1; m[3][29] = 1'b1; e[3][2] = ~e[3][2];
    shift(1, rand_vecs(), e, m, N);
    read_result(1, res); expect_res("P+1 masked mismatches", res, 4'b0110);
    capture(1, 1);
    // random vectors: a few wrong bits, random masks
    for (int r = 0; r < 60; r++) begin
      e = captured(1); m = zero_vecs();
      for (int c = 0; c < int'(S); c++)
        for (int i = 0; i < int'(N); i++) begin
          automatic int unsigned u = $urandom;
          if (u % 32 == 0)        e[c][i] = ~e[c][i];
          if ((u >> 8) % 10 == 0) m[c][i] = 1'b1;
        end
      shift(1, rand_vecs(), e, m, N);
      read_result(1, res);
      capture(1, 1 + ($urandom % 2));
    end
  endtask

  initial begin
    for (int k = 0; k < K; k++) begin
      sen[k] = 1'b0; sexp[k] = '0; mask[k] = '0; tb_sin[k] = '0;
      fault_en[k] = 1'b0; fault_chain[k] = 0; fault_pos[k] = 0; fault_val[k] = 1'b0;
      ref_shifts[k] = 0;
      for (int c = 0; c < int'(S); c++) begin
        ref_state[k][c] = '0; ref_flag[k][c] = 1'b0; ref_pcnt[k][c] = 0;
      end
    end
    // with sen = 0 the first capture makes model and reference agree only
    // once the model's random start state is replaced: load through the chain
    shift(0, rand_vecs(), zero_vecs(), zero_vecs(), N);
    shift(1, rand_vecs(), zero_vecs(), zero_vecs(), N);
    plain_basic();
    plain_selftest();
    plain_diagnosis();
    masked_tests();
    $display("pass %0d fail %0d early %0d no-capture %0d double-capture %0d self-test %0d diagnosis-rows %0d mask-ok %0d mask-refused %0d",
             n_pass, n_fail, n_early, n_nocapture, n_double, n_selftest, n_diag, n_mask_ok, n_mask_refused);
    checks++;
    if (n_pass == 0 || n_fail == 0 || n_early == 0 || n_nocapture == 0 || n_double == 0 ||
        n_selftest == 0 || n_diag != 4 || n_mask_ok == 0 || n_mask_refused == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
