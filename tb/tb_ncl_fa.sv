// tb_ncl_fa: self-checking testbench of ncl_fa ({co, s} = x + y + ci).
//
// Every input combination is applied many times, with the inputs arriving
// one by one in a random order and then returning to NULL one by one in a
// random order. The expected outputs are computed in Boolean arithmetic.
// Checked after every single input change:
//   - while only some inputs are DATA, the outputs are not yet all DATA
//     (input completeness) and any output that is DATA already has its final
//     value;
//   - once all inputs are DATA, every output equals the expected value;
//   - while only some inputs have returned to NULL, the outputs are not yet
//     all NULL and keep their values;
//   - once all inputs are NULL, every output is NULL.
// No output may ever show the illegal code (both rails high).
module tb_ncl_fa;
  import ncl_pkg::*;

  localparam int K = 3;   // inputs
  localparam int L = 2;   // outputs
  localparam int ROUNDS = 16;

  int checks = 0;
  int failures = 0;

  dr_t in_v  [K];
  dr_t out_v [L];

  ncl_fa dut (
    .x(in_v[0]),
    .y(in_v[1]),
    .ci(in_v[2]),
    .s(out_v[0]),
    .co(out_v[1])
  );

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_data();
    for (int i = 0; i < L; i++) if (!is_data(out_v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit all_null();
    for (int i = 0; i < L; i++) if (!is_null(out_v[i])) return 1'b0;
    return 1'b1;
  endfunction

  // Every output that is DATA carries its expected value, none is illegal.
  function automatic bit consistent(logic exp [L]);
    for (int i = 0; i < L; i++) begin
      if (is_illegal(out_v[i])) return 1'b0;
      if (is_data(out_v[i]) && decode(out_v[i]) != exp[i]) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic bit out_equals(logic exp [L]);
    for (int i = 0; i < L; i++)
      if (!is_data(out_v[i]) || decode(out_v[i]) != exp[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic shuffle(ref int order [K]);
    for (int i = 0; i < K; i++) order[i] = i;
    for (int i = K - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
  endtask

  initial begin
    logic v   [K];
    logic exp [L];
    int   order [K];

    for (int i = 0; i < K; i++) in_v[i] = '0;
    #1;
    check(all_null(), "outputs NULL after all-NULL inputs");

    for (int r = 0; r < ROUNDS; r++) begin
      for (int c = 0; c < (1 << K); c++) begin
        for (int i = 0; i < K; i++) v[i] = c[i];
        {exp[1], exp[0]} = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);

        shuffle(order);
        for (int k = 0; k < K; k++) begin
          in_v[order[k]] = encode(v[order[k]]);
          #1;
          if (k < K - 1) check(!all_data() && consistent(exp), "partial DATA");
          else           check(out_equals(exp), "complete DATA");
        end

        shuffle(order);
        for (int k = 0; k < K; k++) begin
          in_v[order[k]] = '0;
          #1;
          if (k < K - 1) check(!all_null() && consistent(exp), "partial NULL");
          else           check(all_null(), "complete NULL");
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
