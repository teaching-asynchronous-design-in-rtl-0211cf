// tb_ncl_top: end-to-end testbench of the whole design at its default sizes.
//
// Four processes run at once, each with its own independently computed
// reference:
//   - multiplier: a source sends random signed operand pairs (bits arriving
//     in random order) under the NCL four-phase protocol, and a sink with
//     random and occasionally long pauses checks each 7-bit product against
//     (a*b) mod 2^7;
//   - pipeline: a source sends random 2-bit values and a pausing sink checks
//     that they come out unchanged and in order;
//   - gates: OR, XOR and MUX operands go DATA and back to NULL one input at a
//     time; each result is checked when complete, and checked to be still
//     NULL while an input is missing.
// Mechanisms counted, each required at least once: multiplier with two
// products in flight, multiplier source stalled by the sink, pipeline with
// two values in flight, pipeline source stalled, MUX selecting each input,
// a gate output held back by a missing input (input completeness).
module tb_ncl_top;
  import ncl_pkg::*;

  localparam int NMUL  = 300;
  localparam int NPIPE = 300;
  localparam int NGATE = 200;

  int checks = 0;
  int failures = 0;

  logic       rst;
  logic       mul_ki, mul_ko, pipe_ki, pipe_ko;
  dr_t [3:0]  mul_a, mul_b;
  dr_t [6:0]  mul_x;
  dr_t        or_x, or_y, or_z, xor_x, xor_y, xor_z;
  dr_t        mux_a, mux_b, mux_s, mux_z;
  dr_t [1:0]  pipe_d, pipe_q;

  ncl_top dut (
    .rst(rst),
    .mul_a(mul_a), .mul_b(mul_b), .mul_ko(mul_ko), .mul_x(mul_x), .mul_ki(mul_ki),
    .or_x(or_x), .or_y(or_y), .or_z(or_z),
    .xor_x(xor_x), .xor_y(xor_y), .xor_z(xor_z),
    .mux_a(mux_a), .mux_b(mux_b), .mux_s(mux_s), .mux_z(mux_z),
    .pipe_d(pipe_d), .pipe_ko(pipe_ko), .pipe_q(pipe_q), .pipe_ki(pipe_ki)
  );

  // Mechanism counters
  int mul_overlap = 0, mul_stall = 0, pipe_overlap = 0, pipe_stall = 0;
  int mux_sel_a = 0, mux_sel_b = 0, held_back = 0;
  int done_n = 0;

  initial begin : watchdog
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1'b1;
    mul_a = '0; mul_b = '0; pipe_d = '0;
    or_x = '0; or_y = '0; xor_x = '0; xor_y = '0;
    mux_a = '0; mux_b = '0; mux_s = '0;
    mul_ki = 1'b1; pipe_ki = 1'b1;
    #2 rst = 1'b0;
  end

  // ------------------------------------------------------------ multiplier
  logic [7:0] mul_sent [$];
  int mul_sent_n = 0, mul_recv_n = 0;

  initial begin : mul_source
    logic [7:0] ab;
    int waited;
    #2;
    for (int n = 0; n < NMUL; n++) begin
      ab = 8'($urandom);
      waited = 0;
      while (mul_ko !== 1'b1) begin #1; waited++; end
      if (waited > 20) mul_stall++;
      mul_sent.push_back(ab);
      mul_sent_n++;
      if (mul_sent_n - mul_recv_n >= 2) mul_overlap++;
      for (int i = 0; i < 8; i++) begin
        int k;
        k = int'($urandom_range(7, 0));
        // random order: fill a random still-NULL bit, else the next one
        for (int t = 0; t < 8; t++) begin
          int j;
          j = (k + t) % 8;
          if (j < 4 && is_null(mul_a[j])) begin mul_a[j] = encode(ab[j]); break; end
          if (j >= 4 && is_null(mul_b[j-4])) begin mul_b[j-4] = encode(ab[j]); break; end
        end
        #($urandom_range(1, 0));
      end
      while (mul_ko !== 1'b0) #1;
      #($urandom_range(2, 0));
      mul_a = '0; mul_b = '0;
    end
  end

  initial begin : mul_sink
    logic [7:0] ab;
    logic [6:0] got, exp;
    bit complete;
    #2;
    for (int n = 0; n < NMUL; n++) begin
      do begin
        complete = 1'b1;
        for (int i = 0; i < 7; i++) if (!is_data(mul_x[i])) complete = 1'b0;
        if (!complete) #1;
      end while (!complete);
      ab = mul_sent.pop_front();
      for (int i = 0; i < 7; i++) got[i] = decode(mul_x[i]);
      exp = 7'(int'(signed'(ab[3:0])) * int'(signed'(ab[7:4])));
      check(got == exp, "multiplier product");
      mul_recv_n++;
      if ($urandom_range(9, 0) == 0) #60;
      else #($urandom_range(3, 0));
      mul_ki = 1'b0;
      while (mul_x != '0) #1;
      #($urandom_range(3, 0));
      mul_ki = 1'b1;
    end
    done_n++;
  end

  // -------------------------------------------------------------- pipeline
  logic [1:0] pipe_sent [$];
  int pipe_sent_n = 0, pipe_recv_n = 0;

  initial begin : pipe_source
    logic [1:0] v;
    int waited;
    #2;
    for (int n = 0; n < NPIPE; n++) begin
      v = 2'($urandom);
      waited = 0;
      while (pipe_ko !== 1'b1) begin #1; waited++; end
      if (waited > 20) pipe_stall++;
      #($urandom_range(2, 0));
      pipe_d = {encode(v[1]), encode(v[0])};
      pipe_sent.push_back(v);
      pipe_sent_n++;
      if (pipe_sent_n - pipe_recv_n >= 2) pipe_overlap++;
      while (pipe_ko !== 1'b0) #1;
      #($urandom_range(2, 0));
      pipe_d = '0;
    end
  end

  initial begin : pipe_sink
    logic [1:0] v;
    #2;
    for (int n = 0; n < NPIPE; n++) begin
      while (!(is_data(pipe_q[0]) && is_data(pipe_q[1]))) #1;
      v = pipe_sent.pop_front();
      check({decode(pipe_q[1]), decode(pipe_q[0])} == v, "pipeline value and order");
      pipe_recv_n++;
      if ($urandom_range(9, 0) == 0) #50;
      else #($urandom_range(3, 0));
      pipe_ki = 1'b0;
      while (pipe_q != '0) #1;
      #($urandom_range(3, 0));
      pipe_ki = 1'b1;
    end
    done_n++;
  end

  // ----------------------------------------------------------------- gates
  initial begin : gates
    logic vx, vy, va, vb, vs;
    #3;
    for (int n = 0; n < NGATE; n++) begin
      vx = 1'($urandom); vy = 1'($urandom);
      va = 1'($urandom); vb = 1'($urandom); vs = 1'($urandom);
      // first operand only: outputs must stay NULL
      or_x = encode(vx); xor_x = encode(vx); mux_a = encode(va); mux_s = encode(vs);
      #1;
      check(is_null(or_z) && is_null(xor_z) && is_null(mux_z), "outputs wait for missing inputs");
      if (is_null(or_z) && is_null(xor_z) && is_null(mux_z)) held_back++;
      or_y = encode(vy); xor_y = encode(vy); mux_b = encode(vb);
      #1;
      check(is_data(or_z)  && decode(or_z)  == (vx | vy), "OR result");
      check(is_data(xor_z) && decode(xor_z) == (vx ^ vy), "XOR result");
      check(is_data(mux_z) && decode(mux_z) == (vs ? va : vb), "MUX result");
      if (vs) mux_sel_a++; else mux_sel_b++;
      // partial NULL: results held
      or_x = '0; xor_x = '0; mux_s = '0;
      #1;
      check(is_data(or_z) && is_data(xor_z) && is_data(mux_z), "outputs hold until all inputs NULL");
      or_y = '0; xor_y = '0; mux_a = '0; mux_b = '0;
      #1;
      check(is_null(or_z) && is_null(xor_z) && is_null(mux_z), "outputs NULL");
      #($urandom_range(5, 0));
    end
    done_n++;
  end

  // ---------------------------------------------------------------- finish
  initial begin
    wait (done_n == 3);
    check(mul_overlap  > 0, "multiplier: two products in flight");
    check(mul_stall    > 0, "multiplier: source stalled by sink");
    check(pipe_overlap > 0, "pipeline: two values in flight");
    check(pipe_stall   > 0, "pipeline: source stalled by sink");
    check(mux_sel_a    > 0, "MUX selected a");
    check(mux_sel_b    > 0, "MUX selected b");
    check(held_back    > 0, "gate output held back by a missing input");
    $display("mul_overlap=%0d mul_stall=%0d pipe_overlap=%0d pipe_stall=%0d mux_a=%0d mux_b=%0d held=%0d",
             mul_overlap, mul_stall, pipe_overlap, pipe_stall, mux_sel_a, mux_sel_b, held_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
