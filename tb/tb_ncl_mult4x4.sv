// tb_ncl_mult4x4: self-checking testbench of the two-stage NCL 4x4 multiplier.
//
// A source offers operand pairs under the four-phase NCL protocol (DATA when
// ko = 1, NULL when ko = 0, after random waits), arriving bit by bit in a
// random order so that input completeness is exercised. A sink waits for a
// complete DATA product, checks it, and returns the NULL request after a
// random wait, sometimes a long one. All 256 operand pairs are sent, in a
// random order, followed by random pairs.
// Expected product: the signed product of the two 4-bit two's-complement
// operands, taken modulo 2^7 (so (-8)*(-8) = 64 reads as -64 in 7 bits).
// Also checked:
//   - the product register never shows a partial DATA set to the sink at the
//     moment the sink samples it (sampling happens only on complete DATA);
//   - both pipeline stages are used at once: at least once a second operand
//     pair has been accepted before the previous product was consumed;
//   - a pausing sink stalls the source (ko stays low for a long time).
module tb_ncl_mult4x4;
  import ncl_pkg::*;

  localparam int NRAND = 200;
  localparam int NVAL  = 256 + NRAND;

  int checks = 0;
  int failures = 0;

  logic       rst;
  logic       ki, ko;
  dr_t [3:0]  a, b;
  dr_t [6:0]  x;

  ncl_mult4x4 dut (.rst(rst), .a(a), .b(b), .ko(ko), .x(x), .ki(ki));

  logic [7:0] sent [$];
  int sent_n = 0, recv_n = 0;
  int overlap_n = 0, stall_n = 0;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit x_all_data();
    for (int i = 0; i < 7; i++) if (!is_data(x[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [6:0] x_value();
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = decode(x[i]);
    return r;
  endfunction

  function automatic logic [6:0] ref_product(logic [7:0] ab);
    int sa, sb;
    sa = int'(signed'(ab[3:0]));
    sb = int'(signed'(ab[7:4]));
    return 7'(sa * sb);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Source
  initial begin
    logic [7:0] ab;
    int order [256];
    int perm [8];
    int waited;
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    rst = 1'b1; a = '0; b = '0;
    #2 rst = 1'b0;
    for (int n = 0; n < NVAL; n++) begin
      ab = (n < 256) ? 8'(order[n]) : 8'($urandom);
      waited = 0;
      while (ko !== 1'b1) begin #1; waited++; end
      if (waited > 20) stall_n++;
      sent.push_back(ab);
      sent_n++;
      if (sent_n - recv_n >= 2) overlap_n++;
      // Operand bits arrive one at a time in a random order.
      for (int i = 0; i < 8; i++) perm[i] = i;
      for (int i = 7; i > 0; i--) begin
        int j, t;
        j = int'($urandom_range(i, 0));
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < 8; i++) begin
        if (perm[i] < 4) a[perm[i]]     = encode(ab[perm[i]]);
        else             b[perm[i] - 4] = encode(ab[perm[i]]);
        if (i < 7) begin
          #($urandom_range(1, 0));
          check(ko === 1'b1, "input register waits for all operand bits");
        end
      end
      while (ko !== 1'b0) #1;
      #($urandom_range(2, 0));
      a = '0; b = '0;
    end
  end

  // Sink
  initial begin
    logic [7:0] ab;
    ki = 1'b1;
    #2;
    for (int n = 0; n < NVAL; n++) begin
      while (!x_all_data()) #1;
      ab = sent.pop_front();
      check(x_value() == ref_product(ab), "product");
      if (x_value() != ref_product(ab))
        $display("  a=%0d b=%0d got %b expected %b", signed'(ab[3:0]), signed'(ab[7:4]),
                 x_value(), ref_product(ab));
      recv_n++;
      if ($urandom_range(9, 0) == 0) #60;
      else #($urandom_range(3, 0));
      ki = 1'b0;
      while (x != '0) #1;
      #($urandom_range(3, 0));
      ki = 1'b1;
    end
    check(overlap_n > 0, "both stages busy at once");
    check(stall_n > 0, "source stalled by a pausing sink");
    $display("products=%0d overlap=%0d stall=%0d", recv_n, overlap_n, stall_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
