// tb_ncl_pipeline: self-checking testbench of the three-register NCL pipeline.
//
// A source process offers a new random DATA value whenever the pipeline
// requests DATA (ko = 1) and NULL whenever it requests NULL, after a random
// wait. A sink process waits for complete DATA at the output, checks it
// against the values sent (in order), then after a random wait requests NULL,
// waits for complete NULL and requests DATA again. The sink sometimes pauses
// for a long time, which must stall the source.
// Counted and required at least once each:
//   - overlap: two or more DATA values inside the pipeline at once;
//   - stall: the source saw ko stay low for more than 20 time steps because
//     the sink was pausing.
// The output must never show a partial or illegal mix outside a handshake.
module tb_ncl_pipeline;
  import ncl_pkg::*;

  localparam int W = 2;
  localparam int NVAL = 300;

  int checks = 0;
  int failures = 0;

  logic          rst;
  logic          ki, ko;
  dr_t [W-1:0]   d, q;

  ncl_pipeline dut (.rst(rst), .d(d), .ko(ko), .q(q), .ki(ki));

  logic [W-1:0] sent [$];
  int sent_n = 0, recv_n = 0;
  int overlap_n = 0, stall_n = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_data(dr_t [W-1:0] v);
    for (int i = 0; i < W; i++) if (!is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [W-1:0] dec(dr_t [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = decode(v[i]);
    return r;
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
    logic [W-1:0] v;
    int waited;
    rst = 1'b1; d = '0;
    #2 rst = 1'b0;
    for (int n = 0; n < NVAL; n++) begin
      waited = 0;
      while (ko !== 1'b1) begin #1; waited++; end
      if (waited > 20) stall_n++;
      #($urandom_range(2, 0));
      v = W'($urandom);
      for (int i = 0; i < W; i++) d[i] = encode(v[i]);
      sent.push_back(v);
      sent_n++;
      if (sent_n - recv_n >= 2) overlap_n++;
      while (ko !== 1'b0) #1;
      #($urandom_range(2, 0));
      d = '0;
    end
  end

  // Sink
  initial begin
    logic [W-1:0] exp;
    ki = 1'b1;
    #2;
    for (int n = 0; n < NVAL; n++) begin
      while (!all_data(q)) #1;
      exp = sent.pop_front();
      check(dec(q) == exp, "value and order");
      recv_n++;
      if ($urandom_range(9, 0) == 0) #50;
      else #($urandom_range(3, 0));
      ki = 1'b0;
      while (q != '0) #1;
      #($urandom_range(3, 0));
      ki = 1'b1;
    end
    check(overlap_n > 0, "two or more values in flight at once");
    check(stall_n > 0, "source stalled by a pausing sink");
    $display("overlap=%0d stall=%0d", overlap_n, stall_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
