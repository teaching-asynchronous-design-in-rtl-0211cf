// tb_ncl_th: self-checking testbench of the threshold gate with hysteresis.
//
// Six instances are checked side by side: the default TH23, TH22 (C-element),
// TH33, TH12 (OR), TH23W2 (first input weight 2) and TH34W22 (first two
// inputs weight 2). All are driven by random input vectors, including
// arbitrary non-monotonic changes, and compared after every change with a
// reference model: the output is set when the weighted count of high inputs
// reaches the threshold, cleared when all inputs are low, held otherwise, and
// cleared by reset. Directed checks confirm the hysteresis cases (an output at
// 1 stays 1 while some input is still high; an output at 0 stays 0 below
// threshold).
module tb_ncl_th;

  int checks = 0;
  int failures = 0;

  localparam int G = 6;
  localparam int NI [G] = '{3, 2, 3, 2, 3, 4};
  localparam int MI [G] = '{2, 2, 3, 1, 2, 3};
  localparam int W1 [G] = '{1, 1, 1, 1, 2, 2};
  localparam int W2 [G] = '{1, 1, 1, 1, 1, 2};

  logic       rst;
  logic [3:0] a [G];
  logic       z [G];
  logic       model [G];

  ncl_th                                   u_th23    (.rst(rst), .a(a[0][2:0]), .z(z[0]));
  ncl_th #(.M(2), .N(2))                   u_th22    (.rst(rst), .a(a[1][1:0]), .z(z[1]));
  ncl_th #(.M(3), .N(3))                   u_th33    (.rst(rst), .a(a[2][2:0]), .z(z[2]));
  ncl_th #(.M(1), .N(2))                   u_th12    (.rst(rst), .a(a[3][1:0]), .z(z[3]));
  ncl_th #(.M(2), .N(3), .W1(2))           u_th23w2  (.rst(rst), .a(a[4][2:0]), .z(z[4]));
  ncl_th #(.M(3), .N(4), .W1(2), .W2(2))   u_th34w22 (.rst(rst), .a(a[5][3:0]), .z(z[5]));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wsum(int g, logic [3:0] v);
    int s = 0;
    for (int i = 0; i < NI[g]; i++)
      if (v[i]) s += (i == 0) ? W1[g] : (i == 1) ? W2[g] : 1;
    return s;
  endfunction

  function automatic logic [3:0] mask(int g);
    return 4'((1 << NI[g]) - 1);
  endfunction

  task automatic step_model();
    for (int g = 0; g < G; g++) begin
      if (rst)                                model[g] = 1'b0;
      else if (wsum(g, a[g]) >= MI[g])        model[g] = 1'b1;
      else if ((a[g] & mask(g)) == '0)        model[g] = 1'b0;
    end
  endtask

  task automatic compare(string what);
    for (int g = 0; g < G; g++) begin
      checks++;
      if (z[g] !== model[g]) begin
        failures++;
        $display("FAIL %s gate %0d a=%b z=%b expected %b", what, g, a[g], z[g], model[g]);
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    for (int g = 0; g < G; g++) a[g] = '0;
    #1;
    step_model();
    compare("reset");
    rst = 1'b0;
    #1;
    step_model();
    compare("after reset");

    // Directed: TH23 hysteresis.
    a[0] = 3'b011; #1; step_model(); compare("TH23 reaches 2 of 3");
    a[0] = 3'b001; #1; step_model(); compare("TH23 holds 1 with one input high");
    checks++; if (z[0] !== 1'b1) begin failures++; $display("FAIL TH23 hold 1"); end
    a[0] = 3'b000; #1; step_model(); compare("TH23 clears");
    a[0] = 3'b100; #1; step_model(); compare("TH23 stays 0 below threshold");
    checks++; if (z[0] !== 1'b0) begin failures++; $display("FAIL TH23 hold 0"); end
    // Directed: the weighted input alone reaches the TH23W2 threshold.
    a[4] = 3'b001; #1; step_model(); compare("TH23W2 weight-2 input alone");
    checks++; if (z[4] !== 1'b1) begin failures++; $display("FAIL TH23W2 weight"); end
    a[4] = 3'b000; #1; step_model();

    // Random sequences.
    for (int n = 0; n < 4000; n++) begin
      for (int g = 0; g < G; g++)
        if ($urandom_range(2, 0) == 0) a[g] = 4'($urandom) & mask(g);
      rst = ($urandom_range(99, 0) == 0);
      #1;
      step_model();
      compare("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
